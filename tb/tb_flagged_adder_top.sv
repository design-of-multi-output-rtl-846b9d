// End-to-end testbench of flagged_adder_top at its default 16-bit width.
//
// After checking that reset clears the output registers, it issues one
// operation per clock with random operands and random {sub, comp, incr}
// (plus directed corner operands), and checks every registered result one
// cycle after the operands were applied, against integer arithmetic:
//   sub=0: A+B, A+B+1, -(A+B+1), -(A+B+2)
//   sub=1: A-B-1, A-B, B-A, B-A-1          (selected by {comp,incr})
// It also checks that outputs do not change before the clock edge (one
// cycle latency) and counts how often each mechanism occurred: each of the
// eight operations, a carry out, and an increment that flips more than one
// bit through the flags. A mechanism never seen counts as a failure.
module tb_flagged_adder_top;

  localparam int unsigned N = flagged_adder_pkg::FA_WIDTH;
  localparam int          OPS = 20000;

  logic         clk;
  logic         rst_n;
  logic [N-1:0] a, b;
  logic         sub, incr, comp;
  logic [N-1:0] s_reg;
  logic         cout_reg;

  int checks   = 0;
  int failures = 0;
  int seen_op [8];
  int seen_cout = 0;
  int seen_flag_ripple = 0;

  flagged_adder_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sub(sub), .incr(incr), .comp(comp),
    .s_reg(s_reg), .cout_reg(cout_reg));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (OPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: result and carry out of one operation.
  function automatic logic [N:0] model(logic [N-1:0] x, logic [N-1:0] y,
                                       logic sb, logic cp, logic ic);
    logic [N:0] sum;
    logic [N-1:0] yy;
    yy  = sb ? ~y : y;
    sum = {1'b0, x} + {1'b0, yy} + (N+1)'(ic);
    return {sum[N], cp ? ~sum[N-1:0] : sum[N-1:0]};
  endfunction

  // The same results written as the signed formulas of the operation table.
  function automatic logic [N-1:0] formula(logic [N-1:0] x, logic [N-1:0] y, int op);
    case (op)
      0: return x + y;
      1: return x + y + 1'b1;
      2: return -(x + y + 1'b1);
      3: return -(x + y + N'(2));
      4: return x - y - 1'b1;
      5: return x - y;
      6: return y - x;
      default: return y - x - 1'b1;
    endcase
  endfunction

  initial begin
    logic [N:0] expect_v;
    logic [N-1:0] expect_f;
    logic [N-1:0] held;
    a = '0; b = '0; sub = 0; incr = 0; comp = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (s_reg !== '0 || cout_reg !== 1'b0) begin
      failures++;
      $display("reset did not clear outputs");
    end
    rst_n = 1'b1;
    for (int n = 0; n < OPS; n++) begin
      int op;
      @(negedge clk);
      case (n)
        0: begin a = '1; b = 16'h0000; end
        1: begin a = 16'h00ff; b = 16'h0000; end
        2: begin a = '1; b = '1; end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      op = (n < 24) ? n % 8 : int'($urandom_range(0, 7));
      {sub, comp, incr} = 3'(op);
      expect_v = model(a, b, sub, comp, incr);
      expect_f = formula(a, b, op);
      // Flags at work: the increment changes more than the lowest bit.
      if (incr && ($countones(model(a, b, sub, 1'b0, 1'b1) ^ model(a, b, sub, 1'b0, 1'b0)) > 1))
        seen_flag_ripple++;
      held = s_reg;
      #4;                                  // still before the edge
      checks++;
      if (s_reg !== held) begin
        failures++;
        $display("output changed before the clock edge");
      end
      @(posedge clk);
      #1;
      checks += 3;
      if (s_reg !== expect_v[N-1:0]) begin
        failures++;
        $display("op %0d a=%h b=%h s=%h expected %h", op, a, b, s_reg, expect_v[N-1:0]);
      end
      if (s_reg !== expect_f) begin
        failures++;
        $display("op %0d a=%h b=%h s=%h formula %h", op, a, b, s_reg, expect_f);
      end
      if (cout_reg !== expect_v[N]) begin
        failures++;
        $display("op %0d a=%h b=%h cout=%b expected %b", op, a, b, cout_reg, expect_v[N]);
      end
      seen_op[op]++;
      if (cout_reg) seen_cout++;
    end
    for (int op = 0; op < 8; op++) begin
      $display("operation %0d seen %0d times", op, seen_op[op]);
      checks++;
      if (seen_op[op] == 0) failures++;
    end
    $display("carry out seen %0d times, flag ripple seen %0d times", seen_cout, seen_flag_ripple);
    checks += 2;
    if (seen_cout == 0) failures++;
    if (seen_flag_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
