// Self-checking testbench of flagged_adder.
//
// Checks the four selectable results against integer arithmetic:
//   {comp,incr} = 00 A+B, 01 A+B+1, 10 -(A+B+1), 11 -(A+B+2), modulo 2^N,
// and cout against the carry out of A+B+incr. The default 16-bit adder gets
// corner and random operands; a 4-bit adder is run exhaustively and on the
// worked example A = 7, B = 5, whose four results are 1100, 1101, 0011
// and 0010. Complemented B operands check the subtraction results
// A-B-1, A-B, B-A and B-A-1.
module tb_flagged_adder;
  import flagged_adder_pkg::*;

  localparam int unsigned N = FA_WIDTH;

  logic [N-1:0] a, b, s;
  logic         incr, comp, cout;
  logic [3:0]   a4, b4, s4;
  logic         cout4;
  fa_mode_e     mode;
  int checks   = 0;
  int failures = 0;

  assign {comp, incr} = mode;

  flagged_adder dut (.a(a), .b(b), .incr(incr), .comp(comp), .s(s), .cout(cout));
  flagged_adder #(.N(4)) dut4 (.a(a4), .b(b4), .incr(incr), .comp(comp), .s(s4), .cout(cout4));

  function automatic longint ref_result(longint x, longint y, fa_mode_e m);
    case (m)
      FA_SUM:      return x + y;
      FA_SUM_INC:  return x + y + 1;
      FA_NEG_INC:  return -(x + y + 1);
      default:     return -(x + y + 2);
    endcase
  endfunction

  task automatic check16();
    longint e, ec;
    #1;
    e  = ref_result(longint'(a), longint'(b), mode);
    ec = (longint'(a) + longint'(b) + longint'(incr)) >>> N;
    checks += 2;
    if (s !== N'(e)) begin
      failures++;
      $display("N=16 %s a=%h b=%h s=%h expected %h", mode.name(), a, b, s, N'(e));
    end
    if (cout !== ec[0]) begin
      failures++;
      $display("N=16 %s a=%h b=%h cout=%b", mode.name(), a, b, cout);
    end
  endtask

  task automatic check4();
    longint e;
    #1;
    e = ref_result(longint'(a4), longint'(b4), mode);
    checks += 2;
    if (s4 !== 4'(e)) begin
      failures++;
      $display("N=4 %s a=%h b=%h s=%h expected %h", mode.name(), a4, b4, s4, 4'(e));
    end
    if (cout4 !== 1'((longint'(a4) + longint'(b4) + longint'(incr)) >> 4)) begin
      failures++;
      $display("N=4 %s a=%h b=%h cout=%b", mode.name(), a4, b4, cout4);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] example [4];
    example = '{4'b1100, 4'b1101, 4'b0011, 4'b0010};
    a = '0; b = '0;
    // Worked 4-bit example.
    a4 = 4'd7; b4 = 4'd5;
    for (int m = 0; m < 4; m++) begin
      mode = fa_mode_e'(m);
      #1;
      checks++;
      if (s4 !== example[m]) begin
        failures++;
        $display("example %s: s=%b expected %b", mode.name(), s4, example[m]);
      end
    end
    // Exhaustive 4-bit, all modes.
    for (int v = 0; v < 1024; v++) begin
      {mode, a4, b4} = 10'(v);
      check4();
    end
    // Subtraction through a complemented B: A-B-1, A-B, B-A, B-A-1.
    for (int n = 0; n < 400; n++) begin
      logic [N-1:0] bb;
      logic [N-1:0] esub [4];
      a  = N'($urandom);
      bb = N'($urandom);
      b  = ~bb;
      esub = '{a - bb - 1'b1, a - bb, bb - a, bb - a - 1'b1};
      for (int m = 0; m < 4; m++) begin
        mode = fa_mode_e'(m);
        #1;
        checks++;
        if (s !== esub[m]) begin
          failures++;
          $display("sub %s a=%h b=%h s=%h expected %h", mode.name(), a, bb, s, esub[m]);
        end
      end
    end
    // 16-bit corners and random operands.
    for (int n = 0; n < 4000; n++) begin
      case (n % 1000)
        0: begin a = '1; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = 16'h8000; b = 16'h7fff; end
        3: begin a = '0; b = '0; end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      mode = fa_mode_e'(n % 4);
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
