// Self-checking testbench of mod_prefix_tree.
//
// Runs the tree at the default 16-bit width (random operands plus corner
// cases), at 4 bits (all 256 operand pairs) and at 6 bits (a pair count that
// is not a power of two, all 4096 pairs). For each bit position i the carry
// must equal bit i of (a mod 2^i) + (b mod 2^i), and the flag must be 1
// exactly when every bit below i has a != b.
module tb_mod_prefix_tree;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned N16 = flagged_adder_pkg::FA_WIDTH;

  logic [N16-1:0]   a16, b16;
  logic [N16:0]     c16, f16;
  logic [3:0]       a4, b4;
  logic [4:0]       c4, f4;
  logic [5:0]       a6, b6;
  logic [6:0]       c6, f6;

  mod_prefix_tree dut16 (
    .p(a16 ^ b16), .g(a16 & b16), .r(pair_or16(a16, b16)), .c(c16), .f(f16));
  mod_prefix_tree #(.N(4)) dut4 (
    .p(a4 ^ b4), .g(a4 & b4), .r({a4[3] | b4[3], a4[1] | b4[1]}), .c(c4), .f(f4));
  mod_prefix_tree #(.N(6)) dut6 (
    .p(a6 ^ b6), .g(a6 & b6), .r({a6[5] | b6[5], a6[3] | b6[3], a6[1] | b6[1]}),
    .c(c6), .f(f6));

  function automatic logic [N16/2-1:0] pair_or16(logic [N16-1:0] x, logic [N16-1:0] y);
    for (int k = 0; k < N16 / 2; k++) pair_or16[k] = x[2*k+1] | y[2*k+1];
  endfunction

  // Reference carry into bit i and flag of bit i, from integer arithmetic.
  function automatic logic ref_carry(longint unsigned x, longint unsigned y, int i);
    longint unsigned mask;
    mask = (64'd1 << i) - 1;
    return 1'(((x & mask) + (y & mask)) >> i);
  endfunction

  function automatic logic ref_flag(longint unsigned x, longint unsigned y, int i);
    longint unsigned mask;
    mask = (64'd1 << i) - 1;
    return ((x ^ y) & mask) == mask;
  endfunction

  task automatic cmp(string tag, int i, logic got_c, logic got_f,
                     longint unsigned x, longint unsigned y);
    checks += 2;
    if (got_c !== ref_carry(x, y, i) || got_f !== ref_flag(x, y, i)) begin
      failures++;
      $display("%s a=%0h b=%0h bit %0d: c=%b f=%b", tag, x, y, i, got_c, got_f);
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
    a4 = '0; b4 = '0; a6 = '0; b6 = '0;
    for (int n = 0; n < 1004; n++) begin
      case (n)
        0: begin a16 = '1; b16 = '0; end
        1: begin a16 = '1; b16 = 1; end
        2: begin a16 = 16'h7fff; b16 = 16'h0001; end
        3: begin a16 = 16'haaaa; b16 = 16'h5555; end
        default: begin a16 = N16'($urandom); b16 = N16'($urandom); end
      endcase
      #1;
      for (int i = 0; i <= N16; i++) cmp("N=16", i, c16[i], f16[i], 64'(a16), 64'(b16));
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      for (int i = 0; i <= 4; i++) cmp("N=4", i, c4[i], f4[i], 64'(a4), 64'(b4));
    end
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = 12'(v);
      #1;
      for (int i = 0; i <= 6; i++) cmp("N=6", i, c6[i], f6[i], 64'(a6), 64'(b6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
