// Self-checking testbench of pair_carry.
//
// Walks all sixteen combinations of two operand bit pairs {a1,a0},{b1,b0},
// forms g = a&b and r = a|b as the preprocessing stage would, and compares
// the pair carry with the published truth table of the pair carry (carry is
// 1 for a1a0b1b0 = 0111, 1010, 1011, 1101, 1110, 1111) and with the carry of
// the two-bit integer sum {a1,a0} + {b1,b0}.
module tb_pair_carry;

  logic g_hi, r_hi, g_lo, c;
  int   checks   = 0;
  int   failures = 0;

  // Expected carry, indexed by {a1,a0,b1,b0}.
  localparam logic [15:0] CARRY_TABLE = 16'b1110_1100_1000_0000;

  pair_carry dut (.g_hi(g_hi), .r_hi(r_hi), .g_lo(g_lo), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] a2, b2;
      logic [2:0] sum;  // bit 2 is the carry
      a2   = v[3:2];
      b2   = v[1:0];
      g_hi = a2[1] & b2[1];
      r_hi = a2[1] | b2[1];
      g_lo = a2[0] & b2[0];
      #1;
      sum = {1'b0, a2} + {1'b0, b2};
      checks++;
      if (c !== CARRY_TABLE[v]) begin
        failures++;
        $display("table mismatch a=%b b=%b carry=%b expected=%b", a2, b2, c, CARRY_TABLE[v]);
      end
      checks++;
      if ({c, a2 + b2} !== sum) begin
        failures++;
        $display("sum mismatch a=%b b=%b carry=%b expected=%b", a2, b2, c, sum[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
