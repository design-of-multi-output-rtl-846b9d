// Self-checking testbench of mod_preproc at the default 16-bit width.
//
// Applies directed corner operands and random ones and checks, bit by bit,
// p = a xor b, g = a and b, and r[k] = a[2k+1] or b[2k+1], each worked out
// in the testbench one bit at a time.
module tb_mod_preproc;

  localparam int unsigned N = flagged_adder_pkg::FA_WIDTH;

  logic [N-1:0]   a, b, p, g;
  logic [N/2-1:0] r;
  int checks   = 0;
  int failures = 0;

  mod_preproc dut (.a(a), .b(b), .p(p), .g(g), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    for (int i = 0; i < N; i++) begin
      logic ep, eg;
      ep = (a[i] != b[i]);
      eg = (a[i] == 1'b1) && (b[i] == 1'b1);
      checks++;
      if (p[i] !== ep || g[i] !== eg) begin
        failures++;
        $display("bit %0d: a=%h b=%h p=%b g=%b", i, a, b, p[i], g[i]);
      end
    end
    for (int k = 0; k < N / 2; k++) begin
      checks++;
      if (r[k] !== ((a[2*k+1] == 1'b1) || (b[2*k+1] == 1'b1))) begin
        failures++;
        $display("pair %0d: a=%h b=%h r=%b", k, a, b, r[k]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check_one();
    a = '1; b = '0; check_one();
    a = '0; b = '1; check_one();
    a = '1; b = '1; check_one();
    for (int n = 0; n < 500; n++) begin
      a = N'($urandom);
      b = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
