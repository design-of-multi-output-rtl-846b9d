// Self-checking testbench of flag_inv_cell at the default 16-bit width.
//
// For random p, c, f and all four incr/comp settings it rebuilds each sum bit
// from the two selection tables of the cell: the propagate used is p when
// comp = 0 and its inverse when comp = 1; the carry used is c except for
// flag = 1 with incr = 1, where it is forced to 1.
module tb_flag_inv_cell;

  localparam int unsigned N = flagged_adder_pkg::FA_WIDTH;

  logic [N-1:0] p, c, f, s;
  logic         incr, comp;
  int checks   = 0;
  int failures = 0;

  flag_inv_cell dut (.p(p), .c(c), .f(f), .incr(incr), .comp(comp), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      p = N'($urandom);
      c = N'($urandom);
      f = N'($urandom);
      for (int m = 0; m < 4; m++) begin
        {comp, incr} = 2'(m);
        #1;
        for (int i = 0; i < N; i++) begin
          logic prop_t, carry_t;
          prop_t  = comp ? !p[i] : p[i];
          carry_t = (f[i] && incr) ? 1'b1 : c[i];
          checks++;
          if (s[i] !== (prop_t != carry_t)) begin
            failures++;
            $display("bit %0d p=%b c=%b f=%b incr=%b comp=%b s=%b",
                     i, p[i], c[i], f[i], incr, comp, s[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
