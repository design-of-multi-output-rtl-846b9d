// Image workload on flagged_adder_top at its default 16-bit width.
//
// Superimposes two generated 8-bit greyscale images, I3(i,j) = I1(i,j) +
// I2(i,j) + C with C = 1, the constant the adder adds for free through its
// increment control, and then the plain sum I1 + I2 of the same images.
// Pixels are zero-extended to the adder width and streamed one per clock;
// each registered result is compared with the reference one cycle later,
// and the pass must take exactly one cycle per pixel plus one cycle of
// latency. The images are a horizontal ramp and a pseudo-random texture.
module tb_image_add;

  localparam int unsigned N = flagged_adder_pkg::FA_WIDTH;
  localparam int W = 64;
  localparam int H = 64;

  logic         clk;
  logic         rst_n;
  logic [N-1:0] a, b;
  logic         sub, incr, comp;
  logic [N-1:0] s_reg;
  logic         cout_reg;
  logic [7:0]   img1 [H][W];
  logic [7:0]   img2 [H][W];

  int checks   = 0;
  int failures = 0;

  flagged_adder_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sub(sub), .incr(incr), .comp(comp),
    .s_reg(s_reg), .cout_reg(cout_reg));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * W * H + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pass over the image: pixel k enters at cycle k, leaves at k+1.
  task automatic image_pass(logic constant_one);
    logic [N-1:0] expected;
    int           cycles;
    logic         have_prev;
    have_prev   = 1'b0;
    expected    = '0;
    cycles      = 0;
    incr = constant_one;
    for (int k = 0; k <= W * H; k++) begin
      @(negedge clk);
      if (have_prev) begin
        checks++;
        if (s_reg !== expected || cout_reg !== 1'b0) begin
          failures++;
          $display("pixel %0d: got %0d expected %0d", k - 1, s_reg, expected);
        end
      end
      if (k < W * H) begin
        a = N'(img1[k / W][k % W]);
        b = N'(img2[k / W][k % W]);
        expected  = N'(img1[k / W][k % W]) + N'(img2[k / W][k % W]) + N'(constant_one);
        have_prev = 1'b1;
      end
      cycles++;
    end
    checks++;
    if (cycles != W * H + 1) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", cycles, W * H + 1);
    end
    $display("image pass with C=%0d: %0d pixels in %0d cycles", constant_one, W * H, cycles);
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img1[y][x] = 8'((x * 255) / (W - 1));
        img2[y][x] = 8'($urandom);
      end
    a = '0; b = '0; sub = 1'b0; incr = 1'b0; comp = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    image_pass(1'b1);
    image_pass(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
