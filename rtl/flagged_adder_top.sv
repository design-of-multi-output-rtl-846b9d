// Top level: 16-bit modified flagged binary adder with registered outputs.
//
// The operands go straight into the combinational flagged adder; its result
// and carry out are captured in the output registers s_reg and cout_reg on
// the rising clock edge, so a result appears one cycle after its operands
// and controls are applied, one new operation per cycle.
//
// Controls (sampled with the operands):
//   sub  : complement B ahead of the adder, selecting the subtraction results
//   incr : add one more unit
//   comp : complement the result
//   {sub,comp,incr} = 000 A+B      001 A+B+1      010 -(A+B+1)  011 -(A+B+2)
//                     100 A-B-1    101 A-B        110 B-A       111 B-A-1
// cout_reg is the carry out of A+B'+incr, with B' = B or ~B.
// The output registers, named s_reg and cout_reg, follow the 16-bit
// implementation; the sub input (an inverter row on B), the asynchronous
// active-low reset and the carry-out definition are this design's choices.
module flagged_adder_top #(
  parameter int unsigned N = flagged_adder_pkg::FA_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  input  logic         incr,
  input  logic         comp,
  output logic [N-1:0] s_reg,
  output logic         cout_reg
);

  logic [N-1:0] b_op;
  logic [N-1:0] s;
  logic         cout;

  assign b_op = b ^ {N{sub}};

  flagged_adder #(.N(N)) u_adder (
    .a    (a),
    .b    (b_op),
    .incr (incr),
    .comp (comp),
    .s    (s),
    .cout (cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_reg    <= '0;
      cout_reg <= 1'b0;
    end else begin
      s_reg    <= s;
      cout_reg <= cout;
    end
  end

endmodule
