// sco_preadder: pre-adder of the similar-coefficient optimisation.
//
// Two filter taps whose coefficients are shifted and/or negated copies of one
// another share one multiplication: their samples are first aligned by a
// shift and added or subtracted, and the result is multiplied once. Here
//   y = a + (b << B_SHIFT)   (SUBTRACT = 0)
//   y = a - (b << B_SHIFT)   (SUBTRACT = 1)
// with a and b unsigned and y two's complement of OUT_W bits. The defaults
// give the grouped input D8 = x(i-5) - 4 x(i-4) of the example filter,
// because -48 z^-4 + 12 z^-5 = 12 (z^-5 - 4 z^-4); D8 spans -60..15 and
// needs 7 bits.
//
// Interface: clk and asynchronous active-low rst_n are used only when
// OUT_REG = 1, which puts one register on y (latency one clock); with
// OUT_REG = 0 the block is combinational. The grouping follows the source
// design; the output register is this design's way of pipelining it.
module sco_preadder #(
  parameter int A_W      = 4,
  parameter int B_W      = 4,
  parameter int B_SHIFT  = 2,
  parameter bit SUBTRACT = 1'b1,
  parameter int OUT_W    = 7,
  parameter bit OUT_REG  = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [A_W-1:0]          a,
  input  logic [B_W-1:0]          b,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] a_ext, b_sh, sum;

  always_comb begin
    a_ext = OUT_W'(signed'({1'b0, a}));
    b_sh  = OUT_W'(signed'({1'b0, b})) <<< B_SHIFT;
    sum   = SUBTRACT ? a_ext - b_sh : a_ext + b_sh;
  end

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) y <= '0;
      else        y <= sum;
    end
  end else begin : g_comb
    assign y = sum;
  end

endmodule
