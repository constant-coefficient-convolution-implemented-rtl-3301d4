// tap_delay_line: the z^-1 chain of a direct-form FIR filter.
//
// Every clock the new sample x_in enters the chain and each stored sample
// moves one place on. taps[0] is x_in itself (no register), taps[k] for
// k = 1..DEPTH is the sample presented k clocks earlier, so the filter reads
// x(i), x(i-1), ..., x(i-DEPTH) in the same cycle. DEPTH*W flip-flops.
//
// Interface: clk, asynchronous active-low rst_n (clears every tap to zero so
// the filter starts from a zero history), x_in, taps. One sample per clock,
// no enable. The chain is what the z^-k terms of the filter ask for; the
// reset and the free-running shift are choices of this design.
module tap_delay_line #(
  parameter int W     = 4,
  parameter int DEPTH = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x_in,
  output logic [W-1:0] taps [DEPTH+1]
);

  logic [W-1:0] regs [1:DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= DEPTH; k++) regs[k] <= '0;
    end else begin
      regs[1] <= x_in;
      for (int k = 2; k <= DEPTH; k++) regs[k] <= regs[k-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k <= DEPTH; k++) taps[k] = regs[k];
  end

endmodule
