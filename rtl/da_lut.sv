// da_lut: one look-up table of an (irregular) distributed-arithmetic convolver.
//
// Each of the ADDR_W address lines carries one bit of one input sample. In a
// regular DA convolver all lines of a LUT carry bits of the same significance
// of different samples; in the irregular form used here a LUT may also mix
// bits of different significance, so each line k simply has its own signed
// weight WEIGHT[k] (coefficient times a power of two, negated for the sign
// bit of a two's complement input). Entry a of the table holds
//   sum over k of a[k] * WEIGHT[k],
// the partial product of all lines at once. The contents are computed at
// elaboration from the weights, so the same module serves every LUT of the
// convolver. DATA_W must hold every subset sum (idac_pkg::weights_width
// gives the smallest width). When no weight is negative the output is an
// unsigned number, otherwise two's complement; the caller extends it
// accordingly (idac_pkg::weights_signed tells which).
//
// Interface: addr in, data out. OUT_REG = 0: the table is
// combinational (a 2^ADDR_W x DATA_W ROM, i.e. DATA_W 16x1 LUTs for
// ADDR_W = 4). OUT_REG = 1: a register follows the table, one clock of
// latency, reset to zero by the asynchronous active-low rst_n.
// The line weighting follows the source design; computing the table from the
// weights and the single word-wide table (no per-bit width reductions) are
// this design's choices.
module da_lut #(
  parameter int ADDR_W           = 4,
  parameter int WEIGHT [ADDR_W]  = '{9, -7, 59, 183},
  parameter int DATA_W           = 9,
  parameter bit OUT_REG          = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        addr,
  output logic        [DATA_W-1:0] data
);

  localparam int DEPTH = 1 << ADDR_W;
  typedef logic [DATA_W-1:0] word_t;
  typedef word_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < DEPTH; a++) begin
      int acc = 0;
      for (int k = 0; k < ADDR_W; k++)
        if (a[k]) acc += WEIGHT[k];
      t[a] = DATA_W'(acc);
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  // Range of the entries, to check at elaboration that DATA_W holds them.
  function automatic bit fits();
    int lo = 0, hi = 0;
    for (int k = 0; k < ADDR_W; k++)
      if (WEIGHT[k] < 0) lo += WEIGHT[k]; else hi += WEIGHT[k];
    if (lo == 0) return hi <= (1 << DATA_W) - 1;
    return hi <= (1 << (DATA_W - 1)) - 1 && lo >= -(1 << (DATA_W - 1));
  endfunction

  if (!fits()) begin : g_range_error
    $error("da_lut: DATA_W = %0d cannot hold the table's range", DATA_W);
  end

  word_t rd;
  assign rd = ROM[addr];

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) data <= '0;
      else        data <= rd;
    end
  end else begin : g_comb
    assign data = rd;
  end

endmodule
