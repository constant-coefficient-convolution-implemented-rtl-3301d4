// idac_convolver: 8-tap constant-coefficient FIR filter built as an Irregular
// Distributed Arithmetic Convolver (IDAC).
//
//   y(i) = 59 x(i) + 183 x(i-1) + 162 x(i-2) - 7 x(i-3) - 48 x(i-4)
//          + 12 x(i-5) + 9 x(i-6) + 2 x(i-7)
//
// x is a 4-bit unsigned sample, one per clock; y is 14-bit two's complement
// (its range is -825..6405). There are no multipliers. The datapath is:
//   1. tap_delay_line: x(i) .. x(i-7).
//   2. sco_preadder: the taps with the similar coefficients -48 and 12 are
//      merged into D8 = x(i-5) - 4 x(i-4), to be multiplied by 3 << 2.
//   3. seven da_lut instances (LUTs 9..15): every bit of the DA inputs
//      D0, D1, D2 (= x(i-2), coefficient 81 << 1), D3, D6 and D8 drives one
//      address line of one LUT, following the assignment in idac_pkg. A LUT
//      may combine bits of different significance; it outputs the sum of its
//      active lines' weights, as an unsigned number when none of its weights
//      is negative (LUTs 12 and 14) and in two's complement otherwise.
//   4. adder_tree: the LUT outputs, each shifted left by its base
//      significance, plus the direct input D7 = x(i-7) << 1 (its coefficient
//      2 is a power of two and needs no LUT) are summed.
//
// PIPELINED = 0 is the unpipelined build: y_out is combinational from x_in
// and the seven delay taps (28 flip-flops in all), latency 0.
// PIPELINED = 1 puts a register after the pre-adder, after every LUT and
// after every adder level. Instead of adding alignment registers, the inputs
// are fed from other points of the delay line: the registered pre-adder
// reads x(i-4) and x(i-3) so that its output already equals D8 of the next
// sample, and D7 is taken from an eighth tap, x(i-8), to line up with the
// registered LUT outputs. y_out then shows y(i) LATENCY = 4 clock edges
// after the edge that first samples x(i) (that edge counted as the first).
//
// Interface: clk, asynchronous active-low rst_n (all registers to zero, so
// the filter starts from a zero history), x_in, y_out.
// Follows the source design: the filter, the grouping, the LUT assignment,
// the direct input D7, the two pipelining options and the relocation of
// feeding points. This design's own choices: unsigned 4-bit samples, the
// reset, the balanced adder tree and where exactly the registers sit.
module idac_convolver
  import idac_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_in,
  output y_t      y_out
);

  localparam int DEPTH   = PIPELINED ? N_TAPS : N_TAPS - 1;
  localparam int LATENCY = PIPELINED ? 4 : 0;
  localparam int N_OP    = N_LUT + 1;   // LUT outputs plus the direct input

  if (!assignment_complete()) begin : g_map_error
    $error("idac_convolver: LUT_MAP must use every DA input bit exactly once");
  end

  // ---- 1. delay line ----
  sample_t taps [DEPTH+1];

  tap_delay_line #(.W(X_W), .DEPTH(DEPTH)) u_taps (
    .clk, .rst_n, .x_in, .taps
  );

  // ---- 2. similar-coefficient pre-adder: D8 = x(i-5) - 4 x(i-4) ----
  logic signed [D8_W-1:0] d8;

  sco_preadder #(
    .A_W(X_W), .B_W(X_W), .B_SHIFT(2), .SUBTRACT(1'b1),
    .OUT_W(D8_W), .OUT_REG(PIPELINED)
  ) u_sco (
    .clk, .rst_n,
    .a (PIPELINED ? taps[4] : taps[5]),
    .b (PIPELINED ? taps[3] : taps[4]),
    .y (d8)
  );

  // DA inputs, zero-extended to the widest (D8); indexed by din_e.
  logic [D8_W-1:0] din [N_DIN];

  always_comb begin
    din[D0] = D8_W'(taps[0]);
    din[D1] = D8_W'(taps[1]);
    din[D2] = D8_W'(taps[2]);
    din[D3] = D8_W'(taps[3]);
    din[D6] = D8_W'(taps[6]);
    din[D7] = D8_W'(taps[7]);   // goes to the adder tree, not to a LUT
    din[D8] = d8;
  end

  // ---- 3. IDA-LUTs ----
  y_t op [N_OP];

  for (genvar l = 0; l < N_LUT; l++) begin : g_lut
    localparam int DW   = lut_dw(l);
    localparam int BASE = lut_base(l);
    localparam bit SGN  = lut_signed(l);
    logic [LUT_AW-1:0] addr;
    logic [DW-1:0]     data;

    always_comb begin
      for (int k = 0; k < LUT_AW; k++)
        addr[k] = (LUT_MAP[l][k].src == D_NONE) ? 1'b0
                : din[int'(LUT_MAP[l][k].src)][LUT_MAP[l][k].bit_];
    end

    da_lut #(
      .ADDR_W(LUT_AW), .WEIGHT(lut_weights(l)), .DATA_W(DW), .OUT_REG(PIPELINED)
    ) u_lut (
      .clk, .rst_n, .addr, .data
    );

    // extend (sign or zero, as the LUT's range requires), then align
    if (SGN) begin : g_sext
      assign op[l] = Y_W'(signed'(data)) <<< BASE;
    end else begin : g_zext
      assign op[l] = Y_W'(data) << BASE;
    end
  end

  // ---- 4. direct input D7 and adder tree ----
  if (PIPELINED) begin : g_direct_late
    assign op[N_LUT] = Y_W'(taps[N_TAPS]) << DIN_SHIFT[D7];
  end else begin : g_direct
    assign op[N_LUT] = Y_W'(taps[N_TAPS-1]) << DIN_SHIFT[D7];
  end

  adder_tree #(.N_IN(N_OP), .W(Y_W), .PIPELINED(PIPELINED)) u_tree (
    .clk, .rst_n, .op, .sum(y_out)
  );

endmodule
