// idac_pkg: constants and constant functions of the example Irregular
// Distributed Arithmetic Convolver (IDAC).
//
// The filter is the 8-tap constant-coefficient FIR
//   H(z) = 59 + 183 z^-1 + 162 z^-2 - 7 z^-3 - 48 z^-4 + 12 z^-5 + 9 z^-6 + 2 z^-7
// on 4-bit unsigned samples. Before the distributed-arithmetic (DA) mapping
// the coefficients are rewritten:
//   * similar coefficients are grouped: -48 z^-4 + 12 z^-5 = 12 * (z^-5 - 4 z^-4),
//     so the pre-adder input D8 = x(i-5) - 4 x(i-4) is multiplied by 3 with a
//     shift of 2 (12 = 3 << 2);
//   * every coefficient is shifted right until it is odd, and the shift is
//     added to the significance of the input bits (162 -> 81 << 1, 2 -> 1 << 1).
// This leaves seven DA inputs (D0, D1, D2, D3, D6, D7, D8). D7 has the
// coefficient 1 and goes straight into the adder tree. The bits of the other
// six are spread over seven 4-address-line IDA-LUTs (numbered 9..15 to match
// the block diagram this design follows). Unlike a regular DA convolver, a LUT
// may mix bits of different significance and of different inputs.
//
// A line of a LUT carries one input bit. Its weight inside the LUT is
//   coef(src) * 2^(significance - base(lut)), negated for the sign bit of a
//   two's complement input (D8),
// where base(lut) is the lowest significance of its lines. The LUT's output
// is shifted left by base(lut) in the adder tree.
//
// The coefficients, the grouping and the bit-to-LUT assignment follow the
// source design. The 4-bit unsigned sample format is read from its bit
// assignment; the output widths are derived here from the value ranges.
package idac_pkg;

  // ---- sample format and filter ----
  localparam int X_W    = 4;   // sample width, unsigned
  localparam int N_TAPS = 8;   // filter length
  localparam int H [N_TAPS] = '{59, 183, 162, -7, -48, 12, 9, 2};

  // ---- DA inputs after grouping and odd-shifting ----
  typedef enum int {D0 = 0, D1, D2, D3, D6, D7, D8, D_NONE} din_e;
  localparam int N_DIN = 7;
  //                              D0   D1   D2  D3  D6  D7  D8
  localparam int DIN_COEF  [N_DIN] = '{59, 183, 81, -7,  9,  1,  3};
  localparam int DIN_SHIFT [N_DIN] = '{ 0,   0,  1,  0,  0,  1,  2};
  localparam int DIN_W     [N_DIN] = '{ 4,   4,  4,  4,  4,  4,  7};
  localparam bit DIN_SIGN  [N_DIN] = '{ 0,   0,  0,  0,  0,  0,  1};
  localparam int D8_W = 7;     // x(i-5) - 4 x(i-4) spans -60..15

  // ---- IDA-LUT address-line assignment (LUTs 9..15) ----
  localparam int N_LUT  = 7;
  localparam int LUT_AW = 4;
  typedef struct packed {
    din_e src;   // DA input the line reads, D_NONE if unused
    int   bit_;  // bit index within that input's own value
  } line_t;
  localparam line_t LUT_MAP [N_LUT][LUT_AW] = '{
    '{'{D6,0}, '{D3,0}, '{D0,0}, '{D1,0}},          // LUT  9
    '{'{D6,1}, '{D3,1}, '{D0,1}, '{D2,0}},          // LUT 10
    '{'{D1,1}, '{D8,0}, '{D6,2}, '{D3,2}},          // LUT 11
    '{'{D0,2}, '{D2,1}, '{D1,2}, '{D8,1}},          // LUT 12
    '{'{D6,3}, '{D3,3}, '{D0,3}, '{D2,2}},          // LUT 13
    '{'{D1,3}, '{D8,2}, '{D2,3}, '{D8,3}},          // LUT 14
    '{'{D8,4}, '{D8,5}, '{D8,6}, '{D_NONE,0}}       // LUT 15
  };

  // ---- output of the whole filter ----
  localparam int Y_W = 14;     // y spans -825..6405

  // Significance of one line: bit index plus the coefficient's shift.
  function automatic int line_sig(int l, int k);
    line_t ln = LUT_MAP[l][k];
    return ln.bit_ + DIN_SHIFT[int'(ln.src)];
  endfunction

  // Lowest significance among the used lines of LUT l.
  function automatic int lut_base(int l);
    int b = 1 << 20;
    for (int k = 0; k < LUT_AW; k++)
      if (LUT_MAP[l][k].src != D_NONE && line_sig(l, k) < b) b = line_sig(l, k);
    return b;
  endfunction

  // Weight of address line k of LUT l, relative to the LUT's base.
  function automatic int lut_weight(int l, int k);
    line_t ln = LUT_MAP[l][k];
    int    w;
    if (ln.src == D_NONE) return 0;
    w = DIN_COEF[int'(ln.src)] << (line_sig(l, k) - lut_base(l));
    if (DIN_SIGN[int'(ln.src)] && ln.bit_ == DIN_W[int'(ln.src)] - 1) w = -w;
    return w;
  endfunction

  // All four weights of LUT l, in the form the da_lut parameter takes.
  typedef int weights_t [LUT_AW];
  function automatic weights_t lut_weights(int l);
    weights_t w;
    for (int k = 0; k < LUT_AW; k++) w[k] = lut_weight(l, k);
    return w;
  endfunction

  // A LUT whose weights are all non-negative has an unsigned output;
  // otherwise its output is two's complement.
  function automatic bit weights_signed(weights_t w, int n);
    for (int k = 0; k < n; k++) if (w[k] < 0) return 1'b1;
    return 1'b0;
  endfunction

  // Smallest width holding every sum of a subset of w: unsigned when no
  // weight is negative, two's complement otherwise.
  function automatic int weights_width(weights_t w, int n);
    int lo = 0, hi = 0, width = 1;
    for (int k = 0; k < n; k++)
      if (w[k] < 0) lo += w[k]; else hi += w[k];
    if (lo == 0) begin
      while (hi > (1 << width) - 1) width++;
    end else begin
      while (hi > (1 << (width - 1)) - 1 || lo < -(1 << (width - 1))) width++;
    end
    return width;
  endfunction

  function automatic bit lut_signed(int l);
    return weights_signed(lut_weights(l), LUT_AW);
  endfunction

  function automatic int lut_dw(int l);
    return weights_width(lut_weights(l), LUT_AW);
  endfunction

  // True when every bit of every DA input except the direct one (D7) drives
  // exactly one LUT line, i.e. the assignment loses and repeats nothing.
  function automatic bit assignment_complete();
    for (int d = 0; d < N_DIN; d++) begin
      if (d == int'(D7)) continue;
      for (int b = 0; b < DIN_W[d]; b++) begin
        int uses = 0;
        for (int l = 0; l < N_LUT; l++)
          for (int k = 0; k < LUT_AW; k++)
            if (int'(LUT_MAP[l][k].src) == d && LUT_MAP[l][k].bit_ == b) uses++;
        if (uses != 1) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  typedef logic [X_W-1:0] sample_t;
  typedef logic signed [Y_W-1:0] y_t;

endpackage
