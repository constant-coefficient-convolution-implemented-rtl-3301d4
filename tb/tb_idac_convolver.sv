// tb_idac_convolver: end-to-end test of the IDAC filter in both builds.
//
// Two instances see the same sample stream: u_pipe with every parameter at
// its default (pipelined, latency 4) and u_comb with PIPELINED = 0
// (combinational output). Both are compared every cycle with a direct-form
// reference y(i) = sum H[k] x(i-k) computed here from the samples, using the
// coefficients written out independently of the design.
// Stimulus: an impulse (its response must be the coefficients, which also
// checks the latency), a run of full-scale samples (largest output), the
// pattern that gives the most negative output, then random samples.
// Mechanisms counted (each must occur): negative pre-adder result D8 (the
// subtraction and the sign-bit line of LUT 15), positive D8, a non-zero
// direct input D7, a negative filter output, the largest (6405) and smallest
// (-825) output,
// and the impulse seen after exactly LATENCY clocks.
module tb_idac_convolver;

  localparam int NT = 8;
  localparam int HC [NT] = '{59, 183, 162, -7, -48, 12, 9, 2};
  localparam int LAT = 4;
  localparam int N_RAND = 3000;
  localparam int MAXPAT [8] = '{15, 15, 15, 0, 0, 15, 15, 15};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] x_in = '0;
  logic signed [13:0] y_pipe, y_comb;

  always #5 clk = ~clk;

  idac_convolver u_pipe (.clk, .rst_n, .x_in, .y_out(y_pipe));
  idac_convolver #(.PIPELINED(1'b0)) u_comb (.clk, .rst_n, .x_in, .y_out(y_comb));

  int checks = 0, failures = 0;
  int hist [$];          // hist[0] = newest sample
  int yref [$];          // yref[0] = reference output of the newest sample
  int n_d8_neg = 0, n_d8_pos = 0, n_direct = 0, n_yneg = 0;
  int n_ymax = 0, n_ymin = 0, n_impulse_lat = 0;
  int stim [$];

  function automatic int ref_y();
    int acc = 0;
    for (int k = 0; k < NT; k++) acc += HC[k] * ((k < hist.size()) ? hist[k] : 0);
    return acc;
  endfunction

  function automatic int h_at(int k);
    return (k < hist.size()) ? hist[k] : 0;
  endfunction

  initial begin : watchdog
    repeat (N_RAND + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // impulse, then zeros
    stim.push_back(1);
    repeat (12) stim.push_back(0);
    // full scale
    repeat (12) stim.push_back(15);
    repeat (8) stim.push_back(0);
    // largest: every positive tap at 15, x(i-3) = x(i-4) = 0
    foreach (MAXPAT[k]) stim.push_back(MAXPAT[k]);
    repeat (8) stim.push_back(0);
    // most negative: x(i-3) = x(i-4) = 15, all else 0
    stim.push_back(15); stim.push_back(15);
    repeat (10) stim.push_back(0);
    for (int n = 0; n < N_RAND; n++) stim.push_back(int'($urandom_range(0, 15)));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < stim.size() + LAT; n++) begin
      @(negedge clk);
      // pipelined output now belongs to the sample driven LAT negedges ago
      if (yref.size() >= LAT) begin
        checks++;
        if (y_pipe !== 14'(yref[LAT-1])) begin
          failures++;
          if (failures < 10) $display("pipe mismatch n=%0d got %0d exp %0d", n, y_pipe, yref[LAT-1]);
        end
        if (n == LAT && y_pipe == 14'(HC[0])) n_impulse_lat++;
      end
      // drive the next sample
      x_in = (n < stim.size()) ? 4'(stim[n]) : 4'd0;
      hist.push_front(int'(x_in));
      if (hist.size() > NT) void'(hist.pop_back());
      yref.push_front(ref_y());
      if (yref.size() > LAT + 1) void'(yref.pop_back());
      #1;
      checks++;
      if (y_comb !== 14'(yref[0])) begin
        failures++;
        if (failures < 10) $display("comb mismatch n=%0d got %0d exp %0d", n, y_comb, yref[0]);
      end
      // mechanism counters, from the sample history
      if (h_at(5) - 4 * h_at(4) < 0) n_d8_neg++;
      if (h_at(5) - 4 * h_at(4) > 0) n_d8_pos++;
      if (h_at(7) != 0) n_direct++;
      if (yref[0] < 0) n_yneg++;
      if (yref[0] == 6405) n_ymax++;
      if (yref[0] == -825) n_ymin++;
    end

    $display("mechanisms: d8_neg=%0d d8_pos=%0d direct=%0d y_neg=%0d y_max=%0d y_min=%0d impulse_at_latency=%0d",
             n_d8_neg, n_d8_pos, n_direct, n_yneg, n_ymax, n_ymin, n_impulse_lat);
    checks++; if (n_d8_neg == 0) failures++;
    checks++; if (n_d8_pos == 0) failures++;
    checks++; if (n_direct == 0) failures++;
    checks++; if (n_yneg == 0) failures++;
    checks++; if (n_ymax == 0) failures++;
    checks++; if (n_ymin == 0) failures++;
    checks++; if (n_impulse_lat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
