// tb_idac_convolver_full: the filter with every parameter at its default
// (pipelined build), run on one long sample stream.
//
// After reset the stream is: a unit impulse (the output must then walk
// through the eight coefficients 59, 183, 162, -7, -48, 12, 9, 2, starting
// exactly LAT = 4 clocks after the impulse is sampled), a unit step (the
// output must settle at the coefficient sum 372), and 20000 random 4-bit
// samples. Every output is compared with a direct-form sum of products
// computed here. A sample is taken on every clock, so the run also shows the
// one-sample-per-clock throughput.
module tb_idac_convolver_full;

  localparam int NT = 8;
  localparam int HC [NT] = '{59, 183, 162, -7, -48, 12, 9, 2};
  localparam int LAT = 4;
  localparam int N_RAND = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] x_in = '0;
  logic signed [13:0] y_out;

  always #5 clk = ~clk;

  idac_convolver u_dut (.clk, .rst_n, .x_in, .y_out);

  int checks = 0, failures = 0;
  int stim [$];
  int hist [NT];
  int yref [$];
  int impulse_seen = 0, step_seen = 0;

  initial begin : watchdog
    repeat (N_RAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    stim.push_back(1);
    repeat (NT + LAT) stim.push_back(0);
    repeat (NT + LAT) stim.push_back(1);
    for (int n = 0; n < N_RAND; n++) stim.push_back(int'($urandom_range(0, 15)));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < stim.size() + LAT; n++) begin
      int acc;
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if (int'(y_out) != yref[LAT-1]) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d exp %0d", n, y_out, yref[LAT-1]);
        end
        // impulse response: sample 0 is the impulse; the step starts at
        // sample NT + LAT + 1 and fills the delay line NT - 1 samples later
        if (n - LAT < NT && int'(y_out) == HC[n - LAT]) impulse_seen++;
        if (n - LAT == 2 * NT + LAT && int'(y_out) == 372) step_seen++;
      end
      for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = (n < stim.size()) ? stim[n] : 0;
      x_in = 4'(hist[0]);
      acc = 0;
      for (int k = 0; k < NT; k++) acc += HC[k] * hist[k];
      yref.push_front(acc);
      if (yref.size() > LAT) void'(yref.pop_back());
    end
    checks++;
    if (impulse_seen != NT) begin
      failures++;
      $display("impulse response matched %0d of %0d coefficients", impulse_seen, NT);
    end
    checks++;
    if (step_seen != 1) begin
      failures++;
      $display("step response did not settle at 372");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
