// tb_tap_delay_line: checks the delay chain against a queue of past samples.
// After reset every tap must read zero; then random samples are shifted in
// and every tap k must equal the sample presented k clocks earlier
// (tap 0 is the current input).
module tb_tap_delay_line;

  localparam int W = 4, DEPTH = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x_in = '0;
  logic [W-1:0] taps [DEPTH+1];

  always #5 clk = ~clk;

  tap_delay_line u_dut (.clk, .rst_n, .x_in, .taps);

  int checks = 0, failures = 0;
  int past [$];

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = 4'hA;
    repeat (2) @(negedge clk);
    for (int k = 1; k <= DEPTH; k++) begin
      checks++;
      if (taps[k] != '0) failures++;
    end
    x_in = '0;
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      x_in = W'($urandom);
      past.push_front(int'(x_in));
      #1;
      for (int k = 0; k <= DEPTH; k++) begin
        checks++;
        if (int'(taps[k]) != ((k < past.size()) ? past[k] : 0)) begin
          failures++;
          if (failures < 10) $display("n=%0d tap %0d got %0d", n, k, taps[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
