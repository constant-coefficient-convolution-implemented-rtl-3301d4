// tb_da_lut: exhaustive test of the DA look-up table.
// u_l9 (defaults: the weights 9, -7, 59, 183 of LUT 9, combinational) and
// u_l15 (weights 3, 6, -12, 0 of LUT 15, where the third line is the sign bit
// of a two's complement input, with an output register) and u_l12 (weights
// 59, 81, 183, 6 of LUT 12, all positive, so a 9-bit unsigned output whose
// top entries would overflow a 9-bit signed one) are read at every address;
// the expected entry is the sum of the weights of the set address bits,
// worked out here.
module tb_da_lut;

  localparam int W9  [4] = '{9, -7, 59, 183};
  localparam int W15 [4] = '{3, 6, -12, 0};
  localparam int W12 [4] = '{59, 81, 183, 6};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] addr = '0;
  logic signed [8:0] d9;
  logic signed [4:0] d15;
  logic        [8:0] d12;

  always #5 clk = ~clk;

  da_lut u_l9 (.clk, .rst_n, .addr, .data(d9));
  da_lut #(.ADDR_W(4), .WEIGHT('{3, 6, -12, 0}), .DATA_W(5), .OUT_REG(1'b1))
    u_l15 (.clk, .rst_n, .addr, .data(d15));
  da_lut #(.ADDR_W(4), .WEIGHT('{59, 81, 183, 6}), .DATA_W(9), .OUT_REG(1'b0))
    u_l12 (.clk, .rst_n, .addr, .data(d12));

  int checks = 0, failures = 0;

  // which: 0 = LUT 9, 1 = LUT 15, 2 = LUT 12
  function automatic int expect_of(int a, int which);
    int acc = 0;
    for (int k = 0; k < 4; k++)
      if (a[k]) acc += (which == 1) ? W15[k] : (which == 2) ? W12[k] : W9[k];
    return acc;
  endfunction

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    repeat (2) @(negedge clk);
    checks++;
    if (d15 != '0) failures++;     // register cleared by reset
    rst_n = 1'b1;
    prev = -1;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      if (prev >= 0) begin
        checks++;
        if (int'(d15) != expect_of(prev, 1)) begin
          failures++;
          $display("lut15 addr=%0d got %0d exp %0d", prev, d15, expect_of(prev, 1));
        end
      end
      addr = 4'($urandom);
      if (n < 16) addr = 4'(n);
      #1;
      checks++;
      if (int'(d9) != expect_of(int'(addr), 0)) begin
        failures++;
        $display("lut9 addr=%0d got %0d exp %0d", addr, d9, expect_of(int'(addr), 0));
      end
      checks++;
      if (int'(d12) != expect_of(int'(addr), 2)) begin
        failures++;
        $display("lut12 addr=%0d got %0d exp %0d", addr, d12, expect_of(int'(addr), 2));
      end
      prev = int'(addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
