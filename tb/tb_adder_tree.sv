// tb_adder_tree: random test of the adder tree.
// u_pipe (defaults: 8 operands of 14 bits, a register after each of the 3
// levels) must give the sum of the operands applied 3 clocks earlier;
// u_comb (5 operands, combinational) must give the sum at once. Operands are
// random and chosen so that the sum stays inside 14-bit two's complement.
module tb_adder_tree;

  localparam int LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] op8 [8];
  logic signed [13:0] op5 [5];
  logic signed [13:0] s8, s5;

  always #5 clk = ~clk;

  adder_tree u_pipe (.clk, .rst_n, .op(op8), .sum(s8));
  adder_tree #(.N_IN(5), .W(14), .PIPELINED(1'b0)) u_comb (.clk, .rst_n, .op(op5), .sum(s5));

  int checks = 0, failures = 0;
  int sums [$];

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (op8[j]) op8[j] = '0;
    foreach (op5[j]) op5[j] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (s8 != '0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 1000 + LAT; n++) begin
      int acc8, acc5;
      @(negedge clk);
      if (sums.size() >= LAT) begin
        checks++;
        if (int'(s8) != sums[LAT-1]) begin
          failures++;
          if (failures < 10) $display("pipe n=%0d got %0d exp %0d", n, s8, sums[LAT-1]);
        end
      end
      acc8 = 0;
      acc5 = 0;
      foreach (op8[j]) begin
        op8[j] = 14'($signed($urandom_range(0, 2047)) - 1024);
        acc8 += int'(op8[j]);
      end
      foreach (op5[j]) begin
        op5[j] = 14'($signed($urandom_range(0, 3071)) - 1536);
        acc5 += int'(op5[j]);
      end
      sums.push_front(acc8);
      if (sums.size() > LAT) void'(sums.pop_back());
      #1;
      checks++;
      if (int'(s5) != acc5) begin
        failures++;
        if (failures < 10) $display("comb n=%0d got %0d exp %0d", n, s5, acc5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
