// tb_sco_preadder: exhaustive test of the similar-coefficient pre-adder.
// u_sub (defaults, combinational) must give a - 4b for every pair of 4-bit
// inputs; u_add (SUBTRACT = 0, OUT_REG = 1) must give a + 4b one clock after
// the inputs are applied.
module tb_sco_preadder;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic signed [6:0] y_sub;
  logic signed [7:0] y_add;

  always #5 clk = ~clk;

  sco_preadder u_sub (.clk, .rst_n, .a, .b, .y(y_sub));
  sco_preadder #(.SUBTRACT(1'b0), .OUT_W(8), .OUT_REG(1'b1)) u_add (.clk, .rst_n, .a, .b, .y(y_add));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa, pb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pa = -1;
    pb = 0;
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      // registered output belongs to the previous pair
      if (pa >= 0) begin
        checks++;
        if (int'(y_add) != pa + 4 * pb) begin
          failures++;
          $display("add a=%0d b=%0d got %0d", pa, pb, y_add);
        end
      end
      a = 4'(n);
      b = 4'(n >> 4);
      #1;
      checks++;
      if (int'(y_sub) != int'(a) - 4 * int'(b)) begin
        failures++;
        $display("sub a=%0d b=%0d got %0d", a, b, y_sub);
      end
      pa = int'(a);
      pb = int'(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
