// adder_tree: sums N_IN two's complement operands with two-input adders.
//
// The operands are already aligned to their significance and sign-extended
// to W bits by the caller. They are added pairwise in a balanced binary tree
// of LEVELS = ceil(log2(N_IN)) levels (missing operands count as zero).
// With PIPELINED = 1 a register follows every adder level, which is the
// "one logic element between registers" pipelining; the latency is then
// LEVELS clocks, otherwise the tree is combinational. Because every operand
// passes the same number of levels, no delay-balancing registers are needed.
//
// Interface: clk, asynchronous active-low rst_n (clears the level registers),
// op[N_IN] in, sum out. The source design searches for the adder tree of
// least area; this balanced full-width tree gives the same sum with more
// adder bits.
module adder_tree #(
  parameter int N_IN      = 8,
  parameter int W         = 14,
  parameter bit PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] op [N_IN],
  output logic signed [W-1:0] sum
);

  localparam int LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int WIDE   = 1 << LEVELS;

  logic signed [W-1:0] leaf [WIDE];

  always_comb begin
    for (int j = 0; j < WIDE; j++) leaf[j] = (j < N_IN) ? op[j] : '0;
  end

  // Level l adds pairs of its inputs into v[WIDE >> (l+1)].
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int N_OUT = WIDE >> (l + 1);
    logic signed [W-1:0] in_ [2*N_OUT];
    logic signed [W-1:0] s   [N_OUT];
    logic signed [W-1:0] v   [N_OUT];

    if (l == 0) begin : g_first
      assign in_ = leaf;
    end else begin : g_next
      assign in_ = g_lvl[l-1].v;
    end

    always_comb begin
      for (int j = 0; j < N_OUT; j++) s[j] = in_[2*j] + in_[2*j+1];
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) for (int j = 0; j < N_OUT; j++) v[j] <= '0;
        else        for (int j = 0; j < N_OUT; j++) v[j] <= s[j];
      end
    end else begin : g_comb
      assign v = s;
    end
  end

  assign sum = g_lvl[LEVELS-1].v[0];

endmodule
