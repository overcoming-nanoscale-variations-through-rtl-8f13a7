// majority_voter: majority vote over M sign bits.
//
// The voter counts the ones among its M inputs with a pipelined binary adder
// tree (one register level per tree level, ceil(log2 M) levels; inputs are
// padded with zeros up to a power of two) and then compares the count with M/2.
// The decision is 1 when at least half of the inputs are 1. With M even this
// resolves an exact tie (M/2 ones) as 1, which is how the document's argument
// for the equivalence with the median treats "at least n/2" positive
// comparisons; with M odd it is an ordinary strict majority.
//
// The document gives the voter's function, not its structure: the adder tree,
// its pipelining (the document asks only that post-processing not be on the
// critical path) and the tie rule are this design's choices.
//
// Timing: LEVELS + 1 cycles from v_in/v_valid to decision/d_valid
// (7 cycles for M = 64). The vote count is also brought out, registered
// together with the decision. Reset clears the pipeline.
module majority_voter #(
  parameter int unsigned M = ssnoc_pkg::M_SENSORS_DEF,
  localparam int unsigned LEVELS = (M > 1) ? $clog2(M) : 0,
  localparam int unsigned MP     = 1 << LEVELS,
  localparam int unsigned CW     = ssnoc_pkg::count_w(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          v_valid,
  input  logic [M-1:0]  v_in,
  output logic          d_valid,
  output logic          decision,
  output logic [CW-1:0] count
);

  // Level 0: the (zero-padded) input bits.
  logic [CW-1:0] lvl0 [MP];
  always_comb begin
    for (int k = 0; k < MP; k++) lvl0[k] = (k < M) ? CW'(v_in[k]) : '0;
  end

  logic [LEVELS:0] vpipe;
  assign vpipe[0] = v_valid;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NODES = MP >> l;
    logic [CW-1:0] node [NODES];
    for (genvar k = 0; k < NODES; k++) begin : g_node
      logic [CW-1:0] a, b;
      if (l == 1) begin : g_leaf
        assign a = lvl0[2*k];
        assign b = lvl0[2*k+1];
      end else begin : g_inner
        assign a = g_lvl[l-1].node[2*k];
        assign b = g_lvl[l-1].node[2*k+1];
      end
      always_ff @(posedge clk) begin
        if (!rst_n) node[k] <= '0;
        else        node[k] <= a + b;
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) vpipe[l] <= 1'b0;
      else        vpipe[l] <= vpipe[l-1];
    end
  end

  logic [CW-1:0] total;
  if (LEVELS == 0) begin : g_single
    assign total = lvl0[0];
  end else begin : g_tree
    assign total = g_lvl[LEVELS].node[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      decision <= 1'b0;
      count    <= '0;
      d_valid  <= 1'b0;
    end else begin
      decision <= (2 * 32'(total)) >= M;
      count    <= total;
      d_valid  <= vpipe[LEVELS];
    end
  end

endmodule
