// fusion_block: median-based fusion of the sensor outputs, joined with the
// threshold decision.
//
// Comparing the median of the M sensor outputs with the threshold T is the
// same as asking whether most sensor outputs lie above T. The block therefore
// never sorts: a threshold_slicer turns each y_i into the bit [y_i > T] and a
// majority_voter votes over those bits. A sensor whose output is badly wrong
// (a timing or functional error in the sensor hardware) can flip only its own
// bit, so the decision survives as long as the remaining sensors keep the same
// majority. This structure is the document's; the pipelining is this design's.
//
// Timing: 1 (slicer) + ceil(log2 M) (adder tree) + 1 (compare) cycles from
// y/y_valid to decision/d_valid: 8 cycles for M = 64. vote_count is the number
// of sensors above T for the same sample.
module fusion_block #(
  parameter int unsigned M   = ssnoc_pkg::M_SENSORS_DEF,
  parameter int unsigned Y_W = ssnoc_pkg::sensor_out_w(ssnoc_pkg::X_W_DEF,
                                                      ssnoc_pkg::H_W_DEF, 4),
  localparam int unsigned CW = ssnoc_pkg::count_w(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y [M],
  input  logic signed [Y_W-1:0] thresh,
  output logic                  d_valid,
  output logic                  decision,
  output logic [CW-1:0]         vote_count
);

  logic         s_valid;
  logic [M-1:0] s;

  threshold_slicer #(
    .M   (M),
    .Y_W (Y_W)
  ) u_slicer (
    .clk     (clk),
    .rst_n   (rst_n),
    .y_valid (y_valid),
    .y       (y),
    .thresh  (thresh),
    .s_valid (s_valid),
    .s       (s)
  );

  majority_voter #(
    .M (M)
  ) u_voter (
    .clk      (clk),
    .rst_n    (rst_n),
    .v_valid  (s_valid),
    .v_in     (s),
    .d_valid  (d_valid),
    .decision (decision),
    .count    (vote_count)
  );

endmodule
