// ssnoc_detector: SSNOC-based PN-code acquisition signal detector (top).
//
// The detector decides, for every input sample, whether the last N samples of
// the noisy input x correlate with the stored PN code h strongly enough to
// declare the code present. A conventional detector would compute the full
// N-tap inner product and compare it with a threshold T. Here the correlation
// is split into M statistically similar four-tap sensors (sensor_array); each
// sensor output is compared with T and a majority vote over the M comparisons
// gives the decision (fusion_block), which equals comparing the median of the
// sensor outputs with T. If some sensors produce wrong outputs because of
// device variations or timing errors, the vote still gives the right answer as
// long as they do not change the majority. N = 256, M = 64 and the 8-bit input
// follow the document; the coefficient width, the coefficient write port, the
// valid handshake, the threshold width and the pipeline are this design's.
//
// Interface: the PN code is written one coefficient at a time through
// h_we/h_addr/h_data (pn_code_store). thresh is the signed threshold T in the
// sensor-output format (Y_W bits). A sample is taken when x_valid is high.
//
// Timing: decision/dec_valid appear 1 (sensor) + 1 (slicer) + log2(M) (vote
// tree) + 1 (compare) cycles after the sample: 9 cycles for M = 64. The
// pipeline accepts one sample per clock. vote_count gives the number of
// sensors above T for the same sample.
module ssnoc_detector #(
  parameter int unsigned N_TAPS    = ssnoc_pkg::N_TAPS_DEF,
  parameter int unsigned M_SENSORS = ssnoc_pkg::M_SENSORS_DEF,
  parameter int unsigned X_W       = ssnoc_pkg::X_W_DEF,
  parameter int unsigned H_W       = ssnoc_pkg::H_W_DEF,
  localparam int unsigned K        = ssnoc_pkg::taps_per_sensor(N_TAPS, M_SENSORS),
  localparam int unsigned Y_W      = ssnoc_pkg::sensor_out_w(X_W, H_W, K),
  localparam int unsigned A_W      = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned CW       = ssnoc_pkg::count_w(M_SENSORS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PN-code load
  input  logic                  h_we,
  input  logic [A_W-1:0]        h_addr,
  input  logic signed [H_W-1:0] h_data,
  // threshold
  input  logic signed [Y_W-1:0] thresh,
  // sample stream
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x_in,
  // decision stream
  output logic                  dec_valid,
  output logic                  decision,
  output logic [CW-1:0]         vote_count
);

  logic signed [H_W-1:0] h_all [N_TAPS];
  logic                  y_valid;
  logic signed [Y_W-1:0] y [M_SENSORS];

  pn_code_store #(
    .N_TAPS (N_TAPS),
    .H_W    (H_W)
  ) u_code (
    .clk    (clk),
    .rst_n  (rst_n),
    .h_we   (h_we),
    .h_addr (h_addr),
    .h_data (h_data),
    .h_all  (h_all)
  );

  sensor_array #(
    .N_TAPS    (N_TAPS),
    .M_SENSORS (M_SENSORS),
    .X_W       (X_W),
    .H_W       (H_W)
  ) u_sensors (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x_in    (x_in),
    .h       (h_all),
    .y_valid (y_valid),
    .y       (y)
  );

  fusion_block #(
    .M   (M_SENSORS),
    .Y_W (Y_W)
  ) u_fusion (
    .clk        (clk),
    .rst_n      (rst_n),
    .y_valid    (y_valid),
    .y          (y),
    .thresh     (thresh),
    .d_valid    (dec_valid),
    .decision   (decision),
    .vote_count (vote_count)
  );

endmodule
