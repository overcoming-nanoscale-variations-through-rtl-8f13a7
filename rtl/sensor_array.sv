// sensor_array: the M sensors of the SSNOC detector and the delay chain
// between them.
//
// Sensor i receives the input delayed by K*i samples and the coefficients
// h[K*i .. K*i+K-1], so that its output is the partial correlation
// y_i[n] = sum_{j=0}^{K-1} h[K*i+j] x[n-K*i-j]. Summing all y_i would give the
// full N-tap correlation; the detector instead fuses them (see fusion_block).
// The K-sample delay between neighbours is the last part of each sensor's own
// delay line, so the chain adds no logic between sensors. The decomposition
// (N = 256, M = 64, K = N/M = 4) follows the document.
//
// Timing: all sensors shift on x_valid together; y[i] is valid one cycle after
// the sample (y_valid). Before N samples have entered, the missing older samples
// are read as zero (the delay line resets to zero).
module sensor_array #(
  parameter int unsigned N_TAPS    = ssnoc_pkg::N_TAPS_DEF,
  parameter int unsigned M_SENSORS = ssnoc_pkg::M_SENSORS_DEF,
  parameter int unsigned X_W       = ssnoc_pkg::X_W_DEF,
  parameter int unsigned H_W       = ssnoc_pkg::H_W_DEF,
  localparam int unsigned K        = ssnoc_pkg::taps_per_sensor(N_TAPS, M_SENSORS),
  localparam int unsigned Y_W      = ssnoc_pkg::sensor_out_w(X_W, H_W, K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  logic signed [X_W-1:0]  x_in,
  input  logic signed [H_W-1:0]  h [N_TAPS],
  output logic                   y_valid,
  output logic signed [Y_W-1:0]  y [M_SENSORS]
);

  // The decomposition needs K whole taps per sensor.
  initial begin
    assert (N_TAPS % M_SENSORS == 0 && K >= 1)
      else $error("sensor_array: N_TAPS must be a multiple of M_SENSORS");
  end

  logic signed [X_W-1:0] chain [M_SENSORS+1];
  logic                  sv    [M_SENSORS];

  assign chain[0] = x_in;

  for (genvar i = 0; i < M_SENSORS; i++) begin : g_sensor
    logic signed [H_W-1:0] h_i [K];
    for (genvar j = 0; j < K; j++) begin : g_coef
      assign h_i[j] = h[K*i + j];
    end

    ssnoc_sensor #(
      .K   (K),
      .X_W (X_W),
      .H_W (H_W)
    ) u_sensor (
      .clk     (clk),
      .rst_n   (rst_n),
      .x_valid (x_valid),
      .x_in    (chain[i]),
      .h       (h_i),
      .x_out   (chain[i+1]),
      .y_valid (sv[i]),
      .y       (y[i])
    );
  end

  // All sensors share x_valid, so their valid flags are identical.
  assign y_valid = sv[0];

endmodule
