// ssnoc_sensor: one sensor of the SSNOC detector, a K-tap FIR sub-filter.
//
// Sensor i computes y_i[n] = sum_{j=0}^{K-1} h[K*i+j] * x[n-K*i-j] with K = 4,
// as the document decomposes the 256-tap correlation into 64 four-tap pieces.
// The sensor receives x[n-K*i] on x_in; x_in feeds the first multiplier
// directly and a K-deep shift register holds the older samples, as in the
// direct-form FIR of the document. The last register of that shift register is
// the K-sample delay ("4D") between neighbouring sensors and is brought out as
// x_out for the next sensor.
//
// Timing: when x_valid is high at a rising edge the delay line shifts and the
// sum of products for the current sample is registered into y; y_valid is
// x_valid delayed by one cycle, so y holds the result for a sample one cycle
// after the sample was presented. The registered output is this design's
// pipeline cut, so that the sensor sets the critical path as the document
// requires. Reset (synchronous, active low) clears the delay line and y.
module ssnoc_sensor #(
  parameter int unsigned K   = 4,
  parameter int unsigned X_W = ssnoc_pkg::X_W_DEF,
  parameter int unsigned H_W = ssnoc_pkg::H_W_DEF,
  localparam int unsigned Y_W = ssnoc_pkg::sensor_out_w(X_W, H_W, K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  logic signed [X_W-1:0]  x_in,      // x[n - K*i]
  input  logic signed [H_W-1:0]  h [K],     // h[K*i .. K*i+K-1]
  output logic signed [X_W-1:0]  x_out,     // x[n - K*i - K], to the next sensor
  output logic                   y_valid,
  output logic signed [Y_W-1:0]  y
);

  // tap[k] holds x[n-K*i-1-k] between valid samples.
  logic signed [X_W-1:0] tap [K];
  logic signed [Y_W-1:0] acc;

  always_comb begin
    acc = Y_W'(x_in * h[0]);
    for (int j = 1; j < K; j++) begin
      acc = acc + Y_W'(tap[j-1] * h[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) tap[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        tap[0] <= x_in;
        for (int k = 1; k < K; k++) tap[k] <= tap[k-1];
        y <= acc;
      end
    end
  end

  assign x_out = tap[K-1];

endmodule
