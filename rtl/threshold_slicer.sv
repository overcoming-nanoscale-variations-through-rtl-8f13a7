// threshold_slicer: the threshold comparators in front of the majority voter.
//
// For each of the M sensor outputs the slicer forms the difference y_i - T and
// takes its sign bit, defined as in the document: 1 when the difference is
// positive, 0 when it is zero or negative. The difference is formed one bit
// wider than the operands so that it cannot overflow.
//
// Timing: one register stage. s and s_valid follow y and y_valid one clock
// later. Reset clears the sign bits and the valid flag.
module threshold_slicer #(
  parameter int unsigned M   = ssnoc_pkg::M_SENSORS_DEF,
  parameter int unsigned Y_W = ssnoc_pkg::sensor_out_w(ssnoc_pkg::X_W_DEF,
                                                      ssnoc_pkg::H_W_DEF, 4)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y [M],
  input  logic signed [Y_W-1:0] thresh,
  output logic                  s_valid,
  output logic [M-1:0]          s
);

  logic [M-1:0] s_d;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      logic signed [Y_W:0] diff;
      diff   = (Y_W+1)'(y[i]) - (Y_W+1)'(thresh);
      s_d[i] = !diff[Y_W] && (diff != '0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s       <= '0;
      s_valid <= 1'b0;
    end else begin
      s       <= s_d;
      s_valid <= y_valid;
    end
  end

endmodule
