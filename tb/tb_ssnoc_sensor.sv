// tb_ssnoc_sensor: self-checking testbench for one four-tap sensor.
//
// Random signed coefficients are applied and a random sample stream is driven
// with random gaps in x_valid. A reference history of the accepted samples
// gives the expected sum of products, which must appear on y exactly one cycle
// after the sample (y_valid), and the sample four positions back, which must
// appear on x_out. Extreme values (-128 * -128) are included to check sign
// handling and output width.
module tb_ssnoc_sensor;
  localparam int unsigned K = 4, X_W = 8, H_W = 8;
  localparam int unsigned Y_W = ssnoc_pkg::sensor_out_w(X_W, H_W, K);

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0, x_out;
  logic signed [H_W-1:0] h [K];
  logic y_valid;
  logic signed [Y_W-1:0] y;

  int checks = 0, failures = 0;
  int hist [K+1];   // hist[0] newest accepted sample

  ssnoc_sensor #(.K(K), .X_W(X_W), .H_W(H_W)) dut (
    .clk, .rst_n, .x_valid, .x_in, .h, .x_out, .y_valid, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int exp_y;
    bit v;
    for (int j = 0; j < K; j++) h[j] = '0;
    for (int j = 0; j <= K; j++) hist[j] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int phase = 0; phase < 3; phase++) begin
      @(negedge clk);
      x_valid = 1'b0;
      for (int j = 0; j < K; j++)
        h[j] = (phase == 2) ? -8'sd128 : H_W'($urandom);
      for (int t = 0; t < 600; t++) begin
        @(negedge clk);
        v       = ($urandom_range(0, 9) < 7);
        x_valid = v;
        x_in    = (phase == 2 && t % 3 == 0) ? -8'sd128 : X_W'($urandom);
        exp_y   = int'(x_in) * int'(h[0]);
        for (int j = 1; j < K; j++) exp_y += hist[j-1] * int'(h[j]);
        @(posedge clk);
        #1;
        check(y_valid == v, "y_valid");
        if (v) begin
          for (int j = K; j > 0; j--) hist[j] = hist[j-1];
          hist[0] = int'(x_in);
          check(int'(y) == exp_y, $sformatf("y=%0d exp=%0d", y, exp_y));
        end
        check(int'(x_out) == hist[K-1], "x_out");
      end
    end
    // Reset clears the delay line and the output.
    @(negedge clk) rst_n = 1'b0; x_valid = 1'b0;
    @(posedge clk); #1;
    check(y == '0 && x_out == '0 && !y_valid, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
