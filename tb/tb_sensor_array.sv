// tb_sensor_array: self-checking testbench for the full 64-sensor array.
//
// With random coefficients and a random sample stream (with gaps in x_valid),
// a reference model keeps the last N accepted samples and computes every
// sensor's partial correlation y_i = sum_j h[4i+j] x[n-4i-j]. All 64 outputs
// are compared one cycle after each accepted sample. The run also checks that
// the partial sums add up to the full 256-tap correlation.
module tb_sensor_array;
  localparam int unsigned N = 256, M = 64, X_W = 8, H_W = 8, K = N / M;
  localparam int unsigned Y_W = ssnoc_pkg::sensor_out_w(X_W, H_W, K);

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic signed [H_W-1:0] h [N];
  logic y_valid;
  logic signed [Y_W-1:0] y [M];

  int checks = 0, failures = 0;
  int hist [N];

  sensor_array #(.N_TAPS(N), .M_SENSORS(M), .X_W(X_W), .H_W(H_W)) dut (
    .clk, .rst_n, .x_valid, .x_in, .h, .y_valid, .y);

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
    bit v;
    int e, full, sum;
    for (int j = 0; j < N; j++) begin
      h[j]    = H_W'($urandom);
      hist[j] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 900; t++) begin
      @(negedge clk);
      v       = ($urandom_range(0, 9) < 8);
      x_valid = v;
      x_in    = X_W'($urandom);
      @(posedge clk);
      #1;
      check(y_valid == v, "y_valid");
      if (v) begin
        for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = int'(x_in);
        sum  = 0;
        full = 0;
        for (int j = 0; j < N; j++) full += int'(h[j]) * hist[j];
        for (int i = 0; i < M; i++) begin
          e = 0;
          for (int j = 0; j < K; j++) e += int'(h[K*i+j]) * hist[K*i+j];
          check(int'(y[i]) == e, $sformatf("sensor %0d y=%0d exp=%0d", i, y[i], e));
          sum += int'(y[i]);
        end
        check(sum == full, "partial sums add to the full correlation");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
