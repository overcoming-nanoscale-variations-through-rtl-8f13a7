// tb_ssnoc_error_resilience: detection experiment with injected sensor errors.
//
// This testbench runs the detection task the architecture is meant for and
// compares the SSNOC decision (sensor_array + fusion_block, the RTL) with the
// conventional decision (sum of the same 64 sensor outputs against its own
// threshold, computed here), in the presence of hardware errors in the sensors.
//
// Each trial streams a fresh 256-sample window: uniform noise in [-U, U],
// plus A times a ±1 PN code when the trial carries the signal. Between the
// sensor array and the fusion block the testbench can replace any sensor
// output by a random value over the full output range, each sensor
// independently with probability EPS (an epsilon-contaminated error model).
//
//   1. Calibration: noise-only, error-free trials give the 95th percentile of
//      the sensor median and of the sum; these become the two thresholds, so
//      both detectors run at a 5 % false-alarm rate.
//   2. Error-free trials with and without the signal: detection (Pd) and
//      false-alarm (Pfa) rates of both detectors.
//   3. The same with EPS = 10 % sensor errors.
//
// Every RTL decision and vote count is checked bit-exactly against a model
// fed with the same (possibly corrupted) sensor values. The statistical
// checks are: without errors both detectors separate signal from noise
// (Pd > Pfa + 0.5); with errors the SSNOC detector keeps its separation
// (Pd - Pfa > 0.5) and beats the conventional one. Signal amplitude, noise
// level and error model are this testbench's own choices.
module tb_ssnoc_error_resilience;
  localparam int unsigned N = 256, M = 64, K = 4, X_W = 8, H_W = 8;
  localparam int unsigned Y_W = ssnoc_pkg::sensor_out_w(X_W, H_W, K);
  localparam int TRIALS = 240;
  localparam int A = 8, U = 60;
  localparam int EPS_PCT = 10;

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic signed [H_W-1:0] h [N];
  logic y_valid;
  logic signed [Y_W-1:0] y [M];
  logic signed [Y_W-1:0] y_err [M];
  logic signed [Y_W-1:0] thresh = '0;
  logic d_valid, decision;
  logic [$clog2(M+1)-1:0] vote_count;

  // Error injection between the sensors and the fusion block.
  bit corrupt [M];
  int bad_val [M];
  always_comb
    for (int i = 0; i < M; i++) y_err[i] = corrupt[i] ? Y_W'(bad_val[i]) : y[i];

  sensor_array #(.N_TAPS(N), .M_SENSORS(M), .X_W(X_W), .H_W(H_W)) u_sensors (
    .clk, .rst_n, .x_valid, .x_in, .h, .y_valid, .y);
  fusion_block #(.M(M), .Y_W(Y_W)) u_fusion (
    .clk, .rst_n, .y_valid, .y(y_err), .thresh, .d_valid, .decision, .vote_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5 * TRIALS * (N + 16) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int code [N];
  int win [N];          // win[j] = x[n-j] for the trial's last sample n
  int ys [M];           // sensor values seen by the fusion block
  int t_conv = 0;       // conventional threshold (on the sum)

  // Streams one trial and returns the SSNOC decision from the RTL and the
  // conventional decision from the model.
  task automatic trial(input bit signal, input int eps_pct, input bit use_rtl,
                       output bit d_ssnoc, output bit d_conv, output int med2, output int sum);
    int cnt, tmp, key, b;
    int srt [M];
    for (int i = 0; i < M; i++) begin
      corrupt[i] = ($urandom_range(0, 99) < eps_pct);
      bad_val[i] = int'($urandom_range(0, (1 << Y_W) - 1)) - (1 << (Y_W - 1));
    end
    // Oldest sample first: x[n-255] ... x[n].
    for (int t = N - 1; t >= 0; t--) begin
      @(negedge clk);
      tmp     = int'($urandom_range(0, 2 * U)) - U + (signal ? A * code[t] : 0);
      win[t]  = tmp;
      x_valid = 1'b1;
      x_in    = X_W'(tmp);
    end
    @(negedge clk) x_valid = 1'b0;
    // Model of what the fusion block sees.
    sum = 0;
    cnt = 0;
    for (int i = 0; i < M; i++) begin
      tmp = 0;
      for (int j = 0; j < K; j++) tmp += code[K*i+j] * win[K*i+j];
      ys[i] = corrupt[i] ? bad_val[i] : tmp;
      sum += ys[i];
      if (ys[i] > int'(thresh)) cnt++;
      srt[i] = ys[i];
    end
    for (int a = 1; a < M; a++) begin
      key = srt[a];
      b   = a - 1;
      while (b >= 0 && srt[b] > key) begin
        srt[b+1] = srt[b];
        b--;
      end
      srt[b+1] = key;
    end
    med2   = srt[M/2-1] + srt[M/2];
    d_conv = (sum > t_conv);
    // The last sample was clocked in one edge ago; its decision is registered
    // 9 edges after that one, and the sample after it is idle.
    repeat (8) @(posedge clk);
    #1;
    check(d_valid, "decision valid 9 cycles after the last sample");
    d_ssnoc = decision;
    @(posedge clk);
    #1;
    check(!d_valid, "no decision for the idle cycle");
    if (use_rtl) begin
      check(int'(vote_count) == cnt, "vote count");
      check(decision == (2 * cnt >= M), "decision");
    end
  endtask

  int q_med [TRIALS], q_sum [TRIALS];

  initial begin
    logic [8:0] lfsr;
    bit ds, dc;
    int m2, s, tmp;
    int pd_s [2], pfa_s [2], pd_c [2], pfa_c [2];
    lfsr = 9'h1a5;
    for (int j = 0; j < N; j++) begin
      code[j] = lfsr[0] ? 1 : -1;
      h[j]    = H_W'(code[j]);
      lfsr    = {lfsr[0] ^ lfsr[4], lfsr[8:1]};
    end
    for (int i = 0; i < M; i++) begin
      corrupt[i] = 1'b0;
      bad_val[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. Calibration on noise only, without errors.
    for (int t = 0; t < TRIALS; t++) begin
      trial(1'b0, 0, 1'b0, ds, dc, m2, s);
      q_med[t] = m2;
      q_sum[t] = s;
    end
    for (int a = 1; a < TRIALS; a++)
      for (int b = a; b > 0 && q_med[b-1] > q_med[b]; b--) begin
        tmp = q_med[b]; q_med[b] = q_med[b-1]; q_med[b-1] = tmp;
      end
    for (int a = 1; a < TRIALS; a++)
      for (int b = a; b > 0 && q_sum[b-1] > q_sum[b]; b--) begin
        tmp = q_sum[b]; q_sum[b] = q_sum[b-1]; q_sum[b-1] = tmp;
      end
    // median > T  <=>  2*median > 2*T; take T from the 95th percentile.
    tmp    = q_med[(TRIALS * 95) / 100];
    thresh = Y_W'(tmp >>> 1);
    t_conv = q_sum[(TRIALS * 95) / 100];
    $display("thresholds: SSNOC T = %0d (per sensor), conventional T = %0d (sum)",
             int'(thresh), t_conv);
    @(negedge clk);

    // 2. and 3.: without and with sensor errors.
    for (int e = 0; e < 2; e++) begin
      pd_s[e] = 0; pfa_s[e] = 0; pd_c[e] = 0; pfa_c[e] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        trial(1'b1, e * EPS_PCT, 1'b1, ds, dc, m2, s);
        pd_s[e] += ds;
        pd_c[e] += dc;
        trial(1'b0, e * EPS_PCT, 1'b1, ds, dc, m2, s);
        pfa_s[e] += ds;
        pfa_c[e] += dc;
      end
      $display("sensor error rate %0d%%: SSNOC Pd %0d/%0d Pfa %0d/%0d; conventional Pd %0d/%0d Pfa %0d/%0d",
               e * EPS_PCT, pd_s[e], TRIALS, pfa_s[e], TRIALS, pd_c[e], TRIALS, pfa_c[e], TRIALS);
    end
    check(2 * (pd_s[0] - pfa_s[0]) > TRIALS, "SSNOC separates signal from noise without errors");
    check(2 * (pd_c[0] - pfa_c[0]) > TRIALS, "conventional separates signal from noise without errors");
    check(2 * (pd_s[1] - pfa_s[1]) > TRIALS, "SSNOC separates signal from noise with sensor errors");
    check((pd_s[1] - pfa_s[1]) > (pd_c[1] - pfa_c[1]), "SSNOC beats conventional with sensor errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
