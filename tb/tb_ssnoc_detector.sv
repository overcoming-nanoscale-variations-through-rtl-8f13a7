// tb_ssnoc_detector: end-to-end testbench of the SSNOC detector at its default
// size (N = 256 taps, M = 64 sensors, 8-bit input).
//
// The testbench writes a 256-chip +/-1 PN code (from a 9-bit maximal-length
// LFSR, x^9 + x^5 + 1) into the code store and streams a noisy input: uniform
// noise, into which the code is embedded from time to time with amplitude A,
// so that the correlation window lines up with the code once per embedding.
// A reference model keeps the last 256 samples, forms the 64 partial
// correlations, counts those above T and decides 1 when at least 32 are. Every
// decision and vote count is compared, and it must arrive exactly 9 cycles
// after its sample.
//
// Phases: (1) clear detection with x_valid gaps, (2) the threshold at the noise
// mean, so that about half the sensors exceed it and exact ties and zero
// differences are common, (3) a new code written while the stream is idle (mode change of the
// stored code), then detection with the new code. The testbench counts
// detections at aligned positions, false alarms, 32/32 ties, sensors equal to
// T, input gaps and code reloads, and fails if any of them never happened.
module tb_ssnoc_detector;
  localparam int unsigned N = ssnoc_pkg::N_TAPS_DEF;
  localparam int unsigned M = ssnoc_pkg::M_SENSORS_DEF;
  localparam int unsigned K = N / M;
  localparam int unsigned Y_W = ssnoc_pkg::sensor_out_w(ssnoc_pkg::X_W_DEF, ssnoc_pkg::H_W_DEF, K);
  localparam int unsigned LAT = 1 + 1 + $clog2(M) + 1;
  localparam int unsigned MAXC = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h_we = 1'b0;
  logic [$clog2(N)-1:0] h_addr = '0;
  logic signed [7:0] h_data = '0;
  logic signed [Y_W-1:0] thresh = '0;
  logic x_valid = 1'b0;
  logic signed [7:0] x_in = '0;
  logic dec_valid, decision;
  logic [$clog2(M+1)-1:0] vote_count;

  ssnoc_detector dut (
    .clk, .rst_n, .h_we, .h_addr, .h_data, .thresh,
    .x_valid, .x_in, .dec_valid, .decision, .vote_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_aligned = 0, n_detect_aligned = 0, n_unaligned = 0, n_false_alarm = 0;
  int n_ties = 0, n_equal_T = 0, n_gaps = 0, n_reloads = 0;

  initial begin : watchdog
    repeat (MAXC - 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  int code [N];       // reference copy of h
  int hist [N];       // hist[0] = newest accepted sample
  int unsigned cyc = 0;
  bit e_v [MAXC], e_d [MAXC], e_al [MAXC], e_use [MAXC];
  int e_cnt [MAXC];

  // Advance one clock and compare whatever is due this cycle.
  task automatic tick();
    @(posedge clk);
    #1;
    cyc++;
    check(dec_valid == e_v[cyc], "dec_valid latency");
    if (e_v[cyc]) begin
      check(decision == e_d[cyc], $sformatf("decision (count %0d)", e_cnt[cyc]));
      check(int'(vote_count) == e_cnt[cyc], "vote_count");
      if (e_use[cyc]) begin
        if (e_al[cyc]) begin
          n_aligned++;
          if (decision) n_detect_aligned++;
        end else begin
          n_unaligned++;
          if (decision) n_false_alarm++;
        end
      end
    end
  endtask

  task automatic load_code(input int unsigned seed);
    logic [8:0] lfsr;
    lfsr = 9'(seed) | 9'd1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      code[j] = lfsr[0] ? 1 : -1;
      h_we    = 1'b1;
      h_addr  = j[$clog2(N)-1:0];
      h_data  = 8'(code[j]);
      lfsr    = {lfsr[0] ^ lfsr[4], lfsr[8:1]};
      tick();
    end
    @(negedge clk) h_we = 1'b0;
    tick();
  endtask

  // Present one sample (or an idle cycle) and record its expected result.
  task automatic sample(input bit v, input int x, input bit aligned, input bit use_stat);
    int cnt, yi;
    @(negedge clk);
    x_valid = v;
    x_in    = 8'(x);
    e_v[cyc + LAT] = v;
    if (v) begin
      for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x;
      cnt = 0;
      for (int i = 0; i < M; i++) begin
        yi = 0;
        for (int j = 0; j < K; j++) yi += code[K*i+j] * hist[K*i+j];
        if (yi > int'(thresh)) cnt++;
        if (yi == int'(thresh)) n_equal_T++;
      end
      if (2 * cnt == M) n_ties++;
      e_cnt[cyc + LAT] = cnt;
      e_d[cyc + LAT]   = (2 * cnt >= M);
      e_al[cyc + LAT]  = aligned;
      e_use[cyc + LAT] = use_stat;
    end else begin
      n_gaps++;
    end
    tick();
  endtask

  // Noise, then the code embedded with amplitude amp: the sample that
  // completes the code is the aligned one.
  task automatic burst(input int amp, input int noise, input int gap_pct, input bit use_stat);
    int pre;
    pre = $urandom_range(20, 300);
    for (int t = 0; t < pre; t++) begin
      while ($urandom_range(0, 99) < gap_pct) sample(1'b0, 0, 1'b0, 1'b0);
      sample(1'b1, int'($urandom_range(0, 2 * noise)) - noise, 1'b0, use_stat);
    end
    for (int t = 0; t < N; t++) begin
      while ($urandom_range(0, 99) < gap_pct) sample(1'b0, 0, 1'b0, 1'b0);
      sample(1'b1, amp * code[N-1-t] + int'($urandom_range(0, 2 * noise)) - noise,
             t == N - 1, use_stat);
    end
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin
      code[j] = 0;
      hist[j] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    tick();
    load_code(9'h1a5);
    // Phase 1: clear signal, threshold halfway between 0 and 4*amp.
    thresh = Y_W'(40);
    for (int b = 0; b < 6; b++) burst(20, 40, 15, 1'b1);
    // Phase 2: threshold at the noise mean, so that about half of the sensors
    // exceed it and exact 32/32 ties occur.
    // T is used by the slicer stage, so it is changed only while no sample is
    // between the sensor and slicer registers.
    sample(1'b0, 0, 1'b0, 1'b0);
    thresh = Y_W'(0);
    for (int b = 0; b < 2; b++) burst(10, 40, 0, 1'b0);
    sample(1'b0, 0, 1'b0, 1'b0);
    thresh = Y_W'(40);
    // Phase 3: new code while idle, then detection with it.
    for (int t = 0; t < 5; t++) sample(1'b0, 0, 1'b0, 1'b0);
    load_code(9'h0f3);
    n_reloads++;
    for (int t = 0; t < N; t++) sample(1'b1, 0, 1'b0, 1'b0); // flush the old stream
    for (int b = 0; b < 3; b++) burst(20, 40, 10, 1'b1);
    for (int t = 0; t < LAT + 2; t++) sample(1'b0, 0, 1'b0, 1'b0);

    $display("aligned windows %0d, detected %0d; unaligned windows %0d, false alarms %0d",
             n_aligned, n_detect_aligned, n_unaligned, n_false_alarm);
    $display("ties %0d, sensors equal to T %0d, idle cycles %0d, code reloads %0d",
             n_ties, n_equal_T, n_gaps, n_reloads);
    check(n_detect_aligned > 0, "a detection happened");
    check(n_false_alarm < n_unaligned, "noise-only windows are mostly rejected");
    check(n_ties > 0, "a 32/32 vote tie happened");
    check(n_equal_T > 0, "a sensor output equal to T happened");
    check(n_gaps > 0, "an input gap happened");
    check(n_reloads > 0, "a code reload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
