// tb_fusion_block: self-checking testbench for the median-based fusion block.
//
// Every cycle a new set of 64 sensor outputs and a threshold is applied. Two
// independent references are used: (1) the median of the sorted outputs
// compared with T, which the decision must match whenever the vote is not an
// exact 32/32 tie, and (2) the count of outputs above T, which must match
// vote_count, with a tie resolving to 1. Half of the vectors are "clean"
// outputs clustered around a true value, after which up to (margin) sensors are
// overwritten with wild values, as a failing sensor would produce; the decision
// must still equal the clean decision. The testbench also counts how often the
// same corruption would have flipped a decision based on the sum of all
// outputs (the conventional adder-tree detector). Latency must be 8 cycles.
module tb_fusion_block;
  localparam int unsigned M = 64, Y_W = 18;
  localparam int unsigned LAT = 1 + $clog2(M) + 1;
  localparam int MAXV = (1 << (Y_W - 1)) - 1;
  localparam int MINV = -(1 << (Y_W - 1));

  logic clk = 1'b0, rst_n = 1'b0, y_valid = 1'b0;
  logic signed [Y_W-1:0] y [M];
  logic signed [Y_W-1:0] thresh = '0;
  logic d_valid, decision;
  logic [$clog2(M+1)-1:0] vote_count;

  int checks = 0, failures = 0;
  int n_median = 0, n_tie = 0, n_tolerated = 0, n_sum_flipped = 0;

  fusion_block #(.M(M), .Y_W(Y_W)) dut (
    .clk, .rst_n, .y_valid, .y, .thresh, .d_valid, .decision, .vote_count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  // Expected results, indexed by output cycle.
  bit  e_v [8192], e_med_ok [8192], e_med [8192], e_clean_ok [8192], e_clean [8192];
  int  e_cnt [8192];

  int unsigned cyc = 0;

  initial begin
    int vals [M];
    int srt [M];
    int cnt, clean_cnt, margin, nerr, tmp, t_int, sum_clean, sum_bad;
    bit v, clean_mode;
    for (int i = 0; i < M; i++) y[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 5) != 0);
      clean_mode = t[0];
      t_int = $urandom_range(0, 2000) - 1000;
      if (clean_mode) begin
        // True value near T, sensors scattered around it.
        tmp = t_int + $urandom_range(0, 400) - 200;
        for (int i = 0; i < M; i++) vals[i] = tmp + $urandom_range(0, 600) - 300;
      end else begin
        for (int i = 0; i < M; i++) begin
          case ($urandom_range(0, 3))
            0: vals[i] = t_int;
            1: vals[i] = t_int + 1;
            2: vals[i] = t_int - 1;
            default: vals[i] = $urandom_range(0, 4000) - 2000;
          endcase
        end
      end
      clean_cnt = 0;
      sum_clean = 0;
      for (int i = 0; i < M; i++) begin
        if (vals[i] > t_int) clean_cnt++;
        sum_clean += vals[i];
      end
      e_clean_ok[cyc + LAT] = 1'b0;
      if (clean_mode) begin
        // Corrupt as many sensors as the clean vote can absorb.
        margin = (2 * clean_cnt >= M) ? clean_cnt - M / 2 : M / 2 - 1 - clean_cnt;
        nerr   = (margin > 0) ? $urandom_range(1, margin) : 0;
        for (int e = 0; e < nerr; e++) begin
          int p;
          p = $urandom_range(0, M - 1);
          // Push the corrupted sensor to the wrong side, far away.
          vals[p] = (2 * clean_cnt >= M) ? MINV + $urandom_range(0, 100)
                                         : MAXV - $urandom_range(0, 100);
        end
        sum_bad = 0;
        for (int i = 0; i < M; i++) sum_bad += vals[i];
        if (nerr > 0 && v) begin
          e_clean_ok[cyc + LAT] = 1'b1;
          e_clean[cyc + LAT]    = (2 * clean_cnt >= M);
          if ((sum_clean > M * t_int) != (sum_bad > M * t_int)) n_sum_flipped++;
        end
      end
      cnt = 0;
      for (int i = 0; i < M; i++) begin
        y[i]   = Y_W'(vals[i]);
        srt[i] = vals[i];
        if (vals[i] > t_int) cnt++;
      end
      thresh = Y_W'(t_int);
      // Insertion sort (signed).
      for (int a = 1; a < M; a++) begin
        int key, b;
        key = srt[a];
        b   = a - 1;
        while (b >= 0 && srt[b] > key) begin
          srt[b+1] = srt[b];
          b--;
        end
        srt[b+1] = key;
      end
      e_v[cyc + LAT]   = v;
      e_cnt[cyc + LAT] = cnt;
      e_med_ok[cyc + LAT] = (cnt != M / 2);
      // 2 * median > 2 * T, with median = (srt[M/2-1] + srt[M/2]) / 2
      e_med[cyc + LAT] = (srt[M/2-1] + srt[M/2] > 2 * t_int);
      if (v && cnt == M / 2) n_tie++;
      y_valid = v;
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > LAT) begin
        check(d_valid == e_v[cyc], "valid latency");
        if (e_v[cyc]) begin
          check(int'(vote_count) == e_cnt[cyc], "vote count");
          check(decision == (2 * e_cnt[cyc] >= M), "majority rule");
          if (e_med_ok[cyc]) begin
            n_median++;
            check(decision == e_med[cyc], "decision equals sign(median - T)");
          end
          if (e_clean_ok[cyc]) begin
            n_tolerated++;
            check(decision == e_clean[cyc], "decision survives corrupted sensors");
          end
        end
      end
    end
    check(n_tie > 0 && n_median > 0 && n_tolerated > 0, "ties, median cases and corrupted sensors exercised");
    $display("fusion: median-compared=%0d ties=%0d corrupted-and-tolerated=%0d sum-detector-would-flip=%0d",
             n_median, n_tie, n_tolerated, n_sum_flipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
