// tb_majority_voter: self-checking testbench for the majority voter.
//
// A 64-input voter (the document's size) and a 5-input voter (odd size, with
// zero padding in the adder tree) are fed a new vote vector every cycle, with
// random gaps in the valid flag. The number of ones is chosen around the
// decision point (M/2 - 1, M/2, M/2 + 1) as well as at random and at the
// extremes. The expected decision (at least half of the votes are 1) and count
// are queued and must come out exactly LEVELS + 1 cycles later.
module tb_majority_voter;
  localparam int unsigned MA = 64, MB = 5;
  localparam int unsigned LAT_A = $clog2(MA) + 1, LAT_B = $clog2(MB) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic va = 1'b0, vb = 1'b0;
  logic [MA-1:0] ina = '0;
  logic [MB-1:0] inb = '0;
  logic da_valid, db_valid, da, db;
  logic [$clog2(MA+1)-1:0] ca;
  logic [$clog2(MB+1)-1:0] cb;

  int checks = 0, failures = 0, ties = 0, ones = 0, zeros = 0;

  majority_voter #(.M(MA)) dut_a (
    .clk, .rst_n, .v_valid(va), .v_in(ina), .d_valid(da_valid), .decision(da), .count(ca));
  majority_voter #(.M(MB)) dut_b (
    .clk, .rst_n, .v_valid(vb), .v_in(inb), .d_valid(db_valid), .decision(db), .count(cb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  // Expected (valid, decision, count) per cycle, indexed by cycle number.
  int unsigned cyc = 0;
  bit exp_va [4096], exp_da [4096], exp_vb [4096], exp_db [4096];
  int exp_ca [4096], exp_cb [4096];

  function automatic logic [MA-1:0] vec_with_ones(int k);
    logic [MA-1:0] r = '0;
    int placed = 0;
    while (placed < k) begin
      int p = $urandom_range(0, MA - 1);
      if (!r[p]) begin r[p] = 1'b1; placed++; end
    end
    return r;
  endfunction

  initial begin
    int k;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      va = ($urandom_range(0, 4) != 0);
      vb = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 6))
        0: k = MA / 2;
        1: k = MA / 2 - 1;
        2: k = MA / 2 + 1;
        3: k = 0;
        4: k = MA;
        default: k = $urandom_range(0, MA);
      endcase
      ina = vec_with_ones(k);
      inb = MB'($urandom);
      exp_va[cyc + LAT_A] = va;
      exp_da[cyc + LAT_A] = (2 * k >= MA);
      exp_ca[cyc + LAT_A] = k;
      exp_vb[cyc + LAT_B] = vb;
      exp_db[cyc + LAT_B] = (2 * $countones(inb) >= MB);
      exp_cb[cyc + LAT_B] = $countones(inb);
      if (va && k == MA / 2) ties++;
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > LAT_A) begin
        check(da_valid == exp_va[cyc], "A valid latency");
        if (exp_va[cyc]) begin
          check(da == exp_da[cyc], $sformatf("A decision count=%0d", exp_ca[cyc]));
          check(int'(ca) == exp_ca[cyc], "A count");
          if (da) ones++; else zeros++;
        end
      end
      if (cyc > LAT_B) begin
        check(db_valid == exp_vb[cyc], "B valid latency");
        if (exp_vb[cyc]) begin
          check(db == exp_db[cyc], "B decision");
          check(int'(cb) == exp_cb[cyc], "B count");
        end
      end
    end
    check(ties > 0 && ones > 0 && zeros > 0, "ties, ones and zeros all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
