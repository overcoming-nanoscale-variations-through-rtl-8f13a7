// tb_pn_code_store: self-checking testbench for the PN-code register bank.
//
// Checks that reset clears all 256 coefficients, that a write changes exactly
// the addressed coefficient on the next clock edge, that nothing changes
// without h_we, and that a full random code written in random order reads back
// in parallel.
module tb_pn_code_store;
  localparam int unsigned N = 256, H_W = 8, A_W = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, h_we = 1'b0;
  logic [A_W-1:0] h_addr = '0;
  logic signed [H_W-1:0] h_data = '0;
  logic signed [H_W-1:0] h_all [N];

  int checks = 0, failures = 0;
  int model [N];

  pn_code_store #(.N_TAPS(N), .H_W(H_W)) dut (
    .clk, .rst_n, .h_we, .h_addr, .h_data, .h_all);

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

  task automatic compare_all(input string what);
    for (int j = 0; j < N; j++) check(int'(h_all[j]) == model[j], $sformatf("%s h[%0d]", what, j));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    for (int j = 0; j < N; j++) model[j] = 0;
    #1 compare_all("reset");
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      h_we   = ($urandom_range(0, 2) != 0);
      h_addr = A_W'($urandom);
      h_data = H_W'($urandom);
      @(posedge clk);
      #1;
      if (h_we) model[h_addr] = int'(h_data);
      if (t % 50 == 0) compare_all("random writes");
      else check(int'(h_all[h_addr]) == model[h_addr], "written coefficient");
    end
    @(negedge clk) h_we = 1'b0;
    compare_all("final");
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk); #1;
    for (int j = 0; j < N; j++) model[j] = 0;
    compare_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
