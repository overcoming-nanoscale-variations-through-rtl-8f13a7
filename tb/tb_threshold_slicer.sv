// tb_threshold_slicer: self-checking testbench for the threshold comparators.
//
// Random sensor outputs and thresholds are applied, with a share of outputs
// set exactly equal to the threshold and the extreme values of the format
// used, so that positive, zero and negative differences all occur. Each sign
// bit must be 1 only for y_i > T and must appear one cycle after the input.
module tb_threshold_slicer;
  localparam int unsigned M = 64, Y_W = 18;

  logic clk = 1'b0, rst_n = 1'b0, y_valid = 1'b0;
  logic signed [Y_W-1:0] y [M];
  logic signed [Y_W-1:0] thresh = '0;
  logic s_valid;
  logic [M-1:0] s;

  int checks = 0, failures = 0, n_equal = 0;

  threshold_slicer #(.M(M), .Y_W(Y_W)) dut (
    .clk, .rst_n, .y_valid, .y, .thresh, .s_valid, .s);

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

  localparam int MAXV = (1 << (Y_W - 1)) - 1;
  localparam int MINV = -(1 << (Y_W - 1));

  initial begin
    bit v;
    bit [M-1:0] exp_s;
    for (int i = 0; i < M; i++) y[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      y_valid = v;
      case (t % 4)
        0: thresh = Y_W'($urandom);
        1: thresh = Y_W'($urandom_range(0, 200)) - Y_W'(100);
        2: thresh = Y_W'(MAXV);
        default: thresh = Y_W'(MINV);
      endcase
      for (int i = 0; i < M; i++) begin
        case ($urandom_range(0, 5))
          0: y[i] = thresh;
          1: y[i] = thresh + Y_W'(1);
          2: y[i] = Y_W'(MINV);
          3: y[i] = Y_W'(MAXV);
          default: y[i] = Y_W'($urandom);
        endcase
        exp_s[i] = (int'(y[i]) > int'(thresh));
        if (y[i] == thresh) n_equal++;
      end
      @(posedge clk);
      #1;
      check(s_valid == v, "s_valid");
      for (int i = 0; i < M; i++)
        check(s[i] == exp_s[i], $sformatf("sign %0d y=%0d T=%0d", i, y[i], thresh));
    end
    check(n_equal > 0, "zero difference exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
