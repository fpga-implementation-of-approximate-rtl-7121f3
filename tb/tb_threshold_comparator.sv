// Test of threshold_comparator: random magnitudes and thresholds, including
// equal values, with and without enable; result and result_valid one cycle
// after en, result held while en is low.
module tb_threshold_comparator;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [10:0] data = 0, threshold = 0;
  logic        result, result_valid;
  int checks = 0, failures = 0, edges = 0, nonedges = 0, held = 0;

  threshold_comparator #(.W(11)) dut (.clk, .rst_n, .en, .data, .threshold, .result, .result_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_res = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      bit e;
      @(negedge clk);
      e         = ($urandom_range(0, 3) != 0);
      en        = e;
      data      = 11'($urandom_range(0, 2047));
      threshold = (n % 7 == 0) ? data : 11'($urandom_range(0, 2047));
      if (e) exp_res = (int'(data) > int'(threshold));
      @(posedge clk);
      #1;
      checks += 2;
      if (result_valid != e) failures++;
      if (result != exp_res) begin
        failures++;
        if (failures < 10) $display("n=%0d data=%0d thr=%0d got %0b", n, data, threshold, result);
      end
      if (e && exp_res) edges++;
      else if (e) nonedges++;
      else held++;
    end
    checks++;
    if (edges == 0 || nonedges == 0 || held == 0) failures++;
    $display("edge=%0d non-edge=%0d held=%0d", edges, nonedges, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
