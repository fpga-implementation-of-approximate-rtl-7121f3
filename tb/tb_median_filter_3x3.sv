// Test of median_filter_3x3: random windows, windows with many equal pixels
// and single outliers in a flat window, one per cycle with gaps; the output
// one cycle later must equal the fifth element of the sorted window.
module tb_median_filter_3x3;
  import sobel_pkg::*;

  logic    clk = 0, rst_n = 0, in_valid = 0;
  window_t win;
  logic    out_valid;
  pixel_t  med;
  int checks = 0, failures = 0, n_outlier = 0, n_ties = 0;
  int q[$];

  median_filter_3x3 dut (.clk, .rst_n, .in_valid, .win, .out_valid, .med);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int v[9];
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      for (int i = 0; i < 9; i++) begin
        case (n % 3)
          0: v[i] = $urandom_range(0, 255);
          1: v[i] = $urandom_range(0, 3) * 60;              // many ties
          default: v[i] = 80;                               // flat
        endcase
      end
      if (n % 3 == 2) v[$urandom_range(0, 8)] = (n % 2) ? 255 : 0;  // one outlier
      for (int i = 0; i < 9; i++) win[i / 3][i % 3] = 8'(v[i]);
      if (in_valid) begin
        v.sort();
        q.push_back(v[4]);
        if (n % 3 == 2) n_outlier++;
        if (n % 3 == 1) n_ties++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (q.size() != 0) failures++;
    if (n_outlier == 0 || n_ties == 0) failures++;
    $display("outlier windows=%0d windows with ties=%0d", n_outlier, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results are checked half a cycle after the edge that produced them
  logic v_q = 0;
  always @(posedge clk) v_q <= in_valid;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != v_q) failures++;
      if (out_valid) begin
        int e;
        checks++;
        if (q.size() == 0) failures++;
        else begin
          e = q.pop_front();
          if (int'(med) != e) begin
            failures++;
            if (failures < 10) $display("median %0d expected %0d", med, e);
          end
        end
      end
    end
  end
endmodule
