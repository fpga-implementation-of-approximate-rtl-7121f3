// Exhaustive test of approx_adder at 8 bits: the approximate adder (2 low OR
// bits) against the lower-part-OR definition and against an error bound of
// 2**2, and the exact configuration (0 approximate bits) against a + b.
module tb_approx_adder;
  import sobel_ref_pkg::*;

  localparam int W = 8;
  localparam int K = 2;

  logic [W-1:0] a, b, s_ap, s_ex;
  logic         c_ap, c_ex;
  int checks = 0, failures = 0, approx_differs = 0;

  approx_adder #(.W(W), .APPROX_BITS(K)) dut_ap (.a, .b, .sum(s_ap), .cout(c_ap));
  approx_adder #(.W(W), .APPROX_BITS(0)) dut_ex (.a, .b, .sum(s_ex), .cout(c_ex));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        int r, e, got;
        a = W'(i); b = W'(j);
        #1;
        r   = ref_add(i, j, W, K);
        e   = i + j;
        got = {c_ap, s_ap};
        checks += 3;
        if (got != r) begin
          failures++;
          if (failures < 10) $display("approx %0d + %0d: got %0d expected %0d", i, j, got, r);
        end
        if ({c_ex, s_ex} != (W+1)'(e)) begin
          failures++;
          if (failures < 10) $display("exact %0d + %0d: got %0d", i, j, {c_ex, s_ex});
        end
        if (got - e >= (1 << K) || e - got >= (1 << K)) failures++;
        if (got != e) approx_differs++;
      end
    end
    checks++;
    if (approx_differs == 0) begin
      failures++;
      $display("approximate adder never differed from the exact sum");
    end
    $display("approximate sums differing from exact: %0d of %0d", approx_differs, 1 << (2 * W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
