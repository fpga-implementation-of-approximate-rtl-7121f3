// Exhaustive test of approx_subtractor at 8 bits: difference and carry (sign)
// flag of the 2-bit approximate configuration against the definition, the
// error bound and exact zero for equal operands; the exact configuration
// against a - b.
module tb_approx_subtractor;
  import sobel_ref_pkg::*;

  localparam int W = 8;
  localparam int K = 2;

  logic [W-1:0] a, b, d_ap, d_ex;
  logic         c_ap, c_ex;
  int checks = 0, failures = 0, approx_differs = 0;

  approx_subtractor #(.W(W), .APPROX_BITS(K)) dut_ap (.a, .b, .diff(d_ap), .carry(c_ap));
  approx_subtractor #(.W(W), .APPROX_BITS(0)) dut_ex (.a, .b, .diff(d_ex), .carry(c_ex));

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
        int r, e, got, got_ex;
        a = W'(i); b = W'(j);
        #1;
        r      = ref_sub(i, j, W, K);
        e      = i - j;
        got    = int'(signed'({~c_ap, d_ap}));
        got_ex = int'(signed'({~c_ex, d_ex}));
        checks += 4;
        if (got != r || c_ap != (r >= 0)) begin
          failures++;
          if (failures < 10) $display("approx %0d - %0d: got %0d expected %0d", i, j, got, r);
        end
        if (got_ex != e || c_ex != (e >= 0)) begin
          failures++;
          if (failures < 10) $display("exact %0d - %0d: got %0d", i, j, got_ex);
        end
        if (got - e >= (1 << K) || e - got >= (1 << K)) failures++;
        if (i == j && got != 0) failures++;
        if (got != e) approx_differs++;
      end
    end
    checks++;
    if (approx_differs == 0) begin
      failures++;
      $display("approximate subtractor never differed from the exact difference");
    end
    $display("approximate differences differing from exact: %0d", approx_differs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
