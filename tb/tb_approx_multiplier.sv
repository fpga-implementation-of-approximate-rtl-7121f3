// Exhaustive test of approx_multiplier at 8 x 8 bits: the 4-column
// approximate configuration against a column-count model of the partial
// products, the exact configuration against a * b, and the x2 configuration
// used in the gradient datapath on all 11-bit two's complement inputs.
module tb_approx_multiplier;
  import sobel_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p_ap, p_ex;
  logic [10:0] t, t2;
  int checks = 0, failures = 0, approx_differs = 0;

  approx_multiplier #(.A_W(8), .B_W(8), .P_W(16), .APPROX_COLS(4)) dut_ap (.a, .b, .p(p_ap));
  approx_multiplier #(.A_W(8), .B_W(8), .P_W(16), .APPROX_COLS(0)) dut_ex (.a, .b, .p(p_ex));
  approx_multiplier #(.A_W(11), .B_W(2), .P_W(11), .APPROX_COLS(4)) dut_x2 (.a(t), .b(2'd2), .p(t2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks += 2;
        if (longint'(p_ap) != ref_mul(i, j, 8, 8, 16, 4)) begin
          failures++;
          if (failures < 10) $display("approx %0d * %0d: got %0d", i, j, p_ap);
        end
        if (int'(p_ex) != i * j) begin
          failures++;
          if (failures < 10) $display("exact %0d * %0d: got %0d", i, j, p_ex);
        end
        if (int'(p_ap) != i * j) approx_differs++;
      end
    end
    for (int v = -1024; v < 1024; v++) begin
      t = 11'(v);
      #1;
      checks++;
      if (t2 != 11'(2 * v)) begin
        failures++;
        if (failures < 10) $display("x2 of %0d: got %0d", v, signed'(t2));
      end
    end
    checks++;
    if (approx_differs == 0) begin
      failures++;
      $display("approximate multiplier never differed from the exact product");
    end
    $display("approximate products differing from exact: %0d", approx_differs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
