// Test of approx_gradient: a new random pixel triple pair every cycle (with
// occasional equal pairs and gaps), checked against the reference model two
// cycles later; a second instance with all approximation depths 0 is checked
// against the exact weighted difference. Counts positive and negative
// gradients, i.e. both paths of the two's complement multiplexer.
module tb_approx_gradient;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic         clk = 0, rst_n = 0, in_valid = 0;
  pixel_t [2:0] pa, pb;
  logic         v_ap, v_ex, f_ap, f_ex;
  logic [9:0]   m_ap, m_ex;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_approx_diff = 0;

  approx_gradient dut (.clk, .rst_n, .in_valid, .pa, .pb, .out_valid(v_ap), .mag(m_ap), .flag(f_ap));
  approx_gradient #(.SUB_APPROX(0), .MUL_APPROX(0), .ADD_APPROX(0)) dut_ex (
    .clk, .rst_n, .in_valid, .pa, .pb, .out_valid(v_ex), .mag(m_ex), .flag(f_ex));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, pushed at the input, popped at the output
  typedef struct { int mag; bit pos; int emag; bit epos; } exp_t;
  exp_t q[$];
  int   lat_q[$];
  int   cycle = 0;

  always @(posedge clk) cycle++;

  initial begin
    pa = '0; pb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      for (int k = 0; k < 3; k++) begin
        pa[k] = 8'($urandom_range(0, 255));
        pb[k] = (n % 5 == 0) ? pa[k] : 8'($urandom_range(0, 255));
      end
      if (n % 11 == 0) begin pa = '1; pb = '0; end
      if (n % 13 == 0) begin pa = '0; pb = '1; end
      if (in_valid) begin
        int a[3], b[3], ex;
        exp_t e;
        for (int k = 0; k < 3; k++) begin a[k] = pa[k]; b[k] = pb[k]; end
        e.mag  = ref_grad(a, b, 2, 4, 2, e.pos);
        ex     = (a[0] - b[0]) + 2 * (a[1] - b[1]) + (a[2] - b[2]);
        e.epos = (ex >= 0);
        e.emag = e.epos ? ex : -ex;
        q.push_back(e);
        lat_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_approx_diff == 0) failures++;
    $display("positive=%0d negative=%0d approximate!=exact=%0d", n_pos, n_neg, n_approx_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (v_ap != v_ex) failures++;
      if (v_ap) begin
        exp_t e;
        int t0;
        if (q.size() == 0) begin
          failures++;
        end else begin
          e  = q.pop_front();
          t0 = lat_q.pop_front();
          checks += 4;
          if (cycle - t0 != 2) begin
            failures++;
            if (failures < 10) $display("latency %0d", cycle - t0);
          end
          if (int'(m_ap) != e.mag || f_ap != e.pos) begin
            failures++;
            if (failures < 10) $display("approx: got %0d/%0b expected %0d/%0b", m_ap, f_ap, e.mag, e.pos);
          end
          if (int'(m_ex) != e.emag || f_ex != e.epos) begin
            failures++;
            if (failures < 10) $display("exact: got %0d/%0b expected %0d/%0b", m_ex, f_ex, e.emag, e.epos);
          end
          if (int'(m_ap) - e.emag > 32 || e.emag - int'(m_ap) > 32) failures++;
          if (e.pos) n_pos++; else n_neg++;
          if (int'(m_ap) != e.emag) n_approx_diff++;
        end
      end
    end
  end
endmodule
