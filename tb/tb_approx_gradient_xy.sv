// Test of approx_gradient_xy: random windows, flat windows and pure vertical
// and horizontal steps, one per cycle with gaps. The approximate magnitude and
// both sign flags are checked against the reference model three cycles after
// the window; an exact instance (depths 0) is checked against the exact
// |Gx| + |Gy|.
module tb_approx_gradient_xy;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  window_t     win;
  logic        v_ap, v_ex, fx, fy, fx_ex, fy_ex;
  logic [10:0] m_ap, m_ex;
  int checks = 0, failures = 0, cycle = 0;
  int n_flat = 0, n_vert = 0, n_horz = 0, n_diff = 0;

  approx_gradient_xy dut (.clk, .rst_n, .in_valid, .win, .out_valid(v_ap), .mag(m_ap), .flag_x(fx), .flag_y(fy));
  approx_gradient_xy #(.SUB_APPROX(0), .MUL_APPROX(0), .ADD_APPROX(0)) dut_ex (
    .clk, .rst_n, .in_valid, .win, .out_valid(v_ex), .mag(m_ex), .flag_x(fx_ex), .flag_y(fy_ex));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int mag; bit px; bit py; int emag; int t0; } exp_t;
  exp_t q[$];

  initial begin
    win = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int kind;
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      kind = n % 4;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (kind)
            0: win[r][c] = 8'($urandom_range(0, 255));
            1: win[r][c] = 8'(100 + n % 50);                       // flat
            2: win[r][c] = (c == 0) ? 8'(n % 256) : 8'(255 - n % 256); // vertical step
            default: win[r][c] = (r == 2) ? 8'(n % 256) : 8'(30);      // horizontal step
          endcase
      if (in_valid) begin
        int w[3][3];
        exp_t e;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = win[r][c];
        e.mag  = ref_mag(w, 2, 4, 2, e.px, e.py);
        e.emag = exact_mag(w);
        e.t0   = cycle;
        q.push_back(e);
        if (kind == 1) n_flat++;
        if (kind == 2) n_vert++;
        if (kind == 3) n_horz++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    checks++;
    if (n_flat == 0 || n_vert == 0 || n_horz == 0 || n_diff == 0) failures++;
    $display("flat=%0d vertical=%0d horizontal=%0d approximate!=exact=%0d", n_flat, n_vert, n_horz, n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (v_ap != v_ex) failures++;
      if (v_ap) begin
        exp_t e;
        if (q.size() == 0) failures++;
        else begin
          e = q.pop_front();
          checks += 3;
          if (cycle - e.t0 != 3) begin
            failures++;
            if (failures < 10) $display("latency %0d", cycle - e.t0);
          end
          if (int'(m_ap) != e.mag || fx != e.px || fy != e.py) begin
            failures++;
            if (failures < 10) $display("approx: got %0d expected %0d", m_ap, e.mag);
          end
          if (int'(m_ex) != e.emag) begin
            failures++;
            if (failures < 10) $display("exact: got %0d expected %0d", m_ex, e.emag);
          end
          if (int'(m_ap) != e.emag) n_diff++;
        end
      end
    end
  end
endmodule
