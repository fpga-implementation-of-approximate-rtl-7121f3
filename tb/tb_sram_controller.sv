// Test of sram_controller against a behavioural asynchronous SRAM.
// Streams of back-to-back writes and reads at random addresses (checked in
// the memory and on dataout), the one-byte-per-two-cycles rate of a read
// stream, the write-to-read switch WR1 -> RD0, a read abandoned in RD0, a
// write with wr low (memory unchanged), a read with rd low (no en) and both
// requests high at once (read first). Every
// state transition taken is checked against the transition table and
// counted; each of the transitions the original design names must occur.
module tb_sram_controller;
  import sobel_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] addr_n = '0;
  logic              re = 0, we = 0, rd = 1, wr = 1;
  pixel_t            din = '0, dataout, d_o;
  logic              en, d_oe, ce_n, oe_n, we_n;
  logic [ADDR_W-1:0] addrout;
  sram_state_t       state, prev_state;
  wire [7:0]         bus;
  int checks = 0, failures = 0;
  int trans [5][5];

  sram_controller dut (
    .clk, .rst_n, .addr_n, .re, .we, .rd, .wr, .din, .d_i(bus), .d_o, .d_oe,
    .dataout, .en, .addrout, .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n), .state
  );
  assign bus = d_oe ? d_o : 'z;
  async_sram_model #(.AW(ADDR_W)) mem (.addr(addrout), .d(bus), .ce_n, .oe_n, .we_n);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transition table, written out from the specification
  function automatic sram_state_t next_of(sram_state_t s, bit r, bit w);
    case (s)
      S_IDLE:  return r ? S_RD0 : w ? S_WR0 : S_IDLE;
      S_RD0:   return r ? S_RD1 : w ? S_WR0 : S_IDLE;
      S_RD1:   return r ? S_RD0 : w ? S_WR0 : S_IDLE;
      S_WR0:   return w ? S_WR1 : r ? S_RD0 : S_IDLE;
      default: return r ? S_RD0 : w ? S_WR0 : S_IDLE;
    endcase
  endfunction

  bit re_q, we_q;
  always @(posedge clk) begin
    re_q <= re;
    we_q <= we;
    prev_state <= state;
  end
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (state != next_of(prev_state, re_q, we_q)) begin
        failures++;
        $display("transition %s -> %s with re=%0b we=%0b", prev_state.name(), state.name(), re_q, we_q);
      end
      trans[prev_state][state]++;
      checks++;
      if (d_oe && !oe_n) failures++;
    end
  end

  // one write with we held for WR0 and WR1
  task automatic write_stream(int n, logic [ADDR_W-1:0] a[], pixel_t v[]);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      we = 1; addr_n = a[i]; din = v[i];
      @(negedge clk);  // now in WR0
      @(negedge clk);  // now in WR1, where the next write is requested
    end
    we = 0;
  endtask

  logic [ADDR_W-1:0] addrs [];
  pixel_t            vals  [];
  int                en_cycles [$];
  int                cycle = 0;
  pixel_t            got [$];

  always @(negedge clk) begin
    cycle++;
    if (en) begin
      en_cycles.push_back(cycle);
      got.push_back(dataout);
    end
  end

  initial begin
    int n = 64;
    addrs = new[n];
    vals  = new[n];
    for (int i = 0; i < n; i++) begin
      addrs[i] = ADDR_W'($urandom_range(0, (1 << ADDR_W) - 1));
      vals[i]  = 8'($urandom_range(1, 255));
    end
    repeat (3) @(negedge clk);
    checks += 4;
    if (state != S_IDLE || !ce_n || !oe_n || !we_n) failures++;
    rst_n = 1;

    // back-to-back writes
    write_stream(n, addrs, vals);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (mem.peek(addrs[i]) !== vals[i]) begin
        // a later write to the same address may have replaced it
        bool_later: begin
          bit later = 0;
          for (int j = i + 1; j < n; j++) if (addrs[j] == addrs[i]) later = 1;
          if (!later) begin
            failures++;
            $display("write %0d to %h lost", i, addrs[i]);
          end
        end
      end
    end

    // back-to-back reads of the same addresses
    got.delete();
    en_cycles.delete();
    @(negedge clk);
    re = 1; addr_n = addrs[0];
    for (int i = 1; i <= n; i++) begin
      @(negedge clk);  // RD0
      @(negedge clk);  // RD1: give the next address
      if (i < n) addr_n = addrs[i];
      else re = 0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != n) begin
      failures++;
      $display("%0d reads returned, expected %0d", got.size(), n);
    end
    for (int i = 0; i < n && i < got.size(); i++) begin
      checks++;
      if (got[i] != mem.peek(addrs[i])) begin
        failures++;
        $display("read %0d from %h: %h expected %h", i, addrs[i], got[i], mem.peek(addrs[i]));
      end
    end
    for (int i = 1; i < en_cycles.size(); i++) begin
      checks++;
      if (en_cycles[i] - en_cycles[i-1] != 2) failures++;
    end

    // write followed directly by a read: WR1 -> RD0
    got.delete();
    @(negedge clk);
    we = 1; addr_n = 19'h12345; din = 8'h5a;
    @(negedge clk);                      // WR0
    @(negedge clk);                      // WR1
    we = 0; re = 1;                      // read the same byte
    @(negedge clk);                      // RD0
    @(negedge clk);                      // RD1
    re = 0;
    repeat (2) @(negedge clk);
    checks += 2;
    if (got.size() != 1 || got[0] != 8'h5a) failures++;
    if (mem.peek(19'h12345) != 8'h5a) failures++;

    // read abandoned in RD0: back to idle, no data
    got.delete();
    re = 1; addr_n = 19'h12345;
    @(negedge clk);                      // RD0
    re = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (got.size() != 0) failures++;
    if (state != S_IDLE) failures++;

    // write with wr low leaves the memory alone
    wr = 0;
    we = 1; addr_n = 19'h00077; din = 8'hc3;
    repeat (2) @(negedge clk);
    we = 0;
    repeat (2) @(negedge clk);
    wr = 1;
    checks++;
    if (mem.peek(19'h00077) == 8'hc3) failures++;

    // read with rd low returns nothing
    got.delete();
    rd = 0; re = 1; addr_n = 19'h12345;
    repeat (2) @(negedge clk);
    re = 0;
    repeat (2) @(negedge clk);
    rd = 1;
    checks++;
    if (got.size() != 0) failures++;

    // re and we both high from idle: the read goes first and continues
    got.delete();
    re = 1; we = 1; addr_n = 19'h12345;
    @(negedge clk);                      // RD0
    checks++;
    if (state != S_RD0) failures++;
    @(negedge clk);                      // RD1
    re = 0; we = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (got.size() != 1 || got[0] != 8'h5a) failures++;
    if (trans[S_RD0][S_RD1] == 0 || state != S_IDLE) failures++;

    // one strobe per write: n stream writes and the one before the read
    checks++;
    if (mem.writes != n + 1) begin
      failures++;
      $display("%0d write strobes, expected %0d", mem.writes, n + 1);
    end
    // the transitions the original design names must all have occurred
    checks += 7;
    if (trans[S_IDLE][S_RD0] == 0) begin failures++; $display("IDLE->RD0 never"); end
    if (trans[S_IDLE][S_WR0] == 0) begin failures++; $display("IDLE->WR0 never"); end
    if (trans[S_RD0][S_RD1]  == 0) begin failures++; $display("RD0->RD1 never"); end
    if (trans[S_WR0][S_WR1]  == 0) begin failures++; $display("WR0->WR1 never"); end
    if (trans[S_WR1][S_RD0]  == 0) begin failures++; $display("WR1->RD0 never"); end
    if (trans[S_RD0][S_IDLE] == 0) begin failures++; $display("RD0->IDLE never"); end
    if (trans[S_RD1][S_RD0]  == 0) begin failures++; $display("RD1->RD0 never"); end
    $display("writes seen by the SRAM: %0d", mem.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
