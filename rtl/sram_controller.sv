// Asynchronous SRAM controller.
//
// Connects a host to an external asynchronous SRAM of 2**19 x 8 bits. The
// host requests a read with re or a write with we, gives the 19-bit address
// on addr_n and, for a write, the byte on din. Each access takes two states,
// RD0 then RD1 for a read and WR0 then WR1 for a write, so back-to-back
// accesses with re (or we) held high run at one byte every two cycles.
//
// State transitions (S_IDLE is the idle state):
//   S_IDLE: re -> RD0, else we -> WR0, else stay
//   RD0:    re -> RD1, else we -> WR0, else idle
//   RD1:    re -> RD0, else we -> WR0, else idle
//   WR0:    we -> WR1, else re -> RD0, else idle
//   WR1:    re -> RD0, else we -> WR0, else idle
// The original design gives idle->RD0 on re, idle->WR0 on we, RD0->RD1 on re with
// we low, WR0->WR1 on we with re low, WR1->RD0 on re, and RD0/WR0->idle with
// both low; the remaining combinations, and the priority of re over we in
// idle, are this design's choice.
//
// Device side: the address is registered on entry to RD0/WR0 and held for the
// whole access on addrout. The bidirectional data bus D appears as its input
// d_i, output d_o and output enable d_oe; the tristate pad joins them at the
// top level. During a read the chip is enabled with output
// enable low in RD0 and RD1, and the byte on the data bus is taken
// into dataout at the end of RD1; en is high for the following cycle and
// marks dataout as new. During a write the controller drives the bus in WR0 and
// WR1 and pulls the write strobe low in WR0 only, so the data is written on
// its rising edge and held for one more cycle. The chip-select, output- and
// write-enable pins and the din port are this design's additions, since a
// real SRAM needs them.
//
// rd and wr qualify the data transfer: a read returns data (en) only if rd is
// high in RD1, and a write strobes the chip only if wr is high when the write
// begins. rst_n is active low; reset returns the FSM to idle with all strobes
// inactive and the bus released.
module sram_controller
  import sobel_pkg::*;
(
  input  logic              clk,       // Clk
  input  logic              rst_n,     // Rstn
  input  logic [ADDR_W-1:0] addr_n,    // Addr_n
  input  logic              re,        // Re
  input  logic              we,        // We
  input  logic              rd,        // RD
  input  logic              wr,        // WR
  input  pixel_t            din,       // byte to write
  input  pixel_t            d_i,       // D, read from the SRAM data pins
  output pixel_t            d_o,       // D, driven onto the SRAM data pins
  output logic              d_oe,      // drive d_o onto the pins
  output pixel_t            dataout,
  output logic              en,        // dataout is new
  output logic [ADDR_W-1:0] addrout,   // Addrout, to the SRAM address pins
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output sram_state_t       state
);

  sram_state_t state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE:  state_d = re ? S_RD0 : (we ? S_WR0 : S_IDLE);
      S_RD0:   state_d = re ? S_RD1 : (we ? S_WR0 : S_IDLE);
      S_RD1:   state_d = re ? S_RD0 : (we ? S_WR0 : S_IDLE);
      S_WR0:   state_d = we ? S_WR1 : (re ? S_RD0 : S_IDLE);
      S_WR1:   state_d = re ? S_RD0 : (we ? S_WR0 : S_IDLE);
      default: state_d = S_IDLE;
    endcase
  end

  logic   starting;   // an access begins with the next clock edge
  logic   wr_q;
  pixel_t wdata_q;
  logic   drive;

  assign starting = (state_d == S_RD0 || state_d == S_WR0) && (state_d != state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addrout   <= '0;
      wdata_q   <= '0;
      wr_q      <= 1'b0;
      dataout   <= '0;
      en        <= 1'b0;
      sram_ce_n <= 1'b1;
      sram_oe_n <= 1'b1;
      sram_we_n <= 1'b1;
    end else begin
      state <= state_d;
      if (starting) addrout <= addr_n;
      if (starting && state_d == S_WR0) begin
        wdata_q <= din;
        wr_q    <= wr;
      end
      en <= 1'b0;
      if (state == S_RD1 && rd) begin
        dataout <= d_i;
        en      <= 1'b1;
      end
      sram_ce_n <= (state_d == S_IDLE);
      sram_oe_n <= !(state_d == S_RD0 || state_d == S_RD1);
      sram_we_n <= !(state_d == S_WR0 && (starting ? wr : wr_q));
    end
  end

  assign drive = (state == S_WR0 || state == S_WR1) && wr_q;
  assign d_oe  = drive;
  assign d_o   = wdata_q;

  // the controller never drives the bus while the chip drives it
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n) !(drive && !sram_oe_n));

endmodule
