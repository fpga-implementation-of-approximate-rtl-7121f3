// Behavioural model of an external asynchronous SRAM of 2**AW x 8 bits, for
// simulation only. Reads are combinational: with the chip selected, output
// enable low and write enable high, the addressed byte appears on the data
// bus. A write takes the bus value into the addressed byte on the rising edge
// of the write strobe while the chip is selected. The content starts at zero.
module async_sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic [AW-1:0] addr,
  inout  wire  [7:0]    d,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);

  logic [7:0] mem [2**AW];
  int unsigned writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;

  assign d = (!ce_n && !oe_n && we_n) ? mem[addr] : 'z;

  always @(posedge we_n) begin
    if (!ce_n) begin
      mem[addr] = d;
      writes++;
    end
  end

  function automatic logic [7:0] peek(int unsigned a);
    return mem[a];
  endfunction

  task automatic poke(int unsigned a, logic [7:0] v);
    mem[a] = v;
  endtask

endmodule
