// sram_array: synchronous single-port SRAM model of the data memory.
//
// Functional model of a complete SRAM macro: the memory cell array, the
// address decoder, the write drivers, the sense amplifiers, the data-in and
// data-out registers and the timing circuit are folded into one array of
// words. An access is requested with en=1; we selects write (1) or read (0),
// as the r/w and enable inputs of a classic SRAM. A write stores the bytes
// of wdata whose be bit is set at the clock edge. A read returns the word on
// rdata one cycle after the request (the data-out register); rdata holds its
// value until the next read. Contents are not reset, as in a real SRAM.
//
// From the source: the pin set (r/w, enable, address, data in, data out) and
// the 8192 x 32-bit size of the processor's data RAM. This design's own
// choices: byte enables (the processor writes bytes and half-words) and the
// one-cycle read latency.
module sram_array #(
  parameter int unsigned WORDS  = bti_flip_pkg::DEF_WORDS,
  parameter int unsigned DATA_W = bti_flip_pkg::DEF_DATA_W,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned BE_W   = DATA_W / 8
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BE_W-1:0]   be,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < BE_W; b++) begin
          if (be[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
        end
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
