// sram_sp: main memory array shared by the Main-CPU and the All-Night core.
//
// WORDS 32-bit words, one port, synchronous: on a clock edge with en high
// the word at addr is read (rdata valid in the next cycle) and the bytes
// selected by we are written.  A write returns the old word.  The document
// only names the SRAM; its size and this single-port organisation are this
// design's choices (the dual-port behaviour is made by the controller in
// front of it).  Contents are not reset.
module sram_sp #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [3:0]    we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      for (int b = 0; b < 4; b++)
        if (we[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end
endmodule
