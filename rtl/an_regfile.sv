// an_regfile: register file of the All-Night core, registers x0 .. x7.
//
// NREGS 32-bit registers with two combinational read ports and one write
// port written on the rising clock edge.  x0 always reads zero.  A write
// and a read of the same register in the same cycle return the value being
// written, so an instruction in DECODE sees the result that EXECUTE writes
// back in that cycle.  Register addresses are the 5-bit RISC-V fields; only
// their low log2(NREGS) bits select a register.  Eight registers follow the
// document's core diagram; the bypass and reset to zero are this design's.
module an_regfile #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned XLEN  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      raddr1,
  input  logic [4:0]      raddr2,
  output logic [XLEN-1:0] rdata1,
  output logic [XLEN-1:0] rdata2,
  input  logic            we,
  input  logic [4:0]      waddr,
  input  logic [XLEN-1:0] wdata
);
  localparam int unsigned AW = $clog2(NREGS);

  logic [XLEN-1:0] regs [NREGS];
  logic [AW-1:0]   ra1, ra2, wa;

  assign ra1 = raddr1[AW-1:0];
  assign ra2 = raddr2[AW-1:0];
  assign wa  = waddr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wdata;
    end
  end

  always_comb begin
    if (ra1 == '0)                rdata1 = '0;
    else if (we && wa == ra1)     rdata1 = wdata;
    else                          rdata1 = regs[ra1];
    if (ra2 == '0)                rdata2 = '0;
    else if (we && wa == ra2)     rdata2 = wdata;
    else                          rdata2 = regs[ra2];
  end
endmodule
