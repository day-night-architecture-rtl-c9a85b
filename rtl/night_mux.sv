// night_mux: the All-Night core's bus multiplexer and interrupt source.
//
// Sits between the All-Night core, the SRAM controller and the external
// I/O bus.  It routes each APB transfer of the core by address: the SRAM
// window goes to the controller's APB port, the peripheral window to the
// external I/O multiplexer, and the interrupt window to a one-bit register
// inside this block whose output is the interrupt to the Main-CPU.  This is
// how the core, which has no interrupt logic, wakes the Day segment.
//
// Interrupt register (at IRQ_BASE, this design's address): a write with
// bit 0 = 1 raises irq, a write with bit 0 = 0 drops it, and the Main-CPU
// side drops it with irq_clear.  Reads return the bit.  Zero wait states.
// The routing to SRAM / external I/O and the interrupt path are from the
// document; addresses and the register behaviour are this design's.
module night_mux
  import an_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t core_req,
  output apb_rsp_t core_rsp,
  output apb_req_t sram_req,
  input  apb_rsp_t sram_rsp,
  output apb_req_t periph_req,
  input  apb_rsp_t periph_rsp,
  input  logic     irq_clear,
  output logic     irq
);
  apb_req_t s_req [3];
  apb_rsp_t s_rsp [3];

  apb_decoder #(
    .N   (3),
    .BASE({IRQ_BASE, PERIPH_BASE, SRAM_BASE}),
    .MASK({IRQ_MASK, PERIPH_MASK, SRAM_MASK})
  ) u_dec (
    .m_req(core_req), .m_rsp(core_rsp), .s_req(s_req), .s_rsp(s_rsp));

  assign sram_req   = s_req[0];
  assign s_rsp[0]   = sram_rsp;
  assign periph_req = s_req[1];
  assign s_rsp[1]   = periph_rsp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                             irq <= 1'b0;
    else if (s_req[2].psel && s_req[2].penable && s_req[2].pwrite) irq <= s_req[2].pwdata[0];
    else if (irq_clear)                                     irq <= 1'b0;
  end

  always_comb begin
    s_rsp[2]        = APB_RSP_IDLE;
    s_rsp[2].pready = 1'b1;
    s_rsp[2].prdata = {31'b0, irq};
  end
endmodule
