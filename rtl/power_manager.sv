// power_manager: standby control of the Day segment.
//
// Puts the Day part (Main-CPU and system interconnect) into standby by
// clock gating and wakes it when the All-Night core raises its interrupt.
// day_clk_en is the enable of the Day segment's clock gate: a write of 1 to
// STANDBY drops it (in the next cycle, the document's one-cycle CG
// activation), and a rising edge of night_irq, or a write of 0, raises it
// again.  wake_count counts wake-ups by the interrupt.
//
// APB3 slave on the system interconnect's APB bus, zero wait states.
// Registers: +0x0 STANDBY (R/W, bit0; reads 1 while gated), +0x4 WAKES (R).
// That the power manager moves the Day part to a clock-gated standby is
// from the document; the register interface and the wake rule are this
// design's.
module power_manager
  import an_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  apb_req_t    apb_req,
  output apb_rsp_t    apb_rsp,
  input  logic        night_irq,
  output logic        day_clk_en,
  output logic [15:0] wake_count
);
  logic wr, irq_q, irq_rise;

  assign wr       = apb_req.psel && apb_req.penable && apb_req.pwrite;
  assign irq_rise = night_irq && !irq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      day_clk_en <= 1'b1;
      irq_q      <= 1'b0;
      wake_count <= '0;
    end else begin
      irq_q <= night_irq;
      if (irq_rise) begin
        if (!day_clk_en) wake_count <= wake_count + 1'b1;
        day_clk_en <= 1'b1;
      end else if (wr && apb_req.paddr[2] == 1'b0) begin
        day_clk_en <= !apb_req.pwdata[0];
      end
    end
  end

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    apb_rsp.prdata = apb_req.paddr[2] ? {16'b0, wake_count} : {31'b0, !day_clk_en};
  end
endmodule
