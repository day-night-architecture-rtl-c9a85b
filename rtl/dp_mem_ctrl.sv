// dp_mem_ctrl: dual-port SRAM controller of the Day-Night SoC.
//
// Gives the main memory two ports: an AXI port for the Main-CPU (reached
// through the system interconnect) and an APB port wired straight to the
// All-Night core, so the Night segment reaches memory with the interconnect
// clock-gated.  The ports are mutually exclusive: the controller makes one
// SRAM access per transfer, and when both ports ask in the same cycle the
// one served less recently wins (priority alternates).
//
// AXI side: single-beat AXI4-Lite style channels.  A write is accepted when
// AWVALID and WVALID are both high (AWREADY and WREADY pulse together) and
// answered with BVALID/OKAY; a read is accepted with ARREADY and answered
// one cycle after the SRAM access with RVALID/OKAY.  No new write (read) is
// accepted while a B (R) response waits.  APB side: APB3 slave, word
// accesses, PREADY in the first ACCESS cycle after the SRAM access, so an
// uncontended transfer takes the minimum two cycles.
// Address bits above the memory size are ignored.
//
// The two ports, their protocols and the alternating priority follow the
// document; the AXI subset, timings and the choice of round-robin are this
// design's.
module dp_mem_ctrl
  import an_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t axi_req,
  output axi_rsp_t axi_rsp,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     grant_apb,   // status: SRAM access for the APB port this cycle
  output logic     grant_axi,   // status: SRAM access for the AXI port this cycle
  output logic     conflict     // status: both ports asked in the same cycle
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  typedef enum logic [1:0] {S_IDLE, S_APB_RESP, S_AXI_RD} state_t;
  state_t state;

  logic          last_apb;                  // APB was served last
  logic          bvalid_q, rvalid_q;
  logic [31:0]   rdata_q;
  logic          req_apb, req_axi_w, req_axi_r, req_axi;
  logic          go_axi_w, go_axi_r;
  logic          m_en;
  logic [3:0]    m_we;
  logic [AW-1:0] m_addr;
  logic [31:0]   m_wdata, m_rdata;

  assign req_apb   = apb_req.psel && state == S_IDLE;
  assign req_axi_w = axi_req.awvalid && axi_req.wvalid && !bvalid_q && state == S_IDLE;
  assign req_axi_r = axi_req.arvalid && !rvalid_q && state == S_IDLE;
  assign req_axi   = req_axi_w || req_axi_r;

  // alternating priority between the two ports
  assign grant_apb = req_apb && (!req_axi || !last_apb);
  assign grant_axi = req_axi && !grant_apb;
  assign conflict  = req_apb && req_axi;
  assign go_axi_w  = grant_axi && req_axi_w;            // writes before reads
  assign go_axi_r  = grant_axi && !req_axi_w;

  always_comb begin
    m_en    = grant_apb || grant_axi;
    m_we    = '0;
    m_addr  = apb_req.paddr[AW+1:2];
    m_wdata = apb_req.pwdata;
    if (grant_apb) begin
      m_we = apb_req.pwrite ? 4'hF : 4'h0;
    end else if (go_axi_w) begin
      m_we    = axi_req.wstrb;
      m_addr  = axi_req.awaddr[AW+1:2];
      m_wdata = axi_req.wdata;
    end else if (go_axi_r) begin
      m_addr  = axi_req.araddr[AW+1:2];
    end
  end

  sram_sp #(.WORDS(MEM_WORDS)) u_sram (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      last_apb <= 1'b0;
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (grant_apb) begin
            state    <= S_APB_RESP;
            last_apb <= 1'b1;
          end else if (grant_axi) begin
            last_apb <= 1'b0;
            if (go_axi_w) bvalid_q <= 1'b1;
            else          state    <= S_AXI_RD;
          end
        end
        S_APB_RESP: state <= S_IDLE;
        S_AXI_RD: begin
          rdata_q  <= m_rdata;
          rvalid_q <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (bvalid_q && axi_req.bready) bvalid_q <= 1'b0;
      if (rvalid_q && axi_req.rready) rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = go_axi_w;
    axi_rsp.wready  = go_axi_w;
    axi_rsp.arready = go_axi_r;
    axi_rsp.bvalid  = bvalid_q;
    axi_rsp.rvalid  = rvalid_q;
    axi_rsp.rdata   = rdata_q;
    apb_rsp         = '0;
    apb_rsp.pready  = state == S_APB_RESP;
    apb_rsp.prdata  = (state == S_APB_RESP) ? m_rdata : '0;
  end

`ifndef SYNTHESIS
  // the two ports never reach the SRAM in the same cycle
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(grant_apb && grant_axi));
  // an APB response only answers a transfer in its ACCESS phase
  a_apb_access: assert property (@(posedge clk) disable iff (!rst_n)
    apb_rsp.pready |-> apb_req.psel && apb_req.penable);
`endif
endmodule
