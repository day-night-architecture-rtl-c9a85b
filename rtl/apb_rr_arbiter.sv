// apb_rr_arbiter: two APB masters sharing one APB slave.
//
// Used as the Day-Night multiplexer in front of the external I/O bus (the
// micro-NoC's APB bridge on one side, the All-Night core on the other) and,
// with ROUND_ROBIN = 0, to merge the core's instruction and data ports.
// In an idle cycle the requesting master (PSEL high) is passed to the slave
// as its SETUP phase; the next cycles are the slave's ACCESS phase, and the
// slave's PREADY, PRDATA and PSLVERR go back to that master only.  The
// other master sees PREADY low and waits with its request held, as APB
// allows.  On a tie the master not served last wins (ROUND_ROBIN = 1) or
// master 0 wins (ROUND_ROBIN = 0).  An uncontended transfer keeps the
// minimum two-cycle APB timing.
//
// That both segments share the peripherals through a multiplexer with
// alternating priority is from the document; the protocol details are this
// design's.
module apb_rr_arbiter
  import an_pkg::*;
#(
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t m0_req,
  output apb_rsp_t m0_rsp,
  input  apb_req_t m1_req,
  output apb_rsp_t m1_rsp,
  output apb_req_t s_req,
  input  apb_rsp_t s_rsp,
  output logic     conflict    // status: both masters waiting in an idle cycle
);
  logic busy, owner, last, pick;

  // winner of an idle cycle
  always_comb begin
    if (m0_req.psel && m1_req.psel) pick = ROUND_ROBIN ? !last : 1'b0;
    else                            pick = m1_req.psel;
  end
  assign conflict = !busy && m0_req.psel && m1_req.psel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
      last  <= 1'b1;
    end else if (!busy) begin
      if (m0_req.psel || m1_req.psel) begin
        busy  <= 1'b1;
        owner <= pick;
        last  <= pick;
      end
    end else if (s_rsp.pready) begin
      busy <= 1'b0;
    end
  end

  always_comb begin
    logic sel;
    sel = busy ? owner : pick;
    s_req = sel ? m1_req : m0_req;
    if (!busy) begin
      s_req.psel    = m0_req.psel || m1_req.psel;
      s_req.penable = 1'b0;
    end else begin
      s_req.psel    = 1'b1;
      s_req.penable = 1'b1;
    end
    m0_rsp = APB_RSP_IDLE;
    m1_rsp = APB_RSP_IDLE;
    if (busy) begin
      if (owner) m1_rsp = s_rsp;
      else       m0_rsp = s_rsp;
    end
  end
endmodule
