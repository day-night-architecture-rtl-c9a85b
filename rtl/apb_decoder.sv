// apb_decoder: APB address decoder, one master fanned out to N slaves.
//
// Slave i is selected when (PADDR & MASK_i) == BASE_i, with MASK_i and
// BASE_i the 32-bit slices i of the packed parameters; the first match
// wins.  Only the selected slave sees PSEL; its PREADY, PRDATA and PSLVERR
// return to the master.  An address that matches no slave is answered in
// its ACCESS cycle with PREADY, PSLVERR and read data zero.  Combinational.
// The document shows APB buses with several slaves; the decoding rule and
// the error answer are this design's.
module apb_decoder
  import an_pkg::*;
#(
  parameter int unsigned N = 2,
  // slave i uses bits [32*i +: 32]
  parameter logic [32*N-1:0] BASE = {32'h1000_0000, 32'h0000_0000},
  parameter logic [32*N-1:0] MASK = {32'hF000_0000, 32'hF000_0000}
) (
  input  apb_req_t m_req,
  output apb_rsp_t m_rsp,
  output apb_req_t s_req [N],
  input  apb_rsp_t s_rsp [N]
);
  logic         hit;
  int unsigned  idx;

  always_comb begin
    hit = 1'b0;
    idx = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (!hit && (m_req.paddr & MASK[32*i +: 32]) == BASE[32*i +: 32]) begin
        hit = 1'b1;
        idx = i;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      s_req[i]      = m_req;
      s_req[i].psel = m_req.psel && hit && idx == i;
    end
  end

  always_comb begin
    if (hit) begin
      m_rsp = s_rsp[idx];
    end else begin
      m_rsp         = APB_RSP_IDLE;
      m_rsp.pready  = m_req.psel && m_req.penable;
      m_rsp.pslverr = m_req.psel && m_req.penable;
    end
  end
endmodule
