// nsr: Night Support Register.
//
// The two registers the boot mechanism of the All-Night core needs: the
// start address of the Night function (Night_addr) and the enable bit
// (enable_Night).  The Main-CPU writes both after its own boot; the core
// watches enable_night and, when it is set, starts fetching at night_addr.
// Either side may read them.  APB3 slave on the external I/O bus, zero wait
// states.  Offsets (this design's): +0x0 Night_addr, +0x4 enable_Night
// (bit 0).  Both reset to 0.
module nsr
  import an_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  apb_req_t    apb_req,
  output apb_rsp_t    apb_rsp,
  output logic [31:0] night_addr,
  output logic        enable_night
);
  logic wr;
  assign wr = apb_req.psel && apb_req.penable && apb_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      night_addr   <= '0;
      enable_night <= 1'b0;
    end else if (wr) begin
      if (apb_req.paddr[2] == 1'b0) night_addr   <= apb_req.pwdata;
      else                          enable_night <= apb_req.pwdata[0];
    end
  end

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    apb_rsp.prdata = apb_req.paddr[2] ? {31'b0, enable_night} : night_addr;
  end
endmodule
