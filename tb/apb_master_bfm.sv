// apb_master_bfm: APB3 master model for the testbenches.
//
// write(addr, data) and read(addr, data) each run one transfer: a SETUP
// cycle, then ACCESS until PREADY.  The model drives its outputs just after
// a falling clock edge and samples PREADY one time unit later, so it never
// races the design's rising-edge logic; it returns just after the rising
// edge that completes the transfer.  last_slverr holds PSLVERR of the last
// transfer and last_cycles its length in clock cycles (2 with no wait
// states).
module apb_master_bfm
  import an_pkg::*;
(
  input  logic     clk,
  output apb_req_t req,
  input  apb_rsp_t rsp
);
  logic last_slverr = 1'b0;
  int   last_cycles = 0;

  initial req = APB_REQ_IDLE;

  task automatic xfer(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata);
    apb_req_t r;
    @(negedge clk);
    r = APB_REQ_IDLE;
    r.paddr = addr; r.pwdata = wdata; r.pwrite = wr; r.psel = 1'b1;
    req = r;
    @(negedge clk);
    r.penable = 1'b1;
    req = r;
    last_cycles = 1;
    forever begin
      #1;
      last_cycles++;
      if (rsp.pready) break;
      @(negedge clk);
    end
    rdata = rsp.prdata;
    last_slverr = rsp.pslverr;
    @(posedge clk);
    #1;
    req = APB_REQ_IDLE;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] unused;
    xfer(1'b1, addr, data, unused);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    xfer(1'b0, addr, 32'h0, data);
  endtask
endmodule
