// apb_gpio: general-purpose I/O port on the external I/O bus.
//
// N pins, each an output bit with its own output enable and an input bit.
// The inputs pass through a two-flop synchronizer before they can be read,
// so a pin change shows in IN two clock cycles later.  APB3 slave, zero wait
// states.  Registers (this design's layout):
//   +0x0 OUT  output values (read back as written)
//   +0x4 DIR  output enables, 1 = pin driven from OUT
//   +0x8 IN   synchronized pin levels (read only)
// All registers reset to 0, so every pin starts as an input.
//
// The block is only named among the external peripherals of the prototype;
// its width, registers and synchronizer are this design's choices.
module apb_gpio
  import an_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     apb_req,
  output apb_rsp_t     apb_rsp,
  output logic [N-1:0] gpio_o,     // output values
  output logic [N-1:0] gpio_oe,    // output enables
  input  logic [N-1:0] gpio_i      // pin levels
);
  logic         wr;
  logic [N-1:0] in_s1, in_s2;
  logic [3:0]   off;

  assign off = apb_req.paddr[3:0];
  assign wr  = apb_req.psel && apb_req.penable && apb_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_o  <= '0;
      gpio_oe <= '0;
      in_s1   <= '0;
      in_s2   <= '0;
    end else begin
      in_s1 <= gpio_i;
      in_s2 <= in_s1;
      if (wr && off == 4'h0) gpio_o  <= apb_req.pwdata[N-1:0];
      if (wr && off == 4'h4) gpio_oe <= apb_req.pwdata[N-1:0];
    end
  end

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    case (off)
      4'h0:    apb_rsp.prdata = 32'(gpio_o);
      4'h4:    apb_rsp.prdata = 32'(gpio_oe);
      4'h8:    apb_rsp.prdata = 32'(in_s2);
      default: apb_rsp.prdata = '0;
    endcase
  end
endmodule
