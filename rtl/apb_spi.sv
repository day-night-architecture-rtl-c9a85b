// apb_spi: SPI master on the external I/O bus (camera, OLED display).
//
// Mode 0 (SCLK idle low, MOSI set up before the rising edge, MISO sampled
// on the rising edge), MSB first, 8-bit transfers.  Each SCLK half period
// is DIV+1 clock cycles.  Writing DATA while idle starts a transfer; when it
// ends the received byte can be read from DATA.  The chip select is a
// register bit, so several bytes can be sent under one select.
//
// APB3 slave, zero wait states.  Registers: +0x0 DATA (W: start, R: last
// byte received), +0x4 STATUS (R: bit0 busy), +0x8 DIV (R/W, reset
// DEFAULT_DIV), +0xC CS (R/W, bit0 = 1 drives cs_n low).  The document only
// says the camera and the OLED are on SPI; everything here is this design's
// choice.
module apb_spi
  import an_pkg::*;
#(
  parameter int unsigned DEFAULT_DIV = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     sclk,
  output logic     mosi,
  input  logic     miso,
  output logic     cs_n
);
  logic [3:0]  off;
  logic        wr;
  logic [15:0] div_q, cnt;
  logic        busy, cs_q;
  logic [7:0]  tx_q, rx_q;
  logic [3:0]  bits;

  assign off = apb_req.paddr[3:0];
  assign wr  = apb_req.psel && apb_req.penable && apb_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= 16'(DEFAULT_DIV); cnt <= '0; busy <= 1'b0; cs_q <= 1'b0;
      tx_q <= '0; rx_q <= '0; bits <= '0; sclk <= 1'b0;
    end else begin
      if (wr && off == 4'h8) div_q <= apb_req.pwdata[15:0];
      if (wr && off == 4'hC) cs_q  <= apb_req.pwdata[0];
      if (!busy) begin
        sclk <= 1'b0;
        if (wr && off == 4'h0) begin
          busy <= 1'b1;
          tx_q <= apb_req.pwdata[7:0];
          bits <= 4'd8;
          cnt  <= '0;
        end
      end else if (cnt == div_q) begin
        cnt <= '0;
        if (!sclk) begin                 // rising edge: sample MISO
          sclk <= 1'b1;
          rx_q <= {rx_q[6:0], miso};
        end else begin                   // falling edge: next bit
          sclk <= 1'b0;
          tx_q <= {tx_q[6:0], 1'b0};
          bits <= bits - 1'b1;
          if (bits == 4'd1) busy <= 1'b0;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign mosi = tx_q[7];
  assign cs_n = !cs_q;

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    unique case (off)
      4'h0:    apb_rsp.prdata = {24'b0, rx_q};
      4'h4:    apb_rsp.prdata = {31'b0, busy};
      4'h8:    apb_rsp.prdata = {16'b0, div_q};
      4'hC:    apb_rsp.prdata = {31'b0, cs_q};
      default: apb_rsp.prdata = '0;
    endcase
  end
endmodule
