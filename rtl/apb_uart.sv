// apb_uart: UART on the external I/O bus (PPG sensor, monitor).
//
// 8 data bits, no parity, one stop bit, LSB first.  The bit time is DIV
// clock cycles (register, reset value CLKS_PER_BIT).  Transmit: writing
// TXDATA while the transmitter is idle sends the byte.  Receive: the rx
// line is synchronised with two flip-flops; a falling edge starts a frame,
// each bit is sampled in the middle of its bit time and a good stop bit
// stores the byte in RXDATA and sets rx_valid, which a read of RXDATA
// clears.  A byte arriving while rx_valid is set overwrites RXDATA and sets
// overrun.
//
// APB3 slave, zero wait states.  Registers: +0x0 TXDATA (W), +0x4 RXDATA
// (R), +0x8 STATUS (R: bit0 tx_busy, bit1 rx_valid, bit2 overrun; a read
// clears overrun), +0xC DIV (R/W).  The document only says the PPG sensor
// and the monitor are on UART; everything here is this design's choice.
module apb_uart
  import an_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz / 115200 baud
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     tx,
  input  logic     rx
);
  logic [15:0] div_q;
  logic        wr, rd;
  logic [3:0]  off;

  // transmitter
  logic        tx_busy;
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;

  // receiver
  logic        rx_s1, rx_s2, rx_busy, rx_valid, overrun;
  logic [7:0]  rx_shift, rx_data;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;

  assign off = apb_req.paddr[3:0];
  assign wr  = apb_req.psel && apb_req.penable && apb_req.pwrite;
  assign rd  = apb_req.psel && apb_req.penable && !apb_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q    <= 16'(CLKS_PER_BIT);
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      tx       <= 1'b1;
    end else begin
      if (wr && off == 4'hC) div_q <= apb_req.pwdata[15:0];
      if (!tx_busy) begin
        tx <= 1'b1;
        if (wr && off == 4'h0) begin
          tx_busy  <= 1'b1;
          tx_shift <= {1'b1, apb_req.pwdata[7:0], 1'b0};
          tx_bits  <= 4'd10;
          tx_cnt   <= '0;
        end
      end else begin
        tx <= tx_shift[0];
        if (tx_cnt == div_q - 1'b1) begin
          tx_cnt   <= '0;
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 1'b1;
          if (tx_bits == 4'd1) tx_busy <= 1'b0;
        end else begin
          tx_cnt <= tx_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1;
      rx_busy <= 1'b0; rx_valid <= 1'b0; overrun <= 1'b0;
      rx_shift <= '0; rx_data <= '0; rx_bits <= '0; rx_cnt <= '0;
    end else begin
      rx_s1 <= rx;
      rx_s2 <= rx_s1;
      if (rd && off == 4'h4) rx_valid <= 1'b0;
      if (rd && off == 4'h8) overrun  <= 1'b0;
      if (!rx_busy) begin
        if (!rx_s2) begin                       // start bit seen
          rx_busy <= 1'b1;
          rx_cnt  <= div_q >> 1;                // go to the middle of the bit
          rx_bits <= 4'd0;
        end
      end else if (rx_cnt == div_q - 1'b1) begin
        rx_cnt  <= '0;
        rx_bits <= rx_bits + 1'b1;
        if (rx_bits == 4'd0) begin
          if (rx_s2) rx_busy <= 1'b0;          // false start
        end else if (rx_bits <= 4'd8) begin
          rx_shift <= {rx_s2, rx_shift[7:1]};
        end else begin                          // stop bit
          rx_busy <= 1'b0;
          if (rx_s2) begin
            rx_data  <= rx_shift;
            rx_valid <= 1'b1;
            if (rx_valid && !(rd && off == 4'h4)) overrun <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    unique case (off)
      4'h4:    apb_rsp.prdata = {24'b0, rx_data};
      4'h8:    apb_rsp.prdata = {29'b0, overrun, rx_valid, tx_busy};
      4'hC:    apb_rsp.prdata = {16'b0, div_q};
      default: apb_rsp.prdata = '0;
    endcase
  end
endmodule
