// apb_i2c: I2C master on the external I/O bus (accelerometer, temperature
// sensor).
//
// Byte-level master: one command performs, in this order and as selected,
// a START condition, an 8-bit WRITE followed by reading the slave's ACK bit,
// or an 8-bit READ followed by sending ACK (or NACK), and a STOP condition.
// Every bit takes four quarter periods of DIV+1 clock cycles each: SDA is set
// while SCL is low, SCL rises, SDA is sampled, SCL falls.  SDA only changes
// while SCL is low, except in START and STOP.  SCL and SDA are
// open drain: *_oe = 1 pulls the line low, 0 releases it.  Single master,
// no clock stretching.
//
// APB3 slave, zero wait states.  Registers: +0x0 CMD (W: bit0 START, bit1
// STOP, bit2 WRITE, bit3 READ, bit4 send NACK after READ, bits 15:8 byte to
// write), +0x4 STATUS (R: bit0 busy, bit1 the slave answered NACK, bit2 SCL and
// bit3 SDA line levels),
// +0x8 RXDATA (R), +0xC DIV (R/W, reset DEFAULT_DIV).  The document only says
// the accelerometer and the temperature sensor are on I2C; everything here is
// this design's choice.
module apb_i2c
  import an_pkg::*;
#(
  parameter int unsigned DEFAULT_DIV = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     scl_oe,
  output logic     sda_oe,
  input  logic     scl_i,
  input  logic     sda_i
);
  typedef enum logic [2:0] {I_IDLE, I_START, I_BITS, I_STOP} istate_t;
  istate_t     state;
  logic [3:0]  off;
  logic        wr;
  logic [15:0] div_q, cnt;
  logic [1:0]  q;                 // quarter of the current bit
  logic [3:0]  bit_i;             // 0..8, 8 = acknowledge bit
  logic        do_stop, do_write, do_read, send_nack;
  logic [7:0]  shift, rx_q;
  logic        nack_q, scl_q, sda_q, tick;

  assign off  = apb_req.paddr[3:0];
  assign wr   = apb_req.psel && apb_req.penable && apb_req.pwrite;
  assign tick = (cnt == div_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE; div_q <= 16'(DEFAULT_DIV); cnt <= '0; q <= '0; bit_i <= '0;
      do_stop <= 1'b0; do_write <= 1'b0; do_read <= 1'b0;
      send_nack <= 1'b0; shift <= '0; rx_q <= '0; nack_q <= 1'b0;
      scl_q <= 1'b1; sda_q <= 1'b1;
    end else begin
      if (wr && off == 4'hC) div_q <= apb_req.pwdata[15:0];
      cnt <= (state == I_IDLE || tick) ? '0 : cnt + 1'b1;
      unique case (state)
        I_IDLE: begin
          q <= '0;
          if (wr && off == 4'h0) begin
            do_stop   <= apb_req.pwdata[1];
            do_write  <= apb_req.pwdata[2];
            do_read   <= apb_req.pwdata[3];
            send_nack <= apb_req.pwdata[4];
            shift     <= apb_req.pwdata[15:8];
            bit_i     <= '0;
            if (apb_req.pwdata[0])                          state <= I_START;
            else if (apb_req.pwdata[2] || apb_req.pwdata[3]) state <= I_BITS;
            else if (apb_req.pwdata[1])                     state <= I_STOP;
          end
        end
        I_START: if (tick) begin
          q <= q + 1'b1;
          unique case (q)
            2'd0: sda_q <= 1'b1;                       // release SDA (SCL low
            2'd1: scl_q <= 1'b1;                       // on a repeated START)
            2'd2: sda_q <= 1'b0;                       // SDA falls, SCL high
            default: begin
              scl_q <= 1'b0;
              q <= '0;
              if (do_write || do_read) state <= I_BITS;
              else if (do_stop)        state <= I_STOP;
              else                     state <= I_IDLE;
            end
          endcase
        end
        I_BITS: if (tick) begin
          q <= q + 1'b1;
          unique case (q)
            2'd0: begin                                // SCL low: set SDA
              scl_q <= 1'b0;
              if (bit_i == 4'd8) sda_q <= do_read ? send_nack : 1'b1;
              else               sda_q <= do_write ? shift[7] : 1'b1;
            end
            2'd1: scl_q <= 1'b1;
            2'd2: begin                                // SCL high: sample SDA
              if (bit_i == 4'd8) begin
                if (do_write) nack_q <= sda_i;
              end else begin
                shift <= {shift[6:0], 1'b0};
                if (do_read) rx_q <= {rx_q[6:0], sda_i};
              end
            end
            default: begin
              scl_q <= 1'b0;
              if (bit_i == 4'd8) begin
                bit_i <= '0;
                state <= do_stop ? I_STOP : I_IDLE;
              end else begin
                bit_i <= bit_i + 1'b1;
              end
            end
          endcase
        end
        I_STOP: if (tick) begin
          q <= q + 1'b1;
          unique case (q)
            2'd0: begin scl_q <= 1'b0; sda_q <= 1'b0; end
            2'd1: scl_q <= 1'b1;
            2'd2: sda_q <= 1'b1;                       // SDA rises, SCL high
            default: begin q <= '0; state <= I_IDLE; end
          endcase
        end
        default: state <= I_IDLE;
      endcase
    end
  end

  assign scl_oe = !scl_q;
  assign sda_oe = !sda_q;

  always_comb begin
    apb_rsp        = APB_RSP_IDLE;
    apb_rsp.pready = 1'b1;
    unique case (off)
      4'h4:    apb_rsp.prdata = {28'b0, sda_i, scl_i, nack_q, state != I_IDLE};
      4'h8:    apb_rsp.prdata = {24'b0, rx_q};
      4'hC:    apb_rsp.prdata = {16'b0, div_q};
      default: apb_rsp.prdata = '0;
    endcase
  end
endmodule
