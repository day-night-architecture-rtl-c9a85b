// i2c_sensor_model: I2C slave with a register file, standing in for the
// temperature sensor and accelerometer.
//
// Answers at address ADDR.  A write transfer sets the register pointer
// with its first data byte; a read transfer returns regs[pointer] and then
// increments the pointer.  It ACKs every byte written to it.  sda_low pulls
// SDA low (open drain).  transfers counts address bytes it acknowledged.
module i2c_sensor_model #(
  parameter logic [6:0] ADDR = 7'h1D
) (
  input  logic scl,
  input  logic sda,
  output logic sda_low
);
  logic [7:0] regs [4];
  logic [7:0] shift = 0, txb = 0;
  logic [1:0] ptr = 0;
  int bitc = 0, nbyte = 0, transfers = 0;
  logic addressed = 0, reading = 0;

  initial begin sda_low = 0; foreach (regs[i]) regs[i] = 0; end

  always @(negedge sda) if (scl) begin bitc = 0; nbyte = 0; reading = 0; addressed = 0; sda_low = 0; end
  always @(posedge sda) if (scl) begin addressed = 0; reading = 0; end
  always @(posedge scl) begin
    if (bitc < 8 && !reading) shift = {shift[6:0], sda};
    bitc++;
  end
  always @(negedge scl) begin
    if (bitc == 8) begin
      if (!reading) begin
        if (nbyte == 0) begin
          addressed = (shift[7:1] == ADDR);
          if (addressed) transfers++;
        end else if (nbyte == 1 && addressed) begin
          ptr = shift[1:0];
        end
        nbyte++;
        sda_low = addressed;
      end else begin
        sda_low = 0;
      end
    end else if (bitc == 9) begin
      bitc = 0;
      sda_low = 0;
      if (reading) begin
        ptr++;                       // next register on a continued read
        reading = 0;
      end else if (addressed && nbyte == 1 && shift[0]) begin
        reading = 1;
        txb = regs[ptr];
        sda_low = !txb[7];
      end
    end else if (reading && bitc >= 1 && bitc <= 7) begin
      sda_low = !txb[7 - bitc];
    end
  end
endmodule
