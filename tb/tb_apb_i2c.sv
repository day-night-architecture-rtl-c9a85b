// tb_apb_i2c: the master talks to an I2C slave model at address 0x1D on
// open-drain lines: START + address/write, a data byte, a repeated START +
// address/read, a read with NACK and STOP.  Checked: the bytes the slave
// saw, the byte the master read, the slave's ACKs, START and STOP counts,
// and a NACK from a missing address.  Then 20 register reads from a second
// slave (a sensor model at 0x2E) with random register contents and random
// dividers, each checked for the byte read, the ACKs and the SCL period of
// 4 * (DIV + 1) clock cycles, and each followed by an address that no slave
// answers, which must be reported as a NACK.  Uses DIV = 2 at first.
module tb_apb_i2c;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, scl_oe, sda_oe, scl, sda;
  logic sda_slave_low = 0, sens_low;
  int scl_rise_prev = -1, scl_period = 0, cyc = 0;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0, starts = 0, stops = 0, bitc = 0;
  logic [7:0] shift = 0, txb = 8'hC3;
  logic [7:0] got [$];
  logic addressed = 0, first = 0, reading = 0;

  apb_i2c #(.DEFAULT_DIV(2)) dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp),
                                 .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda));
  apb_master_bfm u_m (.clk, .req, .rsp);
  always #5 clk = !clk;

  // open-drain bus with pull-ups
  assign scl = !scl_oe;
  assign sda = !(sda_oe || sda_slave_low || sens_low);

  i2c_sensor_model #(.ADDR(7'h2E)) u_sens (.scl, .sda, .sda_low(sens_low));

  always @(posedge clk) cyc++;
  always @(posedge scl) begin
    if (scl_rise_prev >= 0) scl_period = cyc - scl_rise_prev;
    scl_rise_prev = cyc;
  end

  // slave model
  always @(negedge sda) if (scl) begin starts++; bitc = 0; first = 1; reading = 0; sda_slave_low = 0; end
  always @(posedge sda) if (scl) begin stops++; addressed = 0; end
  always @(posedge scl) begin
    if (bitc < 8 && !reading) shift = {shift[6:0], sda};
    bitc++;
  end
  always @(negedge scl) begin
    if (bitc == 8) begin
      if (!reading) begin
        got.push_back(shift);
        if (first) begin
          addressed = (shift[7:1] == 7'h1D);
          first = 0;
        end
        sda_slave_low = addressed;                 // ACK
      end else begin
        sda_slave_low = 0;                         // master acknowledges
      end
    end else if (bitc == 9) begin
      bitc = 0;
      sda_slave_low = 0;
      if (addressed && got.size() > 0 && got[got.size()-1][0] && !reading) reading = 1;
      else if (reading) reading = 0;
      if (reading) sda_slave_low = !txb[7];
    end else if (reading && bitc >= 1 && bitc <= 7) begin
      sda_slave_low = !txb[7 - bitc];
    end
  end

  task automatic chk(input logic [31:0] got_v, exp, input string what);
    checks++;
    if (got_v !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got_v, exp); end
  endtask

  task automatic cmd(input logic [31:0] c);
    logic [31:0] d;
    u_m.write(32'h0, c);
    do u_m.read(32'h4, d); while (d[0]);
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    starts = 0; stops = 0;   // ignore edges from power-up values before reset
    u_m.write(32'hC, 2);
    cmd({16'b0, 8'h3A, 8'b0000_0101});            // START, WRITE addr 0x1D + W
    u_m.read(32'h4, d); chk(d[1], 0, "address ACK");
    cmd({16'b0, 8'h5C, 8'b0000_0100});            // WRITE data
    u_m.read(32'h4, d); chk(d[1], 0, "data ACK");
    cmd({16'b0, 8'h3B, 8'b0000_0101});            // repeated START, addr + R
    cmd({16'b0, 8'h00, 8'b0001_1010});            // READ, NACK, STOP
    u_m.read(32'h8, d); chk(d[7:0], 8'hC3, "byte read");
    chk(got.size(), 3, "bytes seen by slave");
    if (got.size() == 3) begin
      chk(got[0], 8'h3A, "slave byte 0"); chk(got[1], 8'h5C, "slave byte 1"); chk(got[2], 8'h3B, "slave byte 2");
    end
    chk(starts, 2, "START count"); chk(stops, 1, "STOP count");
    cmd({16'b0, 8'h40, 8'b0000_0111});            // START, addr 0x20 + W, STOP
    u_m.read(32'h4, d); chk(d[1], 1, "NACK from missing slave");
    chk(stops, 2, "second STOP");
    chk(scl && sda, 1, "bus released");
    for (int t = 0; t < 20; t++) begin
      int dv, r, mn;
      logic [7:0] v;
      dv = $urandom_range(1, 5); r = $urandom_range(3); v = $urandom;
      u_sens.regs[r] = v;
      u_m.write(32'hC, dv);
      cmd({16'b0, 8'h5C, 8'b0000_0101});          // START, addr 0x2E + W
      u_m.read(32'h4, d); chk(d[1], 0, "sensor address ACK");
      cmd({16'b0, 8'(r), 8'b0000_0100});          // register number
      u_m.read(32'h4, d); chk(d[1], 0, "sensor register ACK");
      chk(scl_period, 4 * (dv + 1), "SCL period");
      cmd({16'b0, 8'h5D, 8'b0000_0101});          // repeated START, addr + R
      cmd({16'b0, 8'h00, 8'b0001_1010});          // READ, NACK, STOP
      u_m.read(32'h8, d); chk(d[7:0], v, "sensor register read");
      cmd({16'b0, 8'(8'h5E | t % 2), 8'b0000_0111}); // missing slave 0x2F, STOP
      u_m.read(32'h4, d); chk(d[1], 1, "NACK from missing slave 0x2F");
    end
    chk(u_sens.transfers, 40, "sensor transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
