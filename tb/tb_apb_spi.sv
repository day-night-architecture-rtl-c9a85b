// tb_apb_spi: a mode-0 SPI slave model exchanges random bytes with the
// master: the slave must receive the byte written to DATA and the master
// must read back the slave's byte.  Also checked: 8 SCLK pulses per byte,
// an SCLK high time of DIV+1 cycles, and the chip select register.
module tb_apb_spi;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, sclk, mosi, miso, cs_n;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0, pulses = 0, high_len = 0, last_high = 0;
  logic [7:0] slave_rx, slave_tx;

  apb_spi #(.DEFAULT_DIV(4)) dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .sclk, .mosi, .miso, .cs_n);
  apb_master_bfm u_m (.clk, .req, .rsp);
  always #5 clk = !clk;

  // slave: sample MOSI on the rising edge, shift MISO out on the falling edge
  always @(posedge sclk) begin slave_rx <= {slave_rx[6:0], mosi}; pulses++; end
  always @(negedge sclk) slave_tx <= {slave_tx[6:0], 1'b0};
  assign miso = slave_tx[7];
  always @(posedge clk) begin
    if (sclk) high_len++;
    else if (high_len != 0) begin last_high = high_len; high_len = 0; end
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] m, s;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    chk(cs_n, 1, "cs_n idle");
    u_m.write(32'hC, 1);
    chk(cs_n, 0, "cs_n active");
    for (int div = 1; div <= 3; div++) begin
      u_m.write(32'h8, div);
      repeat (5) begin
        m = 8'($urandom); s = 8'($urandom);
        slave_tx = s; pulses = 0;
        u_m.write(32'h0, {24'b0, m});
        do u_m.read(32'h4, d); while (d[0]);
        chk(slave_rx, m, "slave received");
        u_m.read(32'h0, d); chk(d[7:0], s, "master received");
        chk(pulses, 8, "SCLK pulses");
        chk(last_high, div + 1, "SCLK high time");
      end
    end
    u_m.write(32'hC, 0);
    chk(cs_n, 1, "cs_n released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
