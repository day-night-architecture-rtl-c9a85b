// tb_apb_uart: bytes written to TXDATA are decoded from the tx line by a
// testbench receiver (checking start bit, data, stop bit and a bit time of
// DIV cycles); bytes sent on rx by a testbench transmitter appear in
// RXDATA with rx_valid; a second byte before the first is read sets
// overrun.  Uses DIV = 8 set over APB.
module tb_apb_uart;
  import an_pkg::*;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0, tx, rx = 1;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0;

  apb_uart #(.CLKS_PER_BIT(434)) dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .tx, .rx);
  apb_master_bfm u_m (.clk, .req, .rsp);
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // testbench receiver: waits for the start bit, samples every bit in its
  // middle, and measures the start bit (the byte's bit 0 is 1, so the line
  // rises exactly at the end of the start bit)
  task automatic rx_line(output logic [7:0] b, output int start_len);
    start_len = 0;
    @(negedge clk); while (tx) @(negedge clk);
    for (int t = 0; t < 3 * DIV / 2; t++) begin
      if (!tx) start_len++;
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin b[i] = tx; repeat (DIV) @(negedge clk); end
    checks++;
    if (!tx) begin failures++; $display("FAIL stop bit"); end
  endtask

  task automatic tx_line(input logic [7:0] b);
    @(negedge clk); rx = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (DIV) @(negedge clk); end
    rx = 1; repeat (DIV) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] b, sent;
    int len;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    u_m.read(32'hC, d); chk(d, 434, "reset divisor");
    u_m.write(32'hC, DIV);
    repeat (6) begin
      sent = 8'($urandom) | 8'h01;
      fork
        u_m.write(32'h0, {24'b0, sent});
        rx_line(b, len);
      join
      chk(b, sent, "tx byte"); chk(len, DIV, "start bit length");
      do u_m.read(32'h8, d); while (d[0]);
    end
    repeat (6) begin
      sent = 8'($urandom);
      tx_line(sent);
      u_m.read(32'h8, d); chk(d[1], 1, "rx_valid");
      u_m.read(32'h4, d); chk(d[7:0], sent, "rx byte");
      u_m.read(32'h8, d); chk(d[1], 0, "rx_valid cleared");
    end
    tx_line(8'h5A); tx_line(8'hA5);
    u_m.read(32'h8, d); chk(d[2], 1, "overrun");
    u_m.read(32'h4, d); chk(d[7:0], 8'hA5, "latest byte kept");
    u_m.read(32'h8, d); chk(d[2], 0, "overrun cleared by status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
