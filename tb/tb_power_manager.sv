// tb_power_manager: a STANDBY write gates the Day clock enable in the next
// cycle, a rising night interrupt wakes it and counts a wake-up, a write
// of 0 also wakes, and an interrupt while awake counts nothing.
module tb_power_manager;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, night_irq = 0, day_clk_en;
  logic [15:0] wake_count;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0;

  power_manager dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .night_irq, .day_clk_en, .wake_count);
  apb_master_bfm u_m (.clk, .req, .rsp);
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    chk(day_clk_en, 1, "awake after reset");
    for (int k = 1; k <= 3; k++) begin
      u_m.write(32'h0, 1);
      #1 chk(day_clk_en, 0, "gated one cycle after the write");
      u_m.read(32'h0, d); chk(d, 1, "standby read");
      repeat (5) @(posedge clk);
      chk(day_clk_en, 0, "stays gated");
      @(negedge clk); night_irq = 1;
      @(posedge clk); #1;
      chk(day_clk_en, 1, "woken by irq");
      @(negedge clk); night_irq = 0;
      chk(wake_count, 16'(k), "wake count");
    end
    @(negedge clk); night_irq = 1; @(negedge clk); night_irq = 0;
    chk(wake_count, 3, "irq while awake not counted");
    u_m.write(32'h0, 1); u_m.write(32'h0, 0);
    chk(day_clk_en, 1, "woken by write");
    u_m.read(32'h4, d); chk(d, 3, "WAKES read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
