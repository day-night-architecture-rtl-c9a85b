// tb_nsr: Night_addr and enable_Night are written and read back over APB,
// reset to zero, and drive the night_addr / enable_night outputs.
module tb_nsr;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, enable_night;
  logic [31:0] night_addr;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0;

  nsr dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .night_addr, .enable_night);
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
    chk(night_addr, 0, "reset addr"); chk(enable_night, 0, "reset enable");
    repeat (20) begin
      logic [31:0] a; a = $urandom;
      u_m.write(NSR_BASE, a);
      chk(night_addr, a, "night_addr out");
      u_m.read(NSR_BASE, d); chk(d, a, "night_addr read");
      chk(enable_night, 0, "enable untouched");
    end
    u_m.write(NSR_BASE + 4, 1);
    chk(enable_night, 1, "enable set");
    u_m.read(NSR_BASE + 4, d); chk(d, 1, "enable read");
    u_m.write(NSR_BASE + 4, 0);
    chk(enable_night, 0, "enable cleared");
    chk(32'(u_m.last_cycles), 2, "zero wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
