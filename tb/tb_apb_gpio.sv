// tb_apb_gpio: OUT and DIR written and read back over APB and seen on the
// pins, random pin levels read through IN after exactly two clock cycles of
// synchronization, reset values, zero wait states.
module tb_apb_gpio;
  import an_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] gpio_o, gpio_oe, gpio_i = '0;
  apb_req_t req; apb_rsp_t rsp;
  int checks = 0, failures = 0;

  apb_gpio #(.N(N)) dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .gpio_o, .gpio_oe, .gpio_i);
  apb_master_bfm u_m (.clk, .req, .rsp);
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [N-1:0] v;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(gpio_o, 0, "reset OUT"); chk(gpio_oe, 0, "reset DIR");
    repeat (20) begin
      logic [31:0] a, b; a = $urandom; b = $urandom;
      u_m.write(GPIO_BASE, a);
      u_m.write(GPIO_BASE + 4, b);
      chk(gpio_o, a[N-1:0], "OUT on pins"); chk(gpio_oe, b[N-1:0], "DIR on pins");
      u_m.read(GPIO_BASE, d);     chk(d, 32'(a[N-1:0]), "OUT read");
      u_m.read(GPIO_BASE + 4, d); chk(d, 32'(b[N-1:0]), "DIR read");
    end
    chk(32'(u_m.last_cycles), 2, "zero wait states");
    // input path: a change shows in IN two clock edges later, not one
    repeat (20) begin
      @(negedge clk); v = N'($urandom); if (v == dut.in_s2) v = ~v; gpio_i = v;
      @(negedge clk); chk(32'(dut.in_s2 == v), 0, "IN not yet after one edge");
      @(negedge clk); chk(32'(dut.in_s2), 32'(v), "IN after two edges");
      u_m.read(GPIO_BASE + 8, d); chk(d, 32'(v), "IN read");
    end
    u_m.read(GPIO_BASE + 12, d); chk(d, 0, "unused offset reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
