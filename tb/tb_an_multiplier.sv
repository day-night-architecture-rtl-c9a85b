// tb_an_multiplier: random and corner-case products against a*b modulo
// 2^32, and the latency: done rises exactly 33 cycles after the start cycle (a load cycle and 32 iterations).
module tb_an_multiplier;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  an_multiplier dut (.clk, .rst_n, .start, .rs1_data(a), .rs2_data(b), .busy, .done, .product(p));
  always #5 clk = !clk;

  task automatic mul(input logic [31:0] x, y);
    int n;
    @(posedge clk);
    a <= x; b <= y; start <= 1;
    @(posedge clk);
    start <= 0;
    n = 1;
    forever begin @(negedge clk); if (done) break; @(posedge clk); n++; end
    checks += 2;
    if (p !== x * y) begin failures++; $display("FAIL %h*%h=%h got %h", x, y, x*y, p); end
    if (n != 33) begin failures++; $display("FAIL latency %0d", n); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mul(0, 0); mul(32'hFFFF_FFFF, 32'hFFFF_FFFF); mul(1, 32'h8000_0000); mul(12345, 6789);
    repeat (300) mul($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
