// tb_an_regfile: random writes and reads of x0..x7 against a model array,
// x0 staying zero, the same-cycle write-through, and the low-3-bit
// addressing of the 5-bit register fields.
module tb_an_regfile;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  an_regfile dut (.clk, .rst_n, .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2),
                  .we, .waddr(wa), .wdata(wd));
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      // write-through in the same cycle
      chk(rd1, (ra1[2:0] == 0) ? 0 : (we && wa[2:0] == ra1[2:0]) ? wd : model[ra1[2:0]], "rd1");
      chk(rd2, (ra2[2:0] == 0) ? 0 : (we && wa[2:0] == ra2[2:0]) ? wd : model[ra2[2:0]], "rd2");
      @(posedge clk);
      if (we && wa[2:0] != 0) model[wa[2:0]] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
