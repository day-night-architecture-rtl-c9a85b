// tb_an_adder32: random additions and subtractions against a reference
// computed with 33-bit integer arithmetic, plus overflow corner cases.
module tb_an_adder32;
  logic [31:0] a, b, sum;
  logic sub, carry, ovf;
  int checks = 0, failures = 0;

  an_adder32 dut (.a, .b, .sub, .sum, .carry, .overflow(ovf));

  task automatic check(input logic [31:0] ta, tb_, input logic ts);
    logic [32:0] ref_w;
    logic ref_ovf;
    a = ta; b = tb_; sub = ts;
    #1;
    ref_w = ts ? ({1'b0, ta} + {1'b0, ~tb_} + 33'd1) : ({1'b0, ta} + {1'b0, tb_});
    ref_ovf = ts ? ((ta[31] != tb_[31]) && (ref_w[31] != ta[31]))
                 : ((ta[31] == tb_[31]) && (ref_w[31] != ta[31]));
    checks++;
    if (sum !== ref_w[31:0] || carry !== ref_w[32] || ovf !== ref_ovf) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b sum=%h c=%b v=%b", ta, tb_, ts, sum, carry, ovf);
    end
  endtask

  initial begin
    check(32'h7FFF_FFFF, 32'h1, 0);
    check(32'h8000_0000, 32'h1, 1);
    check(32'h0, 32'h0, 1);
    check(32'hFFFF_FFFF, 32'h1, 0);
    repeat (2000) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
