// tb_an_shifter1: one-bit left and arithmetic right shifts of random words.
module tb_an_shifter1;
  logic [31:0] din, dout;
  logic right;
  int checks = 0, failures = 0;

  an_shifter1 dut (.din, .right, .dout);

  initial begin
    repeat (2000) begin
      logic [31:0] r;
      din = $urandom; right = 1'($urandom);
      #1;
      r = right ? 32'($signed(din) >>> 1) : din << 1;
      checks++;
      if (dout !== r) begin failures++; $display("FAIL %h %b -> %h", din, right, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
