// tb_an_sign_ext: 12-bit and 20-bit sign extension of every 12-bit value
// and of random 20-bit values, against $signed arithmetic.
module tb_an_sign_ext;
  logic [11:0] d12; logic [19:0] d20;
  logic [31:0] o12, o20;
  int checks = 0, failures = 0;

  an_sign_ext #(.IN_W(12), .OUT_W(32)) dut12 (.din(d12), .dout(o12));
  an_sign_ext #(.IN_W(20), .OUT_W(32)) dut20 (.din(d20), .dout(o20));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      d12 = 12'(i); d20 = 20'($urandom);
      #1;
      checks += 2;
      if (o12 !== 32'($signed(d12))) begin failures++; $display("FAIL12 %h %h", d12, o12); end
      if (o20 !== 32'($signed(d20))) begin failures++; $display("FAIL20 %h %h", d20, o20); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
