// tb_sram_sp: random byte-masked writes and reads against a model array,
// with the one-cycle read latency.
module tb_sram_sp;
  logic clk = 0, en = 0;
  logic [3:0] we = 0;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(256)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;

  initial begin
    // initialise both through full writes
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 4'hF; addr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    repeat (3000) begin
      logic [31:0] exp;
      @(negedge clk);
      en = 1; we = 4'($urandom); addr = 8'($urandom); wdata = $urandom;
      exp = model[addr];
      @(posedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL addr %0d got %h exp %h", addr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
