// tb_apb_rr_arbiter: two APB masters share one slave memory with random
// wait states through the arbiter, both with round-robin and with fixed
// priority.  Every read is checked against a model; with both masters
// always asking, round-robin must alternate the grants and fixed priority
// must serve master 0 first.
module tb_apb_rr_arbiter;
  import an_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t m0_req, m1_req, s_req, f0_req, f1_req, fs_req;
  apb_rsp_t m0_rsp, m1_rsp, s_rsp, f0_rsp, f1_rsp, fs_rsp;
  logic conflict, fconflict;
  logic [31:0] model [64];
  int checks = 0, failures = 0, n_conflict = 0, n_alt = 0;
  logic last_owner = 1, fixed_ok = 1;   // the arbiter resets with master 1 as last served

  apb_rr_arbiter #(.ROUND_ROBIN(1'b1)) dut (.clk, .rst_n, .m0_req, .m0_rsp, .m1_req, .m1_rsp,
                                            .s_req, .s_rsp, .conflict);
  apb_mem_model #(.WORDS(64), .MAX_WAIT(2)) u_mem (.clk, .req(s_req), .rsp(s_rsp));
  apb_master_bfm u_m0 (.clk, .req(m0_req), .rsp(m0_rsp));
  apb_master_bfm u_m1 (.clk, .req(m1_req), .rsp(m1_rsp));

  apb_rr_arbiter #(.ROUND_ROBIN(1'b0)) dut_fixed (.clk, .rst_n, .m0_req(f0_req), .m0_rsp(f0_rsp),
     .m1_req(f1_req), .m1_rsp(f1_rsp), .s_req(fs_req), .s_rsp(fs_rsp), .conflict(fconflict));
  apb_mem_model #(.WORDS(64), .MAX_WAIT(0)) u_fmem (.clk, .req(fs_req), .rsp(fs_rsp));
  apb_master_bfm u_f0 (.clk, .req(f0_req), .rsp(f0_rsp));
  apb_master_bfm u_f1 (.clk, .req(f1_req), .rsp(f1_rsp));

  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    if (conflict) begin
      n_conflict++;
      checks++;
      if (dut.pick != last_owner) n_alt++;
      else begin failures++; $display("FAIL round robin repeated master %0d", dut.pick); end
    end
    if (!dut.busy && (m0_req.psel || m1_req.psel)) last_owner <= dut.pick;
    if (fconflict && dut_fixed.pick != 1'b0) fixed_ok = 0;
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 32'h13;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      repeat (300) begin
        automatic int w = $urandom_range(0, 31);
        if ($urandom_range(0, 1) == 1) begin model[w] = $urandom; u_m0.write(32'(4*w), model[w]); end
        else begin automatic logic [31:0] r; u_m0.read(32'(4*w), r); chk(r, model[w], "m0 read"); end
      end
      repeat (300) begin
        automatic int w = $urandom_range(32, 63);
        if ($urandom_range(0, 1) == 1) begin model[w] = $urandom; u_m1.write(32'(4*w), model[w]); end
        else begin automatic logic [31:0] r; u_m1.read(32'(4*w), r); chk(r, model[w], "m1 read"); end
      end
      repeat (50) u_f0.write(0, 1);
      repeat (50) u_f1.write(4, 2);
    join
    checks++;
    if (n_conflict < 10 || n_alt != n_conflict) begin
      failures++; $display("FAIL round robin: conflicts=%0d alternated=%0d", n_conflict, n_alt);
    end
    checks++;
    if (!fixed_ok) begin failures++; $display("FAIL fixed priority"); end
    $display("conflicts=%0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
