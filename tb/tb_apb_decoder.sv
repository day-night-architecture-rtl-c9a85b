// tb_apb_decoder: a master reaches four slaves of a three-slave decoder
// map plus an unmapped window; each slave model must see only its own
// transfers, reads must return that slave's data, and the unmapped window
// must answer with PSLVERR.  Then 300 random transfers over eight windows
// (three mapped, five unmapped, random offsets), each checked against a
// reference copy of the three slave memories, plus the write counts.
module tb_apb_decoder;
  import an_pkg::*;
  logic clk = 0;
  apb_req_t m_req;
  apb_rsp_t m_rsp;
  apb_req_t s_req [3];
  apb_rsp_t s_rsp [3];
  int checks = 0, failures = 0;

  apb_decoder #(.N(3),
    .BASE({32'h3000_0000, 32'h2000_0000, 32'h1000_0000}),
    .MASK({32'hF000_0000, 32'hF000_0000, 32'hF000_0000})) dut (.m_req, .m_rsp, .s_req, .s_rsp);
  apb_master_bfm u_m (.clk, .req(m_req), .rsp(m_rsp));
  apb_mem_model #(.WORDS(16), .MAX_WAIT(1)) u_s0 (.clk, .req(s_req[0]), .rsp(s_rsp[0]));
  apb_mem_model #(.WORDS(16), .MAX_WAIT(1)) u_s1 (.clk, .req(s_req[1]), .rsp(s_rsp[1]));
  apb_mem_model #(.WORDS(16), .MAX_WAIT(1)) u_s2 (.clk, .req(s_req[2]), .rsp(s_rsp[2]));
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    u_s0.mem[1] = 32'hA0; u_s1.mem[1] = 32'hA1; u_s2.mem[1] = 32'hA2;
    @(posedge clk);
    u_m.read(32'h1000_0004, d); chk(d, 32'hA0, "slave 0 read"); chk(u_m.last_slverr, 0, "no error");
    u_m.read(32'h2000_0004, d); chk(d, 32'hA1, "slave 1 read");
    u_m.read(32'h3000_0004, d); chk(d, 32'hA2, "slave 2 read");
    u_m.write(32'h2000_0008, 32'h55);
    chk(u_s1.mem[2], 32'h55, "slave 1 write"); chk(u_s0.mem[2], 32'h13, "slave 0 untouched");
    chk(u_s2.mem[2], 32'h13, "slave 2 untouched");
    chk(u_s0.writes + u_s2.writes, 0, "no stray writes");
    u_m.write(32'h4000_0008, 32'h66);
    chk(u_m.last_slverr, 1, "unmapped write error");
    u_m.read(32'h0000_0004, d);
    chk(u_m.last_slverr, 1, "unmapped read error"); chk(d, 0, "unmapped read data");
    chk(u_s0.writes + u_s1.writes + u_s2.writes, 1, "unmapped write reached no slave");
    begin
      logic [31:0] ref_m [3][16], a, v;
      int w, k, n_w [3];
      ref_m[0] = u_s0.mem; ref_m[1] = u_s1.mem; ref_m[2] = u_s2.mem;
      n_w[0] = u_s0.writes; n_w[1] = u_s1.writes; n_w[2] = u_s2.writes;
      for (int t = 0; t < 300; t++) begin
        w = $urandom_range(7); k = $urandom_range(15); v = $urandom;
        a = {4'(w), 22'($urandom), 4'(k), 2'b00};
        if ($urandom_range(1)) begin
          u_m.write(a, v);
          if (w >= 1 && w <= 3) begin ref_m[w-1][k] = v; n_w[w-1]++; end
        end else begin
          u_m.read(a, d);
          chk(d, (w >= 1 && w <= 3) ? ref_m[w-1][k] : 32'h0, "random read data");
        end
        chk(u_m.last_slverr, !(w >= 1 && w <= 3), "random PSLVERR");
      end
      chk(u_s0.writes, n_w[0], "slave 0 write count");
      chk(u_s1.writes, n_w[1], "slave 1 write count");
      chk(u_s2.writes, n_w[2], "slave 2 write count");
      for (int i = 0; i < 16; i++) begin
        chk(u_s0.mem[i], ref_m[0][i], "slave 0 contents");
        chk(u_s1.mem[i], ref_m[1][i], "slave 1 contents");
        chk(u_s2.mem[i], ref_m[2][i], "slave 2 contents");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
