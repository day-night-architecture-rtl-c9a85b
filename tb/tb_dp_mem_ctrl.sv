// tb_dp_mem_ctrl: an APB master and an AXI master hammer the controller at
// the same time with random reads and writes to disjoint halves of a small
// memory; every read is compared with a model.  Also checked: an
// uncontended APB transfer takes two cycles, the SRAM is never granted to
// both ports in one cycle, and under contention the grants alternate.
module tb_dp_mem_ctrl;
  import an_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t axi_req, ax;   // ax: working copy, driven as a whole
  axi_rsp_t axi_rsp;
  apb_req_t apb_req;
  apb_rsp_t apb_rsp;
  logic grant_apb, grant_axi, conflict;
  logic [31:0] model [256];
  int checks = 0, failures = 0, n_conflict = 0, n_alt = 0;
  logic last_grant_apb = 0;
  bit apb_done = 0, axi_done = 0;

  dp_mem_ctrl #(.MEM_WORDS(256)) dut (.clk, .rst_n, .axi_req, .axi_rsp, .apb_req, .apb_rsp,
                                      .grant_apb, .grant_axi, .conflict);
  apb_master_bfm u_apb (.clk, .req(apb_req), .rsp(apb_rsp));
  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    if (grant_apb && grant_axi) begin failures++; $display("FAIL both granted"); end
    if (conflict) begin
      n_conflict++;
      checks++;
      if (grant_apb != last_grant_apb && grant_apb != grant_axi) n_alt++;
      else begin failures++; $display("FAIL conflict not alternated"); end
    end
    if (grant_apb || grant_axi) last_grant_apb <= grant_apb;
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic axi_write(input logic [31:0] addr, data);
    @(negedge clk);
    ax.awaddr = addr; ax.wdata = data; ax.wstrb = 4'hF;
    ax.awvalid = 1; ax.wvalid = 1; ax.bready = 1; axi_req = ax;
    forever begin #1; if (axi_rsp.awready) break; @(negedge clk); end
    @(negedge clk);
    ax.awvalid = 0; ax.wvalid = 0; axi_req = ax;
    forever begin #1; if (axi_rsp.bvalid) break; @(negedge clk); end
    @(negedge clk);
    ax.bready = 0; axi_req = ax;
  endtask

  task automatic axi_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    ax.araddr = addr; ax.arvalid = 1; ax.rready = 1; axi_req = ax;
    forever begin #1; if (axi_rsp.arready) break; @(negedge clk); end
    @(negedge clk);
    ax.arvalid = 0; axi_req = ax;
    forever begin #1; if (axi_rsp.rvalid) break; @(negedge clk); end
    data = axi_rsp.rdata;
    @(negedge clk);
    ax.rready = 0; axi_req = ax;
  endtask

  initial begin
    logic [31:0] d;
    axi_req = '0; ax = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // uncontended APB timing and initialisation
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      u_apb.write(32'(4*i), model[i]);
    end
    chk(32'(u_apb.last_cycles), 2, "APB write cycles");
    u_apb.read(32'h10, d);
    chk(d, model[4], "APB read");
    chk(32'(u_apb.last_cycles), 2, "APB read cycles");
    fork
      begin
        repeat (400) begin
          automatic int w = $urandom_range(0, 127);
          if ($urandom_range(0, 1) == 1) begin model[w] = $urandom; u_apb.write(32'(4*w), model[w]); end
          else begin automatic logic [31:0] r; u_apb.read(32'(4*w), r); chk(r, model[w], "APB rd"); end
        end
      end
      begin
        repeat (400) begin
          automatic int w = $urandom_range(128, 255);
          if ($urandom_range(0, 1) == 1) begin model[w] = $urandom; axi_write(32'(4*w), model[w]); end
          else begin automatic logic [31:0] r; axi_read(32'(4*w), r); chk(r, model[w], "AXI rd"); end
        end
      end
    join
    // cross check: each port reads the other's half
    for (int i = 0; i < 256; i += 17) begin
      u_apb.read(32'(4*i), d); chk(d, model[i], "APB final");
      axi_read(32'(4*i), d);   chk(d, model[i], "AXI final");
    end
    checks++;
    if (n_conflict == 0 || n_alt != n_conflict) begin
      failures++; $display("FAIL conflicts=%0d alternated=%0d", n_conflict, n_alt);
    end
    $display("conflicts=%0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
