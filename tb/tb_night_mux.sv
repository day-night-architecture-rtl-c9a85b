// tb_night_mux: the core-side master reaches the SRAM window, the
// peripheral window and the interrupt register; irq is raised and dropped
// by stores and dropped by irq_clear; unmapped addresses answer PSLVERR.
// Then 300 random transfers over the four windows (SRAM, peripherals,
// interrupt register, unmapped) with random irq_clear pulses, each checked
// against a reference copy of both memories and of the interrupt bit.
module tb_night_mux;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, irq_clear = 0, irq;
  apb_req_t core_req, sram_req, periph_req;
  apb_rsp_t core_rsp, sram_rsp, periph_rsp;
  int checks = 0, failures = 0;

  night_mux dut (.clk, .rst_n, .core_req, .core_rsp, .sram_req, .sram_rsp,
                 .periph_req, .periph_rsp, .irq_clear, .irq);
  apb_master_bfm u_m (.clk, .req(core_req), .rsp(core_rsp));
  apb_mem_model #(.WORDS(16), .MAX_WAIT(2)) u_sram (.clk, .req(sram_req), .rsp(sram_rsp));
  apb_mem_model #(.WORDS(16), .MAX_WAIT(2)) u_per  (.clk, .req(periph_req), .rsp(periph_rsp));
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    u_m.write(32'h0000_0008, 32'h11);
    u_m.write(32'h1000_0008, 32'h22);
    chk(u_sram.mem[2], 32'h11, "SRAM write"); chk(u_per.mem[2], 32'h22, "peripheral write");
    u_m.read(32'h0000_0008, d); chk(d, 32'h11, "SRAM read");
    u_m.read(32'h1000_0008, d); chk(d, 32'h22, "peripheral read");
    chk(irq, 0, "irq low after reset");
    u_m.write(IRQ_BASE, 1);
    chk(irq, 1, "irq raised by store");
    u_m.read(IRQ_BASE, d); chk(d, 1, "irq read back");
    u_m.write(IRQ_BASE, 0);
    chk(irq, 0, "irq dropped by store");
    u_m.write(IRQ_BASE, 1);
    @(negedge clk); irq_clear = 1; @(negedge clk); irq_clear = 0;
    chk(irq, 0, "irq dropped by irq_clear");
    u_m.read(32'h5000_0000, d); chk(u_m.last_slverr, 1, "unmapped error");
    chk(u_sram.writes + u_per.writes, 2, "no stray writes");
    begin
      logic [31:0] ref_s [16], ref_p [16], a, v;
      logic ref_irq;
      int w, k, n_s, n_p;
      ref_s = u_sram.mem; ref_p = u_per.mem; ref_irq = irq;
      n_s = u_sram.writes; n_p = u_per.writes;
      for (int t = 0; t < 300; t++) begin
        w = $urandom_range(3); k = $urandom_range(15); v = $urandom;
        a = {w[1:0] == 3 ? 4'h7 : 4'(w), 22'($urandom), 4'(k), 2'b00};
        if ($urandom_range(1)) begin
          u_m.write(a, v);
          case (w)
            0: begin ref_s[k] = v; n_s++; end
            1: begin ref_p[k] = v; n_p++; end
            2: ref_irq = v[0];
            default: ;
          endcase
        end else begin
          u_m.read(a, d);
          case (w)
            0: chk(d, ref_s[k], "random SRAM read");
            1: chk(d, ref_p[k], "random peripheral read");
            2: chk(d, {31'b0, ref_irq}, "random irq read");
            default: ;
          endcase
        end
        chk(u_m.last_slverr, w == 3, "random PSLVERR");
        chk(irq, ref_irq, "random irq level");
        if ($urandom_range(7) == 0) begin
          @(negedge clk); irq_clear = 1; @(negedge clk); irq_clear = 0;
          ref_irq = 0;
          chk(irq, 0, "random irq_clear");
        end
      end
      chk(u_sram.writes, n_s, "SRAM write count");
      chk(u_per.writes, n_p, "peripheral write count");
      for (int i = 0; i < 16; i++) begin
        chk(u_sram.mem[i], ref_s[i], "SRAM contents");
        chk(u_per.mem[i], ref_p[i], "peripheral contents");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
