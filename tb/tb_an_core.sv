// tb_an_core: the All-Night core running programs from an APB memory model
// with random wait states.
//
// Program 1 (at 0x100) uses all sixteen instructions, a taken and a
// not-taken BEQ, JAL, JALR, an unsupported BNE (must do nothing), a load
// feeding the next instruction and register 9 aliasing x1, and stores its
// results at 0x400; the expected words are computed here with SystemVerilog
// arithmetic.  The test also checks that nothing is fetched before
// enable_night is set, that the first fetch is at night_addr, that clearing
// enable_night stops fetching, and that setting it again restarts the core
// at a new night_addr (program 2 at 0x300).  Then 25 random programs of the
// sixteen instructions are run and their registers and data memory compared
// with a reference model written here.
module tb_an_core;
  import an_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0, enable_night = 0;
  logic [31:0] night_addr = 0;
  apb_req_t imem_req, dmem_req;
  apb_rsp_t imem_rsp, dmem_rsp;
  logic running, retire, flush;
  int checks = 0, failures = 0, n_flush = 0, n_fetch = 0, first_fetch = -1;

  an_core dut (.clk, .rst_n, .enable_night, .night_addr, .imem_req, .imem_rsp,
               .dmem_req, .dmem_rsp, .running, .retire, .flush);

  apb_mem_model #(.WORDS(4096), .MAX_WAIT(2)) u_imem (.clk, .req(imem_req), .rsp(imem_rsp));
  apb_mem_model #(.WORDS(4096), .MAX_WAIT(2)) u_dmem (.clk, .req(dmem_req), .rsp(dmem_rsp));

  always #5 clk = !clk;

  always @(posedge clk) begin
    if (flush) n_flush++;
    if (imem_req.psel && !imem_req.penable) begin
      n_fetch++;
      if (first_fetch < 0) first_fetch = int'(imem_req.paddr);
    end
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  logic [31:0] prog [$];
  task automatic load(input int base);
    foreach (prog[i]) begin
      u_imem.mem[base/4 + i] = prog[i];
      u_dmem.mem[base/4 + i] = prog[i];
    end
  endtask

  // Random programs and a reference model.  Each program sets x1..x7 to
  // random values, runs 60 random instructions (all sixteen kinds; LW/SW on a
  // 64-word data area at 0x600; BEQ and JAL skipping one or two following
  // instructions; register numbers 8..15 alias x0..x7), then stores x1..x7
  // at 0x704.. and a completion marker at 0x720.  The model executes the
  // same instructions from its own register and data copies.
  logic [31:0] iss_x [8];
  logic [31:0] iss_m [64];
  int n_iss = 0;

  function automatic void iss_wr(int rd, logic [31:0] v); if ((rd & 7) != 0) iss_x[rd & 7] = v; endfunction

  task automatic random_program(input int base);
    int skip;
    prog = {};
    for (int k = 0; k < 64; k++) begin iss_m[k] = $urandom; u_dmem.mem[32'h600 / 4 + k] = iss_m[k]; end
    u_dmem.mem[32'h720 / 4] = 0;
    iss_x[0] = 0;
    for (int r = 1; r < 8; r++) begin
      logic [31:0] v; v = $urandom;
      if ($urandom_range(3) == 0) v = $urandom_range(40);     // small values for shifts and branches
      prog.push_back(rv_lui(r, v[31:12] + 20'(v[11])));
      prog.push_back(rv_addi(r, r, int'({{20{v[11]}}, v[11:0]})));
      iss_x[r] = v;
    end
    skip = 0;
    for (int i = 0; i < 60; i++) begin
      int kind, rd, a, b, imm;
      logic [31:0 ] xa, xb, ins, v;
      logic exec;
      kind = $urandom_range(15);
      rd = $urandom_range(15); a = $urandom_range(15); b = $urandom_range(15);
      xa = iss_x[a & 7]; xb = iss_x[b & 7];
      exec = (skip == 0);
      if (skip > 0) skip--;
      imm = int'($urandom_range(4095)) - 2048;
      case (kind)
        0:  begin ins = rv_add(rd, a, b); v = xa + xb; end
        1:  begin ins = rv_sub(rd, a, b); v = xa - xb; end
        2:  begin ins = rv_sll(rd, a, b); v = xa << xb[4:0]; end
        3:  begin ins = rv_slt(rd, a, b); v = 32'($signed(xa) < $signed(xb)); end
        4:  begin ins = rv_sra(rd, a, b); v = $signed(xa) >>> xb[4:0]; end
        5:  begin ins = rv_xor(rd, a, b); v = xa ^ xb; end
        6:  begin ins = rv_or(rd, a, b);  v = xa | xb; end
        7:  begin ins = rv_and(rd, a, b); v = xa & xb; end
        8:  begin ins = rv_mul(rd, a, b); v = xa * xb; end
        9:  begin ins = rv_addi(rd, a, imm); v = xa + 32'(imm); end
        10: begin v = $urandom; ins = rv_lui(rd, v[19:0]); v = {v[19:0], 12'b0}; end
        11: begin imm = 32'h600 + 4 * $urandom_range(63); ins = rv_lw(rd, 0, imm); v = iss_m[(imm - 32'h600) / 4]; end
        12: begin
              imm = 32'h600 + 4 * $urandom_range(63); ins = rv_sw(b, 0, imm);
              if (exec) iss_m[(imm - 32'h600) / 4] = xb;
            end
        13: begin                                          // BEQ over one or two instructions
              int n; n = $urandom_range(1, 2);
              if ($urandom_range(1)) b = a + 8 * $urandom_range(1);   // same register: taken
              xb = iss_x[b & 7];
              ins = rv_beq(a, b, 4 * (n + 1));
              if (exec && xa == xb && i + n < 60) skip = n;
              if (i + n >= 60) ins = rv_beq(a, b, 4);
            end
        default: begin                                     // JAL over one instruction
              ins = rv_jal(rd, 8); v = base + 4 * (prog.size() + 1);
              if (exec && i + 1 < 60) skip = 1;
              if (i + 1 >= 60) ins = rv_jal(rd, 4);
            end
      endcase
      if (exec && !(kind inside {12, 13})) iss_wr(rd, v);
      if (exec) n_iss++;
      prog.push_back(ins);
    end
    for (int r = 1; r < 8; r++) prog.push_back(rv_sw(r, 0, 32'h700 + 4 * r));
    prog.push_back(rv_lui(1, 20'hABCDE));
    prog.push_back(rv_sw(1, 0, 32'h720));
    prog.push_back(rv_jal(0, 0));
    load(base);
  endtask

  function automatic logic [31:0] res(int off); return u_dmem.mem[(32'h400 + off) / 4]; endfunction

  initial begin
    logic [31:0] x1v, x2v, jal_link, jalr_link, l_addr;
    int n0;
    // ---------------------------------------------------------- program 1
    prog = {};
    prog.push_back(rv_addi(7, 0, 1024));
    prog.push_back(rv_lui(1, 20'h12345));
    prog.push_back(rv_addi(1, 1, 12'h678));
    prog.push_back(rv_addi(2, 0, -5));
    prog.push_back(rv_add(3, 1, 2));  prog.push_back(rv_sw(3, 7, 0));
    prog.push_back(rv_sub(3, 1, 2));  prog.push_back(rv_sw(3, 7, 4));
    prog.push_back(rv_addi(4, 0, 4));
    prog.push_back(rv_sll(3, 1, 4));  prog.push_back(rv_sw(3, 7, 8));
    prog.push_back(rv_sra(3, 2, 4));  prog.push_back(rv_sw(3, 7, 12));
    prog.push_back(rv_slt(3, 2, 1));  prog.push_back(rv_sw(3, 7, 16));
    prog.push_back(rv_xor(3, 1, 2));  prog.push_back(rv_sw(3, 7, 20));
    prog.push_back(rv_or(3, 1, 2));   prog.push_back(rv_sw(3, 7, 24));
    prog.push_back(rv_and(3, 1, 2));  prog.push_back(rv_sw(3, 7, 28));
    prog.push_back(rv_mul(3, 1, 2));  prog.push_back(rv_sw(3, 7, 32));
    prog.push_back(rv_lw(5, 7, 32));  prog.push_back(rv_addi(5, 5, 1));
    prog.push_back(rv_sw(5, 7, 36));
    prog.push_back(rv_beq(0, 0, 8));           // taken
    prog.push_back(rv_addi(6, 0, 99));         // skipped
    prog.push_back(rv_addi(6, 6, 7));          // x6 = 7 only if the skip happened
    prog.push_back(rv_beq(6, 0, 8));           // not taken
    prog.push_back(rv_addi(6, 6, 1));
    prog.push_back(rv_sw(6, 7, 40));
    prog.push_back(rv_bne(0, 1, 8));           // unsupported: no-op
    prog.push_back(rv_addi(6, 6, 1));
    prog.push_back(rv_sw(6, 7, 44));
    jal_link = 32'h100 + 4 * (prog.size() + 1);
    prog.push_back(rv_jal(5, 8));
    prog.push_back(rv_addi(6, 0, 0));          // skipped
    prog.push_back(rv_sw(5, 7, 48));
    l_addr = 32'h100 + 4 * (prog.size() + 3);
    prog.push_back(rv_addi(4, 0, int'(l_addr)));
    jalr_link = 32'h100 + 4 * (prog.size() + 1);
    prog.push_back(rv_jalr(2, 4, 0));
    prog.push_back(rv_addi(6, 0, 0));          // skipped
    prog.push_back(rv_sw(2, 7, 52));           // L:
    prog.push_back(rv_sw(6, 7, 56));
    prog.push_back(rv_addi(9, 0, 3));          // x9 is x1
    prog.push_back(rv_sw(1, 7, 60));
    prog.push_back(rv_jal(0, 0));              // spin
    load(32'h100);
    // ---------------------------------------------------------- program 2
    prog = {};
    prog.push_back(rv_addi(1, 0, 1234));
    prog.push_back(rv_sw(1, 0, 32'h440));
    prog.push_back(rv_jal(0, 0));
    load(32'h300);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30) @(posedge clk);
    chk(n_fetch, 0, "no fetch while enable_night is 0");
    chk(running, 0, "idle while enable_night is 0");
    night_addr <= 32'h100;
    enable_night <= 1;
    n0 = 0;
    while (u_dmem.mem[(32'h400 + 60) / 4] == 32'h13 && n0 < 5000) begin @(posedge clk); n0++; end
    repeat (5) @(posedge clk);
    chk(first_fetch, 32'h100, "first fetch at night_addr");
    x1v = 32'h1234_5678; x2v = -32'sd5;
    chk(res(0),  x1v + x2v, "ADD");
    chk(res(4),  x1v - x2v, "SUB");
    chk(res(8),  x1v << 4, "SLL");
    chk(res(12), 32'hFFFF_FFFF, "SRA");
    chk(res(16), 1, "SLT");
    chk(res(20), x1v ^ x2v, "XOR");
    chk(res(24), x1v | x2v, "OR");
    chk(res(28), x1v & x2v, "AND");
    chk(res(32), x1v * x2v, "MUL");
    chk(res(36), x1v * x2v + 1, "LW then ADDI");
    chk(res(40), 8, "BEQ taken / not taken");
    chk(res(44), 9, "BNE is a no-op");
    chk(res(48), jal_link, "JAL link");
    chk(res(52), jalr_link, "JALR link");
    chk(res(56), 9, "JALR skipped instruction");
    chk(res(60), 3, "x9 aliases x1");
    checks++; if (n_flush < 4) begin failures++; $display("FAIL flushes %0d", n_flush); end
    // ---------------------------------------------------------- stop and restart
    enable_night <= 0;
    repeat (10) @(posedge clk);
    chk(running, 0, "stopped after enable_night cleared");
    n0 = n_fetch;
    repeat (50) @(posedge clk);
    chk(n_fetch, n0, "no fetch while stopped");
    first_fetch = -1;
    night_addr <= 32'h300;
    enable_night <= 1;
    n0 = 0;
    while (u_dmem.mem[32'h440 / 4] == 32'h13 && n0 < 2000) begin @(posedge clk); n0++; end
    chk(first_fetch, 32'h300, "restart at new night_addr");
    chk(u_dmem.mem[32'h440 / 4], 1234, "program 2 result");
    // ---------------------------------------------------------- random programs
    for (int t = 0; t < 25; t++) begin
      enable_night <= 0;
      n0 = 0;
      while (running && n0 < 100) begin @(posedge clk); n0++; end
      random_program(32'h800);
      night_addr <= 32'h800;
      enable_night <= 1;
      n0 = 0;
      while (u_dmem.mem[32'h720 / 4] != 32'hABCDE000 && n0 < 20000) begin @(posedge clk); n0++; end
      for (int r = 1; r < 8; r++) chk(u_dmem.mem[(32'h700 + 4 * r) / 4], iss_x[r], $sformatf("random program %0d x%0d", t, r));
      for (int k = 0; k < 64; k++) if (u_dmem.mem[32'h600 / 4 + k] !== iss_m[k]) begin
        checks++; failures++; $display("FAIL random program %0d data word %0d", t, k);
      end
      checks++;
    end
    $display("random programs: %0d instructions executed by the reference model", n_iss);
    $display("flushes=%0d fetches=%0d", n_flush, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
