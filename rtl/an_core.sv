// an_core: the All-Night core, an ultra-lightweight RISC-V Sub-CPU.
//
// Executes sixteen instructions: LUI, JAL, JALR, BEQ, LW, SW, ADD, ADDI,
// SUB, SLL, SLT, SRA, XOR, OR, AND (RV32I) and MUL (RV32M), on eight
// registers x0 .. x7.  Anything else is treated as a no-operation.  There are
// no interrupts and no CSRs.
//
// Pipeline (three stages, as in the document's core diagram):
//   FETCH   - an APB read of the instruction at PC into the instruction
//             register.  One fetch is in flight at a time, started only when
//             the instruction register is empty.
//   DECODE  - ALU control, register file read and the two sign extensions
//             (12-bit and 20-bit immediates); results go into the
//             alucont / rs1_data / rs2_data / Imm12 / Imm20 registers.
//   EXECUTE - ALU, the '=' comparator for BEQ, PC+4 for links, the data
//             APB access for LW/SW, and the register write-back.
// DECODE only moves an instruction on when EXECUTE finishes the previous
// one, and the register file forwards the value being written to a read in
// the same cycle, so dependent instructions need no extra stall.  Jumps and
// taken branches resolve at the end of EXECUTE; the younger instructions are
// discarded (an in-flight fetch completes on the bus and is dropped).
// Multi-cycle ALU work (shifts, MUL) holds EXECUTE until it is done.
//
// Night-mode control (the document's boot mechanism): the core watches
// enable_night in FETCH.  While it is 0 no fetch is issued and undecoded
// work is dropped; an instruction already in EXECUTE completes.  When it is
// 1 and the core is idle, PC is loaded from night_addr and execution starts
// there.  Both come from the Night Support Register.
//
// Interfaces: an APB3 master for instructions (imem_*) and one for data
// (dmem_*), word accesses only; the SoC merges them onto the single APB
// port of the core.  Status outputs: running, retire (one pulse per
// finished instruction) and flush (taken jump/branch).
//
// The stage split, register count, instruction set and the enable/address
// start are from the document; the hazard handling, stall rules, bus
// timing and reset values (PC 0, idle, registers zero) are this design's.
module an_core
  import an_pkg::*;
#(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable_night,
  input  logic [31:0] night_addr,
  output apb_req_t    imem_req,
  input  apb_rsp_t    imem_rsp,
  output apb_req_t    dmem_req,
  input  apb_rsp_t    dmem_rsp,
  output logic        running,
  output logic        retire,
  output logic        flush
);
  // ---------------------------------------------------------------- FETCH
  typedef enum logic {F_IDLE, F_ACCESS} fstate_t;
  fstate_t     f_state;
  logic [31:0] pc_q, f_addr;
  logic        f_kill, f_start, f_done, run_q;
  logic        if_valid;
  logic [31:0] if_instr, if_pc;

  // ---------------------------------------------------------------- DECODE
  logic [6:0]  opcode;
  logic [4:0]  rs1, rs2, rd;
  logic [2:0]  funct3;
  logic [6:0]  funct7;
  alu_op_t     alucont_d;
  logic        supported_d;
  logic [11:0] imm12_field;
  logic [19:0] imm20_field;
  logic [31:0] imm12_ext, imm20_ext, rs1_rd, rs2_rd;
  logic        id_advance;

  // ---------------------------------------------------------------- EXECUTE
  logic        ex_valid, ex_supported;
  alu_op_t     ex_alucont;
  logic [6:0]  ex_opcode;
  logic [4:0]  ex_rd;
  logic [31:0] ex_pc, ex_rs1_data, ex_rs2_data, ex_imm12, ex_imm20;
  logic [31:0] alu_b, alu_y, link, target, wb_data;
  logic        alu_ready, alu_zero, rs_equal, is_mem, is_load, is_store;
  logic        is_jal, is_jalr, is_beq, taken, wb_en, ex_done, redirect;
  typedef enum logic {D_IDLE, D_ACCESS} dstate_t;
  dstate_t     d_state;
  logic        d_done;
  logic        stop;   // enable_night dropped while running

  // ================================================================ FETCH
  assign stop    = run_q && !enable_night;
  assign f_start = run_q && enable_night && f_state == F_IDLE && !if_valid;
  assign f_done  = f_state == F_ACCESS && imem_rsp.pready;

  always_comb begin
    imem_req         = APB_REQ_IDLE;
    imem_req.psel    = f_start || f_state == F_ACCESS;
    imem_req.penable = f_state == F_ACCESS;
    imem_req.paddr   = (f_state == F_ACCESS) ? f_addr : pc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_state  <= F_IDLE;
      pc_q     <= '0;
      f_addr   <= '0;
      f_kill   <= 1'b0;
      run_q    <= 1'b0;
      if_valid <= 1'b0;
      if_instr <= '0;
      if_pc    <= '0;
    end else begin
      // start of Night mode: jump to Night_addr
      if (!run_q && enable_night && f_state == F_IDLE && !ex_valid) begin
        run_q <= 1'b1;
        pc_q  <= night_addr;
      end else if (stop) begin
        run_q <= 1'b0;
      end

      if (f_start) begin
        f_state <= F_ACCESS;
        f_addr  <= pc_q;
        pc_q    <= pc_q + 32'd4;
        f_kill  <= redirect;
      end else if (f_done) begin
        f_state <= F_IDLE;
        f_kill  <= 1'b0;
      end else if (f_state == F_ACCESS && (redirect || stop)) begin
        f_kill  <= 1'b1;
      end
      if (redirect) pc_q <= target;

      // instruction register
      if (redirect || stop) begin
        if_valid <= 1'b0;
      end else if (f_done && !f_kill) begin
        if_valid <= 1'b1;
        if_instr <= imem_rsp.prdata;
        if_pc    <= f_addr;
      end else if (id_advance) begin
        if_valid <= 1'b0;
      end
    end
  end

  // ================================================================ DECODE
  assign opcode = if_instr[6:0];
  assign rd     = if_instr[11:7];
  assign funct3 = if_instr[14:12];
  assign rs1    = if_instr[19:15];
  assign rs2    = if_instr[24:20];
  assign funct7 = if_instr[31:25];

  an_alu_control u_alu_control (
    .opcode, .funct3, .funct7, .alucont(alucont_d), .supported(supported_d));

  an_regfile #(.NREGS(NREGS), .XLEN(XLEN)) u_regfile (
    .clk, .rst_n, .raddr1(rs1), .raddr2(rs2), .rdata1(rs1_rd), .rdata2(rs2_rd),
    .we(wb_en), .waddr(ex_rd), .wdata(wb_data));

  // 12-bit immediate field (I, S or B format; B without its zero LSB)
  always_comb begin
    unique case (opcode)
      OP_STORE:  imm12_field = {if_instr[31:25], if_instr[11:7]};
      OP_BRANCH: imm12_field = {if_instr[31], if_instr[7], if_instr[30:25], if_instr[11:8]};
      default:   imm12_field = if_instr[31:20];
    endcase
    // 20-bit immediate field (U format, or J format without its zero LSB)
    if (opcode == OP_JAL)
      imm20_field = {if_instr[31], if_instr[19:12], if_instr[20], if_instr[30:21]};
    else
      imm20_field = if_instr[31:12];
  end

  an_sign_ext #(.IN_W(12), .OUT_W(32)) u_sext12 (.din(imm12_field), .dout(imm12_ext));
  an_sign_ext #(.IN_W(20), .OUT_W(32)) u_sext20 (.din(imm20_field), .dout(imm20_ext));

  assign id_advance = if_valid && run_q && !stop && !redirect && (!ex_valid || ex_done);

  // ================================================================ EXECUTE
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid     <= 1'b0;
      ex_supported <= 1'b0;
      ex_alucont   <= ALU_NOP;
      ex_opcode    <= '0;
      ex_rd        <= '0;
      ex_pc        <= '0;
      ex_rs1_data  <= '0;
      ex_rs2_data  <= '0;
      ex_imm12     <= '0;
      ex_imm20     <= '0;
    end else if (id_advance) begin
      ex_valid     <= 1'b1;
      ex_supported <= supported_d;
      ex_alucont   <= alucont_d;
      ex_opcode    <= opcode;
      ex_rd        <= rd;
      ex_pc        <= if_pc;
      ex_rs1_data  <= rs1_rd;
      ex_rs2_data  <= rs2_rd;
      ex_imm12     <= imm12_ext;
      ex_imm20     <= imm20_ext;
    end else if (ex_done) begin
      ex_valid     <= 1'b0;
    end
  end

  assign is_load  = ex_supported && ex_opcode == OP_LOAD;
  assign is_store = ex_supported && ex_opcode == OP_STORE;
  assign is_mem   = is_load || is_store;
  assign is_jal   = ex_supported && ex_opcode == OP_JAL;
  assign is_jalr  = ex_supported && ex_opcode == OP_JALR;
  assign is_beq   = ex_supported && ex_opcode == OP_BRANCH;

  always_comb begin
    unique case (ex_opcode)
      OP_REG, OP_BRANCH: alu_b = ex_rs2_data;
      OP_LUI:            alu_b = {ex_imm20[19:0], 12'b0};
      default:           alu_b = ex_imm12;
    endcase
  end

  an_alu #(.XLEN(XLEN)) u_alu (
    .clk, .rst_n, .valid(ex_valid), .op(ex_alucont), .a(ex_rs1_data), .b(alu_b),
    .result(alu_y), .ready(alu_ready), .zero(alu_zero));

  assign rs_equal = (ex_rs1_data == ex_rs2_data);   // '=' comparator
  assign link     = ex_pc + 32'd4;                  // PC + 4 adder

  always_comb begin
    if (is_jal)       target = ex_pc + {ex_imm20[30:0], 1'b0};
    else if (is_jalr) target = {alu_y[31:1], 1'b0};
    else              target = ex_pc + {ex_imm12[30:0], 1'b0};
  end

  assign taken = is_jal || is_jalr || (is_beq && rs_equal);

  // data memory access (APB): SETUP in the first EXECUTE cycle
  always_comb begin
    dmem_req         = APB_REQ_IDLE;
    dmem_req.psel    = ex_valid && is_mem;
    dmem_req.penable = d_state == D_ACCESS;
    dmem_req.pwrite  = is_store;
    dmem_req.paddr   = alu_y;
    dmem_req.pwdata  = ex_rs2_data;
  end
  assign d_done = d_state == D_ACCESS && dmem_rsp.pready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                         d_state <= D_IDLE;
    else if (d_state == D_IDLE && dmem_req.psel)        d_state <= D_ACCESS;
    else if (d_done)                                    d_state <= D_IDLE;
  end

  assign ex_done  = ex_valid && alu_ready && (!is_mem || d_done);
  assign redirect = ex_done && taken;

  always_comb begin
    wb_en   = 1'b0;
    wb_data = alu_y;
    if (ex_done && ex_supported) begin
      unique case (ex_opcode)
        OP_LUI, OP_IMM, OP_REG: wb_en = 1'b1;
        OP_JAL, OP_JALR:  begin wb_en = 1'b1; wb_data = link; end
        OP_LOAD:          begin wb_en = 1'b1; wb_data = dmem_rsp.prdata; end
        default:          wb_en = 1'b0;
      endcase
    end
  end

  assign running = run_q;
  assign retire  = ex_done;
  assign flush   = redirect;

`ifndef SYNTHESIS
  // APB rule: address stable from SETUP to the end of ACCESS
  a_dmem_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (dmem_req.psel && !dmem_rsp.pready) |=> $stable(dmem_req.paddr) || !dmem_req.psel);
`endif
endmodule
