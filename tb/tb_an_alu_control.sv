// tb_an_alu_control: the sixteen supported instructions decode to the
// expected ALU operation, and a set of RV32I instructions outside the subset
// decodes to ALU_NOP with supported low.
module tb_an_alu_control;
  import an_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] ins;
  alu_op_t alucont;
  logic supported;
  int checks = 0, failures = 0;

  an_alu_control dut (.opcode(ins[6:0]), .funct3(ins[14:12]), .funct7(ins[31:25]), .alucont, .supported);

  task automatic t(logic [31:0] i, alu_op_t exp, logic sup);
    ins = i; #1;
    checks++;
    if (alucont !== exp || supported !== sup) begin
      failures++; $display("FAIL %h -> %s %b (exp %s %b)", i, alucont.name(), supported, exp.name(), sup);
    end
  endtask

  initial begin
    t(rv_lui(1, 20'h12345), ALU_PASS, 1); t(rv_jal(1, 8), ALU_ADD, 1);
    t(rv_jalr(1, 2, 4), ALU_ADD, 1);      t(rv_beq(1, 2, 8), ALU_SUB, 1);
    t(rv_lw(1, 2, 4), ALU_ADD, 1);        t(rv_sw(1, 2, 4), ALU_ADD, 1);
    t(rv_add(1, 2, 3), ALU_ADD, 1);       t(rv_addi(1, 2, -3), ALU_ADD, 1);
    t(rv_sub(1, 2, 3), ALU_SUB, 1);       t(rv_sll(1, 2, 3), ALU_SLL, 1);
    t(rv_slt(1, 2, 3), ALU_SLT, 1);       t(rv_sra(1, 2, 3), ALU_SRA, 1);
    t(rv_xor(1, 2, 3), ALU_XOR, 1);       t(rv_or(1, 2, 3), ALU_OR, 1);
    t(rv_and(1, 2, 3), ALU_AND, 1);       t(rv_mul(1, 2, 3), ALU_MUL, 1);
    // outside the subset
    t(rv_bne(1, 2, 8), ALU_NOP, 0);
    t(r_type(7'h00, 3'd3, 1, 2, 3), ALU_NOP, 0);          // SLTU
    t(r_type(7'h00, 3'd5, 1, 2, 3), ALU_NOP, 0);          // SRL
    t(r_type(7'h01, 3'd4, 1, 2, 3), ALU_NOP, 0);          // DIV
    t(i_type(7'b0010011, 3'd7, 1, 2, 5), ALU_NOP, 0);     // ANDI
    t(i_type(7'b0000011, 3'd0, 1, 2, 5), ALU_NOP, 0);     // LB
    t({20'h1, 5'd1, 7'b0010111}, ALU_NOP, 0);             // AUIPC
    t(32'h0000_0073, ALU_NOP, 0);                         // ECALL
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
