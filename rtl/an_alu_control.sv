// an_alu_control: ALU control of the All-Night core DECODE stage.
//
// Turns opcode, funct3 and funct7 of an instruction into the ALU operation
// (alucont) for the sixteen supported instructions: LUI, JAL, JALR, BEQ,
// LW, SW, ADD, ADDI, SUB, SLL, SLT, SRA, XOR, OR, AND and MUL.  Loads,
// stores and JALR add (address / target), BEQ subtracts, LUI passes the
// immediate.  JAL needs no ALU result and gets ALU_ADD.  Every other
// instruction, including the rest of RV32I, gets ALU_NOP and is executed as
// a no-operation.  supported tells the core whether the instruction is in
// the subset.  Combinational; the instruction subset is the document's, the
// encoding of alucont is this design's.
module an_alu_control
  import an_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output alu_op_t    alucont,
  output logic       supported
);
  always_comb begin
    alucont   = ALU_NOP;
    supported = 1'b1;
    unique case (opcode)
      OP_LUI:    alucont = ALU_PASS;
      OP_JAL:    alucont = ALU_ADD;
      OP_JALR:   if (funct3 == 3'b000) alucont = ALU_ADD; else supported = 1'b0;
      OP_BRANCH: if (funct3 == 3'b000) alucont = ALU_SUB; else supported = 1'b0;   // BEQ
      OP_LOAD:   if (funct3 == 3'b010) alucont = ALU_ADD; else supported = 1'b0;   // LW
      OP_STORE:  if (funct3 == 3'b010) alucont = ALU_ADD; else supported = 1'b0;   // SW
      OP_IMM:    if (funct3 == 3'b000) alucont = ALU_ADD; else supported = 1'b0;   // ADDI
      OP_REG: begin
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: alucont = ALU_ADD;
          {7'b0100000, 3'b000}: alucont = ALU_SUB;
          {7'b0000000, 3'b001}: alucont = ALU_SLL;
          {7'b0000000, 3'b010}: alucont = ALU_SLT;
          {7'b0100000, 3'b101}: alucont = ALU_SRA;
          {7'b0000000, 3'b100}: alucont = ALU_XOR;
          {7'b0000000, 3'b110}: alucont = ALU_OR;
          {7'b0000000, 3'b111}: alucont = ALU_AND;
          {7'b0000001, 3'b000}: alucont = ALU_MUL;
          default:              supported = 1'b0;
        endcase
      end
      default: supported = 1'b0;
    endcase
    if (!supported) alucont = ALU_NOP;
  end
endmodule
