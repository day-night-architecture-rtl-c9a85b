// rv_asm_pkg: instruction encoders for the testbenches.
//
// Each function returns the 32-bit RV32I/RV32M encoding of one instruction
// of the All-Night core's subset (plus BNE, used to check that unsupported
// instructions do nothing).  Offsets are in bytes.
package rv_asm_pkg;
  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [2:0] f3,
                                         input int rd, input int rs1, input int rs2);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] i_type(input logic [6:0] op, input logic [2:0] f3,
                                         input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] rv_add (int rd, int rs1, int rs2); return r_type(7'h00, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_sub (int rd, int rs1, int rs2); return r_type(7'h20, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_sll (int rd, int rs1, int rs2); return r_type(7'h00, 3'd1, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_slt (int rd, int rs1, int rs2); return r_type(7'h00, 3'd2, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_sra (int rd, int rs1, int rs2); return r_type(7'h20, 3'd5, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_xor (int rd, int rs1, int rs2); return r_type(7'h00, 3'd4, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_or  (int rd, int rs1, int rs2); return r_type(7'h00, 3'd6, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_and (int rd, int rs1, int rs2); return r_type(7'h00, 3'd7, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_mul (int rd, int rs1, int rs2); return r_type(7'h01, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_addi(int rd, int rs1, int imm); return i_type(7'b0010011, 3'd0, rd, rs1, imm); endfunction
  function automatic logic [31:0] rv_lw  (int rd, int rs1, int imm); return i_type(7'b0000011, 3'd2, rd, rs1, imm); endfunction
  function automatic logic [31:0] rv_jalr(int rd, int rs1, int imm); return i_type(7'b1100111, 3'd0, rd, rs1, imm); endfunction
  function automatic logic [31:0] rv_sw(int rs2, int rs1, int imm);
    logic [11:0] i; i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'd2, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] rv_b(input logic [2:0] f3, int rs1, int rs2, int off);
    logic [12:0] i; i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] rv_beq(int rs1, int rs2, int off); return rv_b(3'd0, rs1, rs2, off); endfunction
  function automatic logic [31:0] rv_bne(int rs1, int rs2, int off); return rv_b(3'd1, rs1, rs2, off); endfunction
  function automatic logic [31:0] rv_lui(int rd, logic [19:0] imm); return {imm, 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] rv_jal(int rd, int off);
    logic [20:0] i; i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
endpackage
