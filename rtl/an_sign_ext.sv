// an_sign_ext: sign extension unit of the All-Night core DECODE stage.
//
// Copies the top bit of an IN_W-bit immediate field into the upper bits
// of an OUT_W-bit word.  The core uses two of them, for the 12-bit
// immediate (imm12 [11:0]) and the 20-bit one (imm20 [19:0]), as drawn in
// the core's block diagram.  Combinational.
module an_sign_ext #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);
  assign dout = {{(OUT_W-IN_W){din[IN_W-1]}}, din};
endmodule
