// an_shifter1: the one-bit shifter of the All-Night core ("shifter_1bit").
//
// Shifts a word by exactly one position: left (filling a zero) or, with
// right = 1, arithmetic right (copying the sign bit).  Wider shifts and the
// multiplier's rs1_data << i are built by applying it once per clock cycle.
// Combinational.  The left shift is the document's; the arithmetic right
// direction (needed for SRA) is this design's addition.
module an_shifter1 #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] din,
  input  logic            right,   // 0: << 1, 1: >>> 1
  output logic [XLEN-1:0] dout
);
  always_comb begin
    if (right) dout = {din[XLEN-1], din[XLEN-1:1]};
    else       dout = {din[XLEN-2:0], 1'b0};
  end
endmodule
