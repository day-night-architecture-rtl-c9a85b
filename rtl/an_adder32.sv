// an_adder32: the 32-bit adder of the All-Night core ("adder_32bit").
//
// One ripple-free behavioural adder that serves ADD, SUB, SLT, the branch
// and the accumulation of the shift-and-add multiplier.  With sub = 1 the
// second operand is inverted and a carry of one is added, giving a - b.
// Purely combinational.  The document names the block; the subtract input
// and the carry/overflow outputs are this design's own.
module an_adder32 #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            sub,       // 1: a - b, 0: a + b
  output logic [XLEN-1:0] sum,
  output logic            carry,     // carry out of the MSB
  output logic            overflow   // signed overflow
);
  logic [XLEN-1:0] b_eff;
  logic [XLEN:0]   wide;

  always_comb begin
    b_eff    = sub ? ~b : b;
    wide     = {1'b0, a} + {1'b0, b_eff} + {{XLEN{1'b0}}, sub};
    sum      = wide[XLEN-1:0];
    carry    = wide[XLEN];
    overflow = (a[XLEN-1] == b_eff[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]);
  end
endmodule
