// an_multiplier: shift-and-add multiplier of the All-Night core.
//
// Replaces a 32-bit array multiplier by the document's iterative
// algorithm: for i = 0 .. XLEN-1 the running copy of rs1_data (shifted left
// by i through the one-bit shifter) is ANDed with bit i of rs2_data and
// accumulated with the 32-bit adder.  After XLEN iterations the
// accumulator holds the low XLEN bits of the product, which is what RV32M
// MUL returns.
//
// Timing (this design's choice: one iteration per clock): a one-cycle
// start pulse loads the operands, XLEN iterations follow, and done is high
// for one cycle XLEN+1 cycles after the start cycle;
// product is valid from then until the next start.  busy is high while the
// iterations run.  A start while busy restarts the operation.
module an_multiplier #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [XLEN-1:0] rs1_data,
  input  logic [XLEN-1:0] rs2_data,
  output logic            busy,
  output logic            done,
  output logic [XLEN-1:0] product
);
  localparam int unsigned CW = $clog2(XLEN);

  logic [XLEN-1:0] acc, shifted, multiplier_q;
  logic [XLEN-1:0] shifted_next, partial, acc_next;
  logic [CW-1:0]   i_q;

  an_shifter1 #(.XLEN(XLEN)) u_shifter_1bit (
    .din(shifted), .right(1'b0), .dout(shifted_next));

  // rs1_data << i AND rs2_data[i]
  assign partial = shifted & {XLEN{multiplier_q[i_q]}};

  an_adder32 #(.XLEN(XLEN)) u_adder_32bit (
    .a(acc), .b(partial), .sub(1'b0), .sum(acc_next),
    .carry(), .overflow());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; shifted <= '0; multiplier_q <= '0; i_q <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else if (start) begin
      acc <= '0; shifted <= rs1_data; multiplier_q <= rs2_data; i_q <= '0;
      busy <= 1'b1; done <= 1'b0;
    end else if (busy) begin
      acc     <= acc_next;
      shifted <= shifted_next;
      i_q     <= i_q + 1'b1;
      if (i_q == CW'(XLEN-1)) begin   // i == 32 after this iteration
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  assign product = acc;
endmodule
