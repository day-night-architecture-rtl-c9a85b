// an_alu: ALU of the All-Night core.
//
// Six kinds of operation, as the document lists them: ADD (and SUBTRACT),
// SHIFT, AND, OR, XOR and MULT.  AND, OR and XOR are plain bitwise logic.
// ADD, SUB and SLT use one 32-bit adder.  SHIFT (SLL, SRA) uses the one-bit
// shifter once per clock cycle, so a shift by n is ready n+1 cycles after
// valid rises.  MULT uses the shift-and-add multiplier and is ready XLEN+1
// cycles after valid rises.  ALU_PASS returns operand b
// (used by LUI); ALU_NOP returns zero.
//
// Handshake (this design's own): the requester holds valid, op, a and b
// stable until ready is high.  Single-cycle operations are ready in the
// cycle valid rises; multi-cycle ones raise ready once, at the end.  The
// requester must present a new operation or drop valid after ready.
module an_alu
  import an_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  alu_op_t         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] result,
  output logic            ready,
  output logic            zero       // result == 0 (a == b after SUB)
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_MUL} state_t;
  state_t state;

  logic [XLEN-1:0] add_sum, sh_q, sh_next, mul_p;
  logic            add_ovf, mul_busy, mul_done, mul_start;
  logic [4:0]      sh_cnt;
  logic            multi;

  an_adder32 #(.XLEN(XLEN)) u_adder_32bit (
    .a(a), .b(b), .sub(op == ALU_SUB || op == ALU_SLT),
    .sum(add_sum), .carry(), .overflow(add_ovf));

  an_shifter1 #(.XLEN(XLEN)) u_shifter_1bit (
    .din(sh_q), .right(op == ALU_SRA), .dout(sh_next));

  assign multi     = (op == ALU_SLL) || (op == ALU_SRA) || (op == ALU_MUL);
  assign mul_start = valid && state == S_IDLE && op == ALU_MUL;

  an_multiplier #(.XLEN(XLEN)) u_mult (
    .clk, .rst_n, .start(mul_start), .rs1_data(a), .rs2_data(b),
    .busy(mul_busy), .done(mul_done), .product(mul_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      sh_q   <= '0;
      sh_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (valid && multi) begin
          if (op == ALU_MUL) state <= S_MUL;
          else begin
            state  <= S_SHIFT;
            sh_q   <= a;
            sh_cnt <= b[4:0];
          end
        end
        S_SHIFT: if (sh_cnt == '0) state <= S_IDLE;
                 else begin
                   sh_q   <= sh_next;
                   sh_cnt <= sh_cnt - 1'b1;
                 end
        S_MUL:   if (mul_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    result = '0;
    ready  = 1'b0;
    unique case (op)
      ALU_ADD, ALU_SUB: begin result = add_sum;  ready = valid; end
      ALU_SLT:  begin result = {{(XLEN-1){1'b0}}, add_sum[XLEN-1] ^ add_ovf}; ready = valid; end
      ALU_XOR:  begin result = a ^ b; ready = valid; end
      ALU_OR:   begin result = a | b; ready = valid; end
      ALU_AND:  begin result = a & b; ready = valid; end
      ALU_PASS: begin result = b;     ready = valid; end
      ALU_SLL, ALU_SRA: begin
        result = sh_q;
        ready  = valid && state == S_SHIFT && sh_cnt == '0;
      end
      ALU_MUL:  begin
        result = mul_p;
        ready  = valid && state == S_MUL && mul_done;
      end
      default:  begin result = '0; ready = valid; end
    endcase
  end

  assign zero = (result == '0);
endmodule
