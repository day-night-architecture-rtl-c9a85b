// apb_mem_model: APB3 slave memory for the testbenches.
//
// Answers each ACCESS phase after a random 0..MAX_WAIT wait states, reading
// or writing one word of the array mem (word address = PADDR[..:2]).  Other
// modules fill and inspect mem through hierarchical references.
module apb_mem_model
  import an_pkg::*;
#(
  parameter int WORDS    = 4096,
  parameter int MAX_WAIT = 2
) (
  input  logic     clk,
  input  apb_req_t req,
  output apb_rsp_t rsp
);
  logic [31:0] mem [WORDS];
  int wait_left = 0;
  logic in_access = 1'b0;
  int writes = 0;

  initial foreach (mem[i]) mem[i] = 32'h0000_0013;   // addi x0, x0, 0

  always @(posedge clk) begin
    if (req.psel && req.penable) begin
      if (!in_access) begin
        in_access <= 1'b1;
        wait_left <= $urandom_range(0, MAX_WAIT);
      end else if (wait_left > 0) begin
        wait_left <= wait_left - 1;
      end
      if (rsp.pready) begin
        in_access <= 1'b0;
        if (req.pwrite) begin mem[req.paddr[$clog2(WORDS)+1:2]] <= req.pwdata; writes <= writes + 1; end
      end
    end else begin
      in_access <= 1'b0;
    end
  end

  // ready in the first ACCESS cycle when no wait was drawn
  always_comb begin
    rsp = APB_RSP_IDLE;
    rsp.pready = req.psel && req.penable && in_access && wait_left == 0;
    rsp.prdata = rsp.pready ? mem[req.paddr[$clog2(WORDS)+1:2]] : 32'h0;
  end
endmodule
