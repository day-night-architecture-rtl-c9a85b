// tb_an_alu: every ALU operation on random operands against a reference
// model, with the cycle count from valid to ready: 0 for the single-cycle
// operations, shamt+1 for SLL/SRA and 33 for MUL.
module tb_an_alu;
  import an_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, ready, zero;
  alu_op_t op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  an_alu dut (.clk, .rst_n, .valid, .op, .a, .b, .result(y), .ready, .zero);
  always #5 clk = !clk;

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_SLL:  return x << z[4:0];
      ALU_SLT:  return {31'b0, $signed(x) < $signed(z)};
      ALU_SRA:  return 32'($signed(x) >>> z[4:0]);
      ALU_XOR:  return x ^ z;
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      ALU_MUL:  return x * z;
      ALU_PASS: return z;
      default:  return 0;
    endcase
  endfunction

  task automatic run(alu_op_t o, logic [31:0] x, logic [31:0] z);
    int n, exp_n;
    op <= o; a <= x; b <= z; valid <= 1;
    n = 0;
    forever begin @(negedge clk); if (ready) break; @(posedge clk); n++; end
    exp_n = (o == ALU_SLL || o == ALU_SRA) ? int'(z[4:0]) + 1 : (o == ALU_MUL) ? 33 : 0;
    checks += 2;
    if (y !== model(o, x, z)) begin failures++; $display("FAIL op=%s %h %h -> %h", o.name(), x, z, y); end
    if (n != exp_n) begin failures++; $display("FAIL latency op=%s n=%0d exp=%0d", o.name(), n, exp_n); end
    @(posedge clk);
    if (1'($urandom)) begin valid <= 0; @(posedge clk); end
  endtask

  initial begin
    alu_op_t ops [10] = '{ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SRA, ALU_XOR, ALU_OR, ALU_AND, ALU_MUL, ALU_PASS};
    op = ALU_ADD; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    run(ALU_SLT, 32'h7FFF_FFFF, 32'h8000_0000);
    run(ALU_SRA, 32'h8000_0000, 31);
    run(ALU_SLL, 32'h1, 0);
    repeat (600) run(ops[$urandom_range(0, 9)], $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
