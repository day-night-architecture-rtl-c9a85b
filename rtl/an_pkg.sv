// an_pkg: types and constants shared by the Day-Night Night-segment RTL.
//
// Holds the RV32I opcode values the All-Night core decodes, the ALU
// operation code that the ALU control hands to the ALU, the APB3 and
// AXI4-Lite request/response bundles used between the blocks, and the
// memory map of the Night segment.  The opcodes follow the RISC-V
// specification; the ALU encoding, the bus bundles and the address map
// are this design's own choices.
package an_pkg;


  // RV32I major opcodes used by the supported subset
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // Operation selected by the ALU control
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SRA  = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_OR   = 4'd6,
    ALU_AND  = 4'd7,
    ALU_MUL  = 4'd8,
    ALU_PASS = 4'd9,   // result = operand b (LUI)
    ALU_NOP  = 4'd15   // unsupported instruction: no effect
  } alu_op_t;

  // APB3 bundles (master -> slave, slave -> master)
  typedef struct packed {
    logic [31:0] paddr;
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // AXI4-Lite bundles (single-beat transfers)
  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic        rready;
  } axi_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axi_rsp_t;

  // Night-segment memory map
  localparam logic [31:0] SRAM_BASE   = 32'h0000_0000;
  localparam logic [31:0] SRAM_MASK   = 32'hF000_0000;
  localparam logic [31:0] PERIPH_BASE = 32'h1000_0000;
  localparam logic [31:0] PERIPH_MASK = 32'hF000_0000;
  localparam logic [31:0] IRQ_BASE    = 32'h2000_0000;
  localparam logic [31:0] IRQ_MASK    = 32'hF000_0000;
  // inside the peripheral window
  localparam logic [31:0] NSR_BASE    = 32'h1000_0000;
  localparam logic [31:0] UART_BASE   = 32'h1000_0100;
  localparam logic [31:0] SPI_BASE    = 32'h1000_0200;
  localparam logic [31:0] I2C_BASE    = 32'h1000_0300;
  localparam logic [31:0] GPIO_BASE   = 32'h1000_0400;
  localparam logic [31:0] SLOT_MASK   = 32'hFFFF_FF00;

  localparam apb_req_t APB_REQ_IDLE = '0;
  localparam apb_rsp_t APB_RSP_IDLE = '0;

endpackage
