// day_night_soc: the Night segment of a Day-Night wearable processor, with
// the points where the Day segment attaches.
//
// A Day-Night processor splits into a Day segment (Main-CPU and system
// interconnect, clock-gated most of the time) and a Night segment that
// keeps running: the All-Night core, the main memory and the external I/O,
// reached without going through the interconnect.  This module builds the
// Night segment and the Day-Night additions:
//   - an_core        the All-Night core; its instruction and data APB ports
//                    are merged (data first) by an apb_rr_arbiter,
//   - night_mux      routes the core to the SRAM controller, to the external
//                    I/O multiplexer or to its interrupt register (irq),
//   - dp_mem_ctrl    the main SRAM with an AXI port for the Main-CPU
//                    (day_axi_*) and an APB port for the core,
//   - apb_rr_arbiter the external I/O multiplexer between the interconnect's
//                    APB (day_apb_*) and the core,
//   - apb_decoder    the external I/O APB bus: NSR, UART, SPI, I2C, GPIO,
//   - nsr            Night_addr / enable_Night, written by the Main-CPU,
//   - power_manager  clock-gate enable of the Day segment (pm_apb_*), woken
//                    by irq.
// The Main-CPU, the system interconnect, IROM, JTAG and FLASH are outside:
// their connections are the day_* and pm_* ports, irq and irq_clear.
//
// Memory map seen by the core (this design's): SRAM 0x0000_0000, NSR
// 0x1000_0000, UART 0x1000_0100, SPI 0x1000_0200, I2C 0x1000_0300, GPIO
// 0x1000_0400, interrupt register 0x2000_0000.  The interconnect side reaches the same
// peripherals at the same offsets.  One clock domain, active-low
// asynchronous reset.  The block structure follows the document's
// prototype; bus subsets, addresses and sizes are this design's.
module day_night_soc
  import an_pkg::*;
#(
  parameter int unsigned MEM_WORDS    = 16384,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned SPI_DIV      = 4,
  parameter int unsigned I2C_DIV      = 124   // 100 kHz SCL at 50 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // Main-CPU side (through the system interconnect)
  input  axi_req_t    day_axi_req,
  output axi_rsp_t    day_axi_rsp,
  input  apb_req_t    day_apb_req,
  output apb_rsp_t    day_apb_rsp,
  input  apb_req_t    pm_apb_req,
  output apb_rsp_t    pm_apb_rsp,
  output logic        irq,          // interrupt to the Main-CPU
  input  logic        irq_clear,    // Main-CPU acknowledges the interrupt
  output logic        day_clk_en,   // clock-gate enable of the Day segment
  // external I/O pins
  output logic        uart_tx,
  input  logic        uart_rx,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_cs_n,
  output logic        i2c_scl_oe,
  output logic        i2c_sda_oe,
  input  logic        i2c_scl_i,
  input  logic        i2c_sda_i,
  // status
  output logic        night_running,
  output logic        night_retire,
  output logic        night_flush,
  output logic        mem_conflict,
  output logic        io_conflict,
  output logic [15:0] wake_count,
  output logic [7:0]  gpio_o,
  output logic [7:0]  gpio_oe,
  input  logic [7:0]  gpio_i
);
  apb_req_t imem_req, dmem_req, core_req, sram_req, nio_req, io_req;
  apb_rsp_t imem_rsp, dmem_rsp, core_rsp, sram_rsp, nio_rsp, io_rsp;
  apb_req_t dev_req [5];
  apb_rsp_t dev_rsp [5];
  logic [31:0] night_addr;
  logic        enable_night;

  an_core u_core (
    .clk, .rst_n, .enable_night, .night_addr,
    .imem_req, .imem_rsp, .dmem_req, .dmem_rsp,
    .running(night_running), .retire(night_retire), .flush(night_flush));

  apb_rr_arbiter #(.ROUND_ROBIN(1'b0)) u_core_port (
    .clk, .rst_n,
    .m0_req(dmem_req), .m0_rsp(dmem_rsp), .m1_req(imem_req), .m1_rsp(imem_rsp),
    .s_req(core_req), .s_rsp(core_rsp), .conflict());

  night_mux u_night_mux (
    .clk, .rst_n, .core_req, .core_rsp, .sram_req, .sram_rsp,
    .periph_req(nio_req), .periph_rsp(nio_rsp), .irq_clear, .irq);

  dp_mem_ctrl #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n, .axi_req(day_axi_req), .axi_rsp(day_axi_rsp),
    .apb_req(sram_req), .apb_rsp(sram_rsp),
    .grant_apb(), .grant_axi(), .conflict(mem_conflict));

  apb_rr_arbiter #(.ROUND_ROBIN(1'b1)) u_io_mux (
    .clk, .rst_n,
    .m0_req(day_apb_req), .m0_rsp(day_apb_rsp), .m1_req(nio_req), .m1_rsp(nio_rsp),
    .s_req(io_req), .s_rsp(io_rsp), .conflict(io_conflict));

  apb_decoder #(
    .N   (5),
    .BASE({GPIO_BASE, I2C_BASE,  SPI_BASE,  UART_BASE, NSR_BASE}),
    .MASK({SLOT_MASK, SLOT_MASK, SLOT_MASK, SLOT_MASK, SLOT_MASK})
  ) u_io_bus (.m_req(io_req), .m_rsp(io_rsp), .s_req(dev_req), .s_rsp(dev_rsp));

  nsr u_nsr (
    .clk, .rst_n, .apb_req(dev_req[0]), .apb_rsp(dev_rsp[0]),
    .night_addr, .enable_night);

  apb_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .apb_req(dev_req[1]), .apb_rsp(dev_rsp[1]), .tx(uart_tx), .rx(uart_rx));

  apb_spi #(.DEFAULT_DIV(SPI_DIV)) u_spi (
    .clk, .rst_n, .apb_req(dev_req[2]), .apb_rsp(dev_rsp[2]),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n));

  apb_i2c #(.DEFAULT_DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .apb_req(dev_req[3]), .apb_rsp(dev_rsp[3]),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .scl_i(i2c_scl_i), .sda_i(i2c_sda_i));

  apb_gpio #(.N(8)) u_gpio (
    .clk, .rst_n, .apb_req(dev_req[4]), .apb_rsp(dev_rsp[4]), .gpio_o, .gpio_oe, .gpio_i);

  power_manager u_pm (
    .clk, .rst_n, .apb_req(pm_apb_req), .apb_rsp(pm_apb_rsp),
    .night_irq(irq), .day_clk_en, .wake_count);
endmodule
