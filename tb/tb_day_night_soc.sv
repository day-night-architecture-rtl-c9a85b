// tb_day_night_soc: end-to-end run of the Day-Night SoC at its default
// parameters, with a simplified version of the wearable anomaly-detection
// application.
//
// A Main-CPU model on the AXI and APB ports loads the Night function into
// the shared SRAM, stores the personal limits (alpha, beta, gamma ranges),
// writes Night_addr and enable_Night to the NSR and puts the Day segment
// into standby.  The Night function on the All-Night core then loops:
//   - heart rate from a PPG sensor model on the UART: a frame 254, HR, 255,
//   - temperature (register 0) and the accelerometer ix, iy, iz
//     (registers 1..3) from an I2C sensor model,
//   - acc = ix*(ix>>>7) + iy*(iy>>>7) + iz*(iz>>>7) (SRA and MUL),
//   - range checks with SLT against the limits, anomaly flags and values
//     stored in SRAM, and on an anomaly a store to the interrupt register,
//   - running sums, and every T_Period (4 samples here) the averages of
//     temperature, heart rate and acceleration (sum >>> 2) stored in SRAM,
//     with the acceleration limits reset to 0.5 and 1.5 times its average.
// The interrupt wakes the Day segment; the Main-CPU model reads the stored
// values over AXI while the core keeps running, sends an alarm byte to the
// OLED over SPI through the shared external-I/O bus, lights an alarm LED on
// GPIO, updates a limit (feedback), acknowledges the interrupt and returns
// to standby.  Finally it stops the core with enable_Night = 0 and starts it
// again.
//
// Checked: stored sensor values, flags and interrupt per sample against
// values computed here, the running sums and the averages, the SPI byte, the stop and restart, and that each
// mechanism happened: jump/branch flushes, MUL, SRA, interrupts, wake-ups,
// standby, SRAM port contention, external-I/O contention, core stop and
// restart.
module tb_day_night_soc;
  import an_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_req_t axi_req, ax;
  axi_rsp_t axi_rsp;
  apb_req_t day_apb_req, pm_apb_req;
  apb_rsp_t day_apb_rsp, pm_apb_rsp;
  logic irq, irq_clear = 0, day_clk_en;
  logic uart_tx, uart_rx = 1, spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  logic i2c_scl_oe, i2c_sda_oe, scl, sda, sensor_sda_low;
  logic night_running, night_retire, night_flush, mem_conflict, io_conflict;
  logic [15:0] wake_count;
  logic [7:0] gpio_o, gpio_oe, gpio_i;

  day_night_soc dut (
    .clk, .rst_n, .day_axi_req(axi_req), .day_axi_rsp(axi_rsp),
    .day_apb_req, .day_apb_rsp, .pm_apb_req, .pm_apb_rsp, .irq, .irq_clear, .day_clk_en,
    .uart_tx, .uart_rx, .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_scl_i(scl), .i2c_sda_i(sda),
    .night_running, .night_retire, .night_flush, .mem_conflict, .io_conflict, .wake_count,
    .gpio_o, .gpio_oe, .gpio_i);

  apb_master_bfm u_day (.clk, .req(day_apb_req), .rsp(day_apb_rsp));
  apb_master_bfm u_pm  (.clk, .req(pm_apb_req),  .rsp(pm_apb_rsp));
  i2c_sensor_model #(.ADDR(7'h1D)) u_sensor (.scl, .sda, .sda_low(sensor_sda_low));

  assign scl = !i2c_scl_oe;
  assign sda = !(i2c_sda_oe || sensor_sda_low);
  assign spi_miso = 1'b0;
  assign gpio_i = gpio_oe & gpio_o | ~gpio_oe & 8'h5A;   // alarm LED on pin 0, inputs pulled to 0x5A

  always #10 clk = !clk;   // 50 MHz

  int checks = 0, failures = 0;
  int n_flush = 0, n_mul = 0, n_sra = 0, n_irq = 0, n_memc = 0, n_ioc = 0, n_stop = 0, n_spi = 0;
  logic irq_q = 0, run_q = 0;
  logic [7:0] oled_byte = 0;
  int n_start_org = 0, n_start = 0;
  longint n_retire = 0, n_run = 0;

  always @(posedge clk) if (rst_n) begin
    if (night_flush) n_flush++;
    if (night_retire) n_retire++;
    if (night_running) n_run++;
    if (dut.u_core.u_alu.mul_start) n_mul++;
    if (night_retire && dut.u_core.ex_alucont == ALU_SRA) n_sra++;
    if (irq && !irq_q) n_irq++;
    if (mem_conflict) n_memc++;
    if (io_conflict) n_ioc++;
    if (run_q && !night_running) n_stop++;
    if (night_running && !run_q) begin                // first fetch address
      n_start++;
      if (dut.u_core.pc_q == ORG) n_start_org++;
    end
    irq_q <= irq;
    run_q <= night_running;
  end
  always @(posedge spi_sclk) oled_byte <= {oled_byte[6:0], spi_mosi};
  always @(negedge spi_cs_n) n_spi++;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d (%h) exp %0d", what, got, got, exp); end
  endtask

  // ------------------------------------------------------------ assembler
  localparam int ORG = 32'h100;
  logic [31:0] code [$];
  int lbl [string];
  function automatic int pc(); return ORG + 4 * code.size(); endfunction
  function automatic int L(string n); return lbl.exists(n) ? lbl[n] : pc(); endfunction
  function automatic void mark(string n); lbl[n] = pc(); endfunction
  function automatic void e(logic [31:0] i); code.push_back(i); endfunction
  function automatic void li(int rd, logic [31:0] v);
    logic [31:0] hi; hi = v + 32'h800;
    e(rv_lui(rd, hi[31:12]));
    e(rv_addi(rd, rd, int'({{20{v[11]}}, v[11:0]})));
  endfunction
  // one I2C command with its busy poll (x3, x4 used)
  function automatic void i2c_cmd(logic [31:0] c);
    string p; p = $sformatf("i2c%0d", code.size());
    li(4, c);
    e(rv_sw(4, 6, 12'h300));
    mark(p);
    e(rv_lw(4, 6, 12'h304));
    e(rv_addi(3, 0, 1));
    e(rv_and(4, 4, 3));
    e(rv_beq(4, 3, L(p) - pc()));
  endfunction

  localparam int G = 32'h700;   // global variables of the application
  function automatic void build();
    code.delete();
    e(rv_lui(6, 20'h10000));                        // x6 = peripheral base
    mark("loop");
    // heart rate frame 254, HR, 255 from the PPG sensor (UART)
    mark("hr_sync");
    e(rv_jal(1, L("uart_get") - pc()));
    e(rv_addi(4, 0, 254));
    e(rv_beq(3, 4, 8));
    e(rv_jal(0, L("hr_sync") - pc()));
    e(rv_jal(1, L("uart_get") - pc()));
    e(rv_addi(5, 3, 0));
    e(rv_jal(1, L("uart_get") - pc()));
    e(rv_addi(4, 0, 255));
    e(rv_beq(3, 4, 8));
    e(rv_jal(0, L("hr_sync") - pc()));
    e(rv_sw(5, 0, G + 12'h28));
    // temperature (register 0) and accelerometer (registers 1..3)
    e(rv_addi(2, 0, 0));
    e(rv_jal(1, L("i2c_read") - pc()));
    e(rv_sw(3, 0, G + 12'h24));
    e(rv_addi(5, 0, 0));
    for (int r = 1; r <= 3; r++) begin
      e(rv_addi(2, 0, r));
      e(rv_jal(1, L("i2c_read") - pc()));
      e(rv_jal(1, L("acc_term") - pc()));
    end
    e(rv_sw(5, 0, G + 12'h2C));
    // range checks: flag bit0 temperature, bit1 heart rate, bit2 acceleration
    e(rv_addi(7, 0, 0));
    for (int k = 0; k < 3; k++) begin
      int val_off; val_off = (k == 0) ? 12'h24 : (k == 1) ? 12'h28 : 12'h2C;
      e(rv_lw(3, 0, G + val_off));
      e(rv_lw(4, 0, G + 8 * k));                   // min
      e(rv_slt(2, 3, 4));
      e(rv_lw(4, 0, G + 8 * k + 4));               // max
      e(rv_slt(4, 4, 3));
      e(rv_or(2, 2, 4));
      for (int s = 0; s < k; s++) e(rv_add(2, 2, 2));
      e(rv_or(7, 7, 2));
    end
    e(rv_sw(7, 0, G + 12'h20));
    // running sums over T_Period = 4 samples (the averages of Fig. 8)
    for (int k = 0; k < 3; k++) begin
      e(rv_lw(3, 0, G + 12'h24 + 4 * k));
      e(rv_lw(2, 0, G + 12'h34 + 4 * k));
      e(rv_add(2, 2, 3));
      e(rv_sw(2, 0, G + 12'h34 + 4 * k));
    end
    e(rv_lw(5, 0, G + 12'h30));                    // sample counter
    e(rv_addi(5, 5, 1));
    e(rv_addi(2, 0, 3));
    e(rv_and(2, 5, 2));
    e(rv_beq(2, 0, 8));                            // period complete?
    e(rv_jal(0, L("no_avg") - pc()));
    for (int k = 0; k < 3; k++) begin              // average = sum >>> 2
      e(rv_lw(3, 0, G + 12'h34 + 4 * k));
      e(rv_addi(2, 0, 2));
      e(rv_sra(3, 3, 2));
      e(rv_sw(3, 0, G + 12'h40 + 4 * k));
      e(rv_sw(0, 0, G + 12'h34 + 4 * k));
    end
    e(rv_addi(2, 0, 1));                           // gamma_min = 0.5 * average acc
    e(rv_sra(4, 3, 2));
    e(rv_sw(4, 0, G + 12'h10));
    e(rv_add(4, 4, 3));                            // gamma_max = 1.5 * average acc
    e(rv_sw(4, 0, G + 12'h14));
    mark("no_avg");
    e(rv_sw(5, 0, G + 12'h30));
    e(rv_beq(7, 0, L("loop") - pc()));
    e(rv_lui(4, 20'h20000));                       // anomaly: interrupt
    e(rv_addi(2, 0, 1));
    e(rv_sw(2, 4, 0));
    e(rv_jal(0, L("loop") - pc()));
    // x3 = next UART byte (x2, x3 used)
    mark("uart_get");
    e(rv_lw(3, 6, 12'h108));
    e(rv_addi(2, 0, 2));
    e(rv_and(3, 3, 2));
    e(rv_beq(3, 0, L("uart_get") - pc()));
    e(rv_lw(3, 6, 12'h104));
    e(rv_jalr(0, 1, 0));
    // x3 = sensor register x2 over I2C (x3, x4 used)
    mark("i2c_read");
    i2c_cmd({16'b0, 8'h3A, 8'h05});                // START, address + write
    e(rv_addi(4, 0, 8));
    e(rv_sll(3, 2, 4));
    e(rv_addi(3, 3, 4));
    e(rv_sw(3, 6, 12'h300));                       // WRITE register number
    mark("i2c_poll_reg");
    e(rv_lw(4, 6, 12'h304));
    e(rv_addi(3, 0, 1));
    e(rv_and(4, 4, 3));
    e(rv_beq(4, 3, L("i2c_poll_reg") - pc()));
    i2c_cmd({16'b0, 8'h3B, 8'h05});                // repeated START, address + read
    i2c_cmd({16'b0, 8'h00, 8'h1A});                // READ, NACK, STOP
    e(rv_lw(3, 6, 12'h308));
    e(rv_jalr(0, 1, 0));
    // x5 += x3 * (x3 >>> 7) (x2, x4 used)
    mark("acc_term");
    e(rv_addi(2, 0, 7));
    e(rv_sra(4, 3, 2));
    e(rv_mul(4, 3, 4));
    e(rv_add(5, 5, 4));
    e(rv_jalr(0, 1, 0));
  endfunction

  // ------------------------------------------------------------ Main-CPU model
  task automatic axi_write(input logic [31:0] addr, data);
    @(negedge clk);
    ax.awaddr = addr; ax.wdata = data; ax.wstrb = 4'hF;
    ax.awvalid = 1; ax.wvalid = 1; ax.bready = 1; axi_req = ax;
    forever begin #1; if (axi_rsp.awready) break; @(negedge clk); end
    @(negedge clk);
    ax.awvalid = 0; ax.wvalid = 0; axi_req = ax;
    forever begin #1; if (axi_rsp.bvalid) break; @(negedge clk); end
    @(negedge clk);
    ax.bready = 0; axi_req = ax;
  endtask

  task automatic axi_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    ax.araddr = addr; ax.arvalid = 1; ax.rready = 1; axi_req = ax;
    forever begin #1; if (axi_rsp.arready) break; @(negedge clk); end
    @(negedge clk);
    ax.arvalid = 0; axi_req = ax;
    forever begin #1; if (axi_rsp.rvalid) break; @(negedge clk); end
    data = axi_rsp.rdata;
    @(negedge clk);
    ax.rready = 0; axi_req = ax;
  endtask

  // PPG sensor: UART frame 254, hr, 255 at the default 434 cycles per bit
  task automatic ppg_byte(input logic [7:0] b);
    @(negedge clk); uart_rx = 0; repeat (434) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (434) @(negedge clk); end
    uart_rx = 1; repeat (434) @(negedge clk);
  endtask
  task automatic ppg_frame(input logic [7:0] hr);
    ppg_byte(8'd17);            // noise before the sync byte
    ppg_byte(8'd254); ppg_byte(hr); ppg_byte(8'd255);
  endtask

  logic [31:0] lim [6] = '{34, 38, 50, 120, 100, 300};   // alpha, beta, gamma min/max

  int sum_m [3] = '{0, 0, 0};   // model of the running sums over T_Period
  int n_avg = 0;

  function automatic int acc_of(int ix, int iy, int iz);
    return ix * (ix >>> 7) + iy * (iy >>> 7) + iz * (iz >>> 7);
  endfunction

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return dut.u_mem.u_sram.mem[a[15:2]];
  endfunction

  // one sample: sensors, wait for the counter, check values and interrupt
  task automatic sample(input int temp, hr, ix, iy, iz, input string tag);
    logic [31:0] cnt0, flags;
    int acc, n;
    u_sensor.regs[0] = 8'(temp); u_sensor.regs[1] = 8'(ix);
    u_sensor.regs[2] = 8'(iy);   u_sensor.regs[3] = 8'(iz);
    cnt0 = mem_word(G + 32'h30);
    ppg_frame(8'(hr));
    n = 0;
    while (mem_word(G + 32'h30) == cnt0 && n < 400000) begin @(posedge clk); n++; end
    $display("%s: %0d cycles from the end of the heart-rate frame to the stored result", tag, n);
    repeat (20) @(posedge clk);
    acc = acc_of(ix, iy, iz);
    flags = {29'b0,
             (acc < int'(lim[4]) || acc > int'(lim[5])),
             (hr < int'(lim[2]) || hr > int'(lim[3])),
             (temp < int'(lim[0]) || temp > int'(lim[1]))};
    chk(mem_word(G + 32'h30), cnt0 + 1, {tag, ": sample counted"});
    chk(mem_word(G + 32'h24), temp, {tag, ": temperature"});
    chk(mem_word(G + 32'h28), hr, {tag, ": heart rate"});
    chk(mem_word(G + 32'h2C), acc, {tag, ": acceleration"});
    chk(mem_word(G + 32'h20), flags, {tag, ": anomaly flags"});
    chk(irq, flags != 0, {tag, ": interrupt"});
    sum_m[0] += temp; sum_m[1] += hr; sum_m[2] += acc;
    if ((cnt0 + 1) % 4 == 0) begin
      chk(mem_word(G + 32'h40), sum_m[0] >>> 2, {tag, ": average temperature"});
      chk(mem_word(G + 32'h44), sum_m[1] >>> 2, {tag, ": average heart rate"});
      chk(mem_word(G + 32'h48), sum_m[2] >>> 2, {tag, ": average acceleration"});
      lim[4] = sum_m[2] >>> 3;
      lim[5] = (sum_m[2] >>> 2) + lim[4];
      chk(mem_word(G + 32'h10), lim[4], {tag, ": gamma_min from the average"});
      chk(mem_word(G + 32'h14), lim[5], {tag, ": gamma_max from the average"});
      sum_m = '{0, 0, 0};
      n_avg++;
    end
    for (int k = 0; k < 3; k++) chk(mem_word(G + 32'h34 + 4 * k), sum_m[k], {tag, ": running sum"});
  endtask

  // Main-CPU reaction: wake, read the report, OLED alarm, feedback, standby
  task automatic main_cpu_alarm(input logic [31:0] exp_flags, input int new_beta_max);
    logic [31:0] d;
    int n;
    n = 0;
    while (!day_clk_en && n < 100) begin @(posedge clk); n++; end
    chk(day_clk_en, 1, "Day segment woken by the interrupt");
    axi_read(G + 32'h20, d); chk(d, exp_flags, "Main-CPU reads the flags over AXI");
    // alarm byte to the OLED over SPI through the shared external I/O bus
    u_day.write(SPI_BASE + 32'hC, 1);
    u_day.write(SPI_BASE, 32'hA0 | exp_flags);
    do u_day.read(SPI_BASE + 32'h4, d); while (d[0]);
    u_day.write(SPI_BASE + 32'hC, 0);
    chk(oled_byte, 8'hA0 | 8'(exp_flags), "OLED alarm byte");
    u_day.write(GPIO_BASE + 4, 1);                 // alarm LED on GPIO pin 0
    u_day.write(GPIO_BASE, 1);
    repeat (3) @(posedge clk);                     // input synchronizer
    u_day.read(GPIO_BASE + 8, d); chk(d, 32'h5B, "GPIO pins read back");
    // feedback: adjust the heart-rate limit, repeated reads while the core runs
    lim[3] = new_beta_max;
    axi_write(G + 32'h0C, new_beta_max);
    repeat (20) axi_read(G + 32'h0C, d);
    chk(d, new_beta_max, "feedback stored");
    @(negedge clk); irq_clear = 1; @(negedge clk); irq_clear = 0;
    chk(irq, 0, "interrupt acknowledged");
    u_pm.write(32'h0, 1);
    chk(day_clk_en, 0, "back to standby");
  endtask

  initial begin
    logic [31:0] d;
    axi_req = '0; ax = '0;
    build(); build();                              // second pass resolves labels
    $display("Night function: %0d instructions", code.size());
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    // boot of the Main-CPU: program and personal data into the shared SRAM
    foreach (code[i]) axi_write(ORG + 4 * i, code[i]);
    for (int i = 0; i < 6; i++) axi_write(G + 4 * i, lim[i]);
    for (int a = 'h30; a <= 'h48; a += 4) axi_write(G + a, 0);   // counter, sums, averages
    axi_read(ORG, d); chk(d, code[0], "program readback over AXI");
    chk(night_running, 0, "core idle before enable_Night");
    u_day.write(NSR_BASE, ORG);
    u_day.write(NSR_BASE + 4, 1);
    u_pm.write(32'h0, 1);
    chk(day_clk_en, 0, "Day segment in standby");
    repeat (10) @(posedge clk);
    chk(night_running, 1, "core running after enable_Night");
    chk(n_start_org, 1, "start from Night_addr");

    sample(36, 72, 20, 30, 200, "sample 1 normal");
    sample(36, 150, 20, 30, 200, "sample 2 heart rate high");
    main_cpu_alarm(2, 160);
    sample(40, 150, 20, 30, 0, "sample 3 fever and no iz");
    main_cpu_alarm(5, 160);

    // stop the Night function and start it again (enable_Night 0 -> 1)
    u_day.write(NSR_BASE + 4, 0);
    repeat (20) @(posedge clk);
    chk(night_running, 0, "core stopped by enable_Night = 0");
    u_day.write(NSR_BASE + 4, 1);
    repeat (10) @(posedge clk);
    chk(night_running, 1, "core restarted");
    chk(n_start_org, 2, "restart from Night_addr");
    sample(37, 80, 10, 10, 250, "sample 4 after restart");

    chk(wake_count, 2, "wake-ups counted by the power manager");
    $display("core: %0d instructions in %0d running cycles", n_retire, n_run);
    $display("mechanisms: flush=%0d mul=%0d sra=%0d irq=%0d wake=%0d mem_conflict=%0d io_conflict=%0d stop=%0d spi=%0d i2c=%0d",
             n_flush, n_mul, n_sra, n_irq, wake_count, n_memc, n_ioc, n_stop, n_spi, u_sensor.transfers);
    checks++; if (n_flush == 0) begin failures++; $display("FAIL no flush"); end
    checks++; if (n_avg != 1)   begin failures++; $display("FAIL T_Period averages %0d", n_avg); end
    checks++; if (n_mul == 0)   begin failures++; $display("FAIL no MUL"); end
    checks++; if (n_sra == 0)   begin failures++; $display("FAIL no SRA"); end
    checks++; if (n_irq != 2)   begin failures++; $display("FAIL interrupts %0d", n_irq); end
    checks++; if (n_memc == 0)  begin failures++; $display("FAIL no SRAM port contention"); end
    checks++; if (n_ioc == 0)   begin failures++; $display("FAIL no external I/O contention"); end
    checks++; if (n_stop != 1)  begin failures++; $display("FAIL stops %0d", n_stop); end
    checks++; if (n_start != 2) begin failures++; $display("FAIL starts %0d", n_start); end
    checks++; if (n_spi != 2)   begin failures++; $display("FAIL SPI selects %0d", n_spi); end
    checks++; if (u_sensor.transfers < 32) begin failures++; $display("FAIL I2C transfers %0d", u_sensor.transfers); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
