// tb_ti2c_top: end-to-end test of the TI2C slave driven by the ROM dummy master, at the
// default parameters (50 MHz clock, 400 kHz target SCL, 16 registers at index 0).
//
// Runs the verification cases of the TI2C slave through the ROM sequences stored in
// rtl/ti2c_dummy_master_rom.hex: slave addressing, 16-bit indexing, sequential write and
// read, refusal of a wrong index, 16-bit registers as register pairs, and processor (APB)
// access to the same registers. It also checks the 8-bit index mode, a refused address,
// a read from an index past the bank, the enable gating, the own-address register, the
// spike filter and the interrupts, and measures the SCL period and the length of a
// transfer. Expected values are written out by hand from the ROM contents.
module tb_ti2c_top;
  import ti2c_pkg::*;

  localparam int QUARTER = 32;  // ceil(50 MHz / (4 * 400 kHz))

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic        pready, pslverr;
  logic [6:0]  hw_addr = 7'h50;
  logic        ext_en = 1'b1, intr;
  logic        dm_start = 0;
  logic [4:0]  dm_rom_addr = '0;
  logic [7:0]  dm_count = '0;
  logic        dm_busy, dm_done, dm_nack, dm_rx_valid;
  logic [7:0]  dm_acked, dm_rx_data;
  logic        ext_scl_low = 0, ext_sda_low = 0, scl, sda;

  logic last_err;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_idx_err = 0, n_addr_miss = 0, n_idx8 = 0, n_disabled = 0,
      n_spike = 0, n_intr = 0, n_apb = 0;

  logic [7:0] rx [16];
  int         nrx;

  ti2c_top dut (.*);

  always #10 clk = ~clk;

  always @(posedge clk) if (dm_rx_valid) begin
    rx[nrx[3:0]] = dm_rx_data;
    nrx++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1; d = prdata; last_err = pslverr;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic reg_rd(input int i, output logic [7:0] v);
    logic [31:0] d;
    apb_read(ADDR_REGS + 12'(4 * i), d);
    v = d[7:0];
  endtask

  // runs one dummy-master transfer and returns its length in clock cycles
  task automatic run(input int rom, input int cnt, output int cycles);
    nrx = 0;
    @(negedge clk); dm_rom_addr = 5'(rom); dm_count = 8'(cnt); dm_start = 1;
    @(negedge clk); dm_start = 0;
    cycles = 1;
    while (!dm_done) begin @(negedge clk); cycles++; end
  endtask

  task automatic expect_regs(input int first, input logic [7:0] v [], input string what);
    logic [7:0] r;
    foreach (v[k]) begin
      reg_rd(first + k, r);
      check(r == v[k], $sformatf("%s: reg %0d = %02h, expected %02h", what, first + k, r, v[k]));
    end
  endtask

  task automatic clear_irq();
    apb_write(ADDR_ICR, 32'h1F);
  endtask

  logic [31:0] d;
  logic [7:0]  r;
  int          cyc;
  int          t_rise [$];

  // SCL period measurement
  always @(posedge scl) if (dm_busy) t_rise.push_back(int'($time / 20));

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // ---- configuration over APB
    apb_read(ADDR_SCR, d);
    check(d == SCR_RESET, "SCR reset value");
    apb_write(ADDR_CCR, 32'h1);
    apb_write(ADDR_IMSCR, 32'h1F);
    repeat (4) @(negedge clk);
    apb_read(ADDR_CSR, d);
    check(d[4:3] == 2'b11, "core enabled after CCR enable and external enable");

    // ---- 1,2,4: addressing, 16-bit index, sequential write (A0 00 02 11 22 33 44)
    run(0, 6, cyc);
    check(dm_acked == 7 && !dm_nack, $sformatf("write: acked %0d nack %0b", dm_acked, dm_nack));
    check(cyc >= (2 + 7 * 9) * 4 * QUARTER && cyc <= (2 + 7 * 9) * 4 * QUARTER + 4,
          $sformatf("write of 7 bytes took %0d cycles", cyc));
    expect_regs(2, '{8'h11, 8'h22, 8'h33, 8'h44}, "sequential write");
    apb_read(ADDR_CSR, d);
    check(d[31:16] == 16'h0006, $sformatf("index after write = %h", d[31:16]));
    check(intr == 1'b1, "interrupt raised");
    apb_read(ADDR_ICR, d);
    check(d[NIRQ-1:0] == 5'b01011, $sformatf("raw status after write = %b", d[NIRQ-1:0]));
    if (d[IRQ_WR_BYTE]) n_intr++;
    clear_irq();
    @(negedge clk);
    check(intr == 1'b0, "interrupt cleared");
    n_write++;

    // SCL period: 4 quarters, not faster than 400 kHz
    check(t_rise.size() > 10, "SCL toggled");
    if (t_rise.size() > 10) begin
      check(t_rise[5] - t_rise[4] == 4 * QUARTER,
            $sformatf("SCL period %0d cycles", t_rise[5] - t_rise[4]));
      check(50_000_000 / (t_rise[5] - t_rise[4]) <= 400_000, "SCL at most 400 kHz");
    end

    // ---- 3: sequential read from the current location (set index 2, then read 4)
    run(7, 2, cyc);
    check(dm_acked == 3 && !dm_nack, "set index");
    run(10, 4, cyc);
    check(!dm_nack && dm_acked == 1, "read address acknowledged");
    check(nrx == 4, $sformatf("read returned %0d bytes", nrx));
    check(rx[0] == 8'h11 && rx[1] == 8'h22 && rx[2] == 8'h33 && rx[3] == 8'h44,
          $sformatf("read data %h %h %h %h", rx[0], rx[1], rx[2], rx[3]));
    apb_read(ADDR_ICR, d);
    check(d[IRQ_RD_BYTE] && d[IRQ_STOP], "read byte interrupt");
    apb_read(ADDR_CSR, d);
    check(d[31:16] == 16'h0006 && d[2] == 1'b1, "index and read flag after read");
    clear_irq();
    n_read++;

    // ---- 5: wrong index: A0 FF F0 55 refused at the index LSB, nothing written
    run(11, 3, cyc);
    check(dm_nack && dm_acked == 2, $sformatf("wrong index: acked %0d nack %0b", dm_acked, dm_nack));
    for (int i = 0; i < 16; i++) begin
      reg_rd(i, r);
      check(r != 8'h55, $sformatf("reg %0d untouched by refused write", i));
    end
    apb_read(ADDR_ICR, d);
    check(d[IRQ_IDX_ERR] && !d[IRQ_WR_BYTE], "index error interrupt, no write");
    apb_read(ADDR_CSR, d);
    check(d[31:16] == 16'h0006, "index kept after wrong index");
    clear_irq();
    n_idx_err++;

    // ---- write running past the end of the bank: A0 00 0E AB CD EF
    run(15, 5, cyc);
    check(dm_nack && dm_acked == 5, $sformatf("write past end: acked %0d", dm_acked));
    expect_regs(14, '{8'hAB, 8'hCD}, "write up to the last register");
    n_idx_err++;
    // read from index 0x10, past the bank: refused at the address
    clear_irq();
    run(10, 1, cyc);
    check(dm_nack && dm_acked == 0 && nrx == 0, "read past the bank refused");
    apb_read(ADDR_ICR, d);
    check(d[IRQ_IDX_ERR] && !d[IRQ_ADDR], "read past the bank: index error");
    clear_irq();
    n_idx_err++;

    // ---- another slave address (A4 = 0x52) is not acknowledged
    run(21, 0, cyc);
    check(dm_nack && dm_acked == 0, "other address refused");
    apb_read(ADDR_ICR, d);
    check(d[NIRQ-1:0] == '0, "no event for another address");
    n_addr_miss++;

    // ---- 6,7: 16-bit registers as register pairs at index 8
    run(22, 6, cyc);
    check(!dm_nack && dm_acked == 7, "16-bit register write");
    run(29, 2, cyc);
    run(10, 4, cyc);
    check(nrx == 4 && {rx[0], rx[1]} == 16'h1234 && {rx[2], rx[3]} == 16'h5678,
          "16-bit register read");
    n_write++; n_read++;

    // ---- 8,9: processor bus writes, read back over TI2C; TI2C writes read over APB
    for (int i = 0; i < 4; i++) apb_write(ADDR_REGS + 12'(4 * (2 + i)), 32'(8'hC0 + i));
    run(7, 2, cyc);
    run(10, 4, cyc);
    check(nrx == 4 && rx[0] == 8'hC0 && rx[1] == 8'hC1 && rx[2] == 8'hC2 && rx[3] == 8'hC3,
          "registers written over APB read over TI2C");
    expect_regs(8, '{8'h12, 8'h34, 8'h56, 8'h78}, "registers written over TI2C read over APB");
    apb_read(12'h0F0, d);
    check(last_err == 1'b1, "unmapped address answers with PSLVERR");
    apb_read(ADDR_CSR, d);
    check(last_err == 1'b0, "mapped address answers without PSLVERR");
    n_apb++;

    // ---- 8-bit index mode: A0 00 08 -> index 0, data 08
    apb_write(ADDR_SCR, 32'h080);
    run(29, 2, cyc);
    check(!dm_nack && dm_acked == 3, "8-bit index write");
    expect_regs(0, '{8'h08}, "8-bit index write");
    apb_read(ADDR_CSR, d);
    check(d[31:16] == 16'h0001, "8-bit index incremented");
    apb_write(ADDR_SCR, SCR_RESET);
    n_idx8++;

    // ---- own address from SCR instead of the pins: 0x52
    apb_write(ADDR_SCR, 32'h152);
    run(21, 0, cyc);
    check(!dm_nack && dm_acked == 1, "own address from SCR");
    run(0, 0, cyc);
    check(dm_nack, "pin address no longer answers");
    apb_write(ADDR_SCR, SCR_RESET);

    // ---- enable gating
    apb_write(ADDR_CCR, 32'h0);
    repeat (3) @(negedge clk);
    run(0, 6, cyc);
    check(dm_nack && dm_acked == 0, "disabled by CCR");
    apb_write(ADDR_CCR, 32'h1);
    ext_en = 0;
    repeat (4) @(negedge clk);
    run(0, 6, cyc);
    check(dm_nack && dm_acked == 0, "disabled by external enable");
    ext_en = 1;
    repeat (4) @(negedge clk);
    run(7, 2, cyc);
    check(!dm_nack, "enabled again");
    n_disabled++;

    // ---- a one-cycle spike on SDA while the bus is idle is no START
    @(negedge clk); ext_sda_low = 1;
    @(negedge clk); ext_sda_low = 0;
    repeat (20) @(negedge clk);
    apb_read(ADDR_CSR, d);
    check(d[0] == 1'b0, "spike filtered");
    // a long pull is a START
    ext_sda_low = 1;
    repeat (20) @(negedge clk);
    apb_read(ADDR_CSR, d);
    check(d[0] == 1'b1, "long pull seen as START");
    ext_sda_low = 0;
    repeat (20) @(negedge clk);
    apb_read(ADDR_CSR, d);
    check(d[0] == 1'b0, "release seen as STOP");
    n_spike++;

    check(n_write > 0 && n_read > 0 && n_idx_err > 0 && n_addr_miss > 0 && n_idx8 > 0
          && n_disabled > 0 && n_spike > 0 && n_intr > 0 && n_apb > 0, "every mechanism exercised");
    $display("mechanisms: write=%0d read=%0d index_error=%0d address_miss=%0d index8=%0d disabled=%0d spike=%0d interrupt=%0d apb=%0d",
             n_write, n_read, n_idx_err, n_addr_miss, n_idx8, n_disabled, n_spike, n_intr, n_apb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
