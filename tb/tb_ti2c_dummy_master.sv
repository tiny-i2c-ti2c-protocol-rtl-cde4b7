// tb_ti2c_dummy_master: checks the ROM-driven master against a behavioural I2C slave written
// in the test. The slave answers to address 0x50, acknowledges what it receives except the
// data byte 0x55, and on a read returns 0x90, 0x91, ... It records the bytes, the master's
// acknowledges, and START/STOP conditions. Checked: the bytes of the ROM sequences (see
// rtl/ti2c_dummy_master_rom.hex), stop on NACK, ACK/NACK by the master on a read, the
// acknowledge count, the SCL period (128 cycles at 50 MHz, 390.6 kHz) and the transfer
// length, 4 quarters for START, 36 per byte and 4 for STOP.
module tb_ti2c_dummy_master;
  localparam int Q = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] rom_addr = '0;
  logic [7:0] count = '0;
  logic scl, sda, scl_low, sda_low, busy, done, nack, rx_valid;
  logic [7:0] acked, rx_data;
  logic s_pull = 0;
  int checks = 0, failures = 0;

  ti2c_dummy_master dut (.clk, .rst_n, .start, .rom_addr, .count, .sda_i(sda), .scl_low,
                         .sda_low, .busy, .done, .nack, .acked, .rx_valid, .rx_data);
  always #10 clk = ~clk;

  assign scl = ~scl_low;
  assign sda = ~(sda_low | s_pull);

  // ---- behavioural slave
  int pos = -1, byte_idx = 0, n_start = 0, n_stop = 0;
  bit in_xfer = 0, addr_ok = 0, is_read = 0, tx_off = 0;
  logic [7:0] shreg;
  logic [7:0] got [$];
  bit m_acks [$];
  logic [7:0] rxq [$];

  always @(negedge sda) if (scl) begin
    in_xfer = 1; pos = -1; byte_idx = 0; s_pull = 0; addr_ok = 0; tx_off = 0; n_start++;
  end
  always @(posedge sda) if (scl && !s_pull) begin in_xfer = 0; s_pull = 0; n_stop++; end
  always @(posedge scl) if (in_xfer) begin
    if (pos >= 0 && pos < 8) shreg = {shreg[6:0], sda};
    else if (pos == 8 && is_read && byte_idx > 0) begin
      m_acks.push_back(!sda);
      if (sda) tx_off = 1;
    end
  end
  always @(negedge scl) if (in_xfer) begin
    #40;
    if (pos == 8) byte_idx++;
    pos = (pos == 8) ? 0 : pos + 1;
    if (pos == 8) begin
      if (byte_idx == 0) begin
        got.push_back(shreg);
        addr_ok = (shreg[7:1] == 7'h50); is_read = shreg[0];
        s_pull = addr_ok;
      end else if (!is_read) begin
        got.push_back(shreg);
        s_pull = addr_ok && (shreg != 8'h55);
      end else s_pull = 0;
    end else if (is_read && addr_ok && byte_idx > 0 && !tx_off) begin
      s_pull = !(8'(8'h90 + byte_idx - 1) >> (7 - pos) & 8'h1);
    end else s_pull = 0;
  end

  always @(posedge clk) if (rx_valid) rxq.push_back(rx_data);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int ra, input int cnt, output int cyc);
    got.delete(); m_acks.delete(); rxq.delete();
    @(negedge clk); rom_addr = 5'(ra); count = 8'(cnt); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    check(busy, "busy after start");
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  int cyc, t0, t1;
  always @(posedge scl) if (busy) begin t0 = t1; t1 = int'($time / 20); end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    check(scl && sda && !busy, "bus idle after reset");
    // write A0 00 02 11 22 33 44
    run(0, 6, cyc);
    check(got.size() == 7 && got[0] == 8'hA0 && got[1] == 8'h00 && got[2] == 8'h02 &&
          got[3] == 8'h11 && got[4] == 8'h22 && got[5] == 8'h33 && got[6] == 8'h44,
          $sformatf("write bytes (%0d)", got.size()));
    check(acked == 7 && !nack, "write acknowledged");
    check(cyc >= (2 + 7 * 9) * 4 * Q && cyc <= (2 + 7 * 9) * 4 * Q + 3, $sformatf("write length %0d", cyc));
    check(t1 - t0 == 4 * Q, $sformatf("SCL period %0d", t1 - t0));
    check(n_start == 1 && n_stop == 1, "one START and one STOP");
    // data NACK: A0 FF F0 55 -> stops after 0x55
    run(11, 3, cyc);
    check(got.size() == 4 && got[3] == 8'h55 && acked == 3 && nack, "stop on data NACK");
    // address NACK: A4
    run(21, 3, cyc);
    check(got.size() == 1 && got[0] == 8'hA4 && acked == 0 && nack, "stop on address NACK");
    check(cyc >= (2 + 9) * 4 * Q && cyc <= (2 + 9) * 4 * Q + 3, "address-only length");
    // read 3 bytes: A1
    run(10, 3, cyc);
    check(got.size() == 1 && got[0] == 8'hA1 && acked == 1 && !nack, "read address");
    check(rxq.size() == 3 && rxq[0] == 8'h90 && rxq[1] == 8'h91 && rxq[2] == 8'h92,
          $sformatf("read data (%0d)", rxq.size()));
    check(m_acks.size() == 3 && m_acks[0] && m_acks[1] && !m_acks[2], "ACK, ACK, NACK");
    check(n_start == 4 && n_stop == 4, $sformatf("START/STOP count %0d %0d", n_start, n_stop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
