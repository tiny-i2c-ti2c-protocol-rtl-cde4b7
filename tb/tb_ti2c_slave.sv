// tb_ti2c_slave: checks the slave protocol engine on its own. The test plays the bus and
// transfer monitors: it issues START/STOP and, for every bit, the tagged output and sample
// strobes, with SDA the wired AND of the test's own drive and the engine's pull-down. The
// register bank is an array in the test. Covered: addressing, 16- and 8-bit index, sequential
// write and read, read after a repeated START (random read), refusal of a wrong index, a
// wrong address, a write past the bank, the enable input, and the event pulses.
module tb_ti2c_slave;
  import ti2c_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, idx16 = 1;
  logic [6:0] own_addr = 7'h50;
  bus_ev_t bev = '0;
  trs_ev_t tev = '0;
  logic m_sda = 1, sda_i, sda_low;
  logic [15:0] reg_idx, index;
  logic reg_valid, reg_we, addressed, rw;
  logic [7:0] reg_rdata, reg_wdata;
  slv_state_t state;
  logic [NIRQ-1:0] irq;
  logic [7:0] bank [16];
  int checks = 0, failures = 0;
  int n_irq [NIRQ];
  logic first;

  ti2c_slave dut (.*);
  always #5 clk = ~clk;

  assign sda_i     = m_sda & ~sda_low;
  assign reg_valid = reg_idx < 16;
  assign reg_rdata = reg_valid ? bank[reg_idx[3:0]] : 8'hFF;
  always @(posedge clk) begin
    if (reg_we) bank[reg_idx[3:0]] <= reg_wdata;
    if (rst_n) for (int i = 0; i < NIRQ; i++) n_irq[i] += irq[i];
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic strobe_start();
    @(negedge clk); bev.start = 1; bev.busy = 1;
    @(negedge clk); bev.start = 0; first = 1;
  endtask
  task automatic strobe_stop();
    @(negedge clk); m_sda = 1; bev.stop = 1;
    @(negedge clk); bev.stop = 0; bev.busy = 0;
  endtask

  // one bit slot: output strobe, SDA settles, sample strobe; returns SDA as sampled
  task automatic slot(input int pos, input logic drive, output logic seen);
    @(negedge clk);
    tev = '0; tev.bitcnt = 4'(pos); tev.first_frame = first;
    tev.output_bit = (pos != 8); tev.output_ack = (pos == 8); tev.output_fst = first && pos == 0;
    @(negedge clk); tev = '0;
    m_sda = drive;
    repeat (3) @(negedge clk);
    tev.bitcnt = 4'(pos); tev.first_frame = first;
    tev.sample_bit = (pos != 8); tev.sample_ack = (pos == 8); tev.last_bit = (pos == 7);
    #1 seen = sda_i;
    @(negedge clk); tev = '0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send(input logic [7:0] b, output logic ack);
    logic s;
    for (int i = 0; i < 8; i++) slot(i, b[7 - i], s);
    slot(8, 1'b1, s);
    ack = !s; first = 0;
  endtask
  task automatic recv(output logic [7:0] b, input logic ack);
    logic s;
    for (int i = 0; i < 8; i++) begin slot(i, 1'b1, s); b[7 - i] = s; end
    slot(8, !ack, s);
    first = 0;
  endtask

  logic a;
  logic [7:0] b;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (bank[i]) bank[i] = 8'h00;
    foreach (n_irq[i]) n_irq[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // sequential write, 16-bit index 0x0003
    strobe_start();
    send(8'hA0, a); check(a, "address acknowledged");
    check(addressed && !rw, "addressed for write");
    send(8'h00, a); check(a, "index MSB acknowledged");
    send(8'h03, a); check(a, "index LSB acknowledged");
    check(index == 16'h0003, "index loaded");
    send(8'h5A, a); check(a, "data 1 acknowledged");
    send(8'hC3, a); check(a, "data 2 acknowledged");
    strobe_stop();
    check(bank[3] == 8'h5A && bank[4] == 8'hC3, "bytes written");
    check(index == 16'h0005 && state == SLV_IDLE, "index advanced, idle after STOP");
    // random read: index 3, repeated START, read 2
    strobe_start();
    send(8'hA0, a); send(8'h00, a); send(8'h03, a);
    strobe_start();
    send(8'hA1, a); check(a && rw, "read address acknowledged");
    recv(b, 1'b1); check(b == 8'h5A, $sformatf("read 1 = %h", b));
    recv(b, 1'b0); check(b == 8'hC3, $sformatf("read 2 = %h", b));
    check(state == SLV_IGNORE, "NACK ends the read");
    strobe_stop();
    check(index == 16'h0005, "index after read");
    check(n_irq[IRQ_RD_BYTE] == 2 && n_irq[IRQ_WR_BYTE] == 2, $sformatf("byte events rd %0d wr %0d addr %0d stop %0d", n_irq[IRQ_RD_BYTE], n_irq[IRQ_WR_BYTE], n_irq[IRQ_ADDR], n_irq[IRQ_STOP]));
    // wrong index
    strobe_start();
    send(8'hA0, a); send(8'h12, a); check(a, "index MSB always acknowledged");
    send(8'h34, a); check(!a, "wrong index refused");
    send(8'h77, a); check(!a, "no write after wrong index");
    strobe_stop();
    check(index == 16'h0005 && n_irq[IRQ_IDX_ERR] == 1, "index kept, index error event");
    // wrong address
    strobe_start();
    send(8'hA2, a); check(!a && state == SLV_IGNORE, "other address refused");
    strobe_stop();
    // write past the bank: index 15
    strobe_start();
    send(8'hA0, a); send(8'h00, a); send(8'h0F, a);
    send(8'h99, a); check(a, "last register written");
    send(8'h98, a); check(!a, "write past the bank refused");
    strobe_stop();
    check(bank[15] == 8'h99 && index == 16'h0010, "write up to the end");
    // read from index 16: refused at the address
    strobe_start();
    send(8'hA1, a); check(!a, "read outside the bank refused");
    strobe_stop();
    // 8-bit index
    idx16 = 0;
    strobe_start();
    send(8'hA0, a); send(8'h07, a); check(a && index == 16'h0007, "8-bit index");
    send(8'h3C, a);
    strobe_stop();
    check(bank[7] == 8'h3C, "8-bit index write");
    idx16 = 1;
    // disabled
    en = 0;
    strobe_start();
    send(8'hA0, a); check(!a, "disabled slave ignores its address");
    strobe_stop();
    en = 1;
    check(n_irq[IRQ_ADDR] == 6 && n_irq[IRQ_STOP] == 6 && n_irq[IRQ_IDX_ERR] == 3,
          $sformatf("events addr %0d stop %0d idx %0d", n_irq[IRQ_ADDR], n_irq[IRQ_STOP], n_irq[IRQ_IDX_ERR]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
