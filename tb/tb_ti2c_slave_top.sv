// tb_ti2c_slave_top: checks the TI2C slave subsystem through its pins and APB port. A master
// made of test tasks drives SCL and SDA (open drain, wired AND with the slave's pull-down)
// with 10-cycle quarter periods. Covered: APB set-up and status, 16-bit indexed write,
// random read with a repeated START, sequential read past a 16-bit register pair, a one-
// cycle spike on SCL during a transfer (must not count as a bit), the interrupt line, and
// host writes seen over the bus. A final phase runs 40 random write, random-read and
// wrong-index transfers and compares data and the current index with a model.
module tb_ti2c_slave_top;
  import ti2c_pkg::*;
  localparam int Q = 10;
  logic clk = 0, rst_n = 0;
  logic m_scl = 1, m_sda = 1, scl, sda, sda_low_o;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr, intr, ext_en = 1, spike = 0;
  logic [6:0] hw_addr = 7'h1C;
  int checks = 0, failures = 0;

  assign scl = m_scl & ~spike;
  assign sda = m_sda & ~sda_low_o;

  ti2c_slave_top dut (.clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_low_o, .psel, .penable,
                      .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr, .hw_addr, .ext_en,
                      .intr);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  task automatic quarter(); repeat (Q) @(negedge clk); endtask

  task automatic i2c_start();  // from SCL high (idle or after an ACK with SCL low)
    m_sda = 1; quarter(); m_scl = 1; quarter();
    m_sda = 0; quarter(); m_scl = 0; quarter();
  endtask
  task automatic i2c_stop();
    m_sda = 0; quarter(); m_scl = 1; quarter(); m_sda = 1; quarter(); quarter();
  endtask
  task automatic i2c_bit(input logic b, output logic seen, input bit glitch);
    m_sda = b; quarter();
    if (glitch) begin spike = 1; @(negedge clk); spike = 0; end
    m_scl = 1; quarter(); quarter();
    seen = sda; m_scl = 0; quarter();
  endtask
  task automatic send(input logic [7:0] v, output logic ack, input bit glitch = 0);
    logic s;
    for (int i = 0; i < 8; i++) i2c_bit(v[7 - i], s, 0);
    i2c_bit(1'b1, s, glitch); ack = !s;
  endtask
  task automatic recv(output logic [7:0] v, input logic ack);
    logic s;
    for (int i = 0; i < 8; i++) begin i2c_bit(1'b1, s, 0); v[7 - i] = s; end
    i2c_bit(!ack, s, 0);
  endtask

  logic a;
  logic [7:0] v;
  logic [31:0] d;
  logic [7:0]  model [16];
  logic [15:0] cur;
  int n_rwr = 0, n_rrd = 0, n_rerr = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    apb_write(ADDR_CCR, 1);
    apb_write(ADDR_IMSCR, 32'h2);          // write-byte event only
    repeat (5) @(negedge clk);
    // write 4 bytes at index 0x000A, a SCL spike during an acknowledge
    i2c_start();
    send(8'h38, a); check(a, "address 0x1C acknowledged");
    apb_read(ADDR_CSR, d); check(d[1:0] == 2'b11, "busy and addressed");
    send(8'h00, a); check(a, "index MSB");
    send(8'h0A, a, 1); check(a, "index LSB, SCL spike ignored");
    send(8'hDE, a); send(8'hAD, a); send(8'hBE, a); send(8'hEF, a);
    check(a, "data acknowledged");
    i2c_stop();
    check(intr, "interrupt on write");
    apb_read(ADDR_REGS + 12'h28, d); check(d[7:0] == 8'hDE, "reg 10");
    apb_read(ADDR_REGS + 12'h34, d); check(d[7:0] == 8'hEF, "reg 13");
    apb_read(ADDR_CSR, d); check(d[31:16] == 16'h000E && d[1:0] == 2'b00, "index 14, bus free");
    apb_write(ADDR_ICR, 32'h1F);
    @(negedge clk); check(!intr, "interrupt cleared");
    // random read: set index 0x000B, repeated START, read 3 bytes (crosses index 13->14)
    apb_write(ADDR_REGS + 12'h38, 32'h77);
    i2c_start();
    send(8'h38, a); send(8'h00, a); send(8'h0B, a);
    i2c_start();
    send(8'h39, a); check(a, "read address after repeated START");
    recv(v, 1); check(v == 8'hAD, $sformatf("read 1 %h", v));
    recv(v, 1); check(v == 8'hBE, $sformatf("read 2 %h", v));
    recv(v, 1); check(v == 8'hEF, $sformatf("read 3 %h", v));
    recv(v, 0); check(v == 8'h77, $sformatf("read 4 (written over APB) %h", v));
    i2c_stop();
    apb_read(ADDR_CSR, d); check(d[31:16] == 16'h000F && d[2], "index 15 after read");
    check(!intr, "read events masked");
    apb_read(ADDR_ICR, d); check(d[IRQ_RD_BYTE] && d[IRQ_ADDR] && d[IRQ_STOP], "raw read events");
    // wrong index
    i2c_start();
    send(8'h38, a); send(8'h01, a); send(8'h00, a); check(!a, "index 0x0100 refused");
    i2c_stop();
    // random transfers against a model of the bank and the current index
    for (int i = 0; i < 16; i++) begin apb_read(ADDR_REGS + 12'(4 * i), d); model[i] = d[7:0]; end
    cur = 16'h000F;
    for (int t = 0; t < 40; t++) begin
      logic [15:0] idx;
      int len;
      idx = ($urandom_range(0, 4) == 0) ? 16'($urandom) : 16'($urandom_range(0, 15));
      len = $urandom_range(1, 4);
      i2c_start();
      send(8'h38, a); check(a, "random: address");
      send(idx[15:8], a); send(idx[7:0], a);
      check(a == (idx < 16), $sformatf("random: index %h ack %b", idx, a));
      if (idx < 16) begin
        cur = idx;
        if ($urandom_range(0, 1) == 0) begin
          for (int k = 0; k < len; k++) begin
            v = 8'($urandom);
            send(v, a);
            check(a == (cur < 16), "random: data acknowledge");
            if (!a) break;
            model[cur[3:0]] = v; cur++;
          end
          i2c_stop(); n_rwr++;
        end else begin
          i2c_start();
          send(8'h39, a); check(a, "random: read address");
          for (int k = 0; k < len; k++) begin
            recv(v, k != len - 1);
            check(v == ((cur < 16) ? model[cur[3:0]] : 8'hFF), $sformatf("random: read %h at %h", v, cur));
            if (cur < 16) cur++;
          end
          i2c_stop(); n_rrd++;
        end
      end else begin
        i2c_stop(); n_rerr++;
      end
      apb_read(ADDR_CSR, d); check(d[31:16] == cur, $sformatf("random: index %h vs %h", d[31:16], cur));
    end
    for (int i = 0; i < 16; i++) begin
      apb_read(ADDR_REGS + 12'(4 * i), d); check(d[7:0] == model[i], $sformatf("random: reg %0d", i));
    end
    check(n_rwr > 0 && n_rrd > 0 && n_rerr > 0, "random: writes, reads and wrong indexes all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
