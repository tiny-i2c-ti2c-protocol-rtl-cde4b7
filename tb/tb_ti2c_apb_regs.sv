// tb_ti2c_apb_regs: checks the APB register block: reset values, SCR/CCR/IMSCR read-write,
// the address selection between the SCR field and the HW_ADDR pins, the CSR packing of the
// status inputs, raw and masked interrupt status with write-1-to-clear, INTR, PSLVERR on
// unmapped addresses, and the window onto the register bank (modelled here by an array).
module tb_ti2c_apb_regs;
  import ti2c_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic [6:0] hw_addr = 7'h3A, own_addr;
  logic idx16, ccr_en;
  logic bus_busy = 0, addressed = 0, rw = 0, ext_en_sync = 0, core_en = 0;
  slv_state_t slv_state = SLV_IDLE;
  logic [15:0] index = '0;
  logic [NIRQ-1:0] irq_evt = '0;
  logic intr;
  logic [3:0] h_addr;
  logic h_we;
  logic [7:0] h_wdata, h_rdata;
  logic [7:0] bank [16];
  logic err;
  int checks = 0, failures = 0;

  ti2c_apb_regs dut (.*);
  always #5 clk = ~clk;

  assign h_rdata = bank[h_addr];
  always @(posedge clk) if (h_we) bank[h_addr] <= h_wdata;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1; #1; err = pslverr;
    check(pready == 1'b1, "PREADY");
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1; d = prdata; err = pslverr;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  task automatic event_pulse(input int b);
    @(negedge clk); irq_evt = '0; irq_evt[b] = 1'b1;
    @(negedge clk); irq_evt = '0;
  endtask

  logic [31:0] d;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (bank[i]) bank[i] = 8'(i * 3);
    repeat (3) @(negedge clk); rst_n = 1;
    rd(ADDR_SCR, d);   check(d == 32'h180, "SCR reset");
    check(own_addr == 7'h3A && idx16 == 1'b1, "pin address and 16-bit index after reset");
    rd(ADDR_CCR, d);   check(d == 0 && !ccr_en, "CCR reset");
    wr(ADDR_CCR, 32'hFFFF_FFFF); check(ccr_en, "CCR enable");
    rd(ADDR_CCR, d);   check(d == 1, "CCR readback");
    wr(ADDR_SCR, 32'h0000_0045); check(own_addr == 7'h45 && !idx16, "SCR own address, 8-bit index");
    rd(ADDR_SCR, d);   check(d == 32'h45, "SCR readback");
    // CSR
    bus_busy = 1; addressed = 0; rw = 1; ext_en_sync = 1; core_en = 0; slv_state = SLV_READ;
    index = 16'hBEEF;
    rd(ADDR_CSR, d);
    check(d == {16'hBEEF, 8'h0, 3'd5, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1}, $sformatf("CSR %h", d));
    // interrupts
    wr(ADDR_IMSCR, 32'h0000_0014);
    event_pulse(IRQ_ADDR);
    rd(ADDR_ICR, d); check(d == 32'h1, "raw status set");
    check(!intr, "masked event gives no INTR");
    event_pulse(IRQ_IDX_ERR);
    rd(ADDR_MIS, d); check(d == 32'h10, "masked status");
    check(intr, "unmasked event gives INTR");
    wr(ADDR_ICR, 32'h10);
    rd(ADDR_ICR, d); check(d == 32'h1, "write 1 clears only that bit");
    check(!intr, "INTR cleared");
    // set wins over clear in the same cycle
    @(negedge clk); psel = 1; pwrite = 1; paddr = ADDR_ICR; pwdata = 32'h4;
    @(negedge clk); penable = 1; irq_evt = 5'b00100;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0; irq_evt = '0;
    rd(ADDR_ICR, d); check(d[2] == 1'b1, "set wins over clear");
    rd(ADDR_IMSCR, d); check(d == 32'h14, "IMSCR readback");
    // register window
    for (int i = 0; i < 16; i++) begin
      rd(ADDR_REGS + 12'(4 * i), d); check(d == 32'(8'(i * 3)), $sformatf("bank read %0d", i));
    end
    wr(ADDR_REGS + 12'h24, 32'h0000_01A5);
    check(bank[9] == 8'hA5, "bank write");
    // errors
    rd(12'h018, d); check(err == 1'b1, "PSLVERR unmapped");
    rd(12'h140, d); check(err == 1'b1, "PSLVERR beyond the bank");
    rd(ADDR_MIS, d); check(err == 1'b0, "no PSLVERR on a register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
