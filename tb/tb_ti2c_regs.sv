// tb_ti2c_regs: checks the TI2C register bank against an array model. Random writes and
// reads come from both ports, with indexes inside and outside the bank; the model decides
// validity (index below 16 with base 0), read data (0xFF outside the bank) and the
// priority of the TI2C port when both ports write one register.
module tb_ti2c_regs;
  logic clk = 0, rst_n = 0;
  logic [15:0] i2c_idx = '0;
  logic idx_valid, i2c_we = 0, h_we = 0;
  logic [7:0] i2c_rdata, i2c_wdata = '0, h_wdata = '0, h_rdata;
  logic [3:0] h_addr = '0;
  logic [7:0] model [16];
  int checks = 0, failures = 0, n_both = 0;

  ti2c_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      i2c_idx   = ($urandom_range(0, 3) == 0) ? 16'($urandom) : 16'($urandom_range(0, 17));
      i2c_we    = $urandom_range(0, 1);
      i2c_wdata = 8'($urandom);
      h_addr    = 4'($urandom);
      h_we      = $urandom_range(0, 1);
      h_wdata   = 8'($urandom);
      if (i < 5 || i % 50 == 0) begin h_addr = i2c_idx[3:0]; i2c_idx = {12'h0, i2c_idx[3:0]}; end
      #1;
      check(idx_valid == (i2c_idx < 16), $sformatf("valid for %h", i2c_idx));
      check(i2c_rdata == ((i2c_idx < 16) ? model[i2c_idx[3:0]] : 8'hFF), "TI2C read");
      check(h_rdata == model[h_addr], "host read");
      if (h_we) model[h_addr] = h_wdata;
      if (i2c_we && i2c_idx < 16) model[i2c_idx[3:0]] = i2c_wdata;
      if (h_we && i2c_we && i2c_idx < 16 && h_addr == i2c_idx[3:0]) n_both++;
    end
    check(n_both > 0, "write collision exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
