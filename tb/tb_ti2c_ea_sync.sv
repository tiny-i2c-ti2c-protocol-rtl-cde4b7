// tb_ti2c_ea_sync: checks the enable synchroniser. The synchronised pin must follow the pin
// two cycles later, and the core enable must be the AND of the pin (as synchronised) and
// the CCR bit, one cycle after that.
module tb_ti2c_ea_sync;
  logic clk = 0, rst_n = 0, ext_en_async = 0, ccr_en = 0, ext_en_sync, core_en;
  int checks = 0, failures = 0;
  logic [2:0] pin_h;
  logic [0:0] ccr_h;

  ti2c_ea_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pin_h = '0; ccr_h = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      pin_h <= {pin_h[1:0], ext_en_async};
      ccr_h <= ccr_en;
      @(negedge clk);
      if (i > 4) begin
        checks += 2;
        if (ext_en_sync !== pin_h[1]) begin failures++; $display("FAIL: sync %0d", i); end
        if (core_en !== (pin_h[2] & ccr_h[0])) begin failures++; $display("FAIL: core_en %0d", i); end
      end
      if ($urandom_range(0, 4) == 0) ext_en_async = ~ext_en_async;
      if ($urandom_range(0, 6) == 0) ccr_en = ~ccr_en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
