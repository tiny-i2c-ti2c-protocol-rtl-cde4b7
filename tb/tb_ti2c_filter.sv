// tb_ti2c_filter: checks the SCL/SDA input filter. Spikes shorter than FILT_LEN cycles must
// not reach the output; a level held long enough must appear exactly FILT_LEN + 2 cycles
// after it was applied (two synchroniser stages plus the stability count). A reference
// model, a shift register of the input history, predicts the output every cycle.
module tb_ti2c_filter;
  localparam int FL = 3;  // the module default
  logic clk = 0, rst_n = 0, line_i = 1, line_o;
  int checks = 0, failures = 0;

  ti2c_filter dut (.*);
  always #5 clk = ~clk;

  // reference: output follows the synchronised input once FL equal samples differ from it
  logic [1:0] s;
  logic       ref_o;
  int         run;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s <= 2'b11; ref_o <= 1; run <= 0; end
    else begin
      s <= {s[0], line_i};
      if (s[1] == ref_o) run <= 0;
      else if (run == FL - 1) begin run <= 0; ref_o <= s[1]; end
      else run <= run + 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (line_o !== ref_o) begin failures++; $display("FAIL: out %b ref %b at %0t", line_o, ref_o, $time); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int lat;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // latency of a clean edge
    @(negedge clk); line_i = 0; lat = 0;
    while (line_o) begin @(negedge clk); lat++; end
    checks++;
    if (lat != FL + 2) begin failures++; $display("FAIL: latency %0d", lat); end
    repeat (10) @(negedge clk); line_i = 1;
    repeat (10) @(negedge clk);
    // spikes of 1..FL-1 cycles are removed
    for (int w = 1; w < FL; w++) begin
      line_i = 0; repeat (w) @(negedge clk); line_i = 1;
      repeat (10) @(negedge clk);
      checks++;
      if (!line_o) begin failures++; $display("FAIL: spike of %0d passed", w); end
    end
    // random line
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) line_i = ~line_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
