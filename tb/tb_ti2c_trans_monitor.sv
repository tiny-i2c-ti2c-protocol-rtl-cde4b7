// tb_ti2c_trans_monitor: checks the framing of bus strobes into 9-bit frames. After START it
// feeds output/sample strobe pairs for three frames and compares every tag (bit counter,
// output_fst/output_bit/output_ack, sample_bit/sample_ack/last_bit, first_frame) with the
// position the test itself keeps track of; a repeated START and a STOP must restart the count.
module tb_ti2c_trans_monitor;
  import ti2c_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_ev_t bev = '0;
  trs_ev_t tev;
  trs_state_t state;
  int checks = 0, failures = 0;

  ti2c_trans_monitor dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_start();
    @(negedge clk); bev = '0; bev.start = 1; bev.busy = 1;
    @(negedge clk); bev.start = 0;
    check(state == TRS_START, "state after START");
  endtask

  // one bit: output strobe then sample strobe; pos is the expected bit position
  task automatic bit_pair(input int pos, input bit fst, input bit frame0);
    @(negedge clk); bev.output_ = 1; #1;
    check(tev.bitcnt == 4'(pos) && tev.output_fst == fst && tev.output_bit == (pos != 8)
          && tev.output_ack == (pos == 8) && !tev.sample_bit && !tev.sample_ack,
          $sformatf("output strobe at bit %0d: %b", pos, tev));
    @(negedge clk); bev.output_ = 0;
    repeat (2) @(negedge clk);
    check(state == ((pos == 8) ? TRS_ACK : TRS_DATA), $sformatf("state at bit %0d", pos));
    bev.sample = 1; #1;
    check(tev.bitcnt == 4'(pos) && tev.sample_bit == (pos != 8) && tev.sample_ack == (pos == 8)
          && tev.last_bit == (pos == 7) && tev.first_frame == frame0 && !tev.output_bit,
          $sformatf("sample strobe at bit %0d: %b", pos, tev));
    @(negedge clk); bev.sample = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(state == TRS_IDLE, "idle");
    pulse_start();
    for (int f = 0; f < 3; f++)
      for (int b = 0; b < 9; b++) bit_pair(b, f == 0 && b == 0, f == 0);
    pulse_start();                              // repeated START restarts the frame
    for (int b = 0; b < 9; b++) bit_pair(b, b == 0, 1'b1);
    bit_pair(0, 0, 0);
    bit_pair(1, 0, 0);
    @(negedge clk); bev.stop = 1; @(negedge clk); bev = '0;
    check(state == TRS_IDLE, "idle after STOP");
    @(negedge clk); bev.sample = 1; #1;
    check(!tev.sample_bit && !tev.sample_ack, "no tags outside a transfer");
    @(negedge clk); bev.sample = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
