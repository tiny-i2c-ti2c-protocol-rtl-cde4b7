// tb_ti2c_bus_monitor: checks START/STOP/repeated-START/sample/output strobes and the busy
// flag. The test drives an I2C-like sequence on the (already filtered) lines and counts the
// strobes, each of which must appear exactly one cycle after the line change.
module tb_ti2c_bus_monitor;
  import ti2c_pkg::*;
  logic clk = 0, rst_n = 0, scl_i = 1, sda_i = 1;
  bus_ev_t ev;
  bus_state_t state;
  int checks = 0, failures = 0;
  int n_start, n_rep, n_stop, n_sample, n_output;

  ti2c_bus_monitor dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_start  += ev.start;  n_rep += ev.repeated; n_stop += ev.stop;
    n_sample += ev.sample; n_output += ev.output_;
  end

  // apply a line change and check that exactly the expected strobe follows one cycle later
  task automatic step(input logic scl, input logic sda, input bus_ev_t exp);
    @(negedge clk); scl_i = scl; sda_i = sda;
    @(negedge clk);
    check(ev.start == exp.start && ev.stop == exp.stop && ev.sample == exp.sample &&
          ev.output_ == exp.output_ && ev.repeated == exp.repeated,
          $sformatf("strobes %b expected %b (scl %b sda %b)", ev, exp, scl, sda));
    repeat (3) @(negedge clk);
    check(ev.start == 0 && ev.stop == 0 && ev.sample == 0 && ev.output_ == 0, "strobe one cycle wide");
  endtask

  function automatic bus_ev_t e(input bit st, input bit rp, input bit sp, input bit sa, input bit ou);
    bus_ev_t r; r = '0; r.start = st; r.repeated = rp; r.stop = sp; r.sample = sa; r.output_ = ou;
    return r;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    {n_start, n_rep, n_stop, n_sample, n_output} = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    check(!ev.busy && state == BUS_IDLE, "idle after reset");
    step(1, 0, e(1, 0, 0, 0, 0));                  // START
    check(ev.busy && state == BUS_SCL_HI, "busy after START");
    step(0, 0, e(0, 0, 0, 0, 1));                  // SCL falls
    check(state == BUS_SCL_LO, "state SCL low");
    step(0, 1, e(0, 0, 0, 0, 0));                  // data change while SCL low: nothing
    step(1, 1, e(0, 0, 0, 1, 0));                  // SCL rises: sample
    step(0, 1, e(0, 0, 0, 0, 1));                  // SCL falls: output
    step(1, 1, e(0, 0, 0, 1, 0));
    step(1, 0, e(1, 1, 0, 0, 0));                  // repeated START
    step(0, 0, e(0, 0, 0, 0, 1));
    step(1, 0, e(0, 0, 0, 1, 0));
    step(1, 1, e(0, 0, 1, 0, 0));                  // STOP
    check(!ev.busy && state == BUS_IDLE, "idle after STOP");
    check(n_start == 2 && n_rep == 1 && n_stop == 1 && n_sample == 3 && n_output == 3,
          $sformatf("counts %0d %0d %0d %0d %0d", n_start, n_rep, n_stop, n_sample, n_output));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
