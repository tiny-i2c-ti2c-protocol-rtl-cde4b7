// ti2c_bus_monitor: bus monitor (BUS MNTR) of the TI2C slave.
//
// Watches the filtered SCL and SDA lines and turns their edges into one-cycle strobes:
//   start    SDA falls while SCL stays high (repeated START if the bus is already busy)
//   stop     SDA rises while SCL stays high
//   sample   SCL rises: the receiver samples SDA (SDA is stable while SCL is high)
//   output_  SCL falls: the transmitter may now change SDA
// `busy` is set by START and cleared by STOP. The strobes are registered, so each appears
// one cycle after the line change is seen on the filtered inputs. The state shows the bus
// phase (idle, SCL high, SCL low). The strobe names follow the signal names of the slave's
// waveforms (i2cstart, i2cstop, i2csample, i2coutput, i2cbusy, i2crepeated); the detection
// logic is this design's.
module ti2c_bus_monitor
  import ti2c_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl_i,   // filtered SCL
  input  logic       sda_i,   // filtered SDA
  output bus_ev_t    ev,
  output bus_state_t state
);
  logic scl_q, sda_q;
  logic start_c, stop_c;

  assign start_c = scl_i & scl_q & sda_q & ~sda_i;
  assign stop_c  = scl_i & scl_q & ~sda_q & sda_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q <= 1'b1;
      sda_q <= 1'b1;
      ev    <= '0;
      state <= BUS_IDLE;
    end else begin
      scl_q       <= scl_i;
      sda_q       <= sda_i;
      ev.start    <= start_c;
      ev.repeated <= start_c & ev.busy;
      ev.stop     <= stop_c;
      ev.sample   <= scl_i & ~scl_q;
      ev.output_  <= ~scl_i & scl_q;
      if (start_c)     ev.busy <= 1'b1;
      else if (stop_c) ev.busy <= 1'b0;
      if (stop_c)                       state <= BUS_IDLE;
      else if (start_c || ev.busy)      state <= scl_i ? BUS_SCL_HI : BUS_SCL_LO;
    end
  end

  a_strobes_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ev.start, ev.stop, ev.sample, ev.output_}));
endmodule
