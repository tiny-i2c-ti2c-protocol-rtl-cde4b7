// ti2c_trans_monitor: transfer monitor (TRANS MNTR) of the TI2C slave.
//
// Splits the bit stream between START and STOP into 9-bit frames (8 data bits, MSB first,
// then the acknowledge bit) and tags every bus strobe with its place in the frame, so the
// slave never counts bits itself. `bitcnt` is the position of the bit now on the bus
// (0..7 data, 8 acknowledge). It advances on each SCL fall (output strobe) except the first
// fall after START, which only opens bit 0 (output_fst). Sample strobes are tagged
// sample_bit or sample_ack; output strobes output_bit or output_ack by the bit they open.
// last_bit marks the sample of data bit 7, when a whole byte is in. first_frame is high for
// the frame right after START (the address byte). All outputs are combinational from the
// incoming strobe and the registered count, so they line up with the bus monitor's strobe.
// The names (bitcnt, samplebit/sampleack, outputfst/outputbit/outputack, TRS_IDLE) follow
// the transfer monitor's waveform signals; the counting scheme is this design's.
module ti2c_trans_monitor
  import ti2c_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  bus_ev_t    bev,
  output trs_ev_t    tev,
  output trs_state_t state
);
  logic [3:0] bitcnt_q, bitcnt_n;
  logic       first_q;
  logic       in_frame;

  assign in_frame = (state == TRS_DATA) || (state == TRS_ACK);
  assign bitcnt_n = (bitcnt_q == 4'd8) ? 4'd0 : bitcnt_q + 4'd1;

  always_comb begin
    tev             = '0;
    tev.bitcnt      = bitcnt_q;
    tev.first_frame = first_q;
    if (!bev.start && !bev.stop) begin
      if (state == TRS_START && bev.output_) begin
        tev.output_fst = 1'b1;
        tev.output_bit = 1'b1;
        tev.bitcnt     = 4'd0;
      end else if (in_frame && bev.output_) begin
        tev.bitcnt     = bitcnt_n;
        tev.output_bit = (bitcnt_n != 4'd8);
        tev.output_ack = (bitcnt_n == 4'd8);
        if (bitcnt_q == 4'd8) tev.first_frame = 1'b0;
      end else if (in_frame && bev.sample) begin
        tev.sample_bit = (bitcnt_q != 4'd8);
        tev.sample_ack = (bitcnt_q == 4'd8);
        tev.last_bit   = (bitcnt_q == 4'd7);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TRS_IDLE;
      bitcnt_q <= 4'd0;
      first_q  <= 1'b0;
    end else if (bev.stop) begin
      state    <= TRS_IDLE;
      bitcnt_q <= 4'd0;
      first_q  <= 1'b0;
    end else if (bev.start) begin
      state    <= TRS_START;
      bitcnt_q <= 4'd0;
      first_q  <= 1'b1;
    end else if (tev.output_bit || tev.output_ack) begin
      bitcnt_q <= tev.bitcnt;
      first_q  <= tev.first_frame;
      state    <= tev.output_ack ? TRS_ACK : TRS_DATA;
    end
  end

  a_bitcnt_range: assert property (@(posedge clk) disable iff (!rst_n) bitcnt_q <= 4'd8);
  a_one_tag: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({tev.sample_bit, tev.sample_ack, tev.output_bit | tev.output_fst, tev.output_ack}));
endmodule
