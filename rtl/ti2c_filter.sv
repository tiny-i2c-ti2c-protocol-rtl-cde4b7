// ti2c_filter: input filter for one I2C line (SCL or SDA).
//
// The raw line is first brought into the i2c clock domain by two flip-flops, then a
// counter suppresses spikes: the filtered output takes a new level only after the
// synchronised input has held that level for FILT_LEN consecutive clock cycles. The latency
// from a clean edge on `line_i` to `line_o` is therefore FILT_LEN + 2 cycles, the same for
// both lines, so SCL and SDA keep their relative timing. The output resets to 1, the idle
// level of an I2C line.
// The filters for SCL and SDA are blocks of the slave configuration; their insides (two-flop
// synchroniser, stability counter, FILT_LEN) are this design's choice.
module ti2c_filter #(
  parameter int unsigned FILT_LEN = 3   // cycles a new level must be stable (>= 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic line_i,   // raw line, asynchronous
  output logic line_o    // synchronised, filtered line
);
  localparam int unsigned CW = $clog2(FILT_LEN + 1);

  logic [1:0]    sync_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= 2'b11;
      cnt_q  <= '0;
      line_o <= 1'b1;
    end else begin
      sync_q <= {sync_q[0], line_i};
      if (sync_q[1] == line_o) begin
        cnt_q <= '0;
      end else if (cnt_q == CW'(FILT_LEN - 1)) begin
        cnt_q  <= '0;
        line_o <= sync_q[1];
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end
endmodule
