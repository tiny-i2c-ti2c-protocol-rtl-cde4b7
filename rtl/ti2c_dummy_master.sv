// ti2c_dummy_master: ROM-driven TI2C test master.
//
// A small I2C master that can only do sequential transfers. A transfer is started with
// `start`, a ROM address `rom_addr` and a byte count `count`. The master issues START and
// sends the ROM byte at `rom_addr`: bits [7:1] are the slave address, bit 0 is 0 for write
// and 1 for read.
//   write: while the slave acknowledges, the ROM address advances by one and the next ROM
//          byte is sent, `count` bytes after the address byte (index bytes and data); a NACK
//          or the last byte ends the transfer with STOP.
//   read:  after the slave acknowledges the address byte, `count` bytes are received and
//          output on `rx_valid`/`rx_data`; each is acknowledged except the last, which gets
//          a NACK so that the slave releases SDA for the STOP.
// `done` pulses at the end of the STOP; `nack` then tells whether a byte was refused, and
// `acked` how many bytes the slave acknowledged. SCL and SDA are open drain: the master only
// pulls them low (`scl_low`, `sda_low`) and reads the bus levels back. Every bit takes four
// quarter periods of QUARTER clock cycles: SCL low, SDA changes, SCL high, SCL high with SDA
// sampled at the end; SCL therefore runs at CLK_HZ / (4 * QUARTER), at most SCL_HZ. The
// master does not read SCL back, so it supports no clock stretching or arbitration (TI2C has neither).
// The ROM, the sequential write with address increment on acknowledge and the address byte
// layout follow the document. The document has the master acknowledge every received byte;
// here the last one is not acknowledged, as I2C requires for the master to end a read. The
// counting interface, the ROM size and the bit timing are this design's own.
module ti2c_dummy_master #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SCL_HZ    = 400_000,
  parameter int unsigned ROM_DEPTH = 32,
  parameter string       ROM_FILE  = "rtl/ti2c_dummy_master_rom.hex"
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(ROM_DEPTH)-1:0] rom_addr,
  input  logic [7:0]                   count,
  input  logic                         sda_i,     // SDA bus level
  output logic                         scl_low,
  output logic                         sda_low,
  output logic                         busy,
  output logic                         done,
  output logic                         nack,
  output logic [7:0]                   acked,
  output logic                         rx_valid,
  output logic [7:0]                   rx_data
);
  localparam int unsigned QUARTER = (CLK_HZ + 4 * SCL_HZ - 1) / (4 * SCL_HZ);
  localparam int unsigned QW      = $clog2(QUARTER + 1);
  localparam int unsigned AW      = $clog2(ROM_DEPTH);

  typedef enum logic [2:0] {M_IDLE, M_START, M_TX, M_RX, M_STOP} mstate_t;

  logic [7:0]    rom [ROM_DEPTH];
  mstate_t       state;
  logic [QW-1:0] qcnt;
  logic [1:0]    phase;
  logic          tick;
  logic [3:0]    bitidx;    // 0..7 data (MSB first), 8 acknowledge
  logic [7:0]    shreg;
  logic [AW-1:0] ptr;
  logic [7:0]    left;
  logic          first;     // address byte in flight
  logic          rd;

  initial $readmemh(ROM_FILE, rom);

  assign tick = (qcnt == QW'(QUARTER - 1));
  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      qcnt     <= '0;
      phase    <= '0;
      bitidx   <= '0;
      shreg    <= '0;
      ptr      <= '0;
      left     <= '0;
      first    <= 1'b0;
      rd       <= 1'b0;
      scl_low  <= 1'b0;
      sda_low  <= 1'b0;
      done     <= 1'b0;
      nack     <= 1'b0;
      acked    <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      done     <= 1'b0;
      rx_valid <= 1'b0;
      if (state == M_IDLE) begin
        qcnt  <= '0;
        phase <= '0;
        if (start) begin
          state  <= M_START;
          ptr    <= rom_addr;
          shreg  <= rom[rom_addr];
          rd     <= rom[rom_addr][0];
          left   <= count;
          first  <= 1'b1;
          nack   <= 1'b0;
          acked  <= '0;
          bitidx <= '0;
        end
      end else if (tick) begin
        qcnt  <= '0;
        phase <= phase + 2'd1;
        unique case (state)
          M_START: begin
            // SDA falls during quarter 1 while SCL is high
            if (phase == 2'd0) sda_low <= 1'b1;
            if (phase == 2'd3) begin
              state   <= M_TX;
              scl_low <= 1'b1;
            end
          end
          M_TX, M_RX: begin
            unique case (phase)
              2'd0: begin  // SCL has been low one quarter: change SDA
                if (bitidx == 4'd8)
                  sda_low <= (state == M_RX) && (left != 8'd1);  // our ACK/NACK
                else
                  sda_low <= (state == M_TX) && !shreg[7 - bitidx[2:0]];
              end
              2'd1: scl_low <= 1'b0;
              2'd2: ;
              2'd3: begin  // end of SCL high: sample, then pull SCL low
                scl_low <= 1'b1;
                bitidx  <= (bitidx == 4'd8) ? 4'd0 : bitidx + 4'd1;
                if (state == M_RX && bitidx != 4'd8)
                  shreg <= {shreg[6:0], sda_i};
                if (bitidx == 4'd8) begin
                  if (state == M_TX) begin
                    first <= 1'b0;
                    if (sda_i) begin
                      nack  <= 1'b1;
                      state <= M_STOP;
                    end else begin
                      acked <= acked + 8'd1;
                      if (left == 8'd0) begin
                        state <= M_STOP;
                      end else if (first && rd) begin
                        state <= M_RX;
                      end else begin
                        ptr   <= ptr + 1'b1;
                        shreg <= rom[ptr + 1'b1];
                        left  <= left - 8'd1;
                      end
                    end
                  end else begin
                    rx_valid <= 1'b1;
                    rx_data  <= shreg;
                    left     <= left - 8'd1;
                    if (left == 8'd1) state <= M_STOP;
                  end
                end
              end
              default: ;
            endcase
          end
          M_STOP: begin
            // SCL low, SDA low, SCL high, then SDA rises while SCL is high
            if (phase == 2'd0) sda_low <= 1'b1;
            if (phase == 2'd1) scl_low <= 1'b0;
            if (phase == 2'd2) sda_low <= 1'b0;
            if (phase == 2'd3) begin
              state <= M_IDLE;
              done  <= 1'b1;
            end
          end
          default: state <= M_IDLE;
        endcase
      end else begin
        qcnt <= qcnt + 1'b1;
      end
    end
  end

  // SDA changes only while SCL is low, except to make START and STOP.
  a_sda_change: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(sda_low) |-> ($past(scl_low) || $past(state) inside {M_START, M_STOP}));
endmodule
