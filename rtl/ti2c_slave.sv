// ti2c_slave: TI2C slave protocol engine (SLAVE module).
//
// A TI2C transfer is an I2C transfer with an index layer on top:
//   write:  START, address+W, index [MSB, LSB | only byte], data, data, ..., STOP
//   read:   START, address+R, data, data, ..., STOP   (from the current index)
// The 7-bit own address is compared with bits [7:1] of the first byte; bit 0 selects read (1)
// or write (0). In 16-bit index mode (`idx16`) two index bytes follow, MSB first, otherwise
// one. Each data byte goes to / comes from the register at the current index, which then
// increments, so both directions are sequential. An index outside the register bank is
// refused: the index byte is not acknowledged and nothing is read or written; a read that
// starts at such an index is refused at the address byte, and a data byte that would reach
// past the bank is not acknowledged. The current index survives STOP, so a read after a
// write transfer continues at the index where the write left off.
// The engine counts no bits: it acts on the transfer monitor's tagged strobes. Received
// bits are shifted in on sample strobes; on the SCL fall that opens the acknowledge bit it
// pulls SDA low if it accepted the byte; on the SCL falls of a read it drives the data bits,
// loading the register at bit 0, and on the master's acknowledge it moves to the next index,
// or stops driving after a NACK. START (also repeated) restarts address decoding, STOP
// returns to idle. `sda_low` is the open-drain pull-down. `irq` carries one-cycle event
// pulses (see ti2c_pkg). Register writes (`reg_we`) are combinational with the sample of
// the last data bit.
// Addressing, the 8/16-bit index, sequential read and write and the refusal of a wrong
// index follow the document; the frame-level behaviour listed above for wrong indexes and
// the events are this design's choices.
module ti2c_slave
  import ti2c_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,        // core enable
  input  logic [6:0]      own_addr,
  input  logic            idx16,     // 1: 16-bit index, 0: 8-bit index
  input  bus_ev_t         bev,
  input  trs_ev_t         tev,
  input  logic            sda_i,     // filtered SDA
  output logic            sda_low,   // 1: pull SDA low
  // register bank
  output logic [15:0]     reg_idx,
  input  logic            reg_valid,
  input  logic [7:0]      reg_rdata,
  output logic            reg_we,
  output logic [7:0]      reg_wdata,
  // status
  output slv_state_t      state,
  output logic            addressed,
  output logic            rw,        // 1: current transfer is a read
  output logic [15:0]     index,     // current index
  output logic [NIRQ-1:0] irq
);
  logic [6:0]  shift_q;
  logic [7:0]  byte_c;
  logic [7:0]  idx_hi_q;
  logic [7:0]  tx_q;
  logic        ack_q;
  logic [15:0] cand_idx;
  logic        sel_q;     // own address seen since the last STOP

  assign byte_c    = {shift_q, sda_i};
  assign cand_idx  = idx16 ? {idx_hi_q, byte_c} : {8'h00, byte_c};
  assign reg_idx   = (state == SLV_IDX_L) ? cand_idx : index;
  assign reg_we    = (state == SLV_WRITE) && tev.last_bit && reg_valid
                     && !bev.start && !bev.stop;
  assign reg_wdata = byte_c;
  assign addressed = (state != SLV_IDLE) && (state != SLV_ADDR) && (state != SLV_IGNORE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SLV_IDLE;
      shift_q  <= '0;
      idx_hi_q <= '0;
      tx_q     <= '0;
      ack_q    <= 1'b0;
      sda_low  <= 1'b0;
      rw       <= 1'b0;
      index    <= '0;
      irq      <= '0;
      sel_q    <= 1'b0;
    end else begin
      irq <= '0;
      if (bev.stop) begin
        if (sel_q) irq[IRQ_STOP] <= 1'b1;
        sel_q   <= 1'b0;
        state   <= SLV_IDLE;
        sda_low <= 1'b0;
        ack_q   <= 1'b0;
      end else if (bev.start) begin
        state   <= en ? SLV_ADDR : SLV_IGNORE;
        sda_low <= 1'b0;
        ack_q   <= 1'b0;
      end else begin
        // ---- receive path
        if (tev.sample_bit) begin
          shift_q <= byte_c[6:0];
          if (tev.last_bit) begin
            unique case (state)
              SLV_ADDR: begin
                if (byte_c[7:1] == own_addr) begin
                  rw    <= byte_c[0];
                  sel_q <= 1'b1;
                  if (byte_c[0] && !reg_valid) begin
                    ack_q <= 1'b0;
                    state <= SLV_IGNORE;
                    irq[IRQ_IDX_ERR] <= 1'b1;
                  end else begin
                    ack_q <= 1'b1;
                    irq[IRQ_ADDR] <= 1'b1;
                    state <= byte_c[0] ? SLV_READ : (idx16 ? SLV_IDX_H : SLV_IDX_L);
                  end
                end else begin
                  ack_q <= 1'b0;
                  state <= SLV_IGNORE;
                end
              end
              SLV_IDX_H: begin
                idx_hi_q <= byte_c;
                ack_q    <= 1'b1;
                state    <= SLV_IDX_L;
              end
              SLV_IDX_L: begin
                if (reg_valid) begin
                  index <= cand_idx;
                  ack_q <= 1'b1;
                  state <= SLV_WRITE;
                end else begin
                  ack_q <= 1'b0;
                  state <= SLV_IGNORE;
                  irq[IRQ_IDX_ERR] <= 1'b1;
                end
              end
              SLV_WRITE: begin
                if (reg_valid) begin
                  index <= index + 16'd1;
                  ack_q <= 1'b1;
                  irq[IRQ_WR_BYTE] <= 1'b1;
                end else begin
                  ack_q <= 1'b0;
                  state <= SLV_IGNORE;
                  irq[IRQ_IDX_ERR] <= 1'b1;
                end
              end
              default: ack_q <= 1'b0;
            endcase
          end
        end
        // ---- master's acknowledge of a byte we sent (ack_q is still set during the
        //      acknowledge of our own address byte, which is not such a byte)
        if (tev.sample_ack && state == SLV_READ && !ack_q) begin
          if (reg_valid) begin
            index <= index + 16'd1;
            irq[IRQ_RD_BYTE] <= 1'b1;
          end else begin
            irq[IRQ_IDX_ERR] <= 1'b1;  // the byte sent was 0xFF from outside the bank
          end
          if (sda_i) state <= SLV_IGNORE;  // NACK: master ends the read
        end
        // ---- transmit path (SCL low)
        if (tev.output_ack) begin
          sda_low <= ack_q;
        end else if (tev.output_bit) begin
          ack_q <= 1'b0;
          if (state == SLV_READ) begin
            if (tev.bitcnt == 4'd0) begin
              sda_low <= ~reg_rdata[7];
              tx_q    <= {reg_rdata[6:0], 1'b1};
            end else begin
              sda_low <= ~tx_q[7];
              tx_q    <= {tx_q[6:0], 1'b1};
            end
          end else begin
            sda_low <= 1'b0;
          end
        end
      end
    end
  end

  // The engine may change SDA only on an SCL fall, START or STOP: a change while SCL is high
  // would itself be a START or STOP on the bus.
  a_sda_on_scl_low: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(sda_low) |-> $past(tev.output_bit || tev.output_ack || bev.start || bev.stop));
  // Only one register write per byte, and only inside the bank.
  a_write_in_bank: assert property (@(posedge clk) disable iff (!rst_n) reg_we |-> reg_valid);
endmodule
