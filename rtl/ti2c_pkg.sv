// ti2c_pkg: types and constants shared by the Tiny I2C (TI2C) slave and its dummy master.
//
// TI2C is a reduced I2C: one master, 7-bit slave addressing, fast mode (400 kHz), and an
// index (sub-address) layer on top of I2C that selects a register inside the slave. The
// index is 8 or 16 bits wide and the data 8 bits. This package holds the strobe bundle that
// the bus monitor hands to the transfer monitor and the slave, the state encodings of the
// monitors and of the slave, the APB register map and the interrupt bit positions.
// The state names with prefixes BUS_ and TRS_ follow the naming of the monitors' states;
// the encodings, the register map and the interrupt bits are this design's own choices.
package ti2c_pkg;

  // Strobes derived from the filtered SCL/SDA lines, each one i2c clock cycle wide.
  typedef struct packed {
    logic start;     // SDA fell while SCL high (also a repeated START)
    logic repeated;  // START seen while the bus was already busy
    logic stop;      // SDA rose while SCL high
    logic sample;    // SCL rose: receivers sample SDA
    logic output_;   // SCL fell: transmitters may change SDA
    logic busy;      // level: between START and STOP
  } bus_ev_t;

  // Bus monitor states: where the filtered SCL is.
  typedef enum logic [1:0] {
    BUS_IDLE    = 2'd0,  // no transfer between STOP and START
    BUS_SCL_HI  = 2'd1,  // busy, SCL high
    BUS_SCL_LO  = 2'd2   // busy, SCL low
  } bus_state_t;

  // Transfer monitor states: position inside a 9-bit frame (8 data bits + acknowledge).
  typedef enum logic [1:0] {
    TRS_IDLE  = 2'd0,  // no transfer
    TRS_START = 2'd1,  // START seen, SCL has not yet fallen
    TRS_DATA  = 2'd2,  // one of the 8 data bits
    TRS_ACK   = 2'd3   // the acknowledge bit
  } trs_state_t;

  // Frame-level strobes from the transfer monitor.
  typedef struct packed {
    logic       sample_bit;  // sample strobe of a data bit
    logic       sample_ack;  // sample strobe of the acknowledge bit
    logic       output_fst;  // first SCL fall after START: drive bit 7 of the first byte
    logic       output_bit;  // SCL fall that starts a data bit
    logic       output_ack;  // SCL fall that starts the acknowledge bit
    logic       last_bit;    // sample_bit of data bit 7 (byte complete)
    logic       first_frame; // level: the frame is the first after START (address byte)
    logic [3:0] bitcnt;      // 0..7 data bit (MSB first), 8 acknowledge
  } trs_ev_t;

  // Slave protocol states.
  typedef enum logic [2:0] {
    SLV_IDLE   = 3'd0,  // not addressed
    SLV_ADDR   = 3'd1,  // receiving the address byte
    SLV_IDX_H  = 3'd2,  // receiving the index MSB (16-bit index mode)
    SLV_IDX_L  = 3'd3,  // receiving the index LSB (or the only index byte)
    SLV_WRITE  = 3'd4,  // receiving data bytes
    SLV_READ   = 3'd5,  // sending data bytes
    SLV_IGNORE = 3'd6   // not for us, or refused: wait for START or STOP
  } slv_state_t;

  // APB register map (byte addresses, 32-bit registers).
  localparam logic [11:0] ADDR_SCR   = 12'h000;  // slave control
  localparam logic [11:0] ADDR_CCR   = 12'h004;  // clock control (enable)
  localparam logic [11:0] ADDR_CSR   = 12'h008;  // current status (read only)
  localparam logic [11:0] ADDR_IMSCR = 12'h00C;  // interrupt mask set/clear
  localparam logic [11:0] ADDR_ICR   = 12'h010;  // read: raw interrupt status; write 1: clear
  localparam logic [11:0] ADDR_MIS   = 12'h014;  // masked interrupt status (read only)
  localparam logic [11:0] ADDR_REGS  = 12'h100;  // TI2C register i at ADDR_REGS + 4*i

  // SCR fields
  localparam int SCR_ADDR_LSB   = 0;  // [6:0] own slave address
  localparam int SCR_USE_HWADDR = 7;  // 1: take the address from the HW_ADDR pins
  localparam int SCR_IDX16      = 8;  // 1: 16-bit index, 0: 8-bit index
  localparam logic [31:0] SCR_RESET = 32'h0000_0180;  // HW_ADDR pins, 16-bit index

  // Interrupt bits (ICR / IMSCR / MIS)
  localparam int NIRQ          = 5;
  localparam int IRQ_ADDR      = 0;  // own address received
  localparam int IRQ_WR_BYTE   = 1;  // a data byte was written into a register
  localparam int IRQ_RD_BYTE   = 2;  // a data byte was read from a register
  localparam int IRQ_STOP      = 3;  // STOP ended a transfer that addressed this slave
  localparam int IRQ_IDX_ERR   = 4;  // index outside the register bank: refused

endpackage
