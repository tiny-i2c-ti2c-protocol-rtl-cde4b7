// ti2c_slave_top: the TI2C slave, i.e. the HTI2C controller in its TI2C slave configuration.
//
// Only the parts a TI2C slave needs are present. SCL and SDA pass through one input filter
// each; the bus monitor turns their edges into START/STOP/sample/output strobes; the
// transfer monitor places each strobe in its 9-bit frame; the slave engine decodes address
// and index and moves bytes between SDA and the TI2C register bank. The APB interface holds
// the control (SCR), clock-control/enable (CCR), status (CSR), interrupt mask (IMSCR) and
// interrupt status/clear (ICR) registers and a window onto the register bank. Ea-sync
// synchronises the external enable and gates the core with the CCR enable.
// The slave only pulls SDA low (`sda_low_o`, open drain); it never drives or stretches SCL.
// Everything runs on one clock, `clk`, which must be fast against SCL: a bit is seen
// FILT_LEN + 3 cycles after it reaches the pins, and SCL must stay low and high for at least
// FILT_LEN + 6 cycles. With FILT_LEN = 3 and a 50 MHz clock that is far inside fast mode.
// The module split follows the document's block diagram of the slave configuration; the
// single clock domain and the interface signals are this design's choices.
module ti2c_slave_top
  import ti2c_pkg::*;
#(
  parameter int unsigned FILT_LEN = 3,
  parameter int unsigned NUM_REGS = 16,
  parameter logic [15:0] REG_BASE = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // I2C pins
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        sda_low_o,
  // APB
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // misc
  input  logic [6:0]  hw_addr,
  input  logic        ext_en,
  output logic        intr
);
  localparam int unsigned AW = $clog2(NUM_REGS);

  logic            scl_f, sda_f;
  bus_ev_t         bev;
  bus_state_t      bus_state;
  trs_ev_t         tev;
  trs_state_t      trs_state;
  logic [6:0]      own_addr;
  logic            idx16, ccr_en, ext_en_sync, core_en;
  logic [15:0]     reg_idx, index;
  logic            reg_valid, reg_we, addressed, rw;
  logic [7:0]      reg_rdata, reg_wdata;
  slv_state_t      slv_state;
  logic [NIRQ-1:0] irq;
  logic [AW-1:0]   h_addr;
  logic            h_we;
  logic [7:0]      h_wdata, h_rdata;

  ti2c_filter #(.FILT_LEN(FILT_LEN)) u_flt_scl (
    .clk, .rst_n, .line_i(scl_i), .line_o(scl_f));
  ti2c_filter #(.FILT_LEN(FILT_LEN)) u_flt_sda (
    .clk, .rst_n, .line_i(sda_i), .line_o(sda_f));

  ti2c_bus_monitor u_bus_mntr (
    .clk, .rst_n, .scl_i(scl_f), .sda_i(sda_f), .ev(bev), .state(bus_state));

  ti2c_trans_monitor u_trans_mntr (
    .clk, .rst_n, .bev, .tev, .state(trs_state));

  ti2c_ea_sync u_ea_sync (
    .clk, .rst_n, .ext_en_async(ext_en), .ccr_en, .ext_en_sync, .core_en);

  ti2c_slave u_slave (
    .clk, .rst_n, .en(core_en), .own_addr, .idx16, .bev, .tev, .sda_i(sda_f),
    .sda_low(sda_low_o), .reg_idx, .reg_valid, .reg_rdata, .reg_we, .reg_wdata,
    .state(slv_state), .addressed, .rw, .index, .irq);

  ti2c_regs #(.IDX_W(16), .NUM_REGS(NUM_REGS), .REG_BASE(REG_BASE)) u_regs (
    .clk, .rst_n, .i2c_idx(reg_idx), .idx_valid(reg_valid), .i2c_rdata(reg_rdata),
    .i2c_we(reg_we), .i2c_wdata(reg_wdata), .h_addr, .h_we, .h_wdata, .h_rdata);

  ti2c_apb_regs #(.NUM_REGS(NUM_REGS)) u_apb (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .hw_addr, .own_addr, .idx16, .ccr_en,
    .bus_busy(bev.busy), .addressed, .rw, .ext_en_sync, .core_en, .slv_state(slv_state),
    .index, .irq_evt(irq), .intr,
    .h_addr, .h_we, .h_wdata, .h_rdata);

endmodule
