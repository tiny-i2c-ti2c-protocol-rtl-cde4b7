// ti2c_top: TI2C slave and its ROM-driven dummy master on one two-wire bus.
//
// This is the arrangement in which the TI2C slave is verified: the dummy master
// (ti2c_dummy_master) sends the bytes of its ROM to the slave (ti2c_slave_top) over SCL and
// SDA, and the processor side of the slave is reached through APB. The bus is modelled as
// it is on a board, open drain with pull-ups: a line is low when any device pulls it low.
// `ext_scl_low`/`ext_sda_low` let further devices on the same bus pull the lines, and the
// line levels come out on `scl`/`sda`. The dummy master's controls and results, the APB
// port, the hardware address pins, the external enable and the interrupt are brought out.
// Clock and reset are shared. Which blocks are joined follows the document's verification
// set-up; the wired-AND bus inside the module is this design's way of joining them.
module ti2c_top #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SCL_HZ    = 400_000,
  parameter int unsigned FILT_LEN  = 3,
  parameter int unsigned NUM_REGS  = 16,
  parameter logic [15:0] REG_BASE  = 16'h0000,
  parameter int unsigned ROM_DEPTH = 32,
  parameter string       ROM_FILE  = "rtl/ti2c_dummy_master_rom.hex"
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // slave: APB
  input  logic                         psel,
  input  logic                         penable,
  input  logic                         pwrite,
  input  logic [11:0]                  paddr,
  input  logic [31:0]                  pwdata,
  output logic [31:0]                  prdata,
  output logic                         pready,
  output logic                         pslverr,
  // slave: pins
  input  logic [6:0]                   hw_addr,
  input  logic                         ext_en,
  output logic                         intr,
  // dummy master
  input  logic                         dm_start,
  input  logic [$clog2(ROM_DEPTH)-1:0] dm_rom_addr,
  input  logic [7:0]                   dm_count,
  output logic                         dm_busy,
  output logic                         dm_done,
  output logic                         dm_nack,
  output logic [7:0]                   dm_acked,
  output logic                         dm_rx_valid,
  output logic [7:0]                   dm_rx_data,
  // bus
  input  logic                         ext_scl_low,
  input  logic                         ext_sda_low,
  output logic                         scl,
  output logic                         sda
);
  logic m_scl_low, m_sda_low, s_sda_low;

  assign scl = ~(m_scl_low | ext_scl_low);
  assign sda = ~(m_sda_low | s_sda_low | ext_sda_low);

  ti2c_slave_top #(.FILT_LEN(FILT_LEN), .NUM_REGS(NUM_REGS), .REG_BASE(REG_BASE)) u_slave (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_low_o(s_sda_low),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .hw_addr, .ext_en, .intr);

  ti2c_dummy_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .ROM_DEPTH(ROM_DEPTH),
                      .ROM_FILE(ROM_FILE)) u_master (
    .clk, .rst_n, .start(dm_start), .rom_addr(dm_rom_addr), .count(dm_count),
    .sda_i(sda), .scl_low(m_scl_low), .sda_low(m_sda_low), .busy(dm_busy),
    .done(dm_done), .nack(dm_nack), .acked(dm_acked), .rx_valid(dm_rx_valid),
    .rx_data(dm_rx_data));
endmodule
