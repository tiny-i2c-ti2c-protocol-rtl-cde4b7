// ti2c_regs: the TI2C register bank, the registers that TI2C indexes select.
//
// NUM_REGS byte registers occupy the index range [REG_BASE, REG_BASE + NUM_REGS). The slave
// reaches them through the TI2C port: `idx_valid` tells whether an index falls inside the
// bank (an index outside it is refused by the slave: no read, no write), `i2c_rdata` is the
// register at the index, combinationally, and `i2c_we` writes it at the clock edge. The
// local processor reaches the same registers through the host port (word-aligned APB
// window), with a registered write and a combinational read. If both ports write the same
// register in the same cycle the TI2C write wins. A 16-bit register is two neighbouring
// byte registers, most significant byte at the lower index, so a sequential two-byte
// transfer moves it whole. All registers reset to 0.
// That the slave accesses registers by index, with 8-bit data, and refuses a wrong index
// follows the document; the bank size, base, the host port and the 16-bit layout are this
// design's choices.
module ti2c_regs #(
  parameter int unsigned IDX_W    = 16,       // index width
  parameter int unsigned NUM_REGS = 16,       // byte registers in the bank
  parameter logic [15:0] REG_BASE = 16'h0000  // index of the first register
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // TI2C side
  input  logic [IDX_W-1:0]            i2c_idx,
  output logic                        idx_valid,
  output logic [7:0]                  i2c_rdata,
  input  logic                        i2c_we,
  input  logic [7:0]                  i2c_wdata,
  // host side
  input  logic [$clog2(NUM_REGS)-1:0] h_addr,
  input  logic                        h_we,
  input  logic [7:0]                  h_wdata,
  output logic [7:0]                  h_rdata
);
  localparam int unsigned AW = $clog2(NUM_REGS);

  logic [7:0]       mem [NUM_REGS];
  logic [IDX_W:0]   offset;   // index - REG_BASE, MSB set when the index is below the base
  logic [AW-1:0]    i2c_addr;

  assign offset    = {1'b0, i2c_idx} - (IDX_W + 1)'(REG_BASE);
  assign idx_valid = !offset[IDX_W] && (offset[IDX_W-1:0] < IDX_W'(NUM_REGS));
  assign i2c_addr  = offset[AW-1:0];
  assign i2c_rdata = idx_valid ? mem[i2c_addr] : 8'hFF;
  assign h_rdata   = mem[h_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_REGS); i++) mem[i] <= 8'h00;
    end else begin
      if (h_we) mem[h_addr] <= h_wdata;
      if (i2c_we && idx_valid) mem[i2c_addr] <= i2c_wdata;
    end
  end
endmodule
