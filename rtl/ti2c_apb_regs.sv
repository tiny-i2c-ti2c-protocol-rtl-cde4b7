// ti2c_apb_regs: APB interface and configuration/status registers of the TI2C slave
// (APB I/F, SCR, CCR, CSR, IMSCR, ICR).
//
// An APB slave with zero wait states (PREADY always 1). A register is written in the access
// phase (PSEL & PENABLE & PWRITE); reads are combinational. Unmapped addresses answer with
// PSLVERR. Map (byte addresses, see ti2c_pkg):
//   0x000 SCR   [6:0] own address, [7] use HW_ADDR pins instead, [8] 16-bit index
//               (reset: HW_ADDR pins, 16-bit index)
//   0x004 CCR   [0] core enable (reset 0)
//   0x008 CSR   read only: [0] bus busy, [1] addressed, [2] read transfer, [3] external
//               enable (synchronised), [4] core enabled, [7:5] slave state,
//               [31:16] current index
//   0x00C IMSCR interrupt mask, 1 = enabled (reset 0)
//   0x010 ICR   read: raw interrupt status; write 1 to a bit: clear it
//   0x014 MIS   read only: masked interrupt status
//   0x100 + 4*i TI2C register i, data in [7:0]
// Raw status bits are set by the slave's event pulses (a set wins over a clear in the same
// cycle); INTR is the OR of the masked status. The register names and their place between
// the APB interface and the slave follow the document; their fields, addresses and reset
// values are this design's own.
module ti2c_apb_regs
  import ti2c_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // APB
  input  logic                        psel,
  input  logic                        penable,
  input  logic                        pwrite,
  input  logic [11:0]                 paddr,
  input  logic [31:0]                 pwdata,
  output logic [31:0]                 prdata,
  output logic                        pready,
  output logic                        pslverr,
  // configuration out
  input  logic [6:0]                  hw_addr,
  output logic [6:0]                  own_addr,
  output logic                        idx16,
  output logic                        ccr_en,
  // status in
  input  logic                        bus_busy,
  input  logic                        addressed,
  input  logic                        rw,
  input  logic                        ext_en_sync,
  input  logic                        core_en,
  input  slv_state_t                  slv_state,
  input  logic [15:0]                 index,
  input  logic [NIRQ-1:0]             irq_evt,
  output logic                        intr,
  // TI2C register bank, host port
  output logic [$clog2(NUM_REGS)-1:0] h_addr,
  output logic                        h_we,
  output logic [7:0]                  h_wdata,
  input  logic [7:0]                  h_rdata
);
  localparam int unsigned AW = $clog2(NUM_REGS);

  logic [8:0]      scr_q;
  logic            ccr_q;
  logic [NIRQ-1:0] imsc_q, ris_q, icr_clr;
  logic            wr, in_bank;

  assign wr      = psel & penable & pwrite;
  assign in_bank = (paddr >= ADDR_REGS) && (paddr < ADDR_REGS + 12'(4 * NUM_REGS))
                   && (paddr[1:0] == 2'b00);
  assign h_addr  = AW'((paddr - ADDR_REGS) >> 2);
  assign h_we    = wr & in_bank;
  assign h_wdata = pwdata[7:0];
  assign pready  = 1'b1;

  assign own_addr = scr_q[SCR_USE_HWADDR] ? hw_addr : scr_q[SCR_ADDR_LSB +: 7];
  assign idx16    = scr_q[SCR_IDX16];
  assign ccr_en   = ccr_q;
  assign intr     = |(ris_q & imsc_q);
  assign icr_clr  = (wr && paddr == ADDR_ICR) ? pwdata[NIRQ-1:0] : '0;

  always_comb begin
    prdata  = '0;
    pslverr = 1'b0;
    if (in_bank) begin
      prdata = {24'h0, h_rdata};
    end else begin
      unique case (paddr)
        ADDR_SCR:   prdata = {23'h0, scr_q};
        ADDR_CCR:   prdata = {31'h0, ccr_q};
        ADDR_CSR:   prdata = {index, 8'h00, slv_state, core_en, ext_en_sync, rw,
                              addressed, bus_busy};
        ADDR_IMSCR: prdata = 32'(imsc_q);
        ADDR_ICR:   prdata = 32'(ris_q);
        ADDR_MIS:   prdata = 32'(ris_q & imsc_q);
        default:    pslverr = psel & penable;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scr_q  <= SCR_RESET[8:0];
      ccr_q  <= 1'b0;
      imsc_q <= '0;
      ris_q  <= '0;
    end else begin
      if (wr && paddr == ADDR_SCR)   scr_q  <= pwdata[8:0];
      if (wr && paddr == ADDR_CCR)   ccr_q  <= pwdata[0];
      if (wr && paddr == ADDR_IMSCR) imsc_q <= pwdata[NIRQ-1:0];
      ris_q <= (ris_q & ~icr_clr) | irq_evt;
    end
  end

  // APB: the access phase always follows a selected set-up phase.
  a_apb_enable_needs_select: assert property (@(posedge clk) disable iff (!rst_n)
    penable |-> psel);
  a_apb_setup_first: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> penable);
endmodule
