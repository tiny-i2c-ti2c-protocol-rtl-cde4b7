// ti2c_ea_sync: enable synchroniser of the TI2C slave (Ea-sync).
//
// The slave core runs only when both the CCR enable bit (written over APB) and the external
// asynchronous enable pin are set. The pin is passed through a two-flip-flop synchroniser;
// the result is ANDed with the CCR bit and registered once more, so `core_en` changes two to
// three cycles after the pin and one cycle after the CCR bit. The synchronised pin is also
// returned for the status register. The block's name and its link to the CCR enable are the
// document's; the two-flop structure and the extra pin are this design's reading of it.
module ti2c_ea_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic ext_en_async,  // external enable, asynchronous to clk
  input  logic ccr_en,        // CCR enable bit
  output logic ext_en_sync,   // synchronised external enable
  output logic core_en        // enable for the slave core
);
  logic meta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q      <= 1'b0;
      ext_en_sync <= 1'b0;
      core_en     <= 1'b0;
    end else begin
      meta_q      <= ext_en_async;
      ext_en_sync <= meta_q;
      core_en     <= ext_en_sync & ccr_en;
    end
  end
endmodule
