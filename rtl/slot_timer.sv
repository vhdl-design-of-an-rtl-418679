// slot_timer - derives the cell clock (hclk) and the data clock (dclk) from pclk.
//
// The switch runs on one clock, pclk. One cell slot (one hclk period) is
// SLOT_PCLK pclk periods; hclk is high for the first HCLK_HIGH of them. dclk has
// a period of DCLK_DIV pclk periods and rises with hclk. The defaults, 512 pclk
// per slot with 480 of them high and dclk at a quarter of pclk, are the ones of
// the switch description. The other blocks do not use hclk and dclk as clocks:
// they act on the strobes of the tmg_t bundle, which mark the pclk cycle at
// which each edge occurs. hclk and dclk themselves are also brought out so that
// the physical layer can be synchronised to the cell slots.
module slot_timer
  import atm_pkg::*;
#(
  parameter int unsigned SLOT_PCLK = 512,
  parameter int unsigned HCLK_HIGH = 480,
  parameter int unsigned DCLK_DIV  = 4
) (
  input  logic pclk,
  input  logic init,
  output tmg_t tmg,
  output logic hclk,
  output logic dclk
);
  logic [9:0] phase;

  always_ff @(posedge pclk) begin
    if (init) phase <= '0;
    else if (phase == 10'(SLOT_PCLK - 1)) phase <= '0;
    else phase <= phase + 10'd1;
  end

  always_comb begin
    tmg.phase = phase;
    tmg.hclk  = phase < 10'(HCLK_HIGH);
    tmg.rise  = phase == 10'd0;
    tmg.fall  = phase == 10'(HCLK_HIGH);
    tmg.dtick = (phase % 10'(DCLK_DIV)) == 10'd0;
    hclk      = tmg.hclk;
    dclk      = (phase % 10'(DCLK_DIV)) < 10'(DCLK_DIV / 2);
  end
endmodule
