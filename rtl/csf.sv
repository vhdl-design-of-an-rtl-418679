// csf - cell switching fabric: a TDM bus shared by all ports.
//
// The user FIFOs of all input ports request the bus; the TDM bus arbiter grants
// one at a time. The granted port's cell words, its routing tag and its valid
// flag are put on one common bus (an AND-OR selection that stands for the
// wired, high-impedance bus) which is broadcast to every output port; each
// output port takes the cells whose routing tag names it. Up to 16 cells cross
// the bus per cell slot.
module csf
  import atm_pkg::*;
#(
  parameter int unsigned PORTS     = 8,
  parameter int unsigned HCLK_HIGH = 480
) (
  input  logic             pclk,
  input  logic             init,
  input  tmg_t             tmg,
  input  logic [PORTS-1:0] csf_request,
  output logic [PORTS-1:0] csf_grant,
  output logic [PORTS-1:0] dest_grant,
  input  logic [7:0]       csf_dest [PORTS],
  input  word_t            csf_bus_in [PORTS],
  input  logic [PORTS-1:0] csf_valid_in,
  output logic [7:0]       csf_dest_out,
  output word_t            csf_bus_out,
  output logic             csf_valid_out
);
  tdm_arbiter #(.PORTS(PORTS), .HCLK_HIGH(HCLK_HIGH)) u_arb (
    .pclk, .init, .tmg, .csf_request, .csf_grant, .dest_grant
  );

  always_comb begin
    csf_dest_out  = '0;
    csf_bus_out   = '0;
    csf_valid_out = 1'b0;
    for (int i = 0; i < PORTS; i++) begin
      if (csf_grant[i]) begin
        csf_bus_out   |= csf_bus_in[i];
        csf_valid_out |= csf_valid_in[i];
      end
      if (dest_grant[i]) csf_dest_out |= csf_dest[i];
    end
  end
endmodule
