// output_module - the output ports of the switch: one Sub Output Module per port.
//
// The cells of the signalling and management processors reach every port over
// their shared buses together with a port address; the grant lines of the ports
// are combined into one resolved grant for each bus. The TDM fabric bus is
// broadcast to all ports, each of which keeps the cells addressed to it. The ILMI
// connections are one per port.
module output_module
  import atm_pkg::*;
#(
  parameter int unsigned PORTS     = 8,
  parameter int unsigned PORT_W    = 3,
  parameter int unsigned UBUF      = 64,
  parameter int unsigned CLASSES   = 8,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned CLASS_MAX = 64
) (
  input  logic              pclk,
  input  logic              init,
  input  logic              cac_request,
  output logic              cac_grant,
  input  logic              cac_data,
  input  logic [PORT_W-1:0] cac_address,
  input  word_t             cac_bus,
  input  logic [7:0]        csf_dest,
  input  word_t             csf_bus,
  input  logic              csf_valid,
  input  logic [PORTS-1:0]  ilmi_request,
  output logic [PORTS-1:0]  ilmi_grant,
  input  logic [PORTS-1:0]  ilmi_data,
  input  word_t             ilmi_bus [PORTS],
  input  word_t             sm_bus,
  input  logic [PORT_W-1:0] sm_address,
  input  logic              sm_data,
  output logic              sm_grant,
  input  logic              sm_request,
  input  logic [$clog2(UBUF+1)-1:0] clp_threshold,
  input  logic [PORTS-1:0]  request,
  output logic [PORTS-1:0]  data_out,
  output logic [PORTS-1:0]  dout_flag,
  output logic [15:0]       clp_discards [PORTS],
  output logic [15:0]       overflow_discards [PORTS]
);
  logic [PORTS-1:0] p_cac_grant, p_sm_grant;

  for (genvar i = 0; i < PORTS; i++) begin : g_som
    logic [CLASSES-1:0] flags;
    som #(
      .PORT(i), .PORT_W(PORT_W), .UBUF(UBUF), .CLASSES(CLASSES), .QDEPTH(QDEPTH),
      .CLASS_MAX(CLASS_MAX)
    ) u_som (
      .pclk, .init, .cac_request, .cac_grant(p_cac_grant[i]), .cac_data, .cac_address,
      .cac_bus, .csf_dest, .csf_bus, .csf_valid,
      .ilmi_request(ilmi_request[i]), .ilmi_grant(ilmi_grant[i]), .ilmi_data(ilmi_data[i]),
      .ilmi_bus(ilmi_bus[i]), .sm_bus, .sm_address, .sm_data, .sm_grant(p_sm_grant[i]),
      .sm_request, .clp_threshold, .request(request[i]), .data_out(data_out[i]),
      .dout_flag(dout_flag[i]), .user_flags(flags), .clp_discards(clp_discards[i]),
      .overflow_discards(overflow_discards[i])
    );
  end

  assign cac_grant = |p_cac_grant;
  assign sm_grant  = |p_sm_grant;
endmodule
