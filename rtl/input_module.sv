// input_module - the input ports of the switch: one Sub Input Module per port.
//
// Each port gets its own SIM with its port number. The signalling bus and the
// management bus are shared by all ports: a SIM drives them only while it holds
// the grant and drives zeros otherwise, so the buses and their data flags are
// the OR of all ports (the resolved form of the shared, high-impedance bus).
// The fabric buses stay one per port.
module input_module
  import atm_pkg::*;
#(
  parameter int unsigned PORTS      = 8,
  parameter int unsigned PORT_W     = 3,
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned USER_DEPTH = 4,
  parameter int unsigned CAC_DEPTH  = 4,
  parameter int unsigned SLOT_PCLK  = 512
) (
  input  logic              pclk,
  input  logic              init,
  input  tmg_t              tmg,
  input  logic [PORTS-1:0]  indicate,
  input  logic [PORTS-1:0]  data_in,
  output logic [PORTS-1:0]  cac_request,
  input  logic              cac_grant,
  output logic              cac_data,
  input  logic [PORT_W-1:0] cac_address,
  output word_t             cac_bus,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address,
  output logic [PORTS-1:0]  csf_request,
  input  logic [PORTS-1:0]  csf_grant,
  input  logic [PORTS-1:0]  dest_grant,
  output logic [7:0]        csf_dest [PORTS],
  output word_t             csf_bus [PORTS],
  output logic [PORTS-1:0]  csf_valid,
  output word_t             ilmi_sbus [PORTS],
  output logic [3:0]        ilmi_stype [PORTS],
  output logic [PORTS-1:0]  ilmi_sdata,
  output word_t             sm_bus,
  input  logic [PORT_W-1:0] sm_address,
  output logic              sm_data,
  input  logic              sm_grant,
  output logic [PORTS-1:0]  sm_request,
  output logic [15:0]       lost_cells [PORTS],
  output logic [15:0]       oam_monitored [PORTS],
  output logic [15:0]       mc_copies [PORTS]
);
  logic [PORTS-1:0] p_cac_data, p_sm_data;
  word_t            p_cac_bus [PORTS];
  word_t            p_sm_bus [PORTS];

  for (genvar i = 0; i < PORTS; i++) begin : g_sim
    stype_e st;
    sim #(
      .PORT(i), .PORTS(PORTS), .PORT_W(PORT_W), .ENTRIES(ENTRIES),
      .USER_DEPTH(USER_DEPTH), .CAC_DEPTH(CAC_DEPTH), .SLOT_PCLK(SLOT_PCLK)
    ) u_sim (
      .pclk, .init, .tmg, .indicate(indicate[i]), .data_in(data_in[i]),
      .cac_request(cac_request[i]), .cac_grant, .cac_data(p_cac_data[i]), .cac_address,
      .cac_bus(p_cac_bus[i]), .signal_control, .signal_address,
      .csf_request(csf_request[i]), .csf_grant(csf_grant[i]), .dest_grant(dest_grant[i]),
      .csf_dest(csf_dest[i]), .csf_bus(csf_bus[i]), .csf_valid(csf_valid[i]),
      .ilmi_sbus(ilmi_sbus[i]), .ilmi_stype(st), .ilmi_sdata(ilmi_sdata[i]),
      .sm_bus(p_sm_bus[i]), .sm_address, .sm_data(p_sm_data[i]), .sm_grant,
      .sm_request(sm_request[i]), .lost_cells(lost_cells[i]),
      .oam_monitored(oam_monitored[i]), .mc_copies(mc_copies[i])
    );
    assign ilmi_stype[i] = st;
  end

  always_comb begin
    cac_bus  = '0;
    sm_bus   = '0;
    cac_data = |p_cac_data;
    sm_data  = |p_sm_data;
    for (int i = 0; i < PORTS; i++) begin
      cac_bus |= p_cac_bus[i];
      sm_bus  |= p_sm_bus[i];
    end
  end
endmodule
