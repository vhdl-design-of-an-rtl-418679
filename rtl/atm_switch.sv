// atm_switch - ATM layer switch with a TDM bus fabric and input/output buffering.
//
// Cells enter bit-serially from the physical layer of each port (data_in, one
// bit per pclk while indicate is high, within the high phase of hclk) and leave
// bit-serially (data_out with dout_flag, 424 bits, shortly after each rise of
// the port's request line). Inside, the switch is built from five parts:
//   input_module   one Sub Input Module per port: header discrimination,
//                  route table CAM, traffic policing, multicast, and the queues
//                  towards the fabric, the signalling and the management buses;
//   csf            the cell switching fabric, a TDM bus for up to 16 cells per slot;
//   cac arbiter    arbitration of the signalling bus (bus_arbiter);
//   sm arbiter     arbitration of the management bus (bus_arbiter);
//   output_module  one Sub Output Module per port: dedicated signalling,
//                  management and ILMI queues, a 64-cell buffer shared by eight
//                  priority classes, and the priority scheduler.
// The signalling (CAC) processor, the system management processor and the ILMI
// agents are software; their connections are ports of this module:
//   cac_*: cells from the input ports (cac_im_bus, cac_im_data, with the port on
//     cac_address), the processor's write request (cac_cell_req, cac_cell_address,
//     cac_cell_grant) and its cells to the output ports (cac_om_data, cac_om_bus);
//     signal_control/signal_address write the route, multicast and traffic tables.
//   sm_*: the same for the management processor.
//   ilmi_*: per port, the sorted cell stream (ilmi_sbus, ilmi_stype, ilmi_sdata
//     marks ILMI cells) and the request/grant write path into the output port.
// One clock, pclk, runs everything; hclk (512 pclk per cell slot, 480 of them
// high) and dclk (pclk/4) are derived from it and brought out for the physical
// layer. init resets the tables and every queue. An uncongested cell leaves the
// switch in the third cell slot after the one in which it arrived.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned PORTS      = 8,
  parameter int unsigned PORT_W     = 3,
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned USER_DEPTH = 4,
  parameter int unsigned CAC_DEPTH  = 4,
  parameter int unsigned UBUF       = 64,
  parameter int unsigned CLASSES    = 8,
  parameter int unsigned QDEPTH     = 8,
  parameter int unsigned CLASS_MAX  = 64,
  parameter int unsigned SLOT_PCLK  = 512,
  parameter int unsigned HCLK_HIGH  = 480,
  parameter int unsigned DCLK_DIV   = 4
) (
  input  logic              pclk,
  input  logic              init,
  output logic              hclk,
  output logic              dclk,
  // physical layer
  input  logic [PORTS-1:0]  indicate,
  input  logic [PORTS-1:0]  data_in,
  input  logic [PORTS-1:0]  request,
  output logic [PORTS-1:0]  data_out,
  output logic [PORTS-1:0]  dout_flag,
  // signalling processor
  output word_t             cac_im_bus,
  output logic              cac_im_data,
  output logic [PORT_W-1:0] cac_address,
  input  logic              cac_cell_req,
  input  logic [PORT_W-1:0] cac_cell_address,
  output logic              cac_cell_grant,
  input  logic              cac_om_data,
  input  word_t             cac_om_bus,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address,
  // management processor
  output word_t             sm_im_bus,
  output logic              sm_im_data,
  output logic [PORT_W-1:0] sm_address,
  input  logic              sm_cell_req,
  input  logic [PORT_W-1:0] sm_cell_address,
  output logic              sm_cell_grant,
  input  logic              sm_om_data,
  input  word_t             sm_om_bus,
  // ILMI agents
  output word_t             ilmi_sbus [PORTS],
  output logic [3:0]        ilmi_stype [PORTS],
  output logic [PORTS-1:0]  ilmi_sdata,
  input  logic [PORTS-1:0]  ilmi_request,
  output logic [PORTS-1:0]  ilmi_grant,
  input  logic [PORTS-1:0]  ilmi_data,
  input  word_t             ilmi_bus [PORTS],
  // selective discard threshold of the shared output buffers
  input  logic [$clog2(UBUF+1)-1:0] clp_threshold,
  // statistics
  output logic [15:0]       lost_cells [PORTS],
  output logic [15:0]       oam_monitored [PORTS],
  output logic [15:0]       mc_copies [PORTS],
  output logic [15:0]       clp_discards [PORTS],
  output logic [15:0]       overflow_discards [PORTS]
);
  tmg_t             tmg;
  logic [PORTS-1:0] cac_req_im, sm_req_im, csf_request, csf_grant, dest_grant, csf_valid;
  logic [7:0]       csf_dest [PORTS];
  word_t            csf_bus [PORTS];
  logic [7:0]       fab_dest;
  word_t            fab_bus;
  logic             fab_valid;
  logic             cac_grant_im, sm_grant_im, cac_wreq, sm_wreq, cac_wgrant, sm_wgrant;

  slot_timer #(.SLOT_PCLK(SLOT_PCLK), .HCLK_HIGH(HCLK_HIGH), .DCLK_DIV(DCLK_DIV)) u_timer (
    .pclk, .init, .tmg, .hclk, .dclk
  );

  input_module #(
    .PORTS(PORTS), .PORT_W(PORT_W), .ENTRIES(ENTRIES), .USER_DEPTH(USER_DEPTH),
    .CAC_DEPTH(CAC_DEPTH), .SLOT_PCLK(SLOT_PCLK)
  ) u_im (
    .pclk, .init, .tmg, .indicate, .data_in,
    .cac_request(cac_req_im), .cac_grant(cac_grant_im), .cac_data(cac_im_data),
    .cac_address, .cac_bus(cac_im_bus), .signal_control, .signal_address,
    .csf_request, .csf_grant, .dest_grant, .csf_dest, .csf_bus, .csf_valid,
    .ilmi_sbus, .ilmi_stype, .ilmi_sdata,
    .sm_bus(sm_im_bus), .sm_address, .sm_data(sm_im_data), .sm_grant(sm_grant_im),
    .sm_request(sm_req_im), .lost_cells, .oam_monitored, .mc_copies
  );

  csf #(.PORTS(PORTS), .HCLK_HIGH(HCLK_HIGH)) u_csf (
    .pclk, .init, .tmg, .csf_request, .csf_grant, .dest_grant, .csf_dest,
    .csf_bus_in(csf_bus), .csf_valid_in(csf_valid), .csf_dest_out(fab_dest),
    .csf_bus_out(fab_bus), .csf_valid_out(fab_valid)
  );

  bus_arbiter #(.PORTS(PORTS), .PORT_W(PORT_W)) u_cac_arb (
    .pclk, .init, .request(cac_req_im), .grant(cac_grant_im), .address(cac_address),
    .write_req(cac_wreq), .write_grant(cac_wgrant), .cell_address(cac_cell_address),
    .cell_req(cac_cell_req), .cell_grant(cac_cell_grant)
  );

  bus_arbiter #(.PORTS(PORTS), .PORT_W(PORT_W)) u_sm_arb (
    .pclk, .init, .request(sm_req_im), .grant(sm_grant_im), .address(sm_address),
    .write_req(sm_wreq), .write_grant(sm_wgrant), .cell_address(sm_cell_address),
    .cell_req(sm_cell_req), .cell_grant(sm_cell_grant)
  );

  output_module #(
    .PORTS(PORTS), .PORT_W(PORT_W), .UBUF(UBUF), .CLASSES(CLASSES), .QDEPTH(QDEPTH),
    .CLASS_MAX(CLASS_MAX)
  ) u_om (
    .pclk, .init, .cac_request(cac_wreq), .cac_grant(cac_wgrant), .cac_data(cac_om_data),
    .cac_address, .cac_bus(cac_om_bus), .csf_dest(fab_dest), .csf_bus(fab_bus),
    .csf_valid(fab_valid), .ilmi_request, .ilmi_grant, .ilmi_data, .ilmi_bus,
    .sm_bus(sm_om_bus), .sm_address, .sm_data(sm_om_data), .sm_grant(sm_wgrant),
    .sm_request(sm_wreq), .clp_threshold, .request, .data_out, .dout_flag,
    .clp_discards, .overflow_discards
  );
endmodule
