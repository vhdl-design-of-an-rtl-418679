// sim - Sub Input Module: the processing of one input port.
//
// The serial cell from the physical layer (data_in, one bit per pclk while
// indicate is high, within the high phase of one hclk period) is read at once by
// serpar, which keeps the payload, and by the cell sorter, which decides from
// the header, with the route table and the traffic policer, where the cell goes.
// In the next cell slot the sorter hands the cell to one of its outputs on the
// internal sbus:
//   cac_fifo   signalling cells, read by the signalling arbiter over cac_bus;
//   user_fifo  user and passing OAM cells, sent through the switching fabric;
//   multicast  cells to replicate, whose copies go back into the user FIFO;
//   local_sm   OAM cells ending here and errored headers, forwarded over sm_bus;
//   ILMI       cells for the ILMI agent, a software processor outside this
//              module that watches sbus/stype/sdata (ilmi_* outputs).
// The route, multicast and traffic tables are written through signal_control and
// signal_address. Each port has a fixed number PORT, used on the shared buses.
module sim
  import atm_pkg::*;
#(
  parameter int unsigned PORT          = 0,
  parameter int unsigned PORTS         = 8,
  parameter int unsigned PORT_W        = 3,
  parameter int unsigned ENTRIES       = 16,
  parameter int unsigned USER_DEPTH    = 4,
  parameter int unsigned CAC_DEPTH     = 4,
  parameter int unsigned SLOT_PCLK     = 512
) (
  input  logic              pclk,
  input  logic              init,
  input  tmg_t              tmg,
  input  logic              indicate,
  input  logic              data_in,
  output logic              cac_request,
  input  logic              cac_grant,
  output logic              cac_data,
  input  logic [PORT_W-1:0] cac_address,
  output word_t             cac_bus,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address,
  output logic              csf_request,
  input  logic              csf_grant,
  input  logic              dest_grant,
  output logic [7:0]        csf_dest,
  output word_t             csf_bus,
  output logic              csf_valid,
  output word_t             ilmi_sbus,
  output stype_e            ilmi_stype,
  output logic              ilmi_sdata,
  output word_t             sm_bus,
  input  logic [PORT_W-1:0] sm_address,
  output logic              sm_data,
  input  logic              sm_grant,
  output logic              sm_request,
  output logic [15:0]       lost_cells,
  output logic [15:0]       oam_monitored,
  output logic [15:0]       mc_copies
);
  logic        d_flag, d_ok, d_rst;
  word_t       d_out;
  logic        table_request, table_grant, table_data, table_flag, table_done;
  word_t       table_wbus, table_rbus;
  tbl_status_e table_status;
  traffic_e    traffic_status;
  logic        buff_full, mc_request, mc_grant, mc_data, mc_busy;
  word_t       mc_bus, sbus;
  logic        sdata;
  stype_e      stype;

  serpar u_serpar (
    .pclk, .init, .tmg, .indicate, .data_in, .d_flag, .d_ok, .d_rst, .d_out
  );

  cell_sort #(.SLOT_PCLK(SLOT_PCLK)) u_sort (
    .pclk, .init, .tmg, .indicate, .data_in, .traffic(traffic_status),
    .d_flag, .d_ok, .d_rst, .d_out,
    .table_request, .table_grant, .table_data, .table_wbus, .table_rbus, .table_flag,
    .table_done, .table_status, .buff_full,
    .mc_request, .mc_grant, .mc_busy, .mc_bus,
    .sdata, .stype, .sbus, .lost_cells
  );

  route_table #(.ENTRIES(ENTRIES), .PORT_W(PORT_W), .PORT(PORT)) u_route (
    .pclk, .init, .tmg, .table_request, .table_grant, .table_data, .table_wbus,
    .table_rbus, .table_done, .table_status, .signal_control, .signal_address
  );

  traffic #(.ENTRIES(ENTRIES), .PORT_W(PORT_W), .PORT(PORT)) u_traffic (
    .pclk, .init, .tmg, .signal_control, .signal_address, .table_data,
    .table_bus(table_wbus), .table_flag, .traffic_status
  );

  cac_fifo #(.DEPTH(CAC_DEPTH), .PORT_W(PORT_W), .PORT(PORT)) u_cac (
    .pclk, .init, .sbus, .stype, .sdata, .cac_request, .cac_grant, .cac_data,
    .cac_address, .cac_bus
  );

  user_fifo #(.DEPTH(USER_DEPTH)) u_user (
    .pclk, .init, .buff_full, .sbus, .stype, .sdata, .mc_data,
    .csf_request, .csf_grant, .dest_grant, .csf_dest, .csf_bus, .csf_valid
  );

  multicast #(.ENTRIES(ENTRIES), .PORTS(PORTS), .PORT_W(PORT_W), .PORT(PORT)) u_mc (
    .pclk, .init, .bus_request(mc_request), .bus_grant(mc_grant), .bus_data(mc_data),
    .mc_bus, .sbus, .stype, .sdata, .signal_control, .signal_address, .busy(mc_busy),
    .copies_sent(mc_copies)
  );

  local_sm #(.PORT_W(PORT_W), .PORT(PORT)) u_lsm (
    .pclk, .init, .sbus, .stype, .sdata, .sm_bus, .sm_address, .sm_data, .sm_grant,
    .sm_request, .oam_monitored
  );

  assign ilmi_sbus  = sbus;
  assign ilmi_stype = stype;
  assign ilmi_sdata = sdata && stype == ST_ILMI;
endmodule
