// som - Sub Output Module: the queues and the scheduler of one output port.
//
// The priority_buffer holds the cells that arrive from the signalling processor,
// the management processor, the ILMI agent of the same port and the switching
// fabric; the scheduler picks, at each request of the physical layer, the queue
// whose head cell is sent next, or an unassigned cell. The cell then leaves
// bit-serially on data_out with dout_flag high, 424 pclk cycles starting two
// cycles after the request rises.
module som
  import atm_pkg::*;
#(
  parameter int unsigned PORT      = 0,
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
  input  logic              ilmi_request,
  output logic              ilmi_grant,
  input  logic              ilmi_data,
  input  word_t             ilmi_bus,
  input  word_t             sm_bus,
  input  logic [PORT_W-1:0] sm_address,
  input  logic              sm_data,
  output logic              sm_grant,
  input  logic              sm_request,
  input  logic [$clog2(UBUF+1)-1:0] clp_threshold,
  input  logic              request,
  output logic              data_out,
  output logic              dout_flag,
  output logic [CLASSES-1:0] user_flags,
  output logic [15:0]       clp_discards,
  output logic [15:0]       overflow_discards
);
  logic               cac_flag, ilmi_flag, sm_flag;
  logic               cacq_grant, ilmiq_grant, smq_grant, unassigned;
  logic [CLASSES-1:0] userq_grants;

  priority_buffer #(
    .PORT(PORT), .PORT_W(PORT_W), .UBUF(UBUF), .CLASSES(CLASSES), .QDEPTH(QDEPTH),
    .CLASS_MAX(CLASS_MAX)
  ) u_prio (
    .pclk, .init, .cac_request, .cac_grant, .cac_data, .cac_address, .cac_bus,
    .csf_dest, .csf_bus, .csf_valid, .ilmi_request, .ilmi_grant, .ilmi_data, .ilmi_bus,
    .sm_bus, .sm_address, .sm_data, .sm_grant, .sm_request, .clp_threshold,
    .cac_flag, .user_flags, .ilmi_flag, .sm_flag,
    .cacq_grant, .userq_grants, .ilmiq_grant, .smq_grant, .unassigned,
    .data_out, .dout_flag, .clp_discards, .overflow_discards
  );

  scheduler #(.CLASSES(CLASSES)) u_sched (
    .pclk, .init, .cac_flag, .user_flags, .ilmi_flag, .sm_flag,
    .cac_grant(cacq_grant), .user_grants(userq_grants), .ilmi_grant(ilmiq_grant),
    .sm_grant(smq_grant), .unassigned, .request
  );
endmodule
