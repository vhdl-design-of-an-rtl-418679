// scheduler - priority scheduler of an output port.
//
// On a rising edge of the physical layer's request line (sampled on pclk) the
// scheduler polls the occupancy flags of the queues and, for one pclk, grants the
// queue with the highest priority: signalling first, then management, then ILMI,
// then the user classes from 7 down to 0. If every queue is empty it asks for an
// unassigned cell. The scheduler only sees flags, so it is independent of how
// the buffers are built. Polling on the request edge, the one-hot grants and the
// unassigned cell follow the switch description, as does the order of the user
// classes (a class-3 cell goes before a class-1 cell); the order of the
// signalling, management and ILMI queues is this design's choice.
module scheduler #(
  parameter int unsigned CLASSES = 8
) (
  input  logic               pclk,
  input  logic               init,
  input  logic               cac_flag,
  input  logic [CLASSES-1:0] user_flags,
  input  logic               ilmi_flag,
  input  logic               sm_flag,
  output logic               cac_grant,
  output logic [CLASSES-1:0] user_grants,
  output logic               ilmi_grant,
  output logic               sm_grant,
  output logic               unassigned,
  input  logic               request
);
  logic req_q;

  always_ff @(posedge pclk) begin
    if (init) begin
      req_q       <= 1'b0;
      cac_grant   <= 1'b0;
      sm_grant    <= 1'b0;
      ilmi_grant  <= 1'b0;
      user_grants <= '0;
      unassigned  <= 1'b0;
    end else begin
      req_q       <= request;
      cac_grant   <= 1'b0;
      sm_grant    <= 1'b0;
      ilmi_grant  <= 1'b0;
      user_grants <= '0;
      unassigned  <= 1'b0;
      if (request && !req_q) begin
        if (cac_flag) cac_grant <= 1'b1;
        else if (sm_flag) sm_grant <= 1'b1;
        else if (ilmi_flag) ilmi_grant <= 1'b1;
        else if (user_flags != '0) begin
          for (int c = 0; c < CLASSES; c++)
            if (user_flags[c]) user_grants <= CLASSES'(1) << c;
        end else unassigned <= 1'b1;
      end
    end
  end
endmodule
