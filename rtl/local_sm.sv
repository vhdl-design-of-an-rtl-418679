// local_sm - local management unit of an input port (its hardware part).
//
// It takes the OAM cells that end at this switch (stype ST_LSM_OAM) and the
// headers that failed the table search (ST_LSM_ERR, header words only; the
// payload is padded with zeros) into a small queue, and forwards them to the
// global system management processor over the shared management bus: sm_request
// while a cell is queued; after sm_grant with this port on sm_address, 27 words
// on sm_bus with sm_data high, then the request drops for one pclk. Passing OAM
// cells that are monitored here (ST_OAM_MON) are counted in oam_monitored.
// The connectivity-verification and alarm processing itself is software and is
// not part of this block; so is the insertion of new cells into the user FIFO.
// The queue depth and the zero padding are this design's choices.
module local_sm
  import atm_pkg::*;
#(
  parameter int unsigned DEPTH  = 2,
  parameter int unsigned PORT_W = 3,
  parameter int unsigned PORT   = 0
) (
  input  logic              pclk,
  input  logic              init,
  input  word_t             sbus,
  input  stype_e            stype,
  input  logic              sdata,
  output word_t             sm_bus,
  input  logic [PORT_W-1:0] sm_address,
  output logic              sm_data,
  input  logic              sm_grant,
  output logic              sm_request,
  output logic [15:0]       oam_monitored
);
  logic       wr, acc, in_prev, full, empty, sending, pause, last, start, wact, isoam;
  logic [4:0] wk, rk;
  word_t      wd, rd;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  cell_fifo #(.DEPTH(DEPTH)) u_q (
    .clk(pclk), .init, .wr_en(wr), .wr_data(wd), .rd_word(rk), .rd_data(rd),
    .pop(last), .full, .empty, .count(cnt)
  );

  assign start = sdata && !in_prev && stype inside {ST_LSM_OAM, ST_LSM_ERR};
  // a whole cell is written from its start: sbus words while they come, then zeros
  assign wr    = (start && !full) || (wact && acc);
  assign wd    = (start || (wact && isoam) || (wact && wk < 5'(HDR_WORDS))) ? sbus : '0;
  assign last  = sending && rk == 5'(CELL_WORDS - 1);

  always_ff @(posedge pclk) begin
    if (init) begin
      in_prev       <= 1'b0;
      acc           <= 1'b0;
      wact          <= 1'b0;
      isoam         <= 1'b0;
      wk            <= '0;
      sending       <= 1'b0;
      pause         <= 1'b0;
      rk            <= '0;
      oam_monitored <= '0;
    end else begin
      in_prev <= sdata;
      pause   <= last;
      if (sdata && !in_prev && stype == ST_OAM_MON) oam_monitored <= oam_monitored + 16'd1;
      if (start) begin
        wact  <= 1'b1;
        acc   <= !full;
        isoam <= stype == ST_LSM_OAM;
        wk    <= 5'd1;
      end else if (wact) begin
        wk <= wk + 5'd1;
        if (wk == 5'(CELL_WORDS - 1)) wact <= 1'b0;
      end
      if (!sending && sm_request && sm_grant && sm_address == PORT_W'(PORT)) begin
        sending <= 1'b1;
        rk      <= '0;
      end else if (sending) begin
        rk <= last ? 5'd0 : rk + 5'd1;
        if (last) sending <= 1'b0;
      end
    end
  end

  assign sm_request = !empty && !pause;
  assign sm_data    = sending;
  assign sm_bus     = sending ? rd : '0;
endmodule
