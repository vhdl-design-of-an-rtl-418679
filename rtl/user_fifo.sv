// user_fifo - queue of the cells an input port sends through the switching fabric.
//
// It takes user cells and passing OAM cells from the cell sorter (stype
// ST_USER, ST_OAM_PASS, ST_OAM_MON with sdata) and the copies of the multicast
// unit (mc_data). buff_full tells the cell sorter not to start another cell.
// While a cell is queued csf_request is high. After csf_grant the head cell is
// sent on csf_bus, one word per pclk for 27 cycles, with csf_valid high, and its
// routing tag is held on csf_dest while dest_grant is high. After the last word
// the request drops for one pclk so that the TDM bus arbiter can serve the other
// ports. Idle outputs are zero, standing for high impedance. The depth is this
// design's choice; the csf_valid flag replaces the non-high-impedance state of
// the bus.
module user_fifo
  import atm_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   pclk,
  input  logic   init,
  output logic   buff_full,
  input  word_t  sbus,
  input  stype_e stype,
  input  logic   sdata,
  input  logic   mc_data,
  output logic   csf_request,
  input  logic   csf_grant,
  input  logic   dest_grant,
  output logic [7:0] csf_dest,
  output word_t  csf_bus,
  output logic   csf_valid
);
  logic       wr, in_cell, in_prev, acc, full, empty, sending, pause, last;
  logic [4:0] rk;
  word_t      rd, head0;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  cell_fifo #(.DEPTH(DEPTH)) u_q (
    .clk(pclk), .init, .wr_en(wr), .wr_data(sbus), .rd_word(rk), .rd_data(rd),
    .pop(last), .full, .empty, .count(cnt)
  );

  assign in_cell = (sdata && stype inside {ST_USER, ST_OAM_PASS, ST_OAM_MON}) || mc_data;
  assign wr = in_cell && (in_prev ? acc : !full);
  assign last = sending && rk == 5'(CELL_WORDS - 1);
  assign buff_full = full;

  always_ff @(posedge pclk) begin
    if (init) begin
      in_prev <= 1'b0;
      acc     <= 1'b0;
      sending <= 1'b0;
      pause   <= 1'b0;
      rk      <= '0;
      head0   <= '0;
    end else begin
      in_prev <= in_cell;
      if (in_cell && !in_prev) acc <= !full;
      pause  <= last;
      if (!sending && csf_request && csf_grant) begin
        sending <= 1'b1;
        rk      <= '0;
        head0   <= rd;   // rk is 0 while idle: word 0 carries the routing tag
      end else if (sending) begin
        rk <= last ? 5'd0 : rk + 5'd1;
        if (last) sending <= 1'b0;
      end
    end
  end

  assign csf_request = !empty && !pause;
  assign csf_valid   = sending;
  assign csf_bus     = sending ? rd : '0;
  assign csf_dest    = (sending && dest_grant) ? head0[15:8] : '0;
endmodule
