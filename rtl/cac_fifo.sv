// cac_fifo - queue of signalling cells of an input port.
//
// Signalling cells that the cell sorter puts on sbus (stype ST_SIG) are queued
// whole. While a cell is queued, cac_request is high. When the signalling
// arbiter raises cac_grant with this port's number on cac_address, the head cell
// goes out on cac_bus, one word per pclk for 27 cycles, with cac_data high. The
// request then drops for one cycle so that the arbiter can release its grant
// and poll the other ports. When idle the bus is driven to zero, which stands for
// the high-impedance state of the shared bus. The queue depth is this design's
// choice.
module cac_fifo
  import atm_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned PORT_W = 3,
  parameter int unsigned PORT   = 0
) (
  input  logic              pclk,
  input  logic              init,
  input  word_t             sbus,
  input  stype_e            stype,
  input  logic              sdata,
  output logic              cac_request,
  input  logic              cac_grant,
  output logic              cac_data,
  input  logic [PORT_W-1:0] cac_address,
  output word_t             cac_bus
);
  logic       wr, in_cell, in_prev, acc, full, empty, sending, pause, last;
  logic [4:0] rk;
  word_t      rd;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  cell_fifo #(.DEPTH(DEPTH)) u_q (
    .clk(pclk), .init, .wr_en(wr), .wr_data(sbus), .rd_word(rk), .rd_data(rd),
    .pop(last), .full, .empty, .count(cnt)
  );

  // accept a whole cell when it starts and the queue has room
  assign in_cell = sdata && stype == ST_SIG;
  assign wr = in_cell && (in_prev ? acc : !full);
  assign last = sending && rk == 5'(CELL_WORDS - 1);

  always_ff @(posedge pclk) begin
    if (init) begin
      in_prev <= 1'b0;
      acc     <= 1'b0;
      sending <= 1'b0;
      pause   <= 1'b0;
      rk      <= '0;
    end else begin
      in_prev <= in_cell;
      if (in_cell && !in_prev) acc <= !full;
      pause  <= last;
      if (!sending && cac_request && cac_grant && cac_address == PORT_W'(PORT)) begin
        sending <= 1'b1;
        rk      <= '0;
      end else if (sending) begin
        rk <= last ? 5'd0 : rk + 5'd1;
        if (last) sending <= 1'b0;
      end
    end
  end

  assign cac_request = !empty && !pause;
  assign cac_data    = sending;
  assign cac_bus     = sending ? rd : '0;
endmodule
