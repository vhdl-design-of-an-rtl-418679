// serpar - serial-to-parallel payload buffer of an input port.
//
// While the cell sorter examines the header, serpar stores the 48-octet payload
// of the incoming serial cell; the header and HEC bits are skipped. It holds two
// buffers of 24 words of 16 bits and a chooser that alternates between them, so
// that the cell received in one slot can be read out early in the next slot while
// the following cell is being received. data_in is sampled on every pclk cycle
// with indicate high; the bit counter restarts with each cell slot.
//
// At the start of the slot after a complete 424-bit cell, d_flag is set. With
// d_ok high, one payload word per cycle is driven on d_out (zero otherwise, in
// place of a high-impedance bus). d_rst drops the flag and abandons the cell.
// The payload is packed sixteen bits per word, the first bit received in bit 15.
module serpar
  import atm_pkg::*;
(
  input  logic  pclk,
  input  logic  init,
  input  tmg_t  tmg,
  input  logic  indicate,
  input  logic  data_in,
  output logic  d_flag,
  input  logic  d_ok,
  input  logic  d_rst,
  output word_t d_out
);
  word_t       buffer [2][PAYLOAD_WORDS];
  logic        wsel, rsel;
  logic [8:0]  bitcnt;      // bits of the current cell received so far
  logic [8:0]  idx;         // index of the bit sampled in this cycle
  logic [14:0] sr;
  logic [4:0]  rword;
  logic [8:0]  pbit;

  assign idx   = tmg.rise ? 9'd0 : bitcnt;
  assign pbit  = idx - 9'(PAYLOAD_START);
  assign d_out = d_ok ? buffer[rsel][rword] : '0;

  always_ff @(posedge pclk) begin
    if (indicate && idx >= 9'(PAYLOAD_START) && idx < 9'(CELL_BITS)) begin
      sr <= {sr[13:0], data_in};
      if (pbit[3:0] == 4'hF) buffer[wsel][pbit[8:4]] <= {sr, data_in};
    end
  end

  always_ff @(posedge pclk) begin
    if (init) begin
      wsel   <= 1'b0;
      rsel   <= 1'b1;
      bitcnt <= '0;
      d_flag <= 1'b0;
      rword  <= '0;
    end else begin
      if (tmg.rise) begin
        bitcnt <= 9'(indicate);
        rword  <= '0;
        if (bitcnt == 9'(CELL_BITS)) begin
          d_flag <= 1'b1;
          rsel   <= wsel;
          wsel   <= ~wsel;
        end else begin
          d_flag <= 1'b0;
        end
      end else begin
        if (indicate && bitcnt < 9'(CELL_BITS)) bitcnt <= bitcnt + 9'd1;
        if (d_rst) begin
          d_flag <= 1'b0;
          rword  <= '0;
        end else if (d_ok) begin
          rword <= rword + 5'd1;
          if (rword == 5'(PAYLOAD_WORDS - 1)) d_flag <= 1'b0;
        end
      end
    end
  end
endmodule
