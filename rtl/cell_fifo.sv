// cell_fifo - a first-in first-out queue of whole cells, used by the input and
// output queues of the switch.
//
// A cell is written as CELL_WORDS consecutive words with wr_en high; the cell
// becomes visible (count, empty) after its last word. The writer must check
// full before it starts a cell. The head cell is read word by word through
// rd_word/rd_data (combinational read) and removed with a one-cycle pop.
module cell_fifo
  import atm_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       init,
  input  logic                       wr_en,
  input  word_t                      wr_data,
  input  logic [4:0]                 rd_word,
  output word_t                      rd_data,
  input  logic                       pop,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t         mem [DEPTH][CELL_WORDS];
  logic [AW-1:0] wptr, rptr;
  logic [4:0]    wword;
  logic          commit, do_pop;

  assign commit = wr_en && wword == 5'(CELL_WORDS - 1);
  assign do_pop = pop && !empty;
  assign full   = count == ($clog2(DEPTH+1))'(DEPTH);
  assign empty  = count == '0;
  assign rd_data = mem[rptr][rd_word];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr][wword] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      wptr  <= '0;
      rptr  <= '0;
      wword <= '0;
      count <= '0;
    end else begin
      if (wr_en) wword <= commit ? 5'd0 : wword + 5'd1;
      if (commit) wptr <= next_ptr(wptr);
      if (do_pop) rptr <= next_ptr(rptr);
      count <= count + ($clog2(DEPTH+1))'(commit) - ($clog2(DEPTH+1))'(do_pop);
    end
  end
endmodule
