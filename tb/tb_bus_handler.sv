// tb_bus_handler - behavioural stand-in for the signalling or management
// processor in testbenches. It takes each cell an input port sends it over the
// shared bus (im_data, 27 words), remembers the port from the arbiter's address,
// and sends the cell back to the output port of the same number through the
// arbiter (cell_req, cell_grant) with om_data. Cells are kept in a queue.
module tb_bus_handler
  import atm_pkg::*;
#(
  parameter int unsigned PORT_W = 3
) (
  input  logic              pclk,
  input  logic              init,
  input  logic              im_data,
  input  word_t             im_bus,
  input  logic [PORT_W-1:0] address,
  output logic              cell_req,
  output logic [PORT_W-1:0] cell_address,
  input  logic              cell_grant,
  output logic              om_data,
  output word_t             om_bus,
  output int                received
);
  typedef struct {
    word_t             w [CELL_WORDS];
    logic [PORT_W-1:0] port;
  } hcell_t;

  hcell_t q [$];
  hcell_t cur;
  int     rk, sk;
  logic   sending;

  always @(posedge pclk) begin
    if (init) begin
      rk <= 0; sk <= 0; sending <= 1'b0; cell_req <= 1'b0; om_data <= 1'b0;
      om_bus <= '0; cell_address <= '0; received <= 0;
    end else begin
      if (im_data) begin
        cur.w[rk] = im_bus;
        if (rk == 0) cur.port = address;
        if (rk == CELL_WORDS - 1) begin
          q.push_back(cur);
          received <= received + 1;
          rk <= 0;
        end else rk <= rk + 1;
      end
      if (!cell_req && !sending && q.size() > 0) begin
        cell_req     <= 1'b1;
        cell_address <= q[0].port;
      end else if (cell_req && cell_grant && !sending && sk == 0) begin
        sending <= 1'b1;
        om_data <= 1'b1;
        om_bus  <= q[0].w[0];
        sk      <= 1;
      end else if (sending) begin
        if (sk == CELL_WORDS) begin
          sending  <= 1'b0;
          om_data  <= 1'b0;
          om_bus   <= '0;
          cell_req <= 1'b0;
          sk       <= 0;
          void'(q.pop_front());
        end else begin
          om_bus <= q[0].w[sk];
          sk     <= sk + 1;
        end
      end
    end
  end
endmodule
