// bus_arbiter - arbiter of a shared cell bus (signalling bus or management bus).
//
// The same arbiter serves the connection admission control and the system
// management. It is evaluated on every pclk edge. A write request of its
// handler (cell_req, with the output port on cell_address) has priority: the
// arbiter raises write_req with that port on address; when the output port
// answers with write_grant the handler gets cell_grant and sends its cell. Both
// drop when cell_req is removed. Without a handler request, the request lines of
// the input ports are polled round robin, starting after the port served last;
// grant is raised with the chosen port on address, and is removed when that
// port removes its request. This behaviour follows the switch description.
module bus_arbiter #(
  parameter int unsigned PORTS  = 8,
  parameter int unsigned PORT_W = 3
) (
  input  logic              pclk,
  input  logic              init,
  input  logic [PORTS-1:0]  request,
  output logic              grant,
  output logic [PORT_W-1:0] address,
  output logic              write_req,
  input  logic              write_grant,
  input  logic [PORT_W-1:0] cell_address,
  input  logic              cell_req,
  output logic              cell_grant
);
  typedef enum logic [1:0] {A_IDLE, A_WRITE, A_GRANT} ast_e;
  ast_e              st;
  logic [PORT_W-1:0] last, pick;
  logic              any;

  // round robin: first requesting port after the last one served
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int d = PORTS; d >= 1; d--) begin
      int unsigned p;
      p = (int'(last) + d) % PORTS;
      if (request[p]) begin
        pick = PORT_W'(p);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge pclk) begin
    if (init) begin
      st         <= A_IDLE;
      last       <= PORT_W'(PORTS - 1);
      address    <= '0;
      grant      <= 1'b0;
      write_req  <= 1'b0;
      cell_grant <= 1'b0;
    end else begin
      case (st)
        A_IDLE: begin
          if (cell_req) begin
            write_req <= 1'b1;
            address   <= cell_address;
            st        <= A_WRITE;
          end else if (any) begin
            grant   <= 1'b1;
            address <= pick;
            last    <= pick;
            st      <= A_GRANT;
          end
        end
        A_WRITE: begin
          if (!cell_req) begin
            write_req  <= 1'b0;
            cell_grant <= 1'b0;
            st         <= A_IDLE;
          end else if (write_grant) cell_grant <= 1'b1;
        end
        default: begin
          if (!request[address]) begin
            grant <= 1'b0;
            st    <= A_IDLE;
          end
        end
      endcase
    end
  end
endmodule
