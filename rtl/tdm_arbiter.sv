// tdm_arbiter - arbiter of the TDM bus that forms the cell switching fabric.
//
// Evaluated on every rising pclk. While no port holds the bus, the requesting
// port that comes first after the one served last (round robin, so no port gets
// the bus twice while another waits) is granted, but only if the 27 words of a
// cell can be sent before hclk falls: the grant is given at slot phase p only
// if p + CELL_WORDS + 2 <= HCLK_HIGH, so that the last word is on the bus
// before phase HCLK_HIGH. The arbiter grants both the data bus
// (csf_grant) and the destination bus (dest_grant), and releases them when the
// granted port drops its request. A user FIFO holds its request for the 27 words
// and then drops it for one pclk, so one cell takes 30 pclk and the bus carries
// 16 cells per 480-pclk hclk-high phase. This follows the switch description.
module tdm_arbiter
  import atm_pkg::*;
#(
  parameter int unsigned PORTS     = 8,
  parameter int unsigned HCLK_HIGH = 480
) (
  input  logic             pclk,
  input  logic             init,
  input  tmg_t             tmg,
  input  logic [PORTS-1:0] csf_request,
  output logic [PORTS-1:0] csf_grant,
  output logic [PORTS-1:0] dest_grant
);
  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1;
  logic [PW-1:0] last, pick, cur;
  logic          any, held, window;

  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int d = PORTS; d >= 1; d--) begin
      int unsigned p;
      p = (int'(last) + d) % PORTS;
      if (csf_request[p]) begin
        pick = PW'(p);
        any  = 1'b1;
      end
    end
  end

  assign window = tmg.hclk && (int'(tmg.phase) + CELL_WORDS + 2 <= HCLK_HIGH);

  always_ff @(posedge pclk) begin
    if (init) begin
      held <= 1'b0;
      cur  <= '0;
      last <= PW'(PORTS - 1);
    end else if (held) begin
      if (!csf_request[cur]) held <= 1'b0;
    end else if (any && window) begin
      held <= 1'b1;
      cur  <= pick;
      last <= pick;
    end
  end

  always_comb begin
    csf_grant = '0;
    if (held) csf_grant[cur] = 1'b1;
    dest_grant = csf_grant;
  end
endmodule
