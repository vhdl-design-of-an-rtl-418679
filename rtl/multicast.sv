// multicast - cell replication unit of an input port.
//
// A user cell that the route table reported as multicast reaches this unit on
// sbus (stype ST_MCAST): its header is kept and its payload stored. The unit
// holds its own copy of the route table CAM (loaded with the same commands) and
// searches it for every outgoing connection of the cell: the entries whose
// GFC/VPI/VCI equal the cell's (VC multicast) or, when there are none, the
// entries with the cell's GFC/VPI and zero incoming VCI (VP multicast, the old
// VCI is kept). For each of them, up to PORTS copies, it requests the sbus from
// the cell sorter (bus_request), and once bus_grant arrives sends the copy, with
// its new header and routing tag, as 27 words with bus_data high, so that the
// user FIFO queues it. Between copies the request drops for one pclk. busy tells
// the cell sorter that a new multicast cell cannot be taken. Replication from the
// same CAM, the request/grant/send loop and the limit of one copy per output port
// follow the switch description; the single cell buffer is this design's choice.
module multicast
  import atm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PORTS   = 8,
  parameter int unsigned PORT_W  = 3,
  parameter int unsigned PORT    = 0
) (
  input  logic              pclk,
  input  logic              init,
  output logic              bus_request,
  input  logic              bus_grant,
  output logic              bus_data,
  output word_t             mc_bus,
  input  word_t             sbus,
  input  stype_e            stype,
  input  logic              sdata,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address,
  output logic              busy,
  output logic [15:0]       copies_sent
);
  typedef enum logic [2:0] {M_IDLE, M_CAPT, M_SCAN, M_SELECT, M_REQ, M_SEND, M_PAUSE} mst_e;

  route_entry_t          ent [ENTRIES];
  logic [ENTRIES-1:0]    valid, m1z, m2, mask;
  word_t                 pay [PAYLOAD_WORDS];
  word_t                 hw [3];
  atm_hdr_t              hdr, ohdr;
  rtag_t                 otag;
  logic                  vp;
  mst_e                  st;
  logic [4:0]            k;
  logic [$clog2(PORTS+1)-1:0] ncopy;
  logic [$clog2(ENTRIES)-1:0] cur;
  logic [ENTRY_BITS-1:0] ld_entry;
  sigcmd_e               ld_cmd;
  route_entry_t ld_ent;
  assign ld_ent = ld_entry;

  table_loader #(.PORT_W(PORT_W), .PORT(PORT)) u_loader (
    .clk(pclk), .init, .signal_control, .signal_address, .entry(ld_entry), .cmd(ld_cmd)
  );

  assign hdr = {hw[0][7:0], hw[1], hw[2][15:8]};

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      m1z[i] = valid[i] && ent[i].in_id.gfc == hdr.gfc && ent[i].in_id.vpi == hdr.vpi &&
               ent[i].in_id.vci == 16'd0;
      m2[i]  = valid[i] && ent[i].in_id == {hdr.gfc, hdr.vpi, hdr.vci};
    end
    cur = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (mask[i]) cur = ($clog2(ENTRIES))'(i);
  end

  function automatic logic [$clog2(ENTRIES)-1:0] first_free(logic [ENTRIES-1:0] v);
    first_free = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (!v[i]) first_free = ($clog2(ENTRIES))'(i);
  endfunction

  always_ff @(posedge pclk) begin
    if (init) begin
      valid       <= '0;
      st          <= M_IDLE;
      k           <= '0;
      mask        <= '0;
      vp          <= 1'b0;
      ncopy       <= '0;
      ohdr        <= '0;
      otag        <= '0;
      copies_sent <= '0;
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      for (int i = 0; i < 3; i++) hw[i] <= '0;
    end else begin
      if (ld_cmd == SC_WR_ROUTE && !(&valid)) begin
        ent[first_free(valid)]   <= route_entry_t'(ld_entry);
        valid[first_free(valid)] <= 1'b1;
      end else if (ld_cmd == SC_REMOVE) begin
        for (int i = 0; i < ENTRIES; i++)
          if (ent[i].in_id == ld_ent.in_id) valid[i] <= 1'b0;
      end

      case (st)
        M_IDLE: if (sdata && stype == ST_MCAST) begin
                  hw[0] <= sbus;
                  k     <= 5'd1;
                  st    <= M_CAPT;
                end
        M_CAPT: begin
          if (k < 5'(HDR_WORDS)) hw[k[1:0]] <= sbus;
          else pay[k - 5'(HDR_WORDS)] <= sbus;
          k <= k + 5'd1;
          if (k == 5'(CELL_WORDS - 1)) st <= M_SCAN;
        end
        M_SCAN: begin
          vp    <= m2 == '0;
          mask  <= (m2 != '0) ? m2 : m1z;
          ncopy <= '0;
          st    <= M_SELECT;
        end
        M_SELECT: begin
          if (mask == '0 || ncopy == ($clog2(PORTS+1))'(PORTS)) st <= M_IDLE;
          else begin
            ohdr <= {ent[cur].out_id.gfc, ent[cur].out_id.vpi,
                     vp ? hdr.vci : ent[cur].out_id.vci, hdr.pt, hdr.clp};
            otag <= {ent[cur].tag.port, ent[cur].tag.prio, hdr.clp};
            st   <= M_REQ;
          end
        end
        M_REQ: if (bus_grant) begin
                 k  <= '0;
                 st <= M_SEND;
               end
        M_SEND: begin
          k <= k + 5'd1;
          if (k == 5'(CELL_WORDS - 1)) begin
            mask[cur]   <= 1'b0;
            ncopy       <= ncopy + 1'b1;
            copies_sent <= copies_sent + 16'd1;
            st          <= M_PAUSE;
          end
        end
        default: st <= M_SELECT;  // M_PAUSE
      endcase
    end
  end

  assign busy        = st != M_IDLE;
  assign bus_request = st inside {M_REQ, M_SEND};
  assign bus_data    = st == M_SEND;
  always_comb begin
    if (st != M_SEND) mc_bus = '0;
    else if (k < 5'(HDR_WORDS)) mc_bus = hdr_word(otag, ohdr, int'(k));
    else mc_bus = pay[k - 5'(HDR_WORDS)];
  end
endmodule
