// route_table - content addressable route table of an input port.
//
// Each 64-bit entry holds the incoming GFC/VPI/VCI, the 8-bit routing tag and the
// outgoing GFC/VPI/VCI. All entries are compared in parallel, in two searches:
//   first search, on GFC and VPI: no match is a table error; one match whose
//     incoming VCI is zero is a virtual path switch (the old VCI is kept); several
//     matches that all have a zero incoming VCI are a VP multicast; otherwise a
//     second search follows.
//   second search, on GFC, VPI and VCI: no match is an error, one match a virtual
//     channel switch, several matches a VC multicast.
// An entry whose routing tag is all ones marks a configurable ILMI connection.
// For VP OAM cells (VCI 3 or 4) the VCI is not part of the connection, so a
// path that ends here (only entries with non-zero incoming VCI) reports a VC
// switch instead of an error; the cell sorter then keeps the cell locally.
//
// Protocol, all steps on dclk ticks: table_request -> table_grant; two header
// words with table_data; one tick per search; then table_done with the status
// and three result words on table_rbus: {tag, out GFC, out VPI[7:4]},
// {out VPI[3:0], out VCI[15:4]}, {out VCI[3:0], 12'b0}. The grant is dropped after
// the last word and given again only after the request has been removed.
// Entries are written through table_loader (first free place) and removed by
// incoming identifier. The search algorithm and the entry format follow the
// switch description; the table size, the word order and the OAM rule are this
// design's choices.
module route_table
  import atm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PORT_W  = 3,
  parameter int unsigned PORT    = 0
) (
  input  logic              pclk,
  input  logic              init,
  input  tmg_t              tmg,
  input  logic              table_request,
  output logic              table_grant,
  input  logic              table_data,
  input  word_t             table_wbus,
  output word_t             table_rbus,
  output logic              table_done,
  output tbl_status_e       table_status,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address
);
  typedef enum logic [2:0] {T_IDLE, T_RECV, T_SEARCH1, T_SEARCH2, T_RESP, T_END} tst_e;

  route_entry_t          ent   [ENTRIES];
  logic [ENTRIES-1:0]    valid;
  logic [ENTRIES-1:0]    m1, m1z, m2;
  logic [ENTRIES-1:0]    hit;
  logic [$clog2(ENTRIES)-1:0] sel;
  tst_e                  st;
  logic                  wc;
  logic [1:0]            rk;
  atm_hdr_t              key;
  route_entry_t          res;
  logic                  vp_keep;   // keep the old VCI (VP switching)

  logic [ENTRY_BITS-1:0] ld_entry;
  sigcmd_e               ld_cmd;
  route_entry_t ld_ent;
  assign ld_ent = ld_entry;

  table_loader #(.PORT_W(PORT_W), .PORT(PORT)) u_loader (
    .clk(pclk), .init, .signal_control, .signal_address, .entry(ld_entry), .cmd(ld_cmd)
  );

  // parallel compare
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      m1[i]  = valid[i] && ent[i].in_id.gfc == key.gfc && ent[i].in_id.vpi == key.vpi;
      m1z[i] = m1[i] && ent[i].in_id.vci == 16'd0;
      m2[i]  = m1[i] && ent[i].in_id.vci == key.vci;
    end
  end

  function automatic logic [$clog2(ENTRIES)-1:0] first(logic [ENTRIES-1:0] v);
    first = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (v[i]) first = ($clog2(ENTRIES))'(i);
  endfunction

  function automatic logic [$clog2(ENTRIES)-1:0] first_free(logic [ENTRIES-1:0] v);
    first_free = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (!v[i]) first_free = ($clog2(ENTRIES))'(i);
  endfunction

  logic oam_vp;
  assign oam_vp = (key.vci == 16'd3 || key.vci == 16'd4) && !key.pt[2];
  assign hit    = m1;
  assign sel    = first(hit);

  always_comb begin
    logic [15:0] ovci;
    ovci = vp_keep ? key.vci : res.out_id.vci;
    case (rk)
      2'd0:    table_rbus = {res.tag, res.out_id.gfc, res.out_id.vpi[7:4]};
      2'd1:    table_rbus = {res.out_id.vpi[3:0], ovci[15:4]};
      default: table_rbus = {ovci[3:0], 12'h000};
    endcase
    if (st != T_RESP) table_rbus = '0;
  end

  assign table_grant = st inside {T_RECV, T_SEARCH1, T_SEARCH2, T_RESP};
  assign table_done  = st == T_RESP;

  always_ff @(posedge pclk) begin
    if (init) begin
      valid        <= '0;
      st           <= T_IDLE;
      wc           <= 1'b0;
      rk           <= '0;
      key          <= '0;
      res          <= '0;
      vp_keep      <= 1'b0;
      table_status <= TS_NONE;
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      // table maintenance
      if (ld_cmd == SC_WR_ROUTE && !(&valid)) begin
        ent[first_free(valid)]   <= route_entry_t'(ld_entry);
        valid[first_free(valid)] <= 1'b1;
      end else if (ld_cmd == SC_REMOVE) begin
        for (int i = 0; i < ENTRIES; i++)
          if (ent[i].in_id == ld_ent.in_id) valid[i] <= 1'b0;
      end

      if (tmg.dtick) begin
        case (st)
          T_IDLE: if (table_request) begin
                    st <= T_RECV;
                    wc <= 1'b0;
                  end
          T_RECV: if (table_data) begin
                    if (!wc) key[31:16] <= table_wbus;
                    else begin
                      key[15:0] <= table_wbus;
                      st        <= T_SEARCH1;
                    end
                    wc <= 1'b1;
                  end
          T_SEARCH1: begin
            rk      <= '0;
            res     <= ent[sel];
            vp_keep <= 1'b0;
            if (m1 == '0) begin
              table_status <= TS_ERROR;
              st           <= T_RESP;
            end else if (oam_vp) begin
              // VP OAM: the path either passes (zero-VCI entries only) or ends here
              st <= T_RESP;
              if (m1 != m1z) table_status <= TS_VC_SWITCH;
              else begin
                table_status <= ($countones(m1) == 1) ? TS_VP_SWITCH : TS_MULTICAST;
                vp_keep      <= 1'b1;
              end
            end else if ($countones(m1) == 1 && m1z != '0) begin
              table_status <= (ent[sel].tag == ILMI_TAG) ? TS_ILMI : TS_VP_SWITCH;
              vp_keep      <= 1'b1;
              st           <= T_RESP;
            end else if (m1 == m1z) begin
              table_status <= TS_MULTICAST;
              st           <= T_RESP;
            end else begin
              st <= T_SEARCH2;
            end
          end
          T_SEARCH2: begin
            res <= ent[first(m2)];
            st  <= T_RESP;
            if (m2 == '0) table_status <= TS_ERROR;
            else if ($countones(m2) == 1)
              table_status <= (ent[first(m2)].tag == ILMI_TAG) ? TS_ILMI : TS_VC_SWITCH;
            else table_status <= TS_MULTICAST;
          end
          T_RESP: begin
            if (rk == 2'd2) st <= T_END;
            else rk <= rk + 2'd1;
          end
          default: if (!table_request) st <= T_IDLE;   // T_END
        endcase
      end
    end
  end
endmodule
