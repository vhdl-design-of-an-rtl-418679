// cell_sort - header discrimination and cell routing of an input port.
//
// The cell sorter reads the same serial stream as serpar. Once the 32 header
// bits are in, it makes the preliminary decision from the pre-defined UNI
// header values: unassigned cells are dropped, signalling and ILMI cells go
// straight to the final decision, and user and OAM cells are looked up in the
// route table. The lookup is a request/grant exchange paced by dclk: the old
// header goes out in two dclk periods on table_wbus with table_data high, and
// after table_done the status and the three words of tag and new header come
// back on table_rbus in three dclk periods. The traffic policer snoops the same
// transfer (table_flag marks user cells).
//
// At the falling hclk edge the final decision is latched: the cell's type on the
// internal bus (stype), its new header with the CLP bit tagged or the cell
// discarded as the policer asks, and the CLP bit copied into the LSB of the
// routing tag. At the next rising hclk edge the cell is sent on sbus with sdata
// high: three header words, then the 24 payload words that serpar drives after
// d_ok. Discarded cells and errored headers are abandoned with d_rst; an errored
// header is still sent, without its payload, to the local management unit.
// After that transfer the sbus is lent to the multicast unit (mc_request,
// mc_grant) when the user FIFO has room and the slot has time for a whole cell.
// A cell bound for a full user FIFO or for a busy multicast unit is lost and
// counted in lost_cells.
module cell_sort
  import atm_pkg::*;
#(
  parameter int unsigned SLOT_PCLK = 512
) (
  input  logic        pclk,
  input  logic        init,
  input  tmg_t        tmg,
  input  logic        indicate,
  input  logic        data_in,
  input  traffic_e    traffic,
  input  logic        d_flag,
  output logic        d_ok,
  output logic        d_rst,
  input  word_t       d_out,
  output logic        table_request,
  input  logic        table_grant,
  output logic        table_data,
  output word_t       table_wbus,
  input  word_t       table_rbus,
  output logic        table_flag,
  input  logic        table_done,
  input  tbl_status_e table_status,
  input  logic        buff_full,
  input  logic        mc_request,
  output logic        mc_grant,
  input  logic        mc_busy,
  input  word_t       mc_bus,
  output logic        sdata,
  output stype_e      stype,
  output word_t       sbus,
  output logic [15:0] lost_cells
);
  typedef enum logic [2:0] {L_IDLE, L_REQ, L_S0, L_S1, L_WAIT, L_R, L_DONE} lst_e;

  logic [8:0]  bitcnt, idx;
  logic [30:0] hsr;
  atm_hdr_t    hdr;
  pre_type_e   pre;
  lst_e        lst;
  logic [1:0]  rc;
  word_t       rw [3];
  tbl_status_e status;

  // decision latched at the falling hclk edge
  stype_e      dec_stype;
  logic        dec_cell;      // a complete cell was received
  word_t       dec_w [3];
  logic        dec_payload;

  // transfer on sbus
  logic        xact, xpay;
  logic [4:0]  xk, xlen;
  stype_e      xtype;
  word_t       xw [3];

  assign idx = tmg.rise ? 9'd0 : bitcnt;

  // ---------------------------------------------------------------- final decision
  stype_e   f_stype;
  logic     f_payload;
  atm_hdr_t f_hdr;
  rtag_t    f_tag;

  always_comb begin
    conn_id_t new_id;
    logic     clp_new, table_ok, is_vp, is_vc, is_mc;
    new_id   = {rw[0][7:0], rw[1], rw[2][15:12]};
    clp_new  = hdr.clp | (traffic == TR_TAG);
    table_ok = lst == L_DONE;
    is_vp    = table_ok && status == TS_VP_SWITCH;
    is_vc    = table_ok && status == TS_VC_SWITCH;
    is_mc    = table_ok && status == TS_MULTICAST;
    f_stype   = ST_NONE;
    f_payload = 1'b1;
    f_hdr     = hdr;
    f_tag     = '0;
    case (pre)
      PRE_UNASSIGNED: f_stype = ST_NONE;
      PRE_SIG:        f_stype = ST_SIG;
      PRE_ILMI:       f_stype = ST_ILMI;
      default: begin
        if (!(is_vp || is_vc || is_mc || (table_ok && status == TS_ILMI))) begin
          f_stype   = ST_LSM_ERR;
          f_payload = 1'b0;
        end else begin
          case (pre)
            PRE_USER: begin
              if (traffic == TR_DISCARD) f_stype = ST_NONE;
              else if (is_mc) begin
                f_stype     = ST_MCAST;
                f_hdr.clp   = clp_new;
              end else if (status == TS_ILMI) f_stype = ST_ILMI;
              else begin
                f_stype = ST_USER;
                f_hdr   = {new_id, hdr.pt, clp_new};
                f_tag   = {rw[0][15:9], clp_new};
              end
            end
            PRE_OAM_VP_SEG: f_stype = ST_LSM_OAM;
            PRE_OAM_VP_E2E, PRE_OAM_VC_SEG: begin
              if (is_vp) begin
                f_stype = ST_OAM_PASS;
                f_hdr   = {new_id, hdr.pt, hdr.clp};
                f_tag   = {rw[0][15:9], hdr.clp};
              end else f_stype = ST_LSM_OAM;
            end
            default: begin  // PRE_OAM_VC_E2E
              if (is_vp || is_vc) begin
                f_stype = ST_OAM_MON;
                f_hdr   = {new_id, hdr.pt, hdr.clp};
                f_tag   = {rw[0][15:9], hdr.clp};
              end else f_stype = ST_LSM_OAM;
            end
          endcase
        end
      end
    endcase
  end

  // ---------------------------------------------------------------- header and lookup
  assign table_request = lst inside {L_REQ, L_S0, L_S1, L_WAIT, L_R};
  assign table_data    = lst inside {L_S0, L_S1};
  assign table_wbus    = (lst == L_S0) ? hdr[31:16] : (lst == L_S1) ? hdr[15:0] : '0;
  assign table_flag    = table_data && pre == PRE_USER;

  always_ff @(posedge pclk) begin
    if (init) begin
      bitcnt <= '0;
      lst    <= L_IDLE;
      rc     <= '0;
      hsr    <= '0;
      hdr    <= '0;
      pre    <= PRE_UNASSIGNED;
      status <= TS_NONE;
      for (int k = 0; k < 3; k++) rw[k] <= '0;
    end else begin
      if (tmg.rise) bitcnt <= 9'(indicate);
      else if (indicate && bitcnt < 9'(CELL_BITS)) bitcnt <= bitcnt + 9'd1;

      if (indicate && idx < 9'(HDR_BITS - 1)) hsr <= {hsr[29:0], data_in};

      if (tmg.rise) lst <= L_IDLE;
      if (indicate && idx == 9'(HDR_BITS - 1)) begin
        hdr <= {hsr, data_in};
        pre <= classify({hsr, data_in});
        if (classify({hsr, data_in}) inside {PRE_UNASSIGNED, PRE_SIG, PRE_ILMI}) lst <= L_DONE;
        else lst <= L_REQ;
      end else if (tmg.dtick && !tmg.rise) begin
        case (lst)
          L_REQ:  if (table_grant) lst <= L_S0;
          L_S0:   lst <= L_S1;
          L_S1:   lst <= L_WAIT;
          L_WAIT: if (table_done) begin
                    status <= table_status;
                    rw[0]  <= table_rbus;
                    rc     <= 2'd1;
                    lst    <= L_R;
                  end
          L_R:    if (table_done) begin
                    rw[rc] <= table_rbus;
                    rc     <= rc + 2'd1;
                    if (rc == 2'd2) lst <= L_DONE;
                  end
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- decision latch
  always_ff @(posedge pclk) begin
    if (init) begin
      dec_stype   <= ST_NONE;
      dec_cell    <= 1'b0;
      dec_payload <= 1'b0;
      for (int k = 0; k < 3; k++) dec_w[k] <= '0;
    end else if (tmg.fall) begin
      dec_cell    <= bitcnt == 9'(CELL_BITS);
      dec_stype   <= (bitcnt == 9'(CELL_BITS)) ? f_stype : ST_NONE;
      dec_payload <= f_payload;
      for (int k = 0; k < 3; k++) dec_w[k] <= hdr_word(f_tag, f_hdr, k);
    end
  end

  // ---------------------------------------------------------------- transfer on sbus
  logic to_user, drop;
  assign to_user = dec_stype inside {ST_USER, ST_OAM_PASS, ST_OAM_MON};
  assign drop    = (to_user && buff_full) || (dec_stype == ST_MCAST && mc_busy);

  always_ff @(posedge pclk) begin
    if (init) begin
      xact       <= 1'b0;
      xpay       <= 1'b0;
      xk         <= '0;
      xlen       <= '0;
      xtype      <= ST_NONE;
      d_rst      <= 1'b0;
      lost_cells <= '0;
      mc_grant   <= 1'b0;
      for (int k = 0; k < 3; k++) xw[k] <= '0;
    end else begin
      d_rst <= 1'b0;
      if (tmg.rise) begin
        xact <= 1'b0;
        if (dec_stype != ST_NONE && !drop) begin
          xact  <= 1'b1;
          xk    <= '0;
          xtype <= dec_stype;
          xpay  <= dec_payload;
          xlen  <= dec_payload ? 5'(CELL_WORDS) : 5'(HDR_WORDS);
          for (int k = 0; k < 3; k++) xw[k] <= dec_w[k];
        end
        if (dec_cell && (dec_stype == ST_NONE || drop || !dec_payload)) d_rst <= 1'b1;
        if (dec_stype != ST_NONE && drop) lost_cells <= lost_cells + 16'd1;
      end else if (xact) begin
        xk <= xk + 5'd1;
        if (xk == xlen - 5'd1) xact <= 1'b0;
      end

      if (mc_grant && !mc_request) mc_grant <= 1'b0;
      else if (!mc_grant && mc_request && !xact && !tmg.rise && !buff_full &&
               tmg.phase < 10'(SLOT_PCLK - CELL_WORDS - 4))
        mc_grant <= 1'b1;
    end
  end

  assign sdata = xact;
  assign stype = xact ? xtype : ST_NONE;
  assign d_ok  = xact && xpay && d_flag && xk >= 5'(HDR_WORDS);
  always_comb begin
    if (mc_grant) sbus = mc_bus;
    else if (!xact) sbus = '0;
    else if (xk < 5'(HDR_WORDS)) sbus = xw[xk[1:0]];
    else sbus = d_out;
  end
endmodule
