// tb_cell_sort - checks the header discrimination and routing of an input port
// with its payload buffer, route table and policer. One random cell per slot is
// sent, drawn from every kind the sorter tells apart (unassigned, signalling,
// ILMI, switched and multicast user cells, an ILMI connection, table errors, the
// four OAM flows, policed connections). In the next slot the transfer on the
// internal bus (type, routing tag, new header, payload) is compared with the
// decision expected here. A full user FIFO and a busy multicast unit are
// simulated at random and must make the cell lost; the bus must be lent to the
// multicast unit on request.
module tb_cell_sort;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int SLOT = 512;
  logic        pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t        tmg;
  logic        indicate = 1'b0, data_in = 1'b0;
  traffic_e    traffic;
  logic        d_flag, d_ok, d_rst;
  word_t       d_out;
  logic        table_request, table_grant, table_data, table_flag, table_done;
  word_t       table_wbus, table_rbus;
  tbl_status_e table_status;
  logic        buff_full = 1'b0, mc_request = 1'b0, mc_grant, mc_busy = 1'b0;
  word_t       mc_bus = '0;
  logic        sdata;
  stype_e      stype;
  word_t       sbus;
  logic [15:0] lost_cells;
  logic [3:0]  signal_control = '0;
  logic [2:0]  signal_address = '0;

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  serpar u_sp (.pclk, .init, .tmg, .indicate, .data_in, .d_flag, .d_ok, .d_rst, .d_out);
  route_table #(.ENTRIES(8), .PORT_W(3), .PORT(0)) u_rt (
    .pclk, .init, .tmg, .table_request, .table_grant, .table_data, .table_wbus, .table_rbus,
    .table_done, .table_status, .signal_control, .signal_address
  );
  traffic #(.ENTRIES(4), .PORT_W(3), .PORT(0)) u_tr (
    .pclk, .init, .tmg, .signal_control, .signal_address, .table_data, .table_bus(table_wbus),
    .table_flag, .traffic_status(traffic)
  );
  cell_sort dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic load(logic [63:0] e, sigcmd_e cmd);
    for (int i = 63; i >= 0; i--) begin
      @(negedge pclk);
      signal_control = {2'b00, 1'b1, e[i]};
    end
    @(negedge pclk) signal_control = {cmd, 2'b00};
    @(negedge pclk) signal_control = '0;
  endtask
  function automatic conn_id_t cid(logic [7:0] vpi, logic [15:0] vci);
    return '{gfc: 4'd0, vpi: vpi, vci: vci};
  endfunction
  function automatic rtag_t tg(int port, int prio, logic clp = 1'b0);
    return '{port: 4'(port), prio: 3'(prio), clp: clp};
  endfunction

  // serial source
  cell_t tx_cell, sh;
  bit    tx_go = 0, act = 0;
  always @(negedge pclk) begin
    if (!init) begin
      if (tmg.phase == 10'd0) begin act = tx_go; sh = tx_cell; tx_go = 0; end
      indicate <= act && tmg.phase < 10'(CELL_BITS);
      data_in  <= act && tmg.phase < 10'(CELL_BITS) && sh[CELL_BITS - 1 - int'(tmg.phase)];
    end
  end

  // reference policer state, slot units
  longint now = 0;
  always @(posedge pclk) if (!init && tmg.rise) now <= now + 1;
  longint tat_tag = 0, tat_dis = 0;
  function automatic bit gcra(ref longint tat, input longint t, input int incr);
    if (tat > t) return 0;                                  // limit 0
    tat = ((tat > t) ? tat : t) + incr;
    return 1;
  endfunction

  typedef struct {
    stype_e st;
    rtag_t  tag;
    cell_t  c;      // cell as it must appear on the bus (header rewritten)
    bit     user;   // bound for the user FIFO
  } exp_t;

  // capture of the transfer in the current slot
  word_t cap [$];
  stype_e cap_t;
  int    sbus_bad = 0;
  always @(posedge pclk) begin
    if (!init) begin
      if (tmg.rise) cap.delete();
      if (sdata) begin cap.push_back(sbus); cap_t = stype; end
      if (mc_grant && sbus != mc_bus) sbus_bad++;
    end
  end

  exp_t  e;
  cell_t c;
  atm_hdr_t h, nh;
  int    kind, cnt [stype_e], lost_exp = 0, mc_grants = 0;
  // cell n arrives in slot n+1 and is transferred at the start of slot n+2
  exp_t  hist [$];
  bit    hdrop [$];
  exp_t  prev;
  bit    prev_drop;

  task automatic verify(int n);
    if (n < 0) return;
    prev      = hist[n];
    prev_drop = hdrop[n];
    if (prev.st == ST_NONE || prev_drop) begin
      check(cap.size() == 0, $sformatf("no transfer expected (%s, lost %0d)", prev.st.name(), prev_drop));
      return;
    end
    cnt[prev.st]++;
    check(cap_t == prev.st, $sformatf("type %s, expected %s", cap_t.name(), prev.st.name()));
    if (prev.st == ST_LSM_ERR) begin
      check(cap.size() == HDR_WORDS, "errored cell: header words only");
      for (int k = 0; k < HDR_WORDS && k < cap.size(); k++)
        check(cap[k] == bus_word(prev.tag, prev.c, k), $sformatf("errored header word %0d", k));
    end else begin
      int bad;
      bad = 0;
      check(cap.size() == CELL_WORDS, $sformatf("27 words (got %0d) for %s w0 %h", cap.size(), prev.st.name(), bus_word(prev.tag, prev.c, 0)));
      for (int k = 0; k < CELL_WORDS && k < cap.size(); k++)
        if (cap[k] != bus_word(prev.tag, prev.c, k)) bad++;
      check(bad == 0, $sformatf("%s cell: %0d words differ, w0 %h expected %h", prev.st.name(), bad,
            cap.size() > 0 ? cap[0] : 16'h0, bus_word(prev.tag, prev.c, 0)));
    end
  endtask

  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    load(route_ent(cid(1, 100), tg(3, 2), cid(2, 200)), SC_WR_ROUTE);
    load(route_ent(cid(5, 0), tg(4, 3), cid(6, 0)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(2, 0), cid(7, 71)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(5, 0), cid(7, 72)), SC_WR_ROUTE);
    load(route_ent(cid(9, 0), ILMI_TAG, cid(9, 0)), SC_WR_ROUTE);
    load(route_ent(cid(11, 110), tg(6, 1), cid(12, 120)), SC_WR_ROUTE);
    @(negedge pclk iff tmg.phase == 10'd2);
    load(traffic_ent(cid(1, 100), 1'b1, 16'd3, 16'd0), SC_WR_TRAFFIC);
    tat_tag = now;
    load(traffic_ent(cid(11, 110), 1'b0, 16'd3, 16'd0), SC_WR_TRAFFIC);
    tat_dis = now;

    for (int n = 0; n < 300; n++) begin
      @(negedge pclk iff tmg.phase == 10'd450);
      kind = $urandom_range(0, 12);
      h = mk_hdr(0, 0);
      e.tag = '0; e.user = 0;
      case (kind)
        0:  begin h = mk_hdr(0, 0); e.st = ST_NONE; end
        1:  begin h = mk_hdr(0, 5); e.st = ST_SIG; end
        2:  begin h = mk_hdr(0, 16, 3'($urandom)); e.st = ST_ILMI; end
        3:  begin h = mk_hdr(1, 100, 3'b000, 1'($urandom)); e.st = ST_USER; end
        4:  begin h = mk_hdr(5, 16'($urandom_range(32, 9999)), 3'b010, 1'($urandom)); e.st = ST_USER; end
        5:  begin h = mk_hdr(7, 70, 3'b000, 1'($urandom)); e.st = ST_MCAST; end
        6:  begin h = mk_hdr(9, 16'($urandom_range(32, 999))); e.st = ST_ILMI; end
        7:  begin h = mk_hdr(13, 1); e.st = ST_LSM_ERR; end
        8:  begin h = mk_hdr(5, 3); e.st = ST_LSM_OAM; end          // VP segment, end point
        9:  begin h = mk_hdr(5, 4); e.st = ST_OAM_PASS; end         // VP end-to-end, passes
        10: begin h = mk_hdr(1, 100, 3'b100); e.st = ST_LSM_OAM; end // VC segment on a VC
        11: begin h = mk_hdr(1, 100, 3'b101); e.st = ST_OAM_MON; end // VC end-to-end
        default: begin h = mk_hdr(11, 110, 3'b000, 1'($urandom)); e.st = ST_USER; end
      endcase
      c  = mk_cell(h, 8'($urandom));
      nh = h;
      // policing: the header is judged in the slot it arrives (now + 1 from here)
      // (a tagging contract still discards a non-conforming cell already at CLP 1)
      if (kind == 3 && !gcra(tat_tag, now + 1, 3)) begin
        if (h.clp) e.st = ST_NONE;
        nh.clp = 1'b1;
      end
      if (kind == 12 && !gcra(tat_dis, now + 1, 3)) e.st = ST_NONE;
      case (kind)
        3:  begin nh.vpi = 2; nh.vci = 200; e.tag = tg(3, 2, nh.clp); end
        4:  begin nh.vpi = 6; e.tag = tg(4, 3, nh.clp); end
        9:  begin nh.vpi = 6; e.tag = tg(4, 3, nh.clp); end
        11: begin nh.vpi = 2; nh.vci = 200; e.tag = tg(3, 2, nh.clp); end
        12: begin nh.vpi = 12; nh.vci = 120; e.tag = tg(6, 1, nh.clp); end
        default: ;
      endcase
      e.c    = (e.st == ST_LSM_ERR) ? err_cell(c) : out_cell(c, nh);
      e.user = e.st inside {ST_USER, ST_OAM_PASS, ST_OAM_MON};
      tx_cell = c; tx_go = 1;
      hist.push_back(e);
      hdrop.push_back(0);
      // the transfer made in this slot is that of cell n-2
      verify(n - 2);
      // cell n-1 is transferred at the next slot start: choose the buffer state for it
      @(negedge pclk iff tmg.phase == 10'd500);
      buff_full = ($urandom_range(0, 9) == 0);
      mc_busy   = ($urandom_range(0, 9) == 0);
      if (n >= 1) begin
        hdrop[n - 1] = (hist[n - 1].user && buff_full) || (hist[n - 1].st == ST_MCAST && mc_busy);
        if (hdrop[n - 1]) lost_exp++;
      end
      // lend the bus to the multicast unit once the transfer is over
      @(negedge pclk iff tmg.phase == 10'd100);
      buff_full = 1'b0; mc_busy = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        mc_request = 1'b1;
        repeat (3) @(negedge pclk);
        check(mc_grant, "bus lent to the multicast unit");
        if (mc_grant) mc_grants++;
        for (int k = 0; k < CELL_WORDS; k++) begin mc_bus = 16'($urandom); @(negedge pclk); end
        mc_request = 1'b0; mc_bus = '0;
        repeat (2) @(negedge pclk);
        check(!mc_grant, "bus returned by the multicast unit");
      end
    end
    @(negedge pclk iff tmg.phase == 10'd450);
    verify(hist.size() - 2);
    @(negedge pclk iff tmg.phase == 10'd500);
    buff_full = 1'b0;
    @(negedge pclk iff tmg.phase == 10'd450);
    verify(hist.size() - 1);
    check(lost_cells == 16'(lost_exp), $sformatf("lost cells %0d, expected %0d", lost_cells, lost_exp));
    check(sbus_bad == 0, "sbus carries the multicast unit's words while lent");
    foreach (cnt[s]) $display("%s: %0d", s.name(), cnt[s]);
    check(cnt.size() == 8, "every cell type was transferred");
    check(lost_exp > 0 && mc_grants > 0, "losses and multicast lending occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (320 * SLOT) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
