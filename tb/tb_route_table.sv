// tb_route_table - checks the route table of an input port through its bus
// protocol: random tables of VP, VC, multicast and ILMI entries are loaded over
// the serial loading lines, random headers (mostly of known connections) are
// looked up, and the status and the new header are compared with a reference
// search written here. Entry removal and the reply timing are checked as well.
module tb_route_table;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int N = 16;
  logic        pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t        tmg;
  logic        table_request = 1'b0, table_grant, table_data = 1'b0, table_done;
  word_t       table_wbus = '0, table_rbus;
  tbl_status_e table_status;
  logic [3:0]  signal_control = '0;
  logic [2:0]  signal_address = 3'd2;

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  route_table #(.ENTRIES(N), .PORT_W(3), .PORT(2)) dut (.*);
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

  route_entry_t tab [$];

  // reference search
  task automatic ref_search(atm_hdr_t h, output tbl_status_e st, output atm_hdr_t nh);
    int m1 [$], m2 [$];
    int nz;
    bit oam;
    route_entry_t r;
    nz = 0;
    foreach (tab[i]) if (tab[i].in_id.gfc == h.gfc && tab[i].in_id.vpi == h.vpi) begin
      m1.push_back(i);
      if (tab[i].in_id.vci != 0) nz++;
      if (tab[i].in_id.vci == h.vci) m2.push_back(i);
    end
    oam = (h.vci == 3 || h.vci == 4) && !h.pt[2];
    nh = h;
    st = TS_ERROR;
    if (m1.size() == 0) return;
    r = tab[m1[0]];
    if (oam) begin
      if (nz > 0) st = TS_VC_SWITCH;
      else begin
        st = (m1.size() == 1) ? TS_VP_SWITCH : TS_MULTICAST;
        nh.gfc = r.out_id.gfc; nh.vpi = r.out_id.vpi;
      end
      if (st == TS_VC_SWITCH) begin
        nh.gfc = r.out_id.gfc; nh.vpi = r.out_id.vpi; nh.vci = r.out_id.vci;
      end
      return;
    end
    if (m1.size() == 1 && nz == 0) begin
      st = (r.tag == ILMI_TAG) ? TS_ILMI : TS_VP_SWITCH;
      nh.gfc = r.out_id.gfc; nh.vpi = r.out_id.vpi;
      return;
    end
    if (nz == 0) begin st = TS_MULTICAST; return; end
    if (m2.size() == 0) return;
    r = tab[m2[0]];
    if (m2.size() > 1) begin st = TS_MULTICAST; return; end
    st = (r.tag == ILMI_TAG) ? TS_ILMI : TS_VC_SWITCH;
    nh.gfc = r.out_id.gfc; nh.vpi = r.out_id.vpi; nh.vci = r.out_id.vci;
  endtask

  int slow = 0;
  // one lookup over the table bus
  task automatic lookup(atm_hdr_t h, output tbl_status_e st, output word_t w [3]);
    int t;
    @(negedge pclk) table_request = 1'b1;
    while (!table_grant) @(negedge pclk);
    table_data = 1'b1;
    table_wbus = h[31:16];
    @(posedge pclk iff tmg.dtick);
    @(negedge pclk) table_wbus = h[15:0];
    @(posedge pclk iff tmg.dtick);
    @(negedge pclk) begin table_data = 1'b0; table_wbus = '0; end
    t = 0;
    while (!table_done) begin @(negedge pclk); t++; end
    if (t > 2 * 4 + 1) slow++;   // at most two search ticks
    st = table_status;
    for (int k = 0; k < 3; k++) begin
      w[k] = table_rbus;
      if (k < 2) begin @(posedge pclk iff tmg.dtick); @(negedge pclk); end
    end
    table_request = 1'b0;
    @(posedge pclk iff tmg.dtick);
    @(negedge pclk);
    check(!table_grant, "grant removed after the reply");
    @(posedge pclk iff tmg.dtick);
    @(negedge pclk);
  endtask

  tbl_status_e st, est;
  atm_hdr_t    h, nh;
  word_t       w [3];
  int          seen [tbl_status_e];
  rtag_t       tg;

  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    for (int round = 0; round < 3; round++) begin
      // clear the table from the previous round
      foreach (tab[i]) load(tab[i], SC_REMOVE);
      tab.delete();
      // a full table of overlapping paths, then smaller ones with distinct paths
      while (tab.size() < ((round == 0) ? N : 6)) begin
        route_entry_t e;
        e.in_id  = '{gfc: 4'd0, vpi: 8'($urandom_range(1, 6)), vci: ($urandom_range(0, 2) == 0) ? 16'd0 : 16'($urandom_range(30, 34))};
        if (round > 0) begin
          e.in_id.vpi = 8'(tab.size() + 1);
          e.in_id.vci = (tab.size() % 2 == 0) ? 16'd0 : 16'($urandom_range(30, 34));
        end
        tg       = ($urandom_range(0, 9) == 0) ? ILMI_TAG : rtag_t'(8'($urandom));
        e.tag    = tg;
        e.out_id = '{gfc: 4'($urandom), vpi: 8'($urandom), vci: 16'($urandom)};
        tab.push_back(e);
        load(e, SC_WR_ROUTE);
      end
      for (int n = 0; n < 120; n++) begin
        h = mk_hdr(8'($urandom_range(0, 7)), 16'($urandom_range(29, 35)), 3'($urandom), 1'($urandom));
        if ($urandom_range(0, 7) == 0) h.vci = 16'($urandom_range(3, 4));
        if ($urandom_range(0, 7) == 0) h.vci = 16'd0;
        ref_search(h, est, nh);
        lookup(h, st, w);
        seen[est]++;
        check(st == est, $sformatf("status %s for %h, expected %s", st.name(), h, est.name()));
        if (est inside {TS_VP_SWITCH, TS_VC_SWITCH, TS_ILMI} && st == est) begin
          route_entry_t r;
          check({w[0][7:0], w[1], w[2][15:12]} == {nh.gfc, nh.vpi, nh.vci},
                $sformatf("new header for %h", h));
        end
      end
    end
    check(slow == 0, "reply within two search ticks");
    foreach (seen[s]) $display("status %s: %0d", s.name(), seen[s]);
    check(seen.exists(TS_ERROR) && seen.exists(TS_VP_SWITCH) && seen.exists(TS_VC_SWITCH) &&
          seen.exists(TS_MULTICAST) && seen.exists(TS_ILMI), "every status occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
