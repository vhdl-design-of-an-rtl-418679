// tb_sim - checks one input port from its serial line to its four outlets:
// switched user cells and passing OAM cells to the fabric (with the routing tag
// on the destination bus), multicast copies to the fabric, signalling cells to
// the signalling bus, table errors to the management bus (header only, zero
// payload), ILMI cells to the ILMI agent. The test bench grants every request
// at once, as idle arbiters would.
module tb_sim;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int PORT = 2;
  logic        pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t        tmg;
  logic        indicate = 0, data_in = 0;
  logic        cac_request, cac_grant = 0, cac_data, csf_request, csf_grant = 0, dest_grant = 0, csf_valid;
  logic        ilmi_sdata, sm_data, sm_grant = 0, sm_request;
  logic [2:0]  cac_address = 3'(PORT), sm_address = 3'(PORT);
  word_t       cac_bus, csf_bus, ilmi_sbus, sm_bus;
  logic [7:0]  csf_dest;
  stype_e      ilmi_stype;
  logic [3:0]  signal_control = '0;
  logic [2:0]  signal_address = 3'(PORT);
  logic [15:0] lost_cells, oam_monitored, mc_copies;

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  sim #(.PORT(PORT)) dut (.*);
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
  function automatic rtag_t tg(int port, int prio);
    return '{port: 4'(port), prio: 3'(prio), clp: 1'b0};
  endfunction

  cell_t tx_cell, sh;
  bit    tx_go = 0, act = 0;
  always @(negedge pclk) begin
    if (!init) begin
      if (tmg.phase == 10'd0) begin act = tx_go; sh = tx_cell; tx_go = 0; end
      indicate <= act && tmg.phase < 10'(CELL_BITS);
      data_in  <= act && tmg.phase < 10'(CELL_BITS) && sh[CELL_BITS - 1 - int'(tmg.phase)];
    end
  end
  task automatic send(cell_t c);
    @(negedge pclk iff tmg.phase == 10'd450);
    tx_cell = c; tx_go = 1;
  endtask

  // idle arbiters: grant whatever is asked, release when the request drops
  always @(negedge pclk) begin
    csf_grant  <= csf_request;
    dest_grant <= csf_request;
    cac_grant  <= cac_request;
    sm_grant   <= sm_request;
  end

  // collect what leaves on each outlet, 27 words per cell
  typedef word_t wcell_t [CELL_WORDS];
  wcell_t out_q [4][$];
  wcell_t cur [4];
  int     wk [4];
  int     dest_bad = 0;
  always @(posedge pclk) begin
    logic v [4];
    word_t w [4];
    if (init) wk = '{0, 0, 0, 0};
    else begin
      v = '{csf_valid, cac_data, sm_data, ilmi_sdata};
      w = '{csf_bus, cac_bus, sm_bus, ilmi_sbus};
      for (int o = 0; o < 4; o++) begin
        if (v[o]) begin
          cur[o][wk[o]] = w[o];
          if (o == 0 && csf_dest != cur[0][0][15:8]) dest_bad++;
          wk[o]++;
          if (wk[o] == CELL_WORDS || (o == 3 && wk[o] == CELL_WORDS)) begin
            out_q[o].push_back(cur[o]);
            wk[o] = 0;
          end
        end
      end
    end
  end

  function automatic bit same(wcell_t w, rtag_t tag, cell_t c);
    for (int k = 0; k < CELL_WORDS; k++) if (w[k] != bus_word(tag, c, k)) return 0;
    return 1;
  endfunction

  cell_t c_vc, c_sig, c_err, c_il, c_mon, c_mc;
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    load(route_ent(cid(1, 100), tg(3, 4), cid(2, 200)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(0, 1), cid(7, 71)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(6, 1), cid(7, 72)), SC_WR_ROUTE);
    c_vc  = mk_cell(mk_hdr(1, 100), 8'h10);
    c_sig = mk_cell(mk_hdr(0, 5), 8'h20);
    c_err = mk_cell(mk_hdr(3, 33), 8'h30);
    c_il  = mk_cell(mk_hdr(0, 16), 8'h40);
    c_mon = mk_cell(mk_hdr(1, 100, 3'b101), 8'h50);
    c_mc  = mk_cell(mk_hdr(7, 70), 8'h60);
    send(c_vc); send(c_sig); send(c_err); send(c_il); send(c_mon); send(c_mc);
    repeat (4) send('0);
    check(out_q[0].size() == 4, $sformatf("four cells to the fabric (%0d)", out_q[0].size()));
    if (out_q[0].size() == 4) begin
      check(same(out_q[0][0], tg(3, 4), out_cell(c_vc, mk_hdr(2, 200))), "VC switched cell");
      check(same(out_q[0][1], tg(3, 4), out_cell(c_mon, mk_hdr(2, 200, 3'b101))), "monitored OAM cell");
      check(same(out_q[0][2], tg(0, 1), out_cell(c_mc, mk_hdr(7, 71))), "first multicast copy");
      check(same(out_q[0][3], tg(6, 1), out_cell(c_mc, mk_hdr(7, 72))), "second multicast copy");
    end
    check(dest_bad == 0, "routing tag on the destination bus");
    check(out_q[1].size() == 1 && same(out_q[1][0], 8'h00, out_cell(c_sig, mk_hdr(0, 5))), "signalling cell");
    check(out_q[2].size() == 1 && same(out_q[2][0], 8'h00, err_cell(c_err)), "errored header to management");
    check(out_q[3].size() == 1 && same(out_q[3][0], 8'h00, out_cell(c_il, mk_hdr(0, 16))), "ILMI cell to the agent");
    check(oam_monitored == 16'd1 && mc_copies == 16'd2 && lost_cells == 16'd0, "statistics");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12 * 512 + 3000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
