// tb_input_module - checks the group of input ports: tables are loaded into one
// port by its address, and cells sent on four different lines (signalling,
// a switched user cell, a table error, ILMI) must raise the request of their own
// port only; the shared signalling and management buses must carry the cell of
// the port whose address is granted.
module tb_input_module;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int P = 8;
  logic         pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t         tmg;
  logic [P-1:0] indicate = '0, data_in = '0;
  logic [P-1:0] cac_request, csf_request, csf_grant = '0, dest_grant = '0, csf_valid, ilmi_sdata, sm_request;
  logic         cac_grant = 0, cac_data, sm_data, sm_grant = 0;
  logic [2:0]   cac_address = '0, sm_address = '0, signal_address = '0;
  word_t        cac_bus, sm_bus;
  logic [3:0]   signal_control = '0;
  logic [7:0]   csf_dest [P];
  word_t        csf_bus [P], ilmi_sbus [P];
  logic [3:0]   ilmi_stype [P];
  logic [15:0]  lost_cells [P], oam_monitored [P], mc_copies [P];

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  input_module dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic load(int port, logic [63:0] e, sigcmd_e cmd);
    signal_address = 3'(port);
    for (int i = 63; i >= 0; i--) begin
      @(negedge pclk);
      signal_control = {2'b00, 1'b1, e[i]};
    end
    @(negedge pclk) signal_control = {cmd, 2'b00};
    @(negedge pclk) signal_control = '0;
  endtask

  cell_t tx [P], sh [P];
  logic [P-1:0] go = '0, act = '0;
  always @(negedge pclk) begin
    if (!init) begin
      if (tmg.phase == 10'd0) begin act = go; sh = tx; go = '0; end
      for (int p = 0; p < P; p++) begin
        indicate[p] <= act[p] && tmg.phase < 10'(CELL_BITS);
        data_in[p]  <= act[p] && tmg.phase < 10'(CELL_BITS) && sh[p][CELL_BITS - 1 - int'(tmg.phase)];
      end
    end
  end

  word_t  wc [$], ws [$], wu [$];
  logic   il_seen [P];
  always @(posedge pclk) if (!init) begin
    if (cac_data) wc.push_back(cac_bus);
    if (sm_data) ws.push_back(sm_bus);
    if (csf_valid[6]) wu.push_back(csf_bus[6]);
    for (int p = 0; p < P; p++) if (ilmi_sdata[p] && ilmi_stype[p] == 4'(ST_ILMI)) il_seen[p] = 1;
  end

  cell_t c_sig, c_vc, c_err, c_il;
  logic [P-1:0] il_mask;
  bit ok;
  initial begin
    foreach (il_seen[p]) il_seen[p] = 0;
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    load(6, route_ent('{gfc: 0, vpi: 8'd1, vci: 16'd100}, 8'h52, '{gfc: 0, vpi: 8'd2, vci: 16'd200}), SC_WR_ROUTE);
    c_sig = mk_cell(mk_hdr(0, 5), 8'h20);
    c_vc  = mk_cell(mk_hdr(1, 100), 8'h30);
    c_err = mk_cell(mk_hdr(1, 100), 8'h40);   // no table entry at port 4
    c_il  = mk_cell(mk_hdr(0, 16), 8'h50);
    @(negedge pclk iff tmg.phase == 10'd450);
    tx[2] = c_sig; tx[6] = c_vc; tx[4] = c_err; tx[1] = c_il;
    go = 8'b0101_0110;
    // the cells are sorted during the next slot and handed on at the one after
    @(negedge pclk iff tmg.phase == 10'd450);
    @(negedge pclk iff tmg.phase == 10'd40);
    check(cac_request == 8'b0000_0100, "signalling request from port 2 only");
    check(sm_request == 8'b0001_0000, "management request from port 4 only");
    check(csf_request == 8'b0100_0000, "fabric request from port 6 only");
    il_mask = '0;
    foreach (il_seen[p]) il_mask[p] = il_seen[p];
    check(il_mask == 8'b0000_0010, "ILMI cell to the agent of port 1 only");
    // grant the buses to the right addresses
    cac_address = 3'd2; cac_grant = 1;
    sm_address = 3'd4; sm_grant = 1;
    csf_grant[6] = 1; dest_grant[6] = 1;
    repeat (40) @(negedge pclk);
    cac_grant = 0; sm_grant = 0; csf_grant = '0; dest_grant = '0;
    ok = wc.size() == CELL_WORDS;
    for (int k = 0; k < CELL_WORDS && ok; k++) if (wc[k] != bus_word(8'h00, out_cell(c_sig, mk_hdr(0, 5)), k)) ok = 0;
    check(ok, "signalling bus carries port 2's cell");
    ok = ws.size() == CELL_WORDS;
    for (int k = 0; k < CELL_WORDS && ok; k++) if (ws[k] != bus_word(8'h00, err_cell(c_err), k)) ok = 0;
    check(ok, "management bus carries port 4's errored header");
    ok = wu.size() == CELL_WORDS;
    for (int k = 0; k < CELL_WORDS && ok; k++) if (wu[k] != bus_word(8'h52, out_cell(c_vc, mk_hdr(2, 200)), k)) ok = 0;
    check(ok, "port 6 sends its switched cell to the fabric");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
