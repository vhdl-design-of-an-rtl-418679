// tb_atm_switch - end-to-end test of the switch at its default size (eight
// ports, 512-cycle cell slot, 64-cell output buffers).
//
// Serial cells are driven into the input ports, one per port and slot, and the
// serial output of every port is collected and compared with the cells expected
// there. The signalling and management processors are replaced by handlers that
// echo each cell to the output port of the port it came from, and each port's
// ILMI agent by a model that echoes ILMI cells. The test runs in two parts:
//   A. single cells through every path: VC and VP switching, multicast, traffic
//      tagging and discard, signalling, ILMI, OAM end point and monitoring,
//      table errors, priority order, selective CLP discard, unassigned filling,
//      and the three-slot latency of a switched cell;
//   B. saturation: every port multicasts two copies per slot, so the fabric must
//      carry sixteen cells per slot and the output buffers overflow.
// Each mechanism is counted and a failure is counted for one that never occurs.
module tb_atm_switch;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int P    = 8;
  localparam int SLOT = 512;

  logic             pclk = 1'b0, init = 1'b1;
  logic             hclk, dclk;
  logic [P-1:0]     indicate, data_in, request, data_out, dout_flag;
  word_t            cac_im_bus, sm_im_bus, cac_om_bus, sm_om_bus;
  logic             cac_im_data, sm_im_data, cac_cell_req, sm_cell_req;
  logic [2:0]       cac_address, sm_address, cac_cell_address, sm_cell_address;
  logic             cac_cell_grant, sm_cell_grant, cac_om_data, sm_om_data;
  logic [3:0]       signal_control;
  logic [2:0]       signal_address;
  word_t            ilmi_sbus [P];
  logic [3:0]       ilmi_stype [P];
  logic [P-1:0]     ilmi_sdata, ilmi_request, ilmi_grant, ilmi_data;
  word_t            ilmi_bus [P];
  logic [6:0]       clp_threshold;
  logic [15:0]      lost_cells [P], oam_monitored [P], mc_copies [P];
  logic [15:0]      clp_discards [P], overflow_discards [P];
  int               cac_rx, sm_rx;
  int               ilmi_rx [P];

  atm_switch dut (.*);

  tb_bus_handler u_cac (
    .pclk, .init, .im_data(cac_im_data), .im_bus(cac_im_bus), .address(cac_address),
    .cell_req(cac_cell_req), .cell_address(cac_cell_address), .cell_grant(cac_cell_grant),
    .om_data(cac_om_data), .om_bus(cac_om_bus), .received(cac_rx)
  );
  tb_bus_handler u_sm (
    .pclk, .init, .im_data(sm_im_data), .im_bus(sm_im_bus), .address(sm_address),
    .cell_req(sm_cell_req), .cell_address(sm_cell_address), .cell_grant(sm_cell_grant),
    .om_data(sm_om_data), .om_bus(sm_om_bus), .received(sm_rx)
  );
  for (genvar i = 0; i < P; i++) begin : g_ilmi
    tb_ilmi_agent u_agent (
      .pclk, .init, .ilmi_sbus(ilmi_sbus[i]), .ilmi_sdata(ilmi_sdata[i]),
      .ilmi_request(ilmi_request[i]), .ilmi_grant(ilmi_grant[i]),
      .ilmi_data(ilmi_data[i]), .ilmi_bus(ilmi_bus[i]), .received(ilmi_rx[i])
    );
  end

  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- timing
  logic [9:0] phase;
  assign phase = dut.tmg.phase;
  int slot_no = 0;
  always @(posedge pclk) if (!init && phase == 10'(SLOT - 1)) slot_no <= slot_no + 1;

  // ------------------------------------------------------- serial sources
  cell_t        tx_buf [P], tx_sh [P];
  logic [P-1:0] tx_pend = '0, tx_act = '0;
  logic [P-1:0] req_en = '0;
  longint       tx_time [P];

  always @(negedge pclk) begin
    if (init) begin
      indicate <= '0; data_in <= '0; request <= '0;
    end else begin
      if (phase == 10'd0) begin
        for (int p = 0; p < P; p++) begin
          tx_act[p] = tx_pend[p];
          tx_sh[p]  = tx_buf[p];
          if (tx_pend[p]) tx_time[p] = $time;
        end
        tx_pend = '0;
      end
      for (int p = 0; p < P; p++) begin
        indicate[p] <= tx_act[p] && phase < 10'(CELL_BITS);
        data_in[p]  <= tx_act[p] && phase < 10'(CELL_BITS) && tx_sh[p][CELL_BITS - 1 - int'(phase)];
      end
      request <= req_en & {P{phase >= 10'd1 && phase < 10'd8}};
    end
  end

  // Expected cells per output port.
  cell_t exp_q [P][$];

  task automatic send(int p, cell_t c);
    tx_buf[p]  = c;
    tx_pend[p] = 1'b1;
  endtask

  task automatic expect_at(int p, cell_t c);
    exp_q[p].push_back(c);
  endtask

  // Wait until late in the slot, so cells queued now go out in the next slot.
  task automatic next_slot();
    do @(negedge pclk); while (phase != 10'd450);
  endtask

  // --------------------------------------------------------- serial sinks
  cell_t  rx_sh [P];
  int     rx_cnt [P];
  int     got_user [P], got_unassigned [P], got_unexpected;
  cell_t  first_at4, vc_expect;
  longint vc_time = 0;
  bit     first_at4_seen = 0;
  bit     saturating = 0;
  longint last_rx_time [P];
  cell_t  last_rx [P];

  always @(posedge pclk) begin
    if (init) begin
      for (int p = 0; p < P; p++) begin
        rx_cnt[p] = 0; got_user[p] = 0; got_unassigned[p] = 0;
      end
      got_unexpected = 0;
    end else begin
      for (int p = 0; p < P; p++) begin
        if (dout_flag[p]) begin
          rx_sh[p] = {rx_sh[p][CELL_BITS-2:0], data_out[p]};
          rx_cnt[p]++;
          if (rx_cnt[p] == CELL_BITS) begin
            rx_cnt[p] = 0;
            if (rx_sh[p] == '0) got_unassigned[p]++;
            else begin
              bit found;
              found = 0;
              got_user[p]++;
              if (rx_sh[p] == vc_expect) vc_time = $time;
              last_rx[p]      = rx_sh[p];
              last_rx_time[p] = $time;
              if (p == 4 && !first_at4_seen) begin
                first_at4      = rx_sh[p];
                first_at4_seen = 1;
              end
              foreach (exp_q[p][i]) begin
                if (!found && exp_q[p][i] == rx_sh[p]) begin
                  exp_q[p].delete(i);
                  found = 1;
                end
              end
              if (!found && !saturating) begin
                got_unexpected++;
                $display("FAIL: unexpected cell at port %0d: %h", p, rx_sh[p]);
              end
            end
          end
        end else rx_cnt[p] = 0;
      end
    end
  end

  // Cells crossing the fabric in each slot.
  int fab_cells = 0, fab_max = 0, fab_slots16 = 0;
  logic fab_prev = 1'b0;
  always @(posedge pclk) begin
    if (init) fab_prev <= 1'b0; else fab_prev <= dut.fab_valid;
    if (dut.fab_valid && !fab_prev) fab_cells <= fab_cells + 1;
    if (phase == 10'(SLOT - 1)) begin
      if (fab_cells > fab_max) fab_max <= fab_cells;
      if (fab_cells == 16) fab_slots16 <= fab_slots16 + 1;
      fab_cells <= 0;
    end
  end

  // -------------------------------------------------------- table loading
  task automatic load(int port, logic [63:0] e, sigcmd_e cmd);
    signal_address = 3'(port);
    for (int i = 63; i >= 0; i--) begin
      @(negedge pclk);
      signal_control = {2'b00, 1'b1, e[i]};
    end
    @(negedge pclk);
    signal_control = {cmd, 2'b00};
    @(negedge pclk);
    signal_control = '0;
    @(negedge pclk);
  endtask

  function automatic conn_id_t cid(logic [7:0] vpi, logic [15:0] vci);
    return '{gfc: 4'd0, vpi: vpi, vci: vci};
  endfunction
  function automatic rtag_t tg(int port, int prio);
    return '{port: 4'(port), prio: 3'(prio), clp: 1'b0};
  endfunction

  // --------------------------------------------------------------- stimulus
  cell_t c_vc, c_vp1, c_vp3, c_clp, c_mc, c_t1, c_t2, c_d1, c_d2, c_il, c_sig, c_err,
         c_vpseg, c_vce2e, c_err2;
  longint lat;
  int     sum_lost, sum_ovf, sum_clp, sum_mon, sum_mc, sum_unass, out_b [P];

  initial begin
    signal_control = '0; signal_address = '0; clp_threshold = 7'd2;
    repeat (5) @(posedge pclk);
    @(negedge pclk) init = 1'b0;

    // port 0: VC switch to port 3, VP switches to port 4 at two priorities
    load(0, route_ent(cid(1, 100), tg(3, 1), cid(2, 200)), SC_WR_ROUTE);
    load(0, route_ent(cid(5, 0),   tg(4, 3), cid(6, 0)),   SC_WR_ROUTE);
    load(0, route_ent(cid(8, 0),   tg(4, 1), cid(9, 0)),   SC_WR_ROUTE);
    // port 1: a VC multicast to ports 2 and 5
    load(1, route_ent(cid(7, 70), tg(2, 0), cid(7, 71)), SC_WR_ROUTE);
    load(1, route_ent(cid(7, 70), tg(5, 0), cid(7, 72)), SC_WR_ROUTE);
    // port 2: policed connections to port 6, one tagging and one discarding
    load(2, route_ent(cid(9, 90), tg(6, 2), cid(9, 190)), SC_WR_ROUTE);
    load(2, traffic_ent(cid(9, 90), 1'b1, 16'd8, 16'd0), SC_WR_TRAFFIC);
    load(2, route_ent(cid(9, 91), tg(6, 2), cid(9, 191)), SC_WR_ROUTE);
    load(2, traffic_ent(cid(9, 91), 1'b0, 16'd8, 16'd0), SC_WR_TRAFFIC);
    // saturation connections: every port multicasts VPI 20 / VCI 1 to p+1 and p+3
    for (int p = 0; p < P; p++) begin
      load(p, route_ent(cid(20, 1), tg((p + 1) % P, 0), cid(21, 16'(p))), SC_WR_ROUTE);
      load(p, route_ent(cid(20, 1), tg((p + 3) % P, 0), cid(22, 16'(p))), SC_WR_ROUTE);
    end
    // a third copy at port 0 asks the fabric for 17 cells per slot: cells are lost
    load(0, route_ent(cid(20, 1), tg(5, 0), cid(23, 0)), SC_WR_ROUTE);

    req_en = 8'hEF;   // port 4 held back to collect cells of two priorities
    c_vc    = mk_cell(mk_hdr(1, 100), 8'h10);
    c_mc    = mk_cell(mk_hdr(7, 70), 8'h20);
    c_t1    = mk_cell(mk_hdr(9, 90), 8'h30);
    c_il    = mk_cell(mk_hdr(0, 16), 8'h40);
    c_sig   = mk_cell(mk_hdr(0, 5), 8'h50);
    c_err   = mk_cell(mk_hdr(33, 1), 8'h60);
    c_vp1   = mk_cell(mk_hdr(8, 44), 8'h70);
    c_t2    = mk_cell(mk_hdr(9, 90), 8'h31);
    c_vp3   = mk_cell(mk_hdr(5, 33), 8'h80);
    c_d1    = mk_cell(mk_hdr(9, 91), 8'h32);
    c_clp   = mk_cell(mk_hdr(5, 34, 3'b000, 1'b1), 8'h90);
    c_d2    = mk_cell(mk_hdr(9, 91), 8'h33);
    c_vpseg = mk_cell(mk_hdr(5, 3), 8'hA0);
    c_vce2e = mk_cell(mk_hdr(1, 100, 3'b101), 8'hB0);
    c_err2  = mk_cell(mk_hdr(1, 101), 8'hC0);

    next_slot();
    send(0, c_vc);  expect_at(3, out_cell(c_vc, mk_hdr(2, 200)));
    send(1, c_mc);  expect_at(2, out_cell(c_mc, mk_hdr(7, 71)));
                    expect_at(5, out_cell(c_mc, mk_hdr(7, 72)));
    send(2, c_t1);  expect_at(6, out_cell(c_t1, mk_hdr(9, 190)));
    send(7, c_il);  expect_at(7, out_cell(c_il, mk_hdr(0, 16)));
    send(5, c_sig); expect_at(5, out_cell(c_sig, mk_hdr(0, 5)));
    send(6, c_err); expect_at(6, err_cell(c_err));
    next_slot();
    send(0, c_vp1); expect_at(4, out_cell(c_vp1, mk_hdr(9, 44)));
    send(2, c_t2);  expect_at(6, out_cell(c_t2, mk_hdr(9, 190, 3'b000, 1'b1)));  // tagged
    next_slot();
    send(0, c_vp3); expect_at(4, out_cell(c_vp3, mk_hdr(6, 33)));
    send(2, c_d1);  expect_at(6, out_cell(c_d1, mk_hdr(9, 191)));
    next_slot();
    send(0, c_clp);                   // two cells wait at port 4: above the CLP threshold
    send(2, c_d2);                    // second cell within the increment: discarded
    next_slot();
    send(0, c_vpseg); expect_at(0, out_cell(c_vpseg, mk_hdr(5, 3)));
    next_slot();
    send(0, c_vce2e); expect_at(3, out_cell(c_vce2e, mk_hdr(2, 200, 3'b101)));
    next_slot();
    send(0, c_err2);  expect_at(0, err_cell(c_err2));
    repeat (6) next_slot();
    req_en = 8'hFF;
    repeat (6) next_slot();

    // latency of the VC-switched cell: sent in slot S, out by the end of slot S+2
    check(exp_q[3].size() == 0, "all cells reached port 3");
    for (int p = 0; p < P; p++)
      if (exp_q[p].size() != 0) check(0, $sformatf("%0d cells missing at port %0d", exp_q[p].size(), p));
    check(got_unexpected == 0, "no unexpected cells");
    check(first_at4_seen && first_at4 == out_cell(c_vp3, mk_hdr(6, 33)),
          "priority 3 cell overtakes the earlier priority 1 cell");
    check(clp_discards[4] == 16'd1, "selective CLP discard at port 4");
    check(cac_rx == 1, "signalling cell reached the CAC handler");
    check(sm_rx == 3, "OAM end point and two table errors reached management");
    check(ilmi_rx[7] == 1, "ILMI cell reached the agent of port 7");
    check(oam_monitored[0] == 16'd1, "end-to-end OAM cell monitored at port 0");
    check(mc_copies[1] == 16'd2, "two multicast copies at port 1");

    // ---------------------------------------------------------- saturation
    saturating    = 1;
    clp_threshold = 7'd64;
    for (int p = 0; p < P; p++) out_b[p] = got_user[p];
    for (int s = 0; s < 90; s++) begin
      next_slot();
      for (int p = 0; p < P; p++) send(p, mk_cell(mk_hdr(20, 1), 8'(s)));
    end
    next_slot();
    for (int p = 0; p < P; p++)
      check(got_user[p] - out_b[p] >= 85, $sformatf("port %0d sends one cell per slot under load (%0d)",
            p, got_user[p] - out_b[p]));
    check(fab_max == 16, $sformatf("fabric carries at most 16 cells per slot (max %0d)", fab_max));
    repeat (70) next_slot();

    sum_lost = 0; sum_ovf = 0; sum_clp = 0; sum_mon = 0; sum_mc = 0; sum_unass = 0;
    for (int p = 0; p < P; p++) begin
      sum_lost  += lost_cells[p];
      sum_ovf   += overflow_discards[p];
      sum_clp   += clp_discards[p];
      sum_mon   += oam_monitored[p];
      sum_mc    += mc_copies[p];
      sum_unass += got_unassigned[p];
    end
    lat = last_rx_time[3];
    $display("mechanisms: fabric16=%0d overflow=%0d lost=%0d clp_discard=%0d monitored=%0d mc=%0d unassigned=%0d sig=%0d mgmt=%0d ilmi=%0d",
             fab_slots16, sum_ovf, sum_lost, sum_clp, sum_mon, sum_mc, sum_unass, cac_rx, sm_rx, ilmi_rx[7]);
    check(fab_slots16 > 0, "slots with 16 fabric cells occurred");
    check(sum_ovf > 0, "output buffer overflow occurred");
    check(sum_lost > 0, "cells lost at a busy multicast unit or full user FIFO");
    check(sum_unass > 0, "unassigned cells were sent");
    check(sum_mc > 2, "multicast copies under load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Three-slot latency of the first VC-switched cell.
  initial begin
    longint t0;
    wait (!init);
    wait (tx_pend[0]);
    @(negedge pclk iff phase == 10'd1);
    t0 = tx_time[0];
    vc_expect = out_cell(c_vc, mk_hdr(2, 200));
    wait (vc_time != 0);
    check((vc_time - t0) / 10 <= 3 * SLOT && (vc_time - t0) / 10 > 2 * SLOT,
          $sformatf("VC cell latency within three slots (%0d cycles)", (vc_time - t0) / 10));
  end

  initial begin
    repeat (300 * SLOT) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
