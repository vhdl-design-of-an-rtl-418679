// tb_workload_16port - the switch at the largest size its TDM bus can carry:
// sixteen ports, every port receiving a user cell in every slot.
//
// The 16-bit fabric moves one cell in 30 pclk cycles (grant, 27 words, request
// gap), so 16 cells fit in the 480-cycle high phase of hclk, which is the port
// count the bus is sized for. Each port i owns four VC connections (VCI 100..103);
// connection k goes to output (i + 1 + k) mod 16, and in slot s every port sends
// on connection s mod 4 (all in one priority class, so each output keeps arrival
// order), so each slot's traffic is a permutation: all sixteen
// outputs are loaded to 100%. Every output asks for a cell in every slot. The
// test checks that no cell is lost at the inputs or the outputs, that every cell
// comes out at the right port with its new header, that the fabric carries
// sixteen cells in a slot, and that every cell leaves within a bounded number of
// slots. The signalling, management and ILMI paths are left idle.
module tb_workload_16port;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int P     = 16;
  localparam int SLOT  = 512;
  localparam int SLOTS = 40;

  logic             pclk = 1'b0, init = 1'b1;
  logic             hclk, dclk;
  logic [P-1:0]     indicate, data_in, request, data_out, dout_flag;
  word_t            cac_im_bus, sm_im_bus;
  logic             cac_im_data, sm_im_data;
  logic [3:0]       cac_address, sm_address;
  logic             cac_cell_grant, sm_cell_grant;
  logic [3:0]       signal_control = '0;
  logic [3:0]       signal_address = '0;
  word_t            ilmi_sbus [P];
  logic [3:0]       ilmi_stype [P];
  logic [P-1:0]     ilmi_sdata, ilmi_grant;
  word_t            ilmi_bus [P];
  logic [15:0]      lost_cells [P], oam_monitored [P], mc_copies [P];
  logic [15:0]      clp_discards [P], overflow_discards [P];

  always_comb for (int i = 0; i < P; i++) ilmi_bus[i] = '0;

  atm_switch #(.PORTS(P), .PORT_W(4)) dut (
    .pclk, .init, .hclk, .dclk, .indicate, .data_in, .request, .data_out, .dout_flag,
    .cac_im_bus, .cac_im_data, .cac_address, .cac_cell_req(1'b0), .cac_cell_address(4'd0),
    .cac_cell_grant, .cac_om_data(1'b0), .cac_om_bus(16'd0), .signal_control, .signal_address,
    .sm_im_bus, .sm_im_data, .sm_address, .sm_cell_req(1'b0), .sm_cell_address(4'd0),
    .sm_cell_grant, .sm_om_data(1'b0), .sm_om_bus(16'd0),
    .ilmi_sbus, .ilmi_stype, .ilmi_sdata, .ilmi_request('0), .ilmi_grant, .ilmi_data('0),
    .ilmi_bus, .clp_threshold(7'd64),
    .lost_cells, .oam_monitored, .mc_copies, .clp_discards, .overflow_discards
  );

  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  logic [9:0] phase;
  assign phase = dut.tmg.phase;
  int slot_no = 0;
  always @(posedge pclk) if (!init && phase == 10'(SLOT - 1)) slot_no <= slot_no + 1;

  // Serial sources: a queued cell starts at the next slot start.
  cell_t        tx_buf [P], tx_sh [P];
  logic [P-1:0] tx_pend = '0, tx_act = '0;
  logic         req_en = 1'b0;

  always @(negedge pclk) begin
    if (init) begin
      indicate <= '0; data_in <= '0; request <= '0;
    end else begin
      if (phase == 10'd0) begin
        for (int p = 0; p < P; p++) begin
          tx_act[p] = tx_pend[p];
          tx_sh[p]  = tx_buf[p];
        end
        tx_pend = '0;
      end
      for (int p = 0; p < P; p++) begin
        indicate[p] <= tx_act[p] && phase < 10'(CELL_BITS);
        data_in[p]  <= tx_act[p] && phase < 10'(CELL_BITS) && tx_sh[p][CELL_BITS - 1 - int'(phase)];
      end
      request <= {P{req_en && phase >= 10'd1 && phase < 10'd8}};
    end
  end

  // Expected cells per output, with the slot they were sent in.
  cell_t exp_q [P][$];
  int    exp_slot [P][$];
  int    got_user = 0, got_wrong = 0, max_delay = 0;

  cell_t rx_sh [P];
  int    rx_cnt [P];
  always @(posedge pclk) begin
    if (init) begin
      for (int p = 0; p < P; p++) rx_cnt[p] = 0;
    end else begin
      for (int p = 0; p < P; p++) begin
        if (dout_flag[p]) begin
          rx_sh[p] = {rx_sh[p][CELL_BITS-2:0], data_out[p]};
          rx_cnt[p]++;
          if (rx_cnt[p] == CELL_BITS) begin
            rx_cnt[p] = 0;
            if (rx_sh[p] != '0) begin
              got_user++;
              // Cells of one output keep their order: compare with the oldest.
              if (exp_q[p].size() != 0 && exp_q[p][0] == rx_sh[p]) begin
                if (slot_no - exp_slot[p][0] > max_delay) max_delay = slot_no - exp_slot[p][0];
                void'(exp_q[p].pop_front());
                void'(exp_slot[p].pop_front());
              end else begin
                got_wrong++;
                $display("FAIL: unexpected cell at port %0d: %h", p, rx_sh[p]);
              end
            end
          end
        end else rx_cnt[p] = 0;
      end
    end
  end

  // Cells crossing the fabric in each slot.
  int   fab_cells = 0, fab_max = 0;
  logic fab_prev = 1'b0;
  always @(posedge pclk) begin
    if (init) fab_prev <= 1'b0; else fab_prev <= dut.fab_valid;
    if (!init && dut.fab_valid && !fab_prev) fab_cells <= fab_cells + 1;
    if (phase == 10'(SLOT - 1)) begin
      if (fab_cells > fab_max) fab_max <= fab_cells;
      fab_cells <= 0;
    end
  end

  task automatic load(int port, logic [63:0] e, sigcmd_e cmd);
    signal_address = 4'(port);
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

  function automatic int dest(int i, int k);
    return (i + 1 + k) % P;
  endfunction

  int unsigned seed;
  initial begin
    seed = $urandom;
    repeat (4) @(posedge pclk);
    init = 1'b0;
    for (int i = 0; i < P; i++)
      for (int k = 0; k < 4; k++)
        load(i, route_ent('{gfc: 4'd0, vpi: 8'(i + 1), vci: 16'(100 + k)},
                          '{port: 4'(dest(i, k)), prio: 3'd0, clp: 1'b0},
                          '{gfc: 4'd0, vpi: 8'(40 + dest(i, k)), vci: 16'(200 + i)}), SC_WR_ROUTE);
    do @(negedge pclk); while (phase != 10'd450);
    req_en = 1'b1;
    for (int s = 0; s < SLOTS; s++) begin
      for (int i = 0; i < P; i++) begin
        cell_t c;
        int    k;
        k = s % 4;
        c = mk_cell(mk_hdr(8'(i + 1), 16'(100 + k)), 8'(seed + 32'(s * P + i)));
        tx_buf[i]  = c;
        tx_pend[i] = 1'b1;
        exp_q[dest(i, k)].push_back(out_cell(c, mk_hdr(8'(40 + dest(i, k)), 16'(200 + i))));
        exp_slot[dest(i, k)].push_back(slot_no + 1);
      end
      do @(negedge pclk); while (phase != 10'd450);
    end
    // Drain: no new cells, outputs keep asking.
    repeat (8) begin
      @(negedge pclk);
      do @(negedge pclk); while (phase != 10'd450);
    end
    begin
      int lost = 0, ovf = 0, left = 0;
      for (int p = 0; p < P; p++) begin
        lost += int'(lost_cells[p]);
        ovf  += int'(overflow_discards[p]);
        left += exp_q[p].size();
      end
      $display("workload 16 ports: cells out %0d of %0d, fabric max %0d per slot, lost %0d, overflow %0d, max delay %0d slots",
               got_user, P * SLOTS, fab_max, lost, ovf, max_delay);
      check(got_user == P * SLOTS, "every cell offered came out");
      check(left == 0 && got_wrong == 0, "every cell came out at its port with its new header, in order");
      check(lost == 0, "no cell lost in the input FIFOs at full load");
      check(ovf == 0, "no output buffer overflow at full load");
      check(fab_max == 16, "the fabric carried 16 cells in one slot");
      check(max_delay <= 4, "every cell left within four slots of arriving");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOT * (SLOTS + 40) + 200000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
