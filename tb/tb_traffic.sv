// tb_traffic - checks the policer: three contracts (a tagging path contract, a
// discarding channel contract, a second tagging channel) are loaded, and one
// random cell per slot is presented on the table bus as the cell sorter does.
// The reported action is compared with a reference virtual-scheduling GCRA kept
// here, in slot units.
module tb_traffic;
  import atm_pkg::*;
  import tb_pkg::*;
  logic       pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t       tmg;
  logic [3:0] signal_control = '0;
  logic [2:0] signal_address = 3'd5;
  logic       table_data = 1'b0, table_flag = 1'b0;
  word_t      table_bus = '0;
  traffic_e   traffic_status;

  slot_timer #(.SLOT_PCLK(128), .HCLK_HIGH(120)) u_t (.pclk, .init, .tmg, .hclk, .dclk);
  traffic #(.ENTRIES(4), .PORT_W(3), .PORT(5)) dut (.*);
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

  // reference contracts
  typedef struct { conn_id_t key; bit tag; int incr, limit; longint tat; } ctr_t;
  ctr_t   c [3];
  longint now = 0;
  always @(posedge pclk) if (!init && tmg.rise) now <= now + 1;

  function automatic traffic_e ref_police(atm_hdr_t h, longint t);
    foreach (c[i]) begin
      if (c[i].key.vpi == h.vpi && (c[i].key.vci == 0 || c[i].key.vci == h.vci)) begin
        if (c[i].tat > t + c[i].limit) return (c[i].tag && !h.clp) ? TR_TAG : TR_DISCARD;
        c[i].tat = ((c[i].tat > t) ? c[i].tat : t) + c[i].incr;
        return TR_NONE;
      end
    end
    return TR_NONE;
  endfunction

  atm_hdr_t h;
  traffic_e exp_s;
  int       cnt [traffic_e];
  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    c[0] = '{key: '{gfc: 0, vpi: 8'd10, vci: 16'd0},  tag: 1, incr: 3, limit: 1, tat: 0};
    c[1] = '{key: '{gfc: 0, vpi: 8'd11, vci: 16'd50}, tag: 0, incr: 2, limit: 0, tat: 0};
    c[2] = '{key: '{gfc: 0, vpi: 8'd12, vci: 16'd60}, tag: 1, incr: 4, limit: 3, tat: 0};
    // loads take under one 128-cycle slot each; the contract starts at its load slot
    foreach (c[i]) begin
      @(negedge pclk iff tmg.phase == 10'd2);
      load(traffic_ent(c[i].key, c[i].tag, 16'(c[i].incr), 16'(c[i].limit)), SC_WR_TRAFFIC);
      c[i].tat = now;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge pclk iff tmg.phase == 10'd10);
      if ($urandom_range(0, 2) == 0) continue;   // idle slot
      case ($urandom_range(0, 4))
        0, 1: h = mk_hdr(8'd10, 16'($urandom_range(1, 900)));
        2:    h = mk_hdr(8'd11, 16'd50);
        3:    h = mk_hdr(8'd12, 16'd60);
        default: h = mk_hdr(8'd11, 16'd51);      // no contract
      endcase
      h.clp = ($urandom_range(0, 3) == 0);
      // the two header words, each held for one dclk tick
      table_data = 1'b1; table_flag = 1'b1; table_bus = h[31:16];
      @(posedge pclk iff tmg.dtick);
      @(negedge pclk) table_bus = h[15:0];
      @(posedge pclk iff tmg.dtick);
      @(negedge pclk) begin table_data = 1'b0; table_flag = 1'b0; table_bus = '0; end
      repeat (12) @(negedge pclk);
      exp_s = ref_police(h, now);
      cnt[exp_s]++;
      check(traffic_status == exp_s, $sformatf("cell %h at slot %0d: %s, expected %s",
            h, now, traffic_status.name(), exp_s.name()));
    end
    // the status returns to no action at the next slot
    @(negedge pclk iff tmg.phase == 10'd1);
    check(traffic_status == TR_NONE, "status cleared at the slot start");
    foreach (cnt[s]) $display("%s: %0d", s.name(), cnt[s]);
    check(cnt.exists(TR_TAG) && cnt.exists(TR_DISCARD) && cnt.exists(TR_NONE), "all actions occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
