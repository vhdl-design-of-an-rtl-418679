// tb_tdm_arbiter - checks the fabric arbiter with eight always-busy senders
// modelled like the user FIFOs (a start cycle and 27 words per grant, then
// one cycle with the request low): one
// grant at a time, only inside the high part of the slot, round-robin order,
// and exactly sixteen cells per slot, two per port. Then one port alone.
module tb_tdm_arbiter;
  import atm_pkg::*;
  localparam int P = 8;
  logic         pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t         tmg;
  logic [P-1:0] csf_request, csf_grant, dest_grant;
  logic [P-1:0] want = '0, pause = '0;
  int           cnt [P];

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  tdm_arbiter dut (.pclk, .init, .tmg, .csf_request, .csf_grant, .dest_grant);
  always #5 pclk = ~pclk;

  assign csf_request = want & ~pause;
  always @(posedge pclk) begin
    for (int p = 0; p < P; p++) begin
      if (init) begin cnt[p] = 0; pause[p] <= 1'b0; end
      else begin
        pause[p] <= 1'b0;
        if (csf_grant[p]) begin
          cnt[p]++;
          if (cnt[p] == CELL_WORDS + 1) begin cnt[p] = 0; pause[p] <= 1'b1; end
        end
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // observe grants
  logic [P-1:0] prev = '0;
  int slot_cells, per_port [P], last_port;
  int order_err = 0, onehot_err = 0, window_err = 0;
  always @(posedge pclk) begin
    if (!init) begin
      prev <= csf_grant;
      if ($countones(csf_grant) > 1) onehot_err++;
      if (csf_grant != dest_grant) onehot_err++;
      for (int p = 0; p < P; p++) if (csf_grant[p] && !prev[p]) begin
        slot_cells++;
        per_port[p]++;
        if (int'(tmg.phase) + CELL_WORDS > 480) window_err++;
        if (want == '1 && last_port >= 0 && p != (last_port + 1) % P) order_err++;
        last_port = p;
      end
    end
  end

  initial begin
    last_port = -1;
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    want = '1;
    for (int s = 0; s < 4; s++) begin
      @(posedge pclk iff tmg.rise);
      slot_cells = 0;
      foreach (per_port[p]) per_port[p] = 0;
      @(posedge pclk iff tmg.phase == 10'd511);
      #1;
      check(slot_cells == 16, $sformatf("16 cells per slot (got %0d)", slot_cells));
      for (int p = 0; p < P; p++) check(per_port[p] == 2, $sformatf("port %0d served twice", p));
    end
    check(onehot_err == 0, "one grant at a time, destination grant follows");
    check(window_err == 0, "every transfer ends inside the high part of the slot");
    check(order_err == 0, "round-robin order");
    // only port 3 asks: it gets every grant
    want = 8'b0000_1000;
    @(posedge pclk iff tmg.rise);
    slot_cells = 0;
    foreach (per_port[p]) per_port[p] = 0;
    @(posedge pclk iff tmg.phase == 10'd511);
    #1;
    check(per_port[3] == 16 && slot_cells == 16, "a single sender gets all 16 transfers");
    want = '0;
    repeat (600) @(posedge pclk);
    check(csf_grant == '0, "no grant without a request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
