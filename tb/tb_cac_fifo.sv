// tb_cac_fifo - checks the signalling queue of an input port: only signalling
// cells on the internal bus are taken, whole cells only, at most DEPTH of them;
// they are handed out in order to the signalling bus when the arbiter grants this
// port's address, and the request drops for one cycle after each cell.
module tb_cac_fifo;
  import atm_pkg::*;
  localparam int D = 4, PORT = 6;
  logic       pclk = 1'b0, init = 1'b1;
  word_t      sbus = '0, cac_bus;
  stype_e     stype = ST_NONE;
  logic       sdata = 1'b0, cac_request, cac_grant = 1'b0, cac_data;
  logic [2:0] cac_address = '0;

  cac_fifo #(.DEPTH(D), .PORT_W(3), .PORT(PORT)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  typedef word_t wcell_t [CELL_WORDS];
  task automatic put(stype_e t, logic [7:0] id);
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      sdata = 1'b1; stype = t; sbus = {id, 8'(k)};
    end
    @(negedge pclk) begin sdata = 1'b0; stype = ST_NONE; sbus = '0; end
  endtask

  // arbiter side: grant when asked, collect one cell, release
  task automatic take(logic [2:0] addr, output wcell_t w, output int n, output int gap);
    int t;
    n = 0; t = 0;
    while (!cac_request && t < 50) begin @(negedge pclk); t++; end
    cac_grant = 1'b1; cac_address = addr;
    t = 0;
    while (!cac_data && t < 5) begin @(negedge pclk); t++; end
    while (cac_data) begin
      if (n < CELL_WORDS) w[n] = cac_bus;
      n++;
      @(negedge pclk);
    end
    gap = 0;
    while (!cac_request && gap < 5) begin
      cac_grant = 1'b0;
      @(negedge pclk);
      gap++;
    end
    cac_grant = 1'b0;
    @(negedge pclk);
  endtask

  wcell_t w;
  int     n, gap;
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    check(!cac_request, "no request while empty");
    put(ST_USER, 8'h90);                 // not signalling: ignored
    check(!cac_request, "user cell not taken");
    for (int i = 0; i < D + 2; i++) put(ST_SIG, 8'(i));   // two more than fit
    check(cac_request, "request with cells queued");
    // a grant for another port's address moves nothing
    cac_grant = 1'b1; cac_address = 3'(PORT + 1);
    repeat (5) @(negedge pclk);
    check(!cac_data, "no transfer on another port's grant");
    cac_grant = 1'b0;
    @(negedge pclk);
    for (int i = 0; i < D; i++) begin
      bit ok;
      take(3'(PORT), w, n, gap);
      ok = n == CELL_WORDS;
      for (int k = 0; k < CELL_WORDS && k < n; k++) if (w[k] != {8'(i), 8'(k)}) ok = 0;
      check(ok, $sformatf("cell %0d handed out whole and in order", i));
      if (i < D - 1) check(gap == 1, $sformatf("request low for one cycle between cells (%0d)", gap));
    end
    repeat (3) @(negedge pclk);
    check(!cac_request, "cells beyond the depth were not kept");
    // a cell that arrives while one is read out is kept
    fork
      put(ST_SIG, 8'h40);
      begin repeat (30) @(negedge pclk); put(ST_SIG, 8'h41); end
    join
    take(3'(PORT), w, n, gap);
    check(n == CELL_WORDS && w[0] == 16'h4000 && w[26] == 16'h401A, "cell 0x40");
    take(3'(PORT), w, n, gap);
    check(n == CELL_WORDS && w[0] == 16'h4100, "cell 0x41");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
