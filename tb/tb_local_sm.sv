// tb_local_sm - checks the local management unit of an input port: OAM cells
// that end here are queued whole, errored headers (three words) are queued as a
// cell with a zero payload, monitored OAM cells are counted but not queued, a
// full queue refuses cells, and cells go out in order to the management bus when
// this port's address is granted.
module tb_local_sm;
  import atm_pkg::*;
  localparam int D = 2, PORT = 3;
  logic        pclk = 1'b0, init = 1'b1;
  word_t       sbus = '0, sm_bus;
  stype_e      stype = ST_NONE;
  logic        sdata = 1'b0, sm_data, sm_grant = 1'b0, sm_request;
  logic [2:0]  sm_address = '0;
  logic [15:0] oam_monitored;

  local_sm #(.DEPTH(D), .PORT_W(3), .PORT(PORT)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic put(stype_e t, logic [7:0] id, int len = CELL_WORDS);
    for (int k = 0; k < len; k++) begin
      @(negedge pclk);
      sdata = 1'b1; stype = t; sbus = {id, 8'(k)};
    end
    @(negedge pclk) begin sdata = 1'b0; stype = ST_NONE; sbus = '0; end
    repeat (40) @(negedge pclk);   // the sorter sends at most one cell per slot
  endtask

  typedef word_t wcell_t [CELL_WORDS];
  task automatic take(output wcell_t w, output int n);
    int t;
    n = 0; t = 0;
    while (!sm_request && t < 20) begin @(negedge pclk); t++; end
    sm_grant = 1'b1; sm_address = 3'(PORT);
    t = 0;
    while (!sm_data && t < 5) begin @(negedge pclk); t++; end
    while (sm_data) begin
      if (n < CELL_WORDS) w[n] = sm_bus;
      n++;
      @(negedge pclk);
    end
    sm_grant = 1'b0;
    @(negedge pclk);
  endtask

  wcell_t w;
  int     n;
  bit     ok;
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    put(ST_USER, 8'h01);
    put(ST_OAM_MON, 8'h02);
    put(ST_OAM_MON, 8'h03);
    check(!sm_request, "user and monitored cells are not queued");
    check(oam_monitored == 16'd2, "monitored OAM cells counted");
    put(ST_LSM_ERR, 8'h10, HDR_WORDS);
    put(ST_LSM_OAM, 8'h11);
    put(ST_LSM_OAM, 8'h12);   // queue full: refused
    check(sm_request, "request with cells queued");
    sm_grant = 1'b1; sm_address = 3'(PORT - 1);
    repeat (4) @(negedge pclk);
    check(!sm_data, "no transfer on another port's grant");
    sm_grant = 1'b0;
    @(negedge pclk);
    take(w, n);
    ok = n == CELL_WORDS;
    for (int k = 0; k < CELL_WORDS && ok; k++)
      if (w[k] != ((k < HDR_WORDS) ? {8'h10, 8'(k)} : 16'h0000)) ok = 0;
    check(ok, "errored header queued with a zero payload");
    take(w, n);
    ok = n == CELL_WORDS;
    for (int k = 0; k < CELL_WORDS && ok; k++) if (w[k] != {8'h11, 8'(k)}) ok = 0;
    check(ok, "OAM cell queued whole");
    repeat (4) @(negedge pclk);
    check(!sm_request, "the cell offered to a full queue was refused");
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
