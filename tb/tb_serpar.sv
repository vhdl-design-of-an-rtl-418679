// tb_serpar - checks the payload buffer of an input port: random cells arrive
// in consecutive slots; in the slot after each, d_flag is set and the 24 payload
// words read with d_ok must be the cell's 48 payload octets. A cell dropped with
// d_rst clears the flag, and an incomplete cell sets no flag.
module tb_serpar;
  import atm_pkg::*;
  import tb_pkg::*;
  logic  pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t  tmg;
  logic  indicate = 1'b0, data_in = 1'b0, d_flag, d_ok = 1'b0, d_rst = 1'b0;
  word_t d_out;

  slot_timer #(.SLOT_PCLK(512), .HCLK_HIGH(480)) u_t (.pclk, .init, .tmg, .hclk, .dclk);
  serpar dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // serial source: sends tx_cell in the next slot when tx_go is set
  cell_t tx_cell, sh;
  bit    tx_go = 0, act = 0;
  int    tx_len = CELL_BITS;
  always @(negedge pclk) begin
    if (!init) begin
      if (tmg.phase == 10'd0) begin act = tx_go; sh = tx_cell; tx_go = 0; end
      indicate <= act && int'(tmg.phase) < tx_len;
      data_in  <= act && int'(tmg.phase) < tx_len && sh[CELL_BITS - 1 - int'(tmg.phase)];
    end
  end
  task automatic late();
    do @(negedge pclk); while (tmg.phase != 10'd450);
  endtask
  task automatic early();
    do @(negedge pclk); while (tmg.phase != 10'd40);
  endtask

  // read the payload while the next cell is arriving
  task automatic read_check(cell_t c, string what);
    int bad;
    bad = 0;
    check(d_flag, {what, ": payload flag set"});
    for (int k = 0; k < PAYLOAD_WORDS; k++) begin
      d_ok = 1'b1;
      #1;
      if (d_out != c[383 - 16*k -: 16]) bad++;
      @(negedge pclk);
    end
    d_ok = 1'b0;
    #1;
    check(bad == 0, {what, ": payload words"});
    check(!d_flag && d_out == '0, {what, ": flag cleared after the last word, bus idle"});
  endtask

  cell_t cells [4];
  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    foreach (cells[i]) begin
      cells[i] = mk_cell(mk_hdr(8'($urandom), 16'($urandom)), 8'($urandom));
      for (int b = 0; b < 384; b++) cells[i][b] = 1'($urandom);
    end
    late(); tx_cell = cells[0]; tx_go = 1;
    late(); tx_cell = cells[1]; tx_go = 1;
    early(); read_check(cells[0], "cell 0");
    late(); tx_cell = cells[2]; tx_go = 1;
    early(); read_check(cells[1], "cell 1 while cell 2 arrives");
    late();
    early();
    // drop cell 2 unread
    check(d_flag, "cell 2 flag set");
    @(negedge pclk) d_rst = 1'b1;
    @(negedge pclk) d_rst = 1'b0;
    check(!d_flag, "d_rst clears the flag");
    // a cell cut short: no flag
    tx_len = 200; tx_cell = cells[3]; tx_go = 1;
    late(); early();
    check(!d_flag, "incomplete cell gives no payload flag");
    tx_len = CELL_BITS; tx_cell = cells[3]; tx_go = 1;
    late(); early();
    read_check(cells[3], "cell 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
