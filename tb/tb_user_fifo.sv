// tb_user_fifo - checks the user queue of an input port: switched user and
// passing OAM cells from the sorter and copies from the multicast unit are
// queued, other cell types are not; buff_full is raised at DEPTH cells and a
// cell offered then is not taken. Cells leave in order on the fabric bus with
// the routing tag on csf_dest, and the request drops for exactly one cycle after
// each cell so that the arbiter can serve the next port.
module tb_user_fifo;
  import atm_pkg::*;
  localparam int D = 4;
  logic       pclk = 1'b0, init = 1'b1;
  logic       buff_full, sdata = 1'b0, mc_data = 1'b0;
  word_t      sbus = '0, csf_bus;
  stype_e     stype = ST_NONE;
  logic       csf_request, csf_grant = 1'b0, dest_grant = 1'b0, csf_valid;
  logic [7:0] csf_dest;

  user_fifo #(.DEPTH(D)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic put(stype_e t, logic [7:0] id, bit mc = 0);
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      if (mc) mc_data = 1'b1; else begin sdata = 1'b1; stype = t; end
      sbus = {id, 8'(k)};
    end
    @(negedge pclk) begin sdata = 1'b0; mc_data = 1'b0; stype = ST_NONE; sbus = '0; end
  endtask

  logic [7:0] got [$];
  int bad_words = 0, bad_dest = 0, gaps [$];
  // fabric side: grant while requested, as the arbiter does
  bit hold = 0;
  initial begin
    int n, g;
    wait (!init);
    forever begin
      @(negedge pclk);
      if (hold) ;
      else if (csf_request && !csf_grant) begin csf_grant = 1'b1; dest_grant = 1'b1; n = 0; end
      else if (csf_grant && !csf_request) begin
        csf_grant = 1'b0; dest_grant = 1'b0;
        g = 0;
        while (!csf_request && g < 4) begin @(negedge pclk); g++; end
        if (g < 4) gaps.push_back(g);
        if (csf_request) begin csf_grant = 1'b1; dest_grant = 1'b1; n = 0; end
      end
      #1;
      if (csf_valid) begin
        if (n == 0) got.push_back(csf_bus[15:8]);
        if (csf_bus != {got[$], 8'(n)}) bad_words++;
        if (csf_dest != got[$]) bad_dest++;
        n++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    put(ST_SIG, 8'h01);
    put(ST_LSM_OAM, 8'h02);
    put(ST_ILMI, 8'h03);
    check(!csf_request, "non-user cell types not queued");
    // hold the fabric off while filling
    hold = 1;
    put(ST_USER, 8'h10);
    put(ST_OAM_PASS, 8'h11);
    put(ST_USER, 8'h12, 1);   // multicast copy
    check(!buff_full, "not full at three cells");
    put(ST_OAM_MON, 8'h13);
    check(buff_full, "full at four cells");
    put(ST_USER, 8'h14);      // refused
    hold = 0;
    repeat (200) @(negedge pclk);
    check(got.size() == 4, $sformatf("four cells left (%0d)", got.size()));
    check(got.size() == 4 && got[0] == 8'h10 && got[1] == 8'h11 && got[2] == 8'h12 && got[3] == 8'h13,
          "cells leave in order");
    check(bad_words == 0, "all 27 words of each cell carried");
    check(bad_dest == 0, "routing tag on the destination bus");
    check(gaps.size() == 3, "three turnarounds between four cells");
    foreach (gaps[i]) check(gaps[i] == 1, $sformatf("request low for one cycle (%0d)", gaps[i]));
    check(!buff_full && !csf_request, "empty again");
    // a copy written while a cell is being sent
    fork
      put(ST_USER, 8'h20);
      begin repeat (29) @(negedge pclk); put(ST_USER, 8'h21, 1); end
    join
    repeat (100) @(negedge pclk);
    check(got.size() == 6 && got[4] == 8'h20 && got[5] == 8'h21, "copy queued while a cell is sent");
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
