// tb_csf - checks the cell switch fabric: eight senders with a full queue each
// drive numbered words while granted; the fabric output must carry exactly the
// granted sender's words and destination, sixteen cells per slot.
module tb_csf;
  import atm_pkg::*;
  localparam int P = 8;
  logic         pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t         tmg;
  logic [P-1:0] csf_request, csf_grant, dest_grant, csf_valid_in;
  logic [7:0]   csf_dest [P];
  word_t        csf_bus_in [P];
  logic [7:0]   csf_dest_out;
  word_t        csf_bus_out;
  logic         csf_valid_out;
  logic [P-1:0] pause = '0;
  int           cnt [P];

  slot_timer u_t (.pclk, .init, .tmg, .hclk, .dclk);
  csf dut (.*);
  always #5 pclk = ~pclk;

  assign csf_request = ~pause;
  for (genvar g = 0; g < P; g++) begin : g_src
    assign csf_dest[g]     = 8'(8'hF0 | g);
    assign csf_valid_in[g] = csf_grant[g] && cnt[g] >= 1;
    assign csf_bus_in[g]   = csf_valid_in[g] ? word_t'({g[7:0], 8'(cnt[g] - 1)}) : csf_grant[g] ? '0 : word_t'(16'hDEAD);
  end
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

  int words = 0, bad = 0, cells = 0;
  logic vprev = 1'b0;
  always @(negedge pclk) begin
    if (!init) begin
      vprev <= csf_valid_out;
      if (csf_valid_out) begin
        int g;
        g = -1;
        for (int p = 0; p < P; p++) if (csf_grant[p]) g = p;
        words++;
        if (!vprev) cells++;
        if (g < 0 || csf_bus_out != {8'(g), 8'(cnt[g] - 1)} || csf_dest_out != (8'hF0 | 8'(g))) bad++;
      end else if (csf_bus_out != '0) bad++;
    end
  end

  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    @(posedge pclk iff tmg.rise);
    words = 0; cells = 0;
    repeat (2) @(posedge pclk iff tmg.rise);
    check(cells == 32, $sformatf("32 cells in two slots (got %0d)", cells));
    check(words == 32 * CELL_WORDS, "27 words per cell");
    check(bad == 0, $sformatf("output is the granted sender's word (%0d bad)", bad));
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
