// tb_slot_timer - checks the cell-slot clock (512 pclk, high for 480) and the
// table-bus clock (4 pclk, high for 2, rising with the slot clock), and the
// phase markers carried with them.
module tb_slot_timer;
  import atm_pkg::*;
  logic pclk = 1'b0, init = 1'b1, hclk, dclk;
  tmg_t tmg;
  slot_timer dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int n;
  int hi, lo, dhi, dlo, rises;
  initial begin
    repeat (3) @(posedge pclk);
    init <= 1'b0;
    // follow the clocks for three slots with a cycle counter of our own
    n = 0; hi = 0; lo = 0; dhi = 0; dlo = 0; rises = 0;
    repeat (3 * 512) begin
      @(negedge pclk);
      check(hclk == ((n % 512) < 480), "hclk level follows the slot position");
      check(dclk == ((n % 4) < 2), "dclk level follows its position");
      check(tmg.rise == ((n % 512) == 0), "rise marks the first cycle of a slot");
      check(tmg.fall == ((n % 512) == 480), "fall marks the first low cycle");
      check(tmg.dtick == ((n % 4) == 0), "dtick marks each dclk period");
      check(int'(tmg.phase) == n % 512, "phase counts pclk cycles in the slot");
      if (hclk) hi++; else lo++;
      if (dclk) dhi++; else dlo++;
      if (tmg.rise) rises++;
      n++;
    end
    check(hi == 3 * 480 && lo == 3 * 32, "hclk high 480 of 512 cycles");
    check(dhi == dlo, "dclk duty cycle one half");
    check(rises == 3, "one slot start per 512 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
