// tb_scheduler - checks the output scheduler: one grant pulse for each rising
// edge of the line's request, in the order signalling, management, ILMI, user
// classes 7 down to 0, and an unassigned cell when nothing waits. Includes the
// two-request example of the design's timing diagram (flags 0x0A then 0x02).
module tb_scheduler;
  logic       pclk = 1'b0, init = 1'b1;
  logic       cac_flag = 0, ilmi_flag = 0, sm_flag = 0, request = 0;
  logic [7:0] user_flags = '0, user_grants;
  logic       cac_grant, ilmi_grant, sm_grant, unassigned;

  scheduler dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // reference: which grant one request gives, as {cac, sm, ilmi, user[7:0], unassigned}
  function automatic logic [11:0] ref_grant(logic c, logic s, logic i, logic [7:0] u);
    logic [7:0] ug;
    ug = '0;
    if (c) return {1'b1, 11'd0};
    if (s) return {2'b01, 10'd0};
    if (i) return {3'b001, 9'd0};
    for (int k = 7; k >= 0; k--) if (u[k]) begin ug[k] = 1'b1; return {3'b000, ug, 1'b0}; end
    return 12'd1;
  endfunction

  // issue one request and collect the grants of the following cycles
  task automatic ask(output logic [11:0] got, output int pulses);
    got = '0; pulses = 0;
    @(negedge pclk) request = 1'b1;
    repeat (6) begin
      @(negedge pclk);
      if ({cac_grant, sm_grant, ilmi_grant, user_grants, unassigned} != '0) begin
        pulses++;
        got |= {cac_grant, sm_grant, ilmi_grant, user_grants, unassigned};
      end
    end
    request = 1'b0;
    @(negedge pclk);
  endtask

  logic [11:0] got;
  int          pulses;
  initial begin
    repeat (3) @(posedge pclk);
    init = 1'b0;
    // timing diagram example
    user_flags = 8'h0A;
    ask(got, pulses);
    check(got[8:1] == 8'h08 && pulses == 1, "flags 0x0A give class 3");
    user_flags = 8'h02;
    ask(got, pulses);
    check(got[8:1] == 8'h02 && pulses == 1, "flags 0x02 give class 1");
    // random flags against the reference
    for (int n = 0; n < 200; n++) begin
      {cac_flag, sm_flag, ilmi_flag} = 3'($urandom_range(0, 7) & $urandom_range(0, 7));
      user_flags = 8'($urandom);
      if ($urandom_range(0, 3) == 0) user_flags = '0;
      ask(got, pulses);
      check(pulses == 1 && got == ref_grant(cac_flag, sm_flag, ilmi_flag, user_flags),
            $sformatf("grant %h for flags c%0d s%0d i%0d u%h", got, cac_flag, sm_flag, ilmi_flag, user_flags));
    end
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
