// tb_som - checks a whole output port (buffer and scheduler) at its default
// size: user cells of classes 0, 3 and 7 (the low class written first), a
// signalling, a management and an ILMI cell are queued; each rising edge of the
// line's request must then send exactly one cell, in the order signalling,
// management, ILMI, class 7, 3, 0 (first in, first out within a class), and
// unassigned cells once all queues are empty.
module tb_som;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int PORT = 4;
  logic       pclk = 1'b0, init = 1'b1;
  logic       cac_request = 0, cac_grant, cac_data = 0, ilmi_request = 0, ilmi_grant, ilmi_data = 0;
  logic       sm_data = 0, sm_grant, sm_request = 0, request = 0;
  logic [2:0] cac_address = '0, sm_address = '0;
  word_t      cac_bus = '0, csf_bus = '0, ilmi_bus = '0, sm_bus = '0;
  logic [7:0] csf_dest = '0, user_flags;
  logic       csf_valid = 0, data_out, dout_flag;
  logic [6:0] clp_threshold = 7'd64;
  logic [15:0] clp_discards, overflow_discards;

  som #(.PORT(PORT)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic cell_t cl(logic [7:0] id);
    return mk_cell(mk_hdr(id, 16'(id) + 16'd7), id, 8'h00);
  endfunction

  task automatic put_user(logic [7:0] id, int cls);
    rtag_t t;
    t = '{port: 4'(PORT), prio: 3'(cls), clp: 1'b0};
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      csf_valid = 1'b1; csf_dest = t; csf_bus = bus_word(t, cl(id), k);
    end
    @(negedge pclk) begin csf_valid = 1'b0; csf_dest = '0; csf_bus = '0; end
    repeat (2) @(negedge pclk);
  endtask

  task automatic put_q(int which, logic [7:0] id);
    int t;
    case (which)
      0: begin cac_request = 1; cac_address = 3'(PORT); end
      1: begin sm_request = 1; sm_address = 3'(PORT); end
      default: ilmi_request = 1;
    endcase
    t = 0;
    while (t < 6 && !((which == 0 && cac_grant) || (which == 1 && sm_grant) || (which == 2 && ilmi_grant))) begin
      @(negedge pclk);
      t++;
    end
    check(t < 6, "queue write granted");
    for (int k = 0; k < CELL_WORDS; k++) begin
      case (which)
        0: begin cac_data = 1; cac_bus = bus_word(8'h00, cl(id), k); end
        1: begin sm_data = 1; sm_bus = bus_word(8'h00, cl(id), k); end
        default: begin ilmi_data = 1; ilmi_bus = bus_word(8'h00, cl(id), k); end
      endcase
      @(negedge pclk);
    end
    {cac_data, sm_data, ilmi_data} = '0;
    {cac_bus, sm_bus, ilmi_bus} = '0;
    {cac_request, sm_request, ilmi_request} = '0;
    repeat (2) @(negedge pclk);
  endtask

  // one line request: a short pulse, then the cell is collected
  task automatic line_request(output cell_t c, output int len, output int start);
    @(negedge pclk) request = 1'b1;
    start = 0;
    while (!dout_flag && start < 10) begin @(negedge pclk); start++; end
    request = 1'b0;
    len = 0;
    c = '0;
    while (dout_flag) begin
      c = {c[CELL_BITS-2:0], data_out};
      len++;
      @(negedge pclk);
    end
    repeat (20) @(negedge pclk);
  endtask

  function automatic cell_t expect_out(logic [7:0] id);
    cell_t c;
    c = cl(id);
    c[391:384] = 8'h00;
    return c;
  endfunction

  cell_t rx;
  int    len, start;
  logic [7:0] order [$] = '{8'hC0, 8'hD0, 8'hE0, 8'h70, 8'h71, 8'h30, 8'h31, 8'h00, 8'h01};
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    // an idle line gets unassigned cells
    line_request(rx, len, start);
    check(len == CELL_BITS && rx == '0, "unassigned cell when nothing waits");
    put_user(8'h00, 0);
    put_user(8'h30, 3);
    put_user(8'h01, 0);
    put_user(8'h70, 7);
    put_user(8'h31, 3);
    put_user(8'h71, 7);
    put_q(2, 8'hE0);
    put_q(1, 8'hD0);
    put_q(0, 8'hC0);
    check(user_flags == 8'b1000_1001, "class flags 0, 3 and 7");
    foreach (order[i]) begin
      line_request(rx, len, start);
      check(len == CELL_BITS && rx == expect_out(order[i]),
            $sformatf("cell %0d is %h (got header %h)", i, order[i], rx[423:392]));
      check(start <= 4, $sformatf("transmission starts within 4 cycles of the request (%0d)", start));
    end
    line_request(rx, len, start);
    check(len == CELL_BITS && rx == '0, "unassigned again when empty");
    check(clp_discards == 0 && overflow_discards == 0, "nothing discarded");
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
