// tb_priority_buffer - checks the output buffer of a port at a reduced size
// (8 shared user cells, at most 4 per class, dedicated queues of 2): cells are
// written through the fabric, signalling, management and ILMI paths; the class
// limit, the selective discard of CLP=1 cells above the threshold and the
// overflow of the shared buffer must refuse cells and count them; the queue
// flags must show what is held; and each grant must send the right cell, in
// first-in first-out order per queue, as 424 serial bits (an all-zero
// unassigned cell when asked for one).
module tb_priority_buffer;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int PORT = 2, UB = 8, CM = 4, QD = 2;
  logic       pclk = 1'b0, init = 1'b1;
  logic       cac_request = 0, cac_grant, cac_data = 0, ilmi_request = 0, ilmi_grant, ilmi_data = 0;
  logic       sm_data = 0, sm_grant, sm_request = 0;
  logic [2:0] cac_address = '0, sm_address = '0;
  word_t      cac_bus = '0, csf_bus = '0, ilmi_bus = '0, sm_bus = '0;
  logic [7:0] csf_dest = '0;
  logic       csf_valid = 0;
  logic [3:0] clp_threshold = 4'd6;
  logic       cac_flag, ilmi_flag, sm_flag, cacq_grant = 0, ilmiq_grant = 0, smq_grant = 0, unassigned = 0;
  logic [7:0] user_flags, userq_grants = '0;
  logic       data_out, dout_flag;
  logic [15:0] clp_discards, overflow_discards;

  priority_buffer #(.PORT(PORT), .PORT_W(3), .UBUF(UB), .CLASSES(8), .QDEPTH(QD), .CLASS_MAX(CM)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic cell_t cl(logic [7:0] id);
    return mk_cell(mk_hdr(id, 16'(id) * 3), id, 8'h00);
  endfunction

  // user cell over the fabric
  task automatic put_user(logic [7:0] id, int cls, logic clp = 1'b0);
    rtag_t t;
    t = '{port: 4'(PORT), prio: 3'(cls), clp: clp};
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      csf_valid = 1'b1; csf_dest = t; csf_bus = bus_word(t, cl(id), k);
    end
    @(negedge pclk) begin csf_valid = 1'b0; csf_dest = '0; csf_bus = '0; end
    repeat (2) @(negedge pclk);
  endtask

  // signalling (0), management (1) or ILMI (2) cell through its request/grant
  task automatic put_q(int which, logic [7:0] id, output bit taken);
    int t;
    case (which)
      0: begin cac_request = 1; cac_address = 3'(PORT); end
      1: begin sm_request = 1; sm_address = 3'(PORT); end
      default: ilmi_request = 1;
    endcase
    t = 0;
    taken = 0;
    while (t < 6) begin
      @(negedge pclk);
      t++;
      if ((which == 0 && cac_grant) || (which == 1 && sm_grant) || (which == 2 && ilmi_grant)) begin
        taken = 1;
        break;
      end
    end
    if (taken)
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

  // grant one queue for one cycle and collect the serial cell
  cell_t rx;
  int    rx_len;
  task automatic emit(int which, output cell_t c, output int len);
    @(negedge pclk);
    case (which)
      0: cacq_grant = 1;
      1: smq_grant = 1;
      2: ilmiq_grant = 1;
      3: unassigned = 1;
      default: userq_grants = 8'(1) << (which - 4);
    endcase
    @(negedge pclk);
    {cacq_grant, smq_grant, ilmiq_grant, unassigned} = '0;
    userq_grants = '0;
    len = 0;
    c = '0;
    while (!dout_flag && len < 5) begin @(negedge pclk); len++; end
    len = 0;
    while (dout_flag) begin
      c = {c[CELL_BITS-2:0], data_out};
      len++;
      @(negedge pclk);
    end
  endtask

  function automatic cell_t expect_out(logic [7:0] id);
    cell_t c;
    c = cl(id);
    c[391:384] = 8'h00;
    return c;
  endfunction

  bit taken;
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    check(user_flags == 0 && !cac_flag && !sm_flag && !ilmi_flag, "all queues empty");
    // class 2: four cells fill its share, a fifth is refused
    for (int i = 0; i < 4; i++) put_user(8'h20 + 8'(i), 2);
    put_user(8'h24, 2);
    check(overflow_discards == 16'd1, "class limit refuses a fifth class-2 cell");
    put_user(8'h50, 5);
    put_user(8'h51, 5);                     // occupancy 6: threshold reached
    put_user(8'h52, 5, 1'b1);               // CLP=1: discarded
    check(clp_discards == 16'd1, "CLP=1 cell discarded at the threshold");
    put_user(8'h53, 5);                     // CLP=0 still taken
    put_user(8'h54, 5);                     // 8 cells: buffer full
    put_user(8'h10, 1);
    check(overflow_discards == 16'd2, "shared buffer overflow refuses a cell");
    check(user_flags == 8'b0010_0100, "flags show classes 2 and 5");
    // dedicated queues
    put_q(0, 8'hC0, taken); check(taken, "signalling cell taken");
    put_q(0, 8'hC1, taken); check(taken, "second signalling cell taken");
    put_q(0, 8'hC2, taken); check(!taken, "full signalling queue gives no grant");
    put_q(1, 8'hD0, taken); check(taken, "management cell taken");
    put_q(2, 8'hE0, taken); check(taken, "ILMI cell taken");
    check(cac_flag && sm_flag && ilmi_flag, "dedicated queue flags set");
    // read out
    emit(4 + 5, rx, rx_len); check(rx_len == CELL_BITS && rx == expect_out(8'h50), "class 5 first cell");
    emit(4 + 2, rx, rx_len); check(rx_len == CELL_BITS && rx == expect_out(8'h20), "class 2 first cell");
    emit(0, rx, rx_len);     check(rx_len == CELL_BITS && rx == expect_out(8'hC0), "signalling cell");
    emit(1, rx, rx_len);     check(rx_len == CELL_BITS && rx == expect_out(8'hD0), "management cell");
    emit(2, rx, rx_len);     check(rx_len == CELL_BITS && rx == expect_out(8'hE0), "ILMI cell");
    emit(3, rx, rx_len);     check(rx_len == CELL_BITS && rx == '0, "unassigned cell is all zeros");
    emit(0, rx, rx_len);     check(rx == expect_out(8'hC1), "second signalling cell");
    check(!cac_flag && !sm_flag && !ilmi_flag, "dedicated queues empty again");
    for (int i = 1; i < 4; i++) begin
      emit(4 + 2, rx, rx_len);
      check(rx == expect_out(8'h20 + 8'(i)), $sformatf("class 2 cell %0d in order", i));
    end
    check(user_flags == 8'b0010_0000, "class 2 empty");
    // freed locations are reused
    put_user(8'h70, 7);
    put_user(8'h71, 7);
    emit(4 + 7, rx, rx_len); check(rx == expect_out(8'h70), "reused location holds class 7 cell");
    for (int i = 0; i < 3; i++) emit(4 + 5, rx, rx_len);
    check(rx == expect_out(8'h54), "last class 5 cell");
    emit(4 + 7, rx, rx_len); check(rx == expect_out(8'h71), "second class 7 cell");
    check(user_flags == 0, "buffer empty");
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
