// tb_output_module - checks that the group of output ports delivers each cell
// to the right port only: fabric cells by the port number in the routing tag,
// signalling and management cells by the bus address, ILMI cells by the agent's
// own port. After the writes every port is asked for one cell; only the
// addressed ports may send a cell other than an unassigned one.
module tb_output_module;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int P = 8;
  logic         pclk = 1'b0, init = 1'b1;
  logic         cac_request = 0, cac_grant, cac_data = 0, sm_data = 0, sm_grant, sm_request = 0;
  logic [2:0]   cac_address = '0, sm_address = '0;
  word_t        cac_bus = '0, csf_bus = '0, sm_bus = '0;
  logic [7:0]   csf_dest = '0;
  logic         csf_valid = 0;
  logic [P-1:0] ilmi_request = '0, ilmi_grant, ilmi_data = '0, request = '0, data_out, dout_flag;
  word_t        ilmi_bus [P];
  logic [6:0]   clp_threshold = 7'd64;
  logic [15:0]  clp_discards [P], overflow_discards [P];

  output_module dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic cell_t cl(logic [7:0] id);
    return mk_cell(mk_hdr(id, 16'd40), id, 8'h00);
  endfunction

  task automatic put_user(logic [7:0] id, int port);
    rtag_t t;
    t = '{port: 4'(port), prio: 3'd2, clp: 1'b0};
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      csf_valid = 1'b1; csf_dest = t; csf_bus = bus_word(t, cl(id), k);
    end
    @(negedge pclk) begin csf_valid = 1'b0; csf_dest = '0; csf_bus = '0; end
    repeat (2) @(negedge pclk);
  endtask

  // which: 0 signalling, 1 management, 2 ILMI of the given port
  task automatic put_q(int which, int port, logic [7:0] id);
    int t;
    case (which)
      0: begin cac_request = 1; cac_address = 3'(port); end
      1: begin sm_request = 1; sm_address = 3'(port); end
      default: ilmi_request[port] = 1;
    endcase
    t = 0;
    while (t < 6 && !((which == 0 && cac_grant) || (which == 1 && sm_grant) || (which == 2 && ilmi_grant[port]))) begin
      @(negedge pclk);
      t++;
    end
    check(t < 6, "write granted");
    for (int k = 0; k < CELL_WORDS; k++) begin
      case (which)
        0: begin cac_data = 1; cac_bus = bus_word(8'h00, cl(id), k); end
        1: begin sm_data = 1; sm_bus = bus_word(8'h00, cl(id), k); end
        default: begin ilmi_data[port] = 1; ilmi_bus[port] = bus_word(8'h00, cl(id), k); end
      endcase
      @(negedge pclk);
    end
    cac_data = 0; sm_data = 0; ilmi_data = '0; cac_bus = '0; sm_bus = '0;
    foreach (ilmi_bus[i]) ilmi_bus[i] = '0;
    cac_request = 0; sm_request = 0; ilmi_request = '0;
    repeat (2) @(negedge pclk);
  endtask

  cell_t rx [P];
  int    len [P];
  always @(posedge pclk)
    for (int p = 0; p < P; p++) if (dout_flag[p]) begin
      rx[p] = {rx[p][CELL_BITS-2:0], data_out[p]};
      len[p]++;
    end

  function automatic cell_t expect_out(logic [7:0] id);
    cell_t c;
    c = cl(id);
    c[391:384] = 8'h00;
    return c;
  endfunction

  logic [7:0] want [P];
  initial begin
    foreach (ilmi_bus[i]) ilmi_bus[i] = '0;
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    want = '{default: 8'h00};
    put_user(8'h15, 5); want[5] = 8'h15;
    put_user(8'h10, 0); want[0] = 8'h10;
    put_q(0, 3, 8'h23); want[3] = 8'h23;
    put_q(1, 6, 8'h36); want[6] = 8'h36;
    put_q(2, 1, 8'h41); want[1] = 8'h41;
    for (int p = 0; p < P; p++) begin rx[p] = '0; len[p] = 0; end
    @(negedge pclk) request = '1;
    repeat (5) @(negedge pclk);
    request = '0;
    repeat (CELL_BITS + 10) @(negedge pclk);
    for (int p = 0; p < P; p++) begin
      check(len[p] == CELL_BITS, $sformatf("port %0d sent one cell", p));
      if (want[p] == 8'h00) check(rx[p] == '0, $sformatf("port %0d sent an unassigned cell", p));
      else check(rx[p] == expect_out(want[p]), $sformatf("port %0d sent its cell %h", p, want[p]));
    end
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
