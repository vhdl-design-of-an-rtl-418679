// tb_multicast - checks the replication unit of an input port: a VC multicast
// cell with three outgoing connections, a VP multicast cell with two (old VCI
// kept) and a cell with more connections than ports (one copy per port at most).
// Each copy is requested on the internal bus, granted after a random delay, and
// compared with the expected header, routing tag and payload. busy must be set
// from the cell's arrival until the last copy.
module tb_multicast;
  import atm_pkg::*;
  import tb_pkg::*;
  localparam int PORTS = 8, PORT = 1;
  logic        pclk = 1'b0, init = 1'b1;
  logic        bus_request, bus_grant = 1'b0, bus_data, sdata = 1'b0, busy;
  word_t       mc_bus, sbus = '0;
  stype_e      stype = ST_NONE;
  logic [3:0]  signal_control = '0;
  logic [2:0]  signal_address = 3'(PORT);
  logic [15:0] copies_sent;

  multicast #(.ENTRIES(16), .PORTS(PORTS), .PORT_W(3), .PORT(PORT)) dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic load(logic [63:0] e, sigcmd_e cmd);
    for (int i = 63; i >= 0; i--) begin
      @(negedge pclk);
      signal_control = {2'b00, 1'b1, e[i]};
    end
    @(negedge pclk) signal_control = {cmd, 2'b00};
    @(negedge pclk) signal_control = '0;
  endtask
  function automatic conn_id_t cid(logic [7:0] vpi, logic [15:0] vci);
    return '{gfc: 4'd0, vpi: vpi, vci: vci};
  endfunction
  function automatic rtag_t tg(int port, int prio, logic clp = 1'b0);
    return '{port: 4'(port), prio: 3'(prio), clp: clp};
  endfunction

  // the cell as the sorter hands it over: old header, tag 0
  task automatic put(cell_t c);
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge pclk);
      sdata = 1'b1; stype = ST_MCAST; sbus = bus_word(8'h00, c, k);
    end
    @(negedge pclk) begin sdata = 1'b0; stype = ST_NONE; sbus = '0; end
  endtask

  // grant copies as they are asked for; returns them as 27-word strings
  typedef word_t wcell_t [CELL_WORDS];
  wcell_t copies [$];
  task automatic collect(int max_wait);
    int t;
    t = 0;
    copies.delete();
    while (t < max_wait) begin
      @(negedge pclk);
      t++;
      if (bus_request && !bus_grant) begin
        wcell_t w;
        int n;
        repeat ($urandom_range(0, 6)) @(negedge pclk);
        bus_grant = 1'b1;
        n = 0;
        while (!bus_data) @(negedge pclk);
        while (bus_data) begin
          if (n < CELL_WORDS) w[n] = mc_bus;
          n++;
          @(negedge pclk);
        end
        bus_grant = 1'b0;
        check(n == CELL_WORDS, "copy of 27 words");
        copies.push_back(w);
        t = 0;
      end
    end
  endtask

  function automatic bit same(wcell_t w, rtag_t tag, cell_t c);
    for (int k = 0; k < CELL_WORDS; k++) if (w[k] != bus_word(tag, c, k)) return 0;
    return 1;
  endfunction

  cell_t c, ref_c;
  bit    busy_seen;
  initial begin
    repeat (3) @(posedge pclk);
    @(negedge pclk) init = 1'b0;
    load(route_ent(cid(7, 70), tg(2, 0), cid(7, 71)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(4, 5), cid(17, 72)), SC_WR_ROUTE);
    load(route_ent(cid(7, 70), tg(6, 1), cid(27, 73)), SC_WR_ROUTE);
    load(route_ent(cid(8, 0), tg(3, 2), cid(18, 0)), SC_WR_ROUTE);
    load(route_ent(cid(8, 0), tg(5, 2), cid(28, 0)), SC_WR_ROUTE);
    for (int i = 0; i < PORTS + 1; i++)
      load(route_ent(cid(9, 90), tg(i % PORTS, 0), cid(9, 16'(100 + i))), SC_WR_ROUTE);

    // VC multicast, CLP 1 kept in header and tag
    c = mk_cell(mk_hdr(7, 70, 3'b000, 1'b1), 8'h40, 8'h00);
    put(c);
    @(negedge pclk);
    busy_seen = busy;
    collect(60);
    check(busy_seen, "busy while replicating");
    check(copies.size() == 3, $sformatf("three VC copies (%0d)", copies.size()));
    if (copies.size() == 3) begin
      check(same(copies[0], tg(2, 0, 1), out_cell(c, mk_hdr(7, 71, 3'b000, 1'b1))), "copy to port 2");
      check(same(copies[1], tg(4, 5, 1), out_cell(c, mk_hdr(17, 72, 3'b000, 1'b1))), "copy to port 4");
      check(same(copies[2], tg(6, 1, 1), out_cell(c, mk_hdr(27, 73, 3'b000, 1'b1))), "copy to port 6");
    end
    check(!busy, "idle after the last copy");
    check(copies_sent == 16'd3, "copies counted");

    // VP multicast keeps the VCI
    c = mk_cell(mk_hdr(8, 555, 3'b010), 8'h80, 8'h00);
    put(c);
    collect(60);
    check(copies.size() == 2, "two VP copies");
    if (copies.size() == 2) begin
      check(same(copies[0], tg(3, 2), out_cell(c, mk_hdr(18, 555, 3'b010))), "VP copy to port 3");
      check(same(copies[1], tg(5, 2), out_cell(c, mk_hdr(28, 555, 3'b010))), "VP copy to port 5");
    end

    // more connections than ports: PORTS copies
    c = mk_cell(mk_hdr(9, 90), 8'hC0, 8'h00);
    put(c);
    collect(60);
    check(copies.size() == PORTS, $sformatf("at most %0d copies (%0d)", PORTS, copies.size()));

    // removing the VC connection leaves no copy
    load(route_ent(cid(7, 70), '0, '0), SC_REMOVE);
    c = mk_cell(mk_hdr(7, 70), 8'h10, 8'h00);
    put(c);
    collect(40);
    check(copies.size() == 0 && !busy, "no copies after removal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
