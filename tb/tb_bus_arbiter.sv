// tb_bus_arbiter - checks the arbiter of the signalling / management bus:
// input ports are polled round-robin and held until they drop their request,
// and a cell from the processor to an output port goes first.
module tb_bus_arbiter;
  localparam int P = 8;
  logic         pclk = 1'b0, init = 1'b1;
  logic [P-1:0] request = '0;
  logic         grant, write_req, write_grant = 1'b0, cell_req = 1'b0, cell_grant;
  logic [2:0]   address, cell_address = '0;

  bus_arbiter dut (.*);
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic cyc(int n = 1);
    repeat (n) @(posedge pclk);
    #1;
  endtask

  int order [$];
  initial begin
    cyc(3);
    init = 1'b0;
    cyc(2);
    check(!grant && !write_req, "idle after reset");
    // three ports ask at once: served 2, 5, 6 in turn, each held while it asks
    request = 8'b0110_0100;
    for (int k = 0; k < 3; k++) begin
      int t;
      t = 0;
      while (!grant && t < 10) begin cyc(); t++; end
      order.push_back(int'(address));
      cyc(5);
      check(grant, "grant held while the port asks");
      request[address] = 1'b0;
      cyc();
      check(!grant, "grant dropped with the request");
    end
    check(order.size() == 3 && order[0] == 2 && order[1] == 5 && order[2] == 6,
          "round-robin order 2, 5, 6");
    // a port that is served again only after the others
    request = 8'b0000_0101;
    cyc(2);
    check(grant && address == 0, "after port 6 the next is port 0");
    request[0] = 1'b0;
    cyc(3);
    check(grant && address == 2, "then port 2");
    request = '0;
    cyc(3);
    // the processor's cell goes first
    cell_req = 1'b1; cell_address = 3'd4; request = 8'b1000_0000;
    cyc(2);
    check(write_req && address == 4 && !grant, "processor cell has priority, address 4");
    check(!cell_grant, "no cell grant before the output port answers");
    write_grant = 1'b1;
    cyc(2);
    check(cell_grant, "cell grant after the output port's grant");
    cell_req = 1'b0; write_grant = 1'b0;
    cyc(2);
    check(!write_req && !cell_grant, "released with the cell request");
    cyc(2);
    check(grant && address == 7, "the waiting input port is then served");
    request = '0;
    cyc(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
