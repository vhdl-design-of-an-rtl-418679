// table_loader - receives table entries from the signalling processor.
//
// Entries are loaded bit-serially over signal_control(3:0) into the tables of
// the input port named by signal_address. Bit 1 is a shift strobe and bit 0 the
// data bit: each pclk cycle with the strobe high shifts one bit, most significant
// first, into a 64-bit entry register. With the strobe low, bits 3:2 carry a
// command (sigcmd_e) that is issued once, in the cycle it first appears: write
// the entry to the route/multicast table, write it to the traffic table, or
// remove the entries whose incoming identifier equals the entry's upper 28 bits.
// The serial loading follows the switch description; the bit assignment of
// signal_control is this design's choice.
module table_loader
  import atm_pkg::*;
#(
  parameter int unsigned PORT_W = 3,
  parameter int unsigned PORT   = 0
) (
  input  logic                  clk,
  input  logic                  init,
  input  logic [3:0]            signal_control,
  input  logic [PORT_W-1:0]     signal_address,
  output logic [ENTRY_BITS-1:0] entry,
  output sigcmd_e               cmd
);
  logic    sel;
  sigcmd_e cur, prev;

  assign sel = signal_address == PORT_W'(PORT);
  assign cur = (sel && !signal_control[1]) ? sigcmd_e'(signal_control[3:2]) : SC_NOP;
  assign cmd = (prev == SC_NOP) ? cur : SC_NOP;

  always_ff @(posedge clk) begin
    if (init) begin
      entry <= '0;
      prev  <= SC_NOP;
    end else begin
      prev <= cur;
      if (sel && signal_control[1]) entry <= {entry[ENTRY_BITS-2:0], signal_control[0]};
    end
  end
endmodule
