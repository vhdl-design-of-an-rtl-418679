// traffic - usage parameter control (traffic contract enforcement) of an input port.
//
// The policer snoops the old header of each user cell while the cell sorter
// sends it to the route table (table_data with table_flag high, two words on
// table_bus, sampled on dclk ticks). It looks the connection up in its own table
// and applies the Generic Cell Rate Algorithm in its virtual-scheduling form, with
// time counted in cell slots:
//   a cell arriving at slot t conforms unless t < TAT - L;
//   a conforming cell moves the theoretical arrival time to max(TAT, t) + I.
// A non-conforming cell is tagged (CLP set to 1) when the entry asks for tagging
// and the cell has CLP = 0, and discarded otherwise. Unknown connections are not
// policed. traffic_status is valid from two dclk ticks after the header until the
// next rising hclk edge, where it returns to "no action".
//
// That the policer sits beside the route table, reads the header from the same
// bus and reports no action, tagging or discard follows the switch description,
// which leaves the algorithm to software; the GCRA, the entry format
// (traffic_entry_t) and the table size are this design's choices.
module traffic
  import atm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PORT_W  = 3,
  parameter int unsigned PORT    = 0,
  parameter int unsigned TIME_W  = 24
) (
  input  logic              pclk,
  input  logic              init,
  input  tmg_t              tmg,
  input  logic [3:0]        signal_control,
  input  logic [PORT_W-1:0] signal_address,
  input  logic              table_data,
  input  word_t             table_bus,
  input  logic              table_flag,
  output traffic_e          traffic_status
);
  traffic_entry_t      ent [ENTRIES];
  logic [TIME_W-1:0]   tat [ENTRIES];
  logic [ENTRIES-1:0]  valid, hit;
  logic [TIME_W-1:0]   now;
  logic                wc, eval;
  atm_hdr_t            key;
  logic [ENTRY_BITS-1:0] ld_entry;
  sigcmd_e             ld_cmd;
  traffic_entry_t ld_ent;
  assign ld_ent = ld_entry;
  logic [$clog2(ENTRIES)-1:0] sel;

  table_loader #(.PORT_W(PORT_W), .PORT(PORT)) u_loader (
    .clk(pclk), .init, .signal_control, .signal_address, .entry(ld_entry), .cmd(ld_cmd)
  );

  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      hit[i] = valid[i] && ent[i].key.gfc == key.gfc && ent[i].key.vpi == key.vpi &&
               (ent[i].key.vci == 16'd0 || ent[i].key.vci == key.vci);
    sel = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (hit[i]) sel = ($clog2(ENTRIES))'(i);
  end

  function automatic logic [$clog2(ENTRIES)-1:0] first_free(logic [ENTRIES-1:0] v);
    first_free = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (!v[i]) first_free = ($clog2(ENTRIES))'(i);
  endfunction

  always_ff @(posedge pclk) begin
    if (init) begin
      valid          <= '0;
      now            <= '0;
      wc             <= 1'b0;
      eval           <= 1'b0;
      key            <= '0;
      traffic_status <= TR_NONE;
      for (int i = 0; i < ENTRIES; i++) begin
        ent[i] <= '0;
        tat[i] <= '0;
      end
    end else begin
      eval <= 1'b0;
      if (tmg.rise) begin
        now            <= now + TIME_W'(1);
        traffic_status <= TR_NONE;
        wc             <= 1'b0;
      end

      if (ld_cmd == SC_WR_TRAFFIC && !(&valid)) begin
        ent[first_free(valid)]   <= traffic_entry_t'(ld_entry);
        tat[first_free(valid)]   <= now;
        valid[first_free(valid)] <= 1'b1;
      end else if (ld_cmd == SC_REMOVE) begin
        for (int i = 0; i < ENTRIES; i++)
          if (ent[i].key == ld_ent.key) valid[i] <= 1'b0;
      end

      if (tmg.dtick && table_data && table_flag) begin
        if (!wc) key[31:16] <= table_bus;
        else begin
          key[15:0] <= table_bus;
          eval      <= 1'b1;
        end
        wc <= ~wc;
      end

      if (eval && hit != '0) begin
        // t < TAT - L  <=>  TAT > t + L, computed one bit wider
        if ({1'b0, tat[sel]} > {1'b0, now} + (TIME_W + 1)'(ent[sel].limit)) begin
          traffic_status <= (ent[sel].tag_mode && !key.clp) ? TR_TAG : TR_DISCARD;
        end else begin
          traffic_status <= TR_NONE;
          tat[sel] <= ((tat[sel] > now) ? tat[sel] : now) + TIME_W'(ent[sel].incr);
        end
      end
    end
  end
endmodule
