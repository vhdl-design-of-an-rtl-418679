// tb_ilmi_agent - behavioural stand-in for the ILMI agent of one port in
// testbenches: it stores each ILMI cell the input port hands it and writes it
// back into the output queue of the same port through the ILMI request/grant
// path, as a reply would be.
module tb_ilmi_agent
  import atm_pkg::*;
(
  input  logic  pclk,
  input  logic  init,
  input  word_t ilmi_sbus,
  input  logic  ilmi_sdata,
  output logic  ilmi_request,
  input  logic  ilmi_grant,
  output logic  ilmi_data,
  output word_t ilmi_bus,
  output int    received
);
  typedef word_t icell_t [CELL_WORDS];
  icell_t q [$];
  icell_t cur;
  int     rk, sk;

  always @(posedge pclk) begin
    if (init) begin
      rk <= 0; sk <= 0; ilmi_request <= 1'b0; ilmi_data <= 1'b0; ilmi_bus <= '0;
      received <= 0;
    end else begin
      if (ilmi_sdata) begin
        cur[rk] = ilmi_sbus;
        if (rk == CELL_WORDS - 1) begin
          q.push_back(cur);
          received <= received + 1;
          rk <= 0;
        end else rk <= rk + 1;
      end
      if (!ilmi_request && q.size() > 0) ilmi_request <= 1'b1;
      else if (ilmi_request && ilmi_grant && sk < CELL_WORDS) begin
        ilmi_data <= 1'b1;
        ilmi_bus  <= q[0][sk];
        sk        <= sk + 1;
      end else if (sk == CELL_WORDS) begin
        ilmi_data    <= 1'b0;
        ilmi_bus     <= '0;
        ilmi_request <= 1'b0;
        sk           <= 0;
        void'(q.pop_front());
      end
    end
  end
endmodule
