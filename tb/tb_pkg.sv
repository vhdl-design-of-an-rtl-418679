// tb_pkg - helpers shared by the testbenches: building serial cells and
// table entries, and the reference cell formats the switch must produce.
package tb_pkg;
  import atm_pkg::*;

  typedef logic [CELL_BITS-1:0] cell_t;

  function automatic atm_hdr_t mk_hdr(logic [7:0] vpi, logic [15:0] vci,
                                      logic [2:0] pt = 3'b000, logic clp = 1'b0);
    return '{gfc: 4'd0, vpi: vpi, vci: vci, pt: pt, clp: clp};
  endfunction

  // 53-octet cell: header, an arbitrary HEC octet, payload octets seed, seed+1, ...
  function automatic cell_t mk_cell(atm_hdr_t h, logic [7:0] seed, logic [7:0] hec = 8'hA5);
    cell_t c;
    c[423:392] = h;
    c[391:384] = hec;
    for (int i = 0; i < 48; i++) c[383 - 8*i -: 8] = seed + 8'(i);
    return c;
  endfunction

  // The same cell as the switch sends it: new header, HEC octet zero.
  function automatic cell_t out_cell(cell_t c, atm_hdr_t h);
    cell_t o;
    o = c;
    o[423:392] = h;
    o[391:384] = 8'h00;
    return o;
  endfunction

  // Cell as it reaches local management after a table error: header, zero payload.
  function automatic cell_t err_cell(cell_t c);
    cell_t o;
    o = '0;
    o[423:392] = c[423:392];
    return o;
  endfunction

  function automatic logic [63:0] route_ent(conn_id_t in_id, rtag_t tag, conn_id_t out_id);
    route_entry_t e;
    e = '{in_id: in_id, tag: tag, out_id: out_id};
    return e;
  endfunction

  function automatic logic [63:0] traffic_ent(conn_id_t key, logic tag_mode,
                                              logic [15:0] incr, logic [15:0] limit);
    traffic_entry_t e;
    e = '{key: key, tag_mode: tag_mode, rsvd: 3'd0, incr: incr, limit: limit};
    return e;
  endfunction

  // Word k of a cell on the internal 16-bit bus (tag in the upper byte of word 0).
  function automatic word_t bus_word(rtag_t tag, cell_t c, int k);
    logic [431:0] b;
    b = {tag, c[423:392], 8'h00, c[383:0]};
    return b[431 - 16*k -: 16];
  endfunction
endpackage
