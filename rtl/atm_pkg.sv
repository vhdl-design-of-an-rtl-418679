// atm_pkg - types and constants shared by every block of the ATM layer switch.
//
// A 53-octet cell crosses the switch as 27 words of 16 bits: word 0 holds the
// 8-bit internal routing tag in its upper byte and header octet 1 in its lower
// byte, word 1 holds header octets 2 and 3, word 2 holds octet 4 and the HEC
// octet, and words 3..26 hold the 48-octet payload. 8 + 40 + 384 = 432 bits,
// exactly 27 words. The HEC octet is carried as zero because the physical layer
// regenerates it. The routing tag layout (output port, priority class, CLP in
// the least significant bit) follows the description of the switch; the bit
// positions of the port and class fields are this design's choice.
package atm_pkg;

  localparam int unsigned CELL_WORDS    = 27;   // tag + header + payload on the 16-bit bus
  localparam int unsigned HDR_WORDS     = 3;
  localparam int unsigned PAYLOAD_WORDS = 24;   // 48 octets
  localparam int unsigned CELL_BITS     = 424;  // 53 octets on a serial line
  localparam int unsigned HDR_BITS      = 32;   // header without HEC
  localparam int unsigned HEC_BITS      = 8;
  localparam int unsigned PAYLOAD_START = HDR_BITS + HEC_BITS;  // first payload bit index
  localparam int unsigned ENTRY_BITS    = 64;   // one route or traffic table entry

  typedef logic [15:0] word_t;

  // UNI cell header without the HEC, most significant bit first on the line.
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
  } atm_hdr_t;

  // Connection identifier: GFC, VPI and VCI (28 bits).
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
  } conn_id_t;

  // Internal routing tag, stripped again at the output port.
  typedef struct packed {
    logic [3:0] port;   // destination output port
    logic [2:0] prio;   // priority class, 7 is served first
    logic       clp;    // copy of the outgoing header's CLP bit
  } rtag_t;

  // Route/multicast table entry: incoming id, routing tag, outgoing id.
  typedef struct packed {
    conn_id_t in_id;
    rtag_t    tag;
    conn_id_t out_id;
  } route_entry_t;

  // Traffic (usage parameter control) table entry.
  typedef struct packed {
    conn_id_t    key;       // VCI 0 polices the whole virtual path
    logic        tag_mode;  // 1: tag a non-conforming CLP=0 cell, 0: discard it
    logic [2:0]  rsvd;
    logic [15:0] incr;      // GCRA increment, in cell slots
    logic [15:0] limit;     // GCRA limit, in cell slots
  } traffic_entry_t;

  // A table entry whose routing tag is all ones marks a configurable ILMI connection.
  localparam rtag_t ILMI_TAG = 8'hFF;

  // Preliminary cell type from the pre-defined header values.
  typedef enum logic [2:0] {
    PRE_UNASSIGNED, PRE_SIG, PRE_ILMI, PRE_OAM_VP_SEG, PRE_OAM_VP_E2E,
    PRE_OAM_VC_SEG, PRE_OAM_VC_E2E, PRE_USER
  } pre_type_e;

  // Route table search result.
  typedef enum logic [2:0] {
    TS_NONE, TS_ERROR, TS_VP_SWITCH, TS_VC_SWITCH, TS_MULTICAST, TS_ILMI
  } tbl_status_e;

  // Traffic contract enforcement result.
  typedef enum logic [1:0] {TR_NONE, TR_TAG, TR_DISCARD} traffic_e;

  // Cell type on the internal bus that leaves the cell sorter.
  typedef enum logic [3:0] {
    ST_NONE,     // no cell
    ST_USER,     // user cell to the user FIFO
    ST_OAM_PASS, // passing OAM cell to the user FIFO
    ST_OAM_MON,  // passing OAM cell to the user FIFO, monitored by the local SM
    ST_SIG,      // signalling cell to the CAC FIFO
    ST_ILMI,     // ILMI cell to the ILMI agent
    ST_MCAST,    // user cell to the multicast unit
    ST_LSM_OAM,  // OAM cell at its end point, to the local SM
    ST_LSM_ERR   // header that failed the table search (header words only)
  } stype_e;

  // Table commands on signal_control(3:2).
  typedef enum logic [1:0] {SC_NOP, SC_WR_ROUTE, SC_WR_TRAFFIC, SC_REMOVE} sigcmd_e;

  // Cell slot timing derived from pclk.
  typedef struct packed {
    logic       hclk;   // level of the cell clock
    logic       rise;   // this pclk cycle ends with a rising hclk edge phase (phase 0)
    logic       fall;   // this pclk cycle is the first with hclk low
    logic       dtick;  // this pclk cycle starts a dclk period
    logic [9:0] phase;  // pclk count within the cell slot
  } tmg_t;

  // Preliminary header discrimination against the pre-defined UNI headers.
  function automatic pre_type_e classify(atm_hdr_t h);
    if (h.gfc == 4'd0 && h.vpi == 8'd0 && h.vci == 16'd0 && !h.clp) return PRE_UNASSIGNED;
    if (h.gfc == 4'd0 && h.vpi == 8'd0 && h.vci == 16'd5 && !h.pt[2]) return PRE_SIG;
    if (h.gfc == 4'd0 && h.vpi == 8'd0 && h.vci == 16'd16) return PRE_ILMI;
    if (h.vci == 16'd3 && !h.pt[2]) return PRE_OAM_VP_SEG;
    if (h.vci == 16'd4 && !h.pt[2]) return PRE_OAM_VP_E2E;
    if (h.pt == 3'b100) return PRE_OAM_VC_SEG;
    if (h.pt == 3'b101) return PRE_OAM_VC_E2E;
    return PRE_USER;
  endfunction

  // Header words of a cell on the 16-bit bus; the HEC octet is sent as zero.
  function automatic word_t hdr_word(rtag_t tag, atm_hdr_t h, int unsigned k);
    logic [31:0] b;
    b = h;
    case (k)
      0:       return {tag, b[31:24]};
      1:       return b[23:8];
      default: return {b[7:0], 8'h00};
    endcase
  endfunction

endpackage
