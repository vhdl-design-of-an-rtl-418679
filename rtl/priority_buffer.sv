// priority_buffer - the queues of an output port (the "Priority" module).
//
// Signalling cells (from the CAC), management cells (from the SM) and ILMI
// cells each have a dedicated queue of QDEPTH cells. The writer asks with a
// request line (for the CAC and SM also the port address); this port answers
// with a grant while its queue has room, takes the words that come with the
// data flag, and drops the grant with the request.
//
// User cells arrive from the TDM bus, which this port cannot refuse, and share a
// buffer of UBUF cells. The buffer is managed with address queues: an idle
// address queue holds the free cell locations (all of them after init), and one
// address queue per priority class holds, in arrival order, the locations of
// that class's cells. A cell on the bus whose routing tag names this port takes
// the head of the idle queue, is written there, and after its last word its
// address joins its class queue. It is discarded instead when no location is
// free, when its class already holds CLASS_MAX cells, or when its CLP bit (LSB
// of the routing tag) is 1 and the occupancy has reached clp_threshold
// (selective cell discard). Discards are counted.
//
// The flags tell the scheduler which queues hold cells. A grant from the
// scheduler starts the serial transmission of that queue's head cell, 424 bits
// from the MSB of the header to the LSB of the payload with dout_flag high; the
// routing tag is not sent. The unassigned grant sends an all-zero cell instead.
// A user location returns to the idle queue after its last bit. Queue sizes (8
// dedicated, 64 shared, 8 classes), the address-queue scheme and the CLP
// threshold follow the switch description; CLASS_MAX, the discard counters and
// the zero payload of the unassigned cell are this design's choices.
module priority_buffer
  import atm_pkg::*;
#(
  parameter int unsigned PORT      = 0,
  parameter int unsigned PORT_W    = 3,
  parameter int unsigned UBUF      = 64,
  parameter int unsigned CLASSES   = 8,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned CLASS_MAX = 64
) (
  input  logic               pclk,
  input  logic               init,
  input  logic               cac_request,
  output logic               cac_grant,
  input  logic               cac_data,
  input  logic [PORT_W-1:0]  cac_address,
  input  word_t              cac_bus,
  input  logic [7:0]         csf_dest,
  input  word_t              csf_bus,
  input  logic               csf_valid,
  input  logic               ilmi_request,
  output logic               ilmi_grant,
  input  logic               ilmi_data,
  input  word_t              ilmi_bus,
  input  word_t              sm_bus,
  input  logic [PORT_W-1:0]  sm_address,
  input  logic               sm_data,
  output logic               sm_grant,
  input  logic               sm_request,
  input  logic [$clog2(UBUF+1)-1:0] clp_threshold,
  output logic               cac_flag,
  output logic [CLASSES-1:0] user_flags,
  output logic               ilmi_flag,
  output logic               sm_flag,
  input  logic               cacq_grant,
  input  logic [CLASSES-1:0] userq_grants,
  input  logic               ilmiq_grant,
  input  logic               smq_grant,
  input  logic               unassigned,
  output logic               data_out,
  output logic               dout_flag,
  output logic [15:0]        clp_discards,
  output logic [15:0]        overflow_discards
);
  localparam int unsigned AW = $clog2(UBUF);
  localparam int unsigned CW = $clog2(UBUF + 1);
  localparam int unsigned KW = (CLASSES > 1) ? $clog2(CLASSES) : 1;

  typedef enum logic [2:0] {SRC_CAC, SRC_SM, SRC_ILMI, SRC_USER, SRC_UNASSIGNED} src_e;

  // ------------------------------------------------ dedicated queues
  logic  cac_full, cac_empty, sm_full, sm_empty, il_full, il_empty;
  logic  cac_pop, sm_pop, il_pop;
  word_t cac_rd, sm_rd, il_rd;
  logic [4:0] tx_word;
  logic [$clog2(QDEPTH+1)-1:0] cac_cnt, sm_cnt, il_cnt;

  cell_fifo #(.DEPTH(QDEPTH)) u_cacq (
    .clk(pclk), .init, .wr_en(cac_data && cac_grant), .wr_data(cac_bus), .rd_word(tx_word),
    .rd_data(cac_rd), .pop(cac_pop), .full(cac_full), .empty(cac_empty), .count(cac_cnt)
  );
  cell_fifo #(.DEPTH(QDEPTH)) u_smq (
    .clk(pclk), .init, .wr_en(sm_data && sm_grant), .wr_data(sm_bus), .rd_word(tx_word),
    .rd_data(sm_rd), .pop(sm_pop), .full(sm_full), .empty(sm_empty), .count(sm_cnt)
  );
  cell_fifo #(.DEPTH(QDEPTH)) u_ilq (
    .clk(pclk), .init, .wr_en(ilmi_data && ilmi_grant), .wr_data(ilmi_bus), .rd_word(tx_word),
    .rd_data(il_rd), .pop(il_pop), .full(il_full), .empty(il_empty), .count(il_cnt)
  );

  always_ff @(posedge pclk) begin
    if (init) begin
      cac_grant  <= 1'b0;
      sm_grant   <= 1'b0;
      ilmi_grant <= 1'b0;
    end else begin
      if (cac_grant && !cac_request) cac_grant <= 1'b0;
      else if (!cac_grant && cac_request && cac_address == PORT_W'(PORT) && !cac_full)
        cac_grant <= 1'b1;
      if (sm_grant && !sm_request) sm_grant <= 1'b0;
      else if (!sm_grant && sm_request && sm_address == PORT_W'(PORT) && !sm_full)
        sm_grant <= 1'b1;
      if (ilmi_grant && !ilmi_request) ilmi_grant <= 1'b0;
      else if (!ilmi_grant && ilmi_request && !il_full) ilmi_grant <= 1'b1;
    end
  end

  // ------------------------------------------------ shared user buffer
  word_t          umem [UBUF][CELL_WORDS];
  logic [AW-1:0]  iq [UBUF];                 // idle address queue
  logic [AW-1:0]  ihead, itail;
  logic [CW-1:0]  icnt;
  logic [AW-1:0]  cq [CLASSES][UBUF];        // class address queues
  logic [AW-1:0]  chead [CLASSES];
  logic [AW-1:0]  ctail [CLASSES];
  logic [CW-1:0]  ccnt [CLASSES];

  logic [4:0]     uwk;                       // word count of the cell on the bus
  logic           uwr, uacc, ustart, uend, mine;
  logic [AW-1:0]  uaddr, uwaddr;
  logic [KW-1:0]  ucls;
  rtag_t          dtag;
  logic           accept;
  logic [CW-1:0]  occupancy;

  assign dtag      = rtag_t'(csf_dest);
  assign mine      = csf_valid && dtag.port == 4'(PORT);
  assign ustart    = csf_valid && uwk == 5'd0;
  assign occupancy = CW'(UBUF) - icnt;
  assign accept    = icnt != '0 && ccnt[KW'(dtag.prio)] < CW'(CLASS_MAX) &&
                     !(dtag.clp && occupancy >= clp_threshold);
  assign uwr       = mine && (ustart ? accept : uacc);
  assign uwaddr    = ustart ? iq[ihead] : uaddr;
  assign uend      = csf_valid && uwk == 5'(CELL_WORDS - 1) && uacc && !ustart;

  always_ff @(posedge pclk) begin
    if (uwr) umem[uwaddr][uwk] <= csf_bus;
  end

  // ------------------------------------------------ transmitter
  logic          tx_busy;
  src_e          tx_src;
  logic [AW-1:0] tx_addr;
  logic [8:0]    tx_bit;
  logic [8:0]    tx_p;
  word_t         tx_w;
  logic          tx_last, tx_start;
  logic [KW-1:0] gcls;
  logic          gany;

  assign tx_p    = tx_bit + 9'd8;      // skip the routing tag byte
  assign tx_word = tx_p[8:4];
  assign tx_last = tx_busy && tx_bit == 9'(CELL_BITS - 1);

  always_comb begin
    gcls = '0;
    gany = 1'b0;
    for (int c = 0; c < CLASSES; c++) if (userq_grants[c] && ccnt[c] != '0) begin
      gcls = KW'(c);
      gany = 1'b1;
    end
  end

  assign tx_start = !tx_busy &&
                    ((cacq_grant && !cac_empty) || (smq_grant && !sm_empty) ||
                     (ilmiq_grant && !il_empty) || gany || unassigned);

  always_comb begin
    case (tx_src)
      SRC_CAC:  tx_w = cac_rd;
      SRC_SM:   tx_w = sm_rd;
      SRC_ILMI: tx_w = il_rd;
      SRC_USER: tx_w = umem[tx_addr][tx_word];
      default:  tx_w = '0;
    endcase
  end

  assign data_out  = tx_busy && tx_w[4'd15 - tx_p[3:0]];
  assign dout_flag = tx_busy;
  assign cac_pop   = tx_last && tx_src == SRC_CAC;
  assign sm_pop    = tx_last && tx_src == SRC_SM;
  assign il_pop    = tx_last && tx_src == SRC_ILMI;

  logic ipush, ipop;
  assign ipush = tx_last && tx_src == SRC_USER;
  assign ipop  = uwr && ustart;

  always_ff @(posedge pclk) begin
    if (init) begin
      for (int i = 0; i < UBUF; i++) iq[i] <= AW'(i);
      ihead   <= '0;
      itail   <= '0;
      icnt    <= CW'(UBUF);
      for (int c = 0; c < CLASSES; c++) begin
        chead[c] <= '0;
        ctail[c] <= '0;
        ccnt[c]  <= '0;
      end
      uwk     <= '0;
      uacc    <= 1'b0;
      uaddr   <= '0;
      ucls    <= '0;
      tx_busy <= 1'b0;
      tx_src  <= SRC_UNASSIGNED;
      tx_addr <= '0;
      tx_bit  <= '0;
      clp_discards      <= '0;
      overflow_discards <= '0;
    end else begin
      // bus word counter and write decision
      if (csf_valid) uwk <= (uwk == 5'(CELL_WORDS - 1)) ? 5'd0 : uwk + 5'd1;
      if (ustart) begin
        uacc  <= mine && accept;
        uaddr <= iq[ihead];
        ucls  <= KW'(dtag.prio);
        if (mine && !accept) begin
          if (dtag.clp && icnt != '0 && occupancy >= clp_threshold)
            clp_discards <= clp_discards + 16'd1;
          else overflow_discards <= overflow_discards + 16'd1;
        end
      end

      // idle address queue
      if (ipop) ihead <= (ihead == AW'(UBUF - 1)) ? '0 : ihead + AW'(1);
      if (ipush) begin
        iq[itail] <= tx_addr;
        itail     <= (itail == AW'(UBUF - 1)) ? '0 : itail + AW'(1);
      end
      icnt <= icnt + CW'(ipush) - CW'(ipop);

      // class address queues
      for (int c = 0; c < CLASSES; c++) begin
        logic push_c, pop_c;
        push_c = uend && ucls == KW'(c);
        pop_c  = tx_start && !((cacq_grant && !cac_empty) || (smq_grant && !sm_empty) ||
                 (ilmiq_grant && !il_empty)) && gany && gcls == KW'(c);
        if (push_c) begin
          cq[c][ctail[c]] <= uaddr;
          ctail[c] <= (ctail[c] == AW'(UBUF - 1)) ? '0 : ctail[c] + AW'(1);
        end
        if (pop_c) chead[c] <= (chead[c] == AW'(UBUF - 1)) ? '0 : chead[c] + AW'(1);
        ccnt[c] <= ccnt[c] + CW'(push_c) - CW'(pop_c);
      end

      // transmitter
      if (tx_start) begin
        tx_busy <= 1'b1;
        tx_bit  <= '0;
        if (cacq_grant && !cac_empty) tx_src <= SRC_CAC;
        else if (smq_grant && !sm_empty) tx_src <= SRC_SM;
        else if (ilmiq_grant && !il_empty) tx_src <= SRC_ILMI;
        else if (gany) begin
          tx_src  <= SRC_USER;
          tx_addr <= cq[gcls][chead[gcls]];
        end else tx_src <= SRC_UNASSIGNED;
      end else if (tx_busy) begin
        tx_bit <= tx_bit + 9'd1;
        if (tx_last) tx_busy <= 1'b0;
      end
    end
  end

  always_comb begin
    cac_flag  = !cac_empty;
    sm_flag   = !sm_empty;
    ilmi_flag = !il_empty;
    for (int c = 0; c < CLASSES; c++) user_flags[c] = ccnt[c] != '0;
  end
endmodule
