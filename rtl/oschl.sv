// oschl: Output Scheduler of the DQM chip.
//
// Once per cell time a 4-bit counter, read bit-reversed, names a virtual port
// (order 0, 8, 4, 12, 2, ...), which spreads the turns of a multi-port link
// evenly over the 16 cell times of a round. The virtual port ANDed with its
// mask (cfg_mask: 1111 for OC-3, 1100 for OC-12, 1000 for a G-link, 0000 for
// OC-48) gives the output link. Every link owns NW scheduling lists, each a
// circular list of non-empty queues built in a shared next-pointer table
// (qnext, indexed by QID); the scheduling table holds, per link and list, a
// pointer to the queue served last (or NIL). The queue after it is served
// next. If the link's Output Master FIFO has no room, or all its lists are
// empty, the cell time is idle.
//
// Two disciplines share these lists (cfg_wrr_en):
//  - two-priority round robin (the basic one): list 1 holds high priority
//    queues, list 0 low priority ones; the low list is served only when the
//    high list is empty.
//  - weighted round robin by Binary Scheduling Wheels: list w is the wheel of
//    queues with weight 2**-w of the link (w = the cell's 5-bit weight code).
//    A per-link fast-forward counter (bsw_ffc) picks the wheels; once picked,
//    a wheel is visited until each queue that was on it has sent one cell
//    (the visit ends when the queue that was last served before the visit
//    has been served again, or the wheel empties). Queues added to a wheel
//    during its visit are served in the same visit.
//
// With cfg_credit_en set, the link is chosen by the credit scheduler
// (link_credit) instead of the counter: the virtual port whose turn it is
// sends if its link has a queue and FIFO room, otherwise the turn passes to
// the next port in ring order that has credit left, so a link may use more
// cell times than its basic share (cfg_extra per virtual port).
//
// Timing (phases of the cell time): phase 0 pick the link and list and read
// qnext of its pointer; from phase 2 nxt_en/nxtqid/nxtout are valid; phase 2
// also reads the scheduled queue's successor. In phase 10, if the Queue
// Manager reports the queue empty (emp), it is unlinked (qnext[ptr] :=
// qnext[queue], pointer unchanged, or NIL if it was alone); otherwise the
// pointer advances to it. A new queue reported by the Queue Manager during the
// cell time is inserted right after the pointer of its list in phases 11..13,
// i.e. after the removal, so the two never disturb each other; it can be
// served from the next cell time. The list structure, the insertion after the
// pointer and the removal rule follow the document; the exact phases, the
// visit-end rule of a wheel and the use of the 5-bit weight code as the wheel
// number are this design's choices.
module oschl
  import dqm_pkg::*;
#(
  parameter int NVC    = 8192,
  parameter int NW     = 32,              // scheduling wheels per link
  localparam int NQ    = NVC + NVP,
  localparam int QID_W = $clog2(NQ),
  localparam int LW    = $clog2(NW)
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [3:0]                phase,
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_mask,   // per virtual port
  input  logic [NIF-1:0]            if_ready,    // Output Master FIFO has room
  input  logic                      cfg_wrr_en,  // Binary Scheduling Wheels
  input  logic                      cfg_credit_en,
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_extra,  // extra credits per virtual port
  // to the Queue Manager / Output Master
  output logic                      nxt_en,
  output logic [QID_W-1:0]          nxtqid,
  output logic [OUT_W-1:0]          nxtout,
  // from the Queue Manager
  input  logic                      new_q,
  input  logic [QID_W-1:0]          newqid,
  input  logic [OUT_W-1:0]          newout,
  input  logic                      newpri,
  input  logic [WT_W-1:0]           newwt,
  input  logic                      emp,
  // one-clock event pulses
  output logic                      ev_high,
  output logic                      ev_low,
  output logic                      ev_idle,
  output logic                      ev_blocked,
  output logic                      ev_extra,    // a link took a passed turn
  output logic                      ev_wheel     // a wheel visit began on wheel > 0
);

  logic [QID_W-1:0] qnext [NQ];
  logic [QID_W-1:0] qn_rdata;

  // scheduling table: [link][list]
  logic [NOUT-1:0][NW-1:0]            hd_v;
  logic [NOUT-1:0][NW-1:0][QID_W-1:0] hd;

  // wheel visits, per link
  logic [NOUT-1:0]             in_visit;
  logic [NOUT-1:0][LW-1:0]     vis_w;
  logic [NOUT-1:0][QID_W-1:0]  vis_stop;

  logic [OUT_W-1:0] cnt;
  logic [LW-1:0]    sel_l;
  logic [QID_W-1:0] sel_prev, sel_next;
  logic             sel_start;
  logic             add_empty;
  logic [QID_W-1:0] add_head;
  logic             go_q;

  // ---------------- link choice ----------------
  logic [NOUT-1:0]  lk_ready;
  logic [OUT_W-1:0] cr_vport, cr_link;
  logic             cr_valid, cr_extra;
  always_comb
    for (int l = 0; l < NOUT; l++)
      lk_ready[l] = (hd_v[l] != '0) && if_ready[l / 4];

  link_credit u_credit (
    .clk, .rst_n, .step(en && cfg_credit_en && phase == P_SEL),
    .cfg_mask, .cfg_extra, .link_ready(lk_ready),
    .sel(cr_vport), .sel_link(cr_link), .sel_valid(cr_valid), .sel_extra(cr_extra)
  );

  wire [OUT_W-1:0] vport = cfg_credit_en ? cr_vport : bitrev4(cnt);
  wire [OUT_W-1:0] link  = vport & cfg_mask[vport];
  wire             room  = if_ready[link[OUT_W-1:OUT_W-2]];

  // ---------------- wheel choice (one fast-forward counter per link) -------
  logic [NOUT-1:0]         ff_nxt, ff_valid, ff_pass;
  logic [NOUT-1:0][LW-1:0] ff_wheel;
  logic [NOUT-1:0][NW-1:0] ff_cnt;

  for (genvar l = 0; l < NOUT; l++) begin : g_ffc
    bsw_ffc #(.W(NW)) u_ffc (
      .clk, .rst_n, .mask(hd_v[l]), .nxt(ff_nxt[l]),
      .wheel(ff_wheel[l]), .valid(ff_valid[l]), .pass_start(ff_pass[l]),
      .counter(ff_cnt[l])
    );
  end

  // list to serve on the chosen link
  logic [LW-1:0] lst;
  logic          has_q, start_visit;
  always_comb begin
    start_visit = 1'b0;
    if (cfg_wrr_en) begin
      has_q = ff_valid[link];
      if (in_visit[link]) lst = vis_w[link];
      else begin
        lst         = ff_wheel[link];
        start_visit = has_q;
      end
    end else begin
      has_q = hd_v[link][1] || hd_v[link][0];
      lst   = hd_v[link][1] ? LW'(1) : LW'(0);
    end
  end
  wire go = en && phase == P_SEL && room && has_q;

  always_comb begin
    ff_nxt = '0;
    ff_nxt[link] = go && cfg_wrr_en && start_visit;
  end

  // list a new queue joins
  wire [LW-1:0] new_l = cfg_wrr_en ? LW'(newwt) : LW'(newpri);

  // ---------------- single-port qnext table ----------------
  logic             qn_we;
  logic [QID_W-1:0] qn_addr, qn_wdata;
  always_comb begin
    qn_we    = 1'b0;
    qn_addr  = hd[link][lst];
    qn_wdata = sel_next;
    case (phase)
      4'd1:   qn_addr = qn_rdata;                       // read successor of scheduled queue
      P_DEL: begin                                       // unlink an emptied queue
        qn_addr = sel_prev;
        qn_we   = nxt_en && emp && (nxtqid != sel_prev);
      end
      P_LOOK: qn_addr = hd[newout][new_l];              // read successor of the pointer
      4'd12: begin
        qn_addr  = newqid;
        qn_we    = new_q;
        qn_wdata = add_empty ? newqid : qn_rdata;
      end
      4'd13: begin
        qn_addr  = add_head;
        qn_we    = new_q && !add_empty;
        qn_wdata = newqid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (qn_we) qnext[qn_addr] <= qn_wdata;
    qn_rdata <= qnext[qn_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd_v      <= '0;
      hd        <= '0;
      in_visit  <= '0;
      vis_w     <= '0;
      vis_stop  <= '0;
      cnt       <= '0;
      sel_l     <= '0;
      sel_prev  <= '0;
      sel_next  <= '0;
      sel_start <= 1'b0;
      nxt_en    <= 1'b0;
      nxtqid    <= '0;
      nxtout    <= '0;
      add_empty <= 1'b0;
      add_head  <= '0;
      {ev_high, ev_low, ev_idle, ev_blocked, ev_extra, ev_wheel} <= '0;
    end else begin
      {ev_high, ev_low, ev_idle, ev_blocked, ev_extra, ev_wheel} <= '0;
      if (en && phase == P_SEL) begin
        cnt       <= cnt + 1'b1;
        sel_l     <= lst;
        sel_prev  <= hd[link][lst];
        sel_start <= start_visit;
        nxtout    <= link;
        ev_high   <= go && !cfg_wrr_en && lst == LW'(1);
        ev_low    <= go && !cfg_wrr_en && lst == LW'(0);
        ev_idle   <= !has_q;
        ev_blocked <= has_q && !room;
        ev_extra   <= go && cfg_credit_en && cr_extra;
        ev_wheel   <= go && start_visit && lst != '0;
        if (go && start_visit) begin
          in_visit[link] <= 1'b1;
          vis_w[link]    <= lst;
          vis_stop[link] <= hd[link][lst];
        end
      end
      if (phase == 4'd1) begin
        nxt_en <= go_q;
        nxtqid <= qn_rdata;
      end
      if (phase == 4'd2) sel_next <= qn_rdata;
      if (phase == P_DEL && nxt_en) begin
        if (!emp)                    hd[nxtout][sel_l]   <= nxtqid;
        else if (nxtqid == sel_prev) hd_v[nxtout][sel_l] <= 1'b0;
        // a wheel visit ends when its last queue has been served
        if (cfg_wrr_en && (nxtqid == vis_stop[nxtout] || (emp && nxtqid == sel_prev)))
          in_visit[nxtout] <= 1'b0;
      end
      if (phase == P_LOOK) begin
        add_empty <= !hd_v[newout][new_l];
        add_head  <= hd[newout][new_l];
      end
      if (phase == 4'd12 && new_q) begin
        hd[newout][new_l]   <= add_empty ? newqid : hd[newout][new_l];
        hd_v[newout][new_l] <= 1'b1;
      end
      if (!cfg_wrr_en) in_visit <= '0;
      if (phase == P_LAST) nxt_en <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) go_q <= 1'b0;
    else if (phase == P_SEL) go_q <= go;

endmodule
