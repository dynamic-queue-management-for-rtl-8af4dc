// dqm_top: the Dynamic Queue Management (DQM) chip.
//
// Sits between the output port of an ATM switch (2.4 Gb/s, 32-bit words at
// 120 MHz, one cell per 14-clock cell time) and up to 16 slower links on four
// UTOPIA-style interfaces. Every connection gets its own queue: VP connections
// a static one, VC connections one assigned on the fly by the Queue Selector's
// set-associative memory and overflow CAM. Queues are linked lists of cell
// slots in external SRAM (Cell Store); free slots are recycled through an
// on-chip cache backed by a Free Slot List in the same SRAM. The Output
// Scheduler visits virtual ports in bit-reversed order and serves each link's
// high-priority list before its low-priority list, round robin within a list.
// Three modes can be switched on by configuration inputs:
//   cfg_wrr_en    weighted round robin by Binary Scheduling Wheels (the
//                 cell's 5-bit weight code picks the wheel) instead of the
//                 two priorities;
//   cfg_credit_en credit-based link choice, so links configured with extra
//                 credits (cfg_extra) use turns other links leave unused;
//   cfg_wfg_en    Weighted Fair Goodput: above buffer level cfg_bh, VCs with
//                 more than cfg_q0 cells lose whole AAL5 packets.
// The configuration inputs should be changed only while no cells are queued
// or while the chip is in reset.
//
// events (one-clock pulses, for statistics): 0 queue lookup hit (SAM or VP),
// 1 CAM hit, 2 CAM-to-SAM migration, 3 new SAM entry, 4 new CAM entry,
// 5 set and CAM full (cell lost), 6 no free slot or queue (cell lost),
// 7 queue freed, 8 output blocked (FIFO full), 9 low priority cell sent,
// 10 high priority cell sent, 11 fresh slots taken, 12 Free Slot List refill,
// 13 Free Slot List spill, 14 input frame error, 15 Output Master drop,
// 16 WFG packet discard, 17 VC made inactive, 18 VC made active again,
// 19 credit scheduler gave a passed turn away, 20 wheel visit on wheel > 0.
//
// Per cell time (14 clocks, phase 0..13, ct_sync high in phase 13):
//   cell k arrives (words in phases 0..13) and its queue is looked up in
//   phases 11..13; in the next cell time it is appended to its queue and
//   written to the SRAM (phases 2, 4, 6). Independently, one queue is picked
//   in phase 0, its head cell read in phases 8, 10, 12 and handed to the
//   Output Master in the next cell time.
// After reset the chip initialises its tables (about NVC+256 clocks) and then
// raises ready; the sender must start each cell in the phase after ct_sync.
// The external SRAM has a one-clock read latency.
module dqm_top
  import dqm_pkg::*;
#(
  parameter int NVC        = 8192,   // dynamically assigned VC queues
  parameter int SETS       = 160,    // SAM sets (load factor 0.8)
  parameter int WAYS       = 64,     // SAM entries per set
  parameter int CAM_N      = 64,     // overflow CAM entries
  parameter int SLOT_W     = 20,     // 2**20 cell slots
  parameter int CACHE_N    = 64,     // free slot cache entries
  parameter int FIFO_CELLS = 8,      // Output Master FIFO depth per interface
  localparam int ADDR_W    = SLOT_W + 2,
  localparam int NQ        = NVC + NVP,
  localparam int QID_W     = $clog2(NQ)
)(
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       ready,
  output logic                       ct_sync,
  // from the switch output port
  input  logic [31:0]                data_opp,
  input  logic                       valid_opp,
  input  logic                       soc_opp,
  // link configuration: mask per virtual port (Table of link types)
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_mask,
  // weighted round robin (Binary Scheduling Wheels) instead of two priorities
  input  logic                       cfg_wrr_en,
  // link credit scheduling: enable, extra credits per virtual port
  input  logic                       cfg_credit_en,
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_extra,
  // Weighted Fair Goodput discard: enable, buffer threshold b_h, queue
  // threshold q0 (cells)
  input  logic                       cfg_wfg_en,
  input  logic [SLOT_W:0]            cfg_bh,
  input  logic [SLOT_W-1:0]          cfg_q0,
  // external SRAM (cell store and free slot list)
  output logic [ADDR_W-1:0]          mem_addr,
  output logic                       mem_we,
  output logic                       mem_re,
  output logic [MEM_W-1:0]           mem_wdata,
  input  logic [MEM_W-1:0]           mem_rdata,
  // UTOPIA-style transmit interfaces
  output logic [NIF-1:0][15:0]       tdata,
  output logic [NIF-1:0]             tsoc,
  output logic [NIF-1:0]             twren_n,
  output logic [NIF-1:0]             txprty,
  output logic [NIF-1:0][1:0]        taddr,
  input  logic [NIF-1:0][3:0]        tca,
  // event pulses, for statistics
  output logic [20:0]                events
);

  logic [3:0] phase;
  logic       qsel_init, qmgr_init, wfg_init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      ready <= 1'b0;
    end else begin
      if (qsel_init && qmgr_init && wfg_init) ready <= 1'b1;
      if (ready) phase <= (phase == P_LAST) ? 4'd0 : phase + 1'b1;
    end
  end
  assign ct_sync = ready && phase == P_LAST;

  // ---------------- Input Master ----------------
  cell_info_t info;
  logic       info_valid, data_valid, frame_err;
  logic [31:0] data_imst;

  imst u_imst (
    .clk, .rst_n, .en(ready), .phase,
    .data_opp, .valid_opp, .soc_opp,
    .info, .info_valid, .data_imst, .data_valid, .frame_err
  );

  // ---------------- Queue Selector ----------------
  logic              arr_valid, arr_newvc;
  logic [QID_W-1:0]  arr_qid;
  cell_info_t        arr_info;
  logic              del;
  logic [QID_W-1:0]  delqid;
  logic              fslt_en;
  logic ev_vp, ev_sam_hit, ev_cam_hit, ev_migrate, ev_new_sam, ev_new_cam,
        ev_overflow, ev_full_drop, ev_free;

  qsel #(.NVC(NVC), .SETS(SETS), .WAYS(WAYS), .CAM_N(CAM_N)) u_qsel (
    .clk, .rst_n, .phase, .init_done(qsel_init),
    .info, .info_valid, .accept(fslt_en),
    .del, .delqid,
    .arr_valid, .arr_qid, .arr_info, .arr_newvc,
    .ev_vp, .ev_sam_hit, .ev_cam_hit, .ev_migrate, .ev_new_sam, .ev_new_cam,
    .ev_overflow, .ev_full_drop, .ev_free
  );

  // ---------------- Weighted Fair Goodput ----------------
  // keep is valid in phase 1, the only phase in which the Queue Manager
  // and the Free Slot Manager act on an arrival.
  logic              keep, arr_keep;
  logic [SLOT_W:0]   buf_level;
  logic ev_discard, ev_wfg_off, ev_wfg_on;

  // ---------------- Queue Manager ----------------
  logic [SLOT_W-1:0] fslt, rtn_slt, wslt, nxtptr, rslt, ptr;
  logic              rqs, rtn_en, wslt_en, rslt_en, ptr_en;
  logic              new_q, newpri, nxt_en;
  logic [QID_W-1:0]  newqid, nxtqid;
  logic [OUT_W-1:0]  newout, nxtout;
  logic [WT_W-1:0]   newwt;

  qmgr #(.NVC(NVC), .SLOT_W(SLOT_W)) u_qmgr (
    .clk, .rst_n, .phase, .init_done(qmgr_init),
    .arr_valid(arr_keep), .arr_qid, .arr_info,
    .fslt, .fslt_en, .rqs, .rtn_en, .rtn_slt,
    .wslt_en, .wslt, .nxtptr, .rslt_en, .rslt, .ptr_en, .ptr,
    .new_q, .newqid, .newout, .newpri, .newwt,
    .nxt_en, .nxtqid,
    .del, .delqid
  );

  assign arr_keep = arr_valid && ready && (phase != P_ARR_WR || keep);

  wfg #(.NVC(NVC), .LEN_W(SLOT_W)) u_wfg (
    .clk, .rst_n, .phase, .en(cfg_wfg_en), .cfg_bh, .cfg_q0,
    .init_done(wfg_init),
    .arr_valid(arr_valid && ready), .arr_qid, .arr_a5(arr_info.a5),
    .arr_u(arr_info.u), .keep,
    .dep_en(rtn_en), .dep_qid(delqid),
    .level(buf_level), .ev_discard, .ev_off(ev_wfg_off), .ev_on(ev_wfg_on)
  );

  // ---------------- Output Scheduler ----------------
  logic [NIF-1:0] if_ready;
  logic ev_high, ev_low, ev_idle, ev_blocked, ev_extra, ev_wheel;

  oschl #(.NVC(NVC)) u_oschl (
    .clk, .rst_n, .en(ready), .phase, .cfg_mask, .if_ready, .cfg_wrr_en, .cfg_credit_en, .cfg_extra,
    .nxt_en, .nxtqid, .nxtout,
    .new_q, .newqid, .newout, .newpri, .newwt, .emp(del),
    .ev_high, .ev_low, .ev_idle, .ev_blocked, .ev_extra, .ev_wheel
  );

  // ---------------- Free Slot Manager ----------------
  localparam int BLK   = 8;
  localparam int FSL_W = SLOT_W - $clog2(BLK);
  logic                  tlen, hden, rfslts_en;
  logic [FSL_W-1:0]      tail, head;
  logic [BLK*SLOT_W-1:0] wfslts, rfslts;
  logic [$clog2(CACHE_N+1)-1:0] cache_cnt;
  logic ev_spill, ev_refill, ev_fresh;

  fsmgr #(.NVC(NVC), .SLOT_W(SLOT_W), .CACHE_N(CACHE_N), .BLK(BLK),
          .LOW(CACHE_N / 4), .HIGH(3 * CACHE_N / 4)) u_fsmgr (
    .clk, .rst_n, .en(ready), .phase,
    .fslt, .fslt_en, .rqs, .rtn_en, .rtn_slt,
    .wr_busy(arr_valid), .rd_busy(rslt_en),
    .tlen, .tail, .wfslts, .hden, .head, .rfslts_en, .rfslts,
    .cache_cnt, .ev_spill, .ev_refill, .ev_fresh
  );

  // ---------------- Memory Controller ----------------
  logic [31:0]      data_mctrl;
  logic             dval_mctrl, dsoc_mctrl;
  logic [OUT_W-1:0] dout_mctrl;

  mctrl #(.SLOT_W(SLOT_W), .BLK(BLK)) u_mctrl (
    .clk, .rst_n, .phase,
    .data_imst, .data_valid,
    .wslt_en, .wslt, .nxtptr, .rslt_en, .rslt, .ptr_en, .ptr,
    .nxtout,
    .tlen, .tail, .wfslts, .hden, .head, .rfslts_en, .rfslts,
    .data_mctrl, .dval_mctrl, .dsoc_mctrl, .dout_mctrl,
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata
  );

  // ---------------- Output Master ----------------
  logic ev_odrop;

  omst #(.FIFO_CELLS(FIFO_CELLS)) u_omst (
    .clk, .rst_n, .phase,
    .data_mctrl, .dval_mctrl, .dsoc_mctrl, .dout_mctrl,
    .if_ready, .tdata, .tsoc, .twren_n, .txprty, .taddr, .tca,
    .ev_drop(ev_odrop)
  );

  assign events = {ev_wheel, ev_extra, ev_wfg_on, ev_wfg_off, ev_discard, ev_odrop, frame_err, ev_spill, ev_refill, ev_fresh,
                   ev_high, ev_low, ev_blocked,
                   ev_free, ev_full_drop, ev_overflow, ev_new_cam, ev_new_sam,
                   ev_migrate, ev_cam_hit, ev_sam_hit | ev_vp};

endmodule
