// qsel: Queue Selector of the DQM chip.
//
// Maps the (VPI,VCI) of each arriving cell to a queue identifier (QID).
// VP connections get the static queue NVC + VPI. VC connections are assigned
// queues dynamically: a set-associative memory (SAM) of SETS sets x WAYS
// entries, each a (tag, QID) pair with a valid bit, is searched together with
// a small fully associative overflow CAM keyed by the whole (VPI,VCI).
//   - SAM hit: use the stored QID.
//   - CAM hit: use the CAM's QID; if the set has a free way, the entry moves
//     from the CAM into the SAM.
//   - no hit: take a QID from the free VC queue list (a circular list with
//     head and tail) and store it in the first free way of the set, or in a
//     free CAM entry when the set is full; with both full the cell is lost
//     (overflow).
// An address map, indexed by QID, remembers where each VC queue's entry sits
// so that, when the Queue Manager reports the queue empty (del), the entry is
// invalidated and the QID goes back to the free list.
//
// Set index = key mod SETS and tag = key div SETS, with key = {VPI,VCI}; for a
// power-of-two SETS this is exactly "low bits select the set, the remaining
// bits are the tag". The document's main configuration has 8192 VC queues, a
// load factor of 0.8 and 64-entry sets, hence 160 sets; the 64-entry CAM is
// this design's pick from the document's overflow analysis.
//
// Timing (phases of the 14-clock cell time, see dqm_pkg): del/delqid are
// sampled in phase 10; the invalidation and free-list return happen in phase
// 11; the set is read in phase 11; the decision and all writes happen in phase
// 13. arr_* are registered in phase 13 and stay valid for the whole next cell
// time. After reset an initialisation pass of NVC clocks fills the free list;
// init_done rises when it ends.
module qsel
  import dqm_pkg::*;
#(
  parameter int NVC   = 8192,   // dynamically assigned VC queues
  parameter int SETS  = 160,    // SAM sets
  parameter int WAYS  = 64,     // SAM entries per set
  parameter int CAM_N = 64,     // overflow CAM entries
  localparam int NQ    = NVC + NVP,
  localparam int QID_W = $clog2(NQ)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        phase,
  output logic              init_done,
  // from the Input Master
  input  cell_info_t        info,
  input  logic              info_valid,
  input  logic              accept,       // a cell slot is free (phase 13)
  // from the Queue Manager
  input  logic              del,
  input  logic [QID_W-1:0]  delqid,
  // to the Queue Manager (valid the whole next cell time)
  output logic              arr_valid,
  output logic [QID_W-1:0]  arr_qid,
  output cell_info_t        arr_info,
  output logic              arr_newvc,
  // one-clock event pulses
  output logic              ev_vp,
  output logic              ev_sam_hit,
  output logic              ev_cam_hit,
  output logic              ev_migrate,
  output logic              ev_new_sam,
  output logic              ev_new_cam,
  output logic              ev_overflow,
  output logic              ev_full_drop,
  output logic              ev_free
);

  localparam int VQ_W   = $clog2(NVC);
  localparam int SET_W  = $clog2(SETS);
  localparam int WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int CAM_W  = (CAM_N > 1) ? $clog2(CAM_N) : 1;
  localparam int LOC_W  = (WAY_W > CAM_W) ? WAY_W : CAM_W;
  localparam int TAG_W  = $clog2(((1 << KEY_W) + SETS - 1) / SETS);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [VQ_W-1:0]  qid;
  } sam_ent_t;

  typedef struct packed {
    logic             in_cam;
    logic [SET_W-1:0] set;
    logic [LOC_W-1:0] loc;     // way in the set, or CAM entry
  } amap_t;

  // ---------------- storage ----------------
  sam_ent_t [WAYS-1:0] sam_mem [SETS];     // SRAM rows, one set per row
  logic     [WAYS-1:0] sam_v   [SETS];     // valid bits (flip-flops)
  logic     [CAM_N-1:0]            cam_v;
  logic     [CAM_N-1:0][KEY_W-1:0] cam_key;
  logic     [CAM_N-1:0][VQ_W-1:0]  cam_qid;
  amap_t               amap_mem [NVC];
  logic [VQ_W-1:0]     fl_mem   [NVC];     // free VC queue list

  logic [VQ_W-1:0]     fl_head, fl_tail;
  logic [VQ_W:0]       fl_cnt;
  logic [VQ_W-1:0]     fl_rdata;
  logic [VQ_W:0]       init_cnt;

  sam_ent_t [WAYS-1:0] row_q;              // set read in phase 11
  logic [SET_W-1:0]    set_q;
  logic [TAG_W-1:0]    tag_q;
  logic [KEY_W-1:0]    key_q;
  amap_t               amap_rdata;
  logic                del_pend;
  logic [VQ_W-1:0]     del_q;

  wire [KEY_W-1:0] key = {info.vpi, info.vci};
  wire             del_vc = del && (delqid < QID_W'(NVC));

  // ---------------- lookup compare (phase 13) ----------------
  logic [WAYS-1:0]  hit_vec, free_vec;
  logic             sam_hit, sam_free;
  logic [WAY_W-1:0] hit_way, free_way;
  logic [CAM_N-1:0] cam_hit_vec;
  logic             cam_hit, cam_free;
  logic [CAM_W-1:0] cam_hit_idx, cam_free_idx;

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      hit_vec[w] = sam_v[set_q][w] && (row_q[w].tag == tag_q);
    free_vec = ~sam_v[set_q];
    sam_hit = |hit_vec;
    sam_free = |free_vec;
    hit_way = '0;
    free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])  hit_way  = WAY_W'(w);
      if (free_vec[w]) free_way = WAY_W'(w);
    end
    for (int c = 0; c < CAM_N; c++)
      cam_hit_vec[c] = cam_v[c] && (cam_key[c] == key_q);
    cam_hit = |cam_hit_vec;
    cam_free = ~&cam_v;
    cam_hit_idx = '0;
    cam_free_idx = '0;
    for (int c = CAM_N - 1; c >= 0; c--) begin
      if (cam_hit_vec[c]) cam_hit_idx  = CAM_W'(c);
      if (!cam_v[c])      cam_free_idx = CAM_W'(c);
    end
  end

  // ---------------- memories ----------------
  wire init_busy = !init_done;

  // SAM rows: read in phase 11, written in phase 13
  logic                 sam_we;
  logic [SET_W-1:0]     sam_waddr;
  sam_ent_t [WAYS-1:0]  sam_wrow;

  always_ff @(posedge clk) begin
    if (phase == P_LOOK) row_q <= sam_mem[SET_W'(key % KEY_W'(SETS))];
    if (sam_we) sam_mem[sam_waddr] <= sam_wrow;
  end

  // address map: read in phase 10, written in phase 13
  logic             am_we;
  logic [VQ_W-1:0]  am_waddr;
  amap_t            am_wdata;
  always_ff @(posedge clk) begin
    if (phase == P_DEL) amap_rdata <= amap_mem[delqid[VQ_W-1:0]];
    if (am_we) amap_mem[am_waddr] <= am_wdata;
  end

  // free list: read at head every clock, written at tail
  logic             fl_we;
  logic [VQ_W-1:0]  fl_waddr, fl_wdata;
  always_ff @(posedge clk) begin
    fl_rdata <= fl_mem[fl_head];
    if (fl_we) fl_mem[fl_waddr] <= fl_wdata;
  end

  always_comb begin
    fl_we    = 1'b0;
    fl_waddr = fl_tail;
    fl_wdata = del_q;
    if (init_busy) begin
      fl_we    = 1'b1;
      fl_waddr = init_cnt[VQ_W-1:0];
      fl_wdata = init_cnt[VQ_W-1:0];
    end else if (phase == P_LOOK && del_pend) begin
      fl_we = 1'b1;
    end
  end

  // ---------------- decision (phase 13) ----------------
  typedef enum logic [2:0] {D_NONE, D_VP, D_SAM, D_CAM, D_NEW_SAM, D_NEW_CAM, D_OVF, D_DROP}
    dec_e;
  dec_e dec;
  logic migrate;

  always_comb begin
    dec     = D_NONE;
    migrate = 1'b0;
    if (init_done && phase == P_COMMIT && info_valid) begin
      if (!info.vc)                   dec = accept ? D_VP : D_DROP;
      else if (sam_hit)               dec = accept ? D_SAM : D_DROP;
      else if (cam_hit) begin
        dec     = accept ? D_CAM : D_DROP;
        migrate = sam_free;
      end
      else if (!accept || fl_cnt == '0) dec = D_DROP;
      else if (sam_free)              dec = D_NEW_SAM;
      else if (cam_free)              dec = D_NEW_CAM;
      else                            dec = D_OVF;
    end
  end

  always_comb begin
    sam_we    = 1'b0;
    sam_waddr = set_q;
    sam_wrow  = row_q;
    am_we     = 1'b0;
    am_waddr  = fl_rdata;
    am_wdata  = '{in_cam: 1'b0, set: set_q, loc: LOC_W'(free_way)};
    if (dec == D_NEW_SAM) begin
      sam_we = 1'b1;
      sam_wrow[free_way] = '{tag: tag_q, qid: fl_rdata};
      am_we = 1'b1;
    end else if (dec == D_NEW_CAM) begin
      am_we = 1'b1;
      am_wdata = '{in_cam: 1'b1, set: set_q, loc: LOC_W'(cam_free_idx)};
    end else if (migrate) begin
      sam_we = 1'b1;
      sam_wrow[free_way] = '{tag: tag_q, qid: cam_qid[cam_hit_idx]};
      am_we = 1'b1;
      am_waddr = cam_qid[cam_hit_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_cnt  <= '0;
      fl_head   <= '0;
      fl_tail   <= '0;
      fl_cnt    <= '0;
      for (int s = 0; s < SETS; s++) sam_v[s] <= '0;
      cam_v     <= '0;
      cam_key   <= '0;
      cam_qid   <= '0;
      set_q     <= '0;
      tag_q     <= '0;
      key_q     <= '0;
      del_pend  <= 1'b0;
      del_q     <= '0;
      arr_valid <= 1'b0;
      arr_qid   <= '0;
      arr_info  <= '0;
      arr_newvc <= 1'b0;
      {ev_vp, ev_sam_hit, ev_cam_hit, ev_migrate, ev_new_sam, ev_new_cam,
       ev_overflow, ev_full_drop, ev_free} <= '0;
    end else begin
      {ev_vp, ev_sam_hit, ev_cam_hit, ev_migrate, ev_new_sam, ev_new_cam,
       ev_overflow, ev_full_drop, ev_free} <= '0;
      if (init_busy) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == (VQ_W+1)'(NVC - 1)) begin
          init_done <= 1'b1;
          fl_cnt    <= (VQ_W+1)'(NVC);
        end
      end else begin
        // phase 10: remember a VC queue to be freed
        if (phase == P_DEL) begin
          del_pend <= del_vc;
          del_q    <= delqid[VQ_W-1:0];
        end
        // phase 11: invalidate its entry, return QID, read the set
        if (phase == P_LOOK) begin
          if (del_pend) begin
            if (amap_rdata.in_cam) cam_v[CAM_W'(amap_rdata.loc)] <= 1'b0;
            else sam_v[amap_rdata.set][WAY_W'(amap_rdata.loc)] <= 1'b0;
            fl_tail  <= fl_tail + 1'b1;
            if (fl_tail == VQ_W'(NVC - 1)) fl_tail <= '0;
            ev_free  <= 1'b1;
            del_pend <= 1'b0;
          end
          set_q <= SET_W'(key % KEY_W'(SETS));
          tag_q <= TAG_W'(key / KEY_W'(SETS));
          key_q <= key;
        end
        // phase 13: commit
        if (phase == P_COMMIT) begin
          arr_valid <= 1'b0;
          arr_newvc <= 1'b0;
          arr_info  <= info;
          case (dec)
            D_VP: begin
              arr_valid <= 1'b1;
              arr_qid   <= QID_W'(NVC) + QID_W'(info.vpi);
              ev_vp     <= 1'b1;
            end
            D_SAM: begin
              arr_valid  <= 1'b1;
              arr_qid    <= QID_W'(row_q[hit_way].qid);
              ev_sam_hit <= 1'b1;
            end
            D_CAM: begin
              arr_valid  <= 1'b1;
              arr_qid    <= QID_W'(cam_qid[cam_hit_idx]);
              ev_cam_hit <= 1'b1;
            end
            D_NEW_SAM, D_NEW_CAM: begin
              arr_valid <= 1'b1;
              arr_newvc <= 1'b1;
              arr_qid   <= QID_W'(fl_rdata);
              fl_head   <= (fl_head == VQ_W'(NVC - 1)) ? '0 : fl_head + 1'b1;
              if (dec == D_NEW_SAM) begin
                sam_v[set_q][free_way] <= 1'b1;
                ev_new_sam <= 1'b1;
              end else begin
                cam_v[cam_free_idx]   <= 1'b1;
                cam_key[cam_free_idx] <= key_q;
                cam_qid[cam_free_idx] <= fl_rdata;
                ev_new_cam <= 1'b1;
              end
            end
            D_OVF:  ev_overflow  <= 1'b1;
            D_DROP: ev_full_drop <= 1'b1;
            default: ;
          endcase
          if (migrate) begin
            sam_v[set_q][free_way] <= 1'b1;
            cam_v[cam_hit_idx]     <= 1'b0;
            ev_migrate             <= 1'b1;
          end
        end
        // free-list count: a pop in phase 13, a push in phase 11
        if (phase == P_LOOK && del_pend) fl_cnt <= fl_cnt + 1'b1;
        else if (phase == P_COMMIT && (dec == D_NEW_SAM || dec == D_NEW_CAM))
          fl_cnt <= fl_cnt - 1'b1;
      end
    end
  end

  // a VC queue can only be freed while it is allocated
  a_fl_not_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(init_done && phase == P_LOOK && del_pend && fl_cnt == (VQ_W+1)'(NVC)));

endmodule
