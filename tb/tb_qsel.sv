// tb_qsel: unit test of the Queue Selector at a small size (16 VC queues,
// 4 sets x 2 ways, 2 CAM entries) so that sets and the CAM fill up often.
// The bench plays the Input Master (cell information in phases 2..13) and
// the Queue Manager (random "queue empty" notices in phase 10), and keeps its
// own model: a map from connection to (QID, in SAM or CAM), the number of SAM
// entries per set (set = key mod 4), the CAM occupancy and the free QID list
// in first-in first-out order. For every cell it checks the decision (VP
// queue, SAM hit, CAM hit with or without migration to the SAM, new SAM or
// CAM entry, overflow, drop for lack of a cell slot), the QID handed to the
// Queue Manager and the event outputs, and that each decision kind occurs.
module tb_qsel;
  import dqm_pkg::*;

  localparam int NVC = 16, SETS = 4, WAYS = 2, CAM_N = 2;
  localparam int NQ = NVC + NVP, QID_W = $clog2(NQ);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic init_done;
  cell_info_t info = '0;
  logic info_valid = 0, accept = 1, del = 0;
  logic [QID_W-1:0] delqid = 0;
  logic arr_valid, arr_newvc;
  logic [QID_W-1:0] arr_qid;
  cell_info_t arr_info;
  logic ev_vp, ev_sam_hit, ev_cam_hit, ev_migrate, ev_new_sam, ev_new_cam,
        ev_overflow, ev_full_drop, ev_free;

  qsel #(.NVC(NVC), .SETS(SETS), .WAYS(WAYS), .CAM_N(CAM_N)) dut (
    .clk, .rst_n, .phase, .init_done, .info, .info_valid, .accept, .del, .delqid,
    .arr_valid, .arr_qid, .arr_info, .arr_newvc,
    .ev_vp, .ev_sam_hit, .ev_cam_hit, .ev_migrate, .ev_new_sam, .ev_new_cam,
    .ev_overflow, .ev_full_drop, .ev_free);

  always @(posedge clk) if (init_done) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  typedef enum {VP, SAM, CAM, CAM_MIG, NEW_SAM, NEW_CAM, OVF, DROP} dec_t;
  int   qid_of [logic [23:0]];
  bit   in_cam [logic [23:0]];
  logic [23:0] key_of_q [int];
  int   set_cnt [SETS];
  int   cam_cnt = 0;
  int   fl [$];
  bit   alive [int];     // VC queues the block has handed out (its own view)
  int   seen [8];

  initial begin
    for (int i = 0; i < NVC; i++) fl.push_back(i);
    for (int s = 0; s < SETS; s++) set_cnt[s] = 0;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int t = 0; t < 20000; t++) begin
      logic [7:0] vpi;
      logic [15:0] vci;
      logic [23:0] key;
      int dq, set, e_qid;
      dec_t d;
      bit vc, dodel, mig_drop;
      vc  = ($urandom % 5) != 0;
      vpi = 8'($urandom % 3);
      vci = 16'($urandom % 12);
      key = {vpi, vci};
      set = int'(key) % SETS;
      accept = ($urandom % 10) != 0;
      // a queue that became empty, reported in phase 10
      dodel = 0;
      if (alive.size() > 0 && $urandom % 3 == 0) begin
        int k, j;
        k = $urandom % alive.size();
        j = 0;
        foreach (alive[q]) begin
          if (j == k) dq = q;
          j++;
        end
        dodel = 1;
      end
      // model: deletion first, then the lookup
      if (dodel) alive.delete(dq);
      if (dodel && key_of_q.exists(dq)) begin
        logic [23:0] dk;
        dk = key_of_q[dq];
        if (in_cam[dk]) cam_cnt--; else set_cnt[int'(dk) % SETS]--;
        qid_of.delete(dk); in_cam.delete(dk); key_of_q.delete(dq);
        fl.push_back(dq);
      end
      e_qid = -1;
      mig_drop = 0;
      if (!vc) begin
        d = accept ? VP : DROP;
        e_qid = accept ? NVC + int'(vpi) : -1;
      end else if (qid_of.exists(key) && !in_cam[key]) begin
        d = accept ? SAM : DROP;
        e_qid = accept ? qid_of[key] : -1;
      end else if (qid_of.exists(key)) begin
        d = !accept ? DROP : (set_cnt[set] < WAYS) ? CAM_MIG : CAM;
        e_qid = qid_of[key];
        // the entry moves to a free way even when the cell is dropped
        if (set_cnt[set] < WAYS) begin
          set_cnt[set]++; cam_cnt--; in_cam[key] = 0;
          mig_drop = !accept;
        end
        if (!accept) e_qid = -1;
      end else if (!accept) d = DROP;
      else if (set_cnt[set] < WAYS || cam_cnt < CAM_N) begin
        e_qid = fl.pop_front();
        qid_of[key] = e_qid;
        key_of_q[e_qid] = key;
        if (set_cnt[set] < WAYS) begin d = NEW_SAM; set_cnt[set]++; in_cam[key] = 0; end
        else begin d = NEW_CAM; cam_cnt++; in_cam[key] = 1; end
      end else d = OVF;
      seen[int'(d)]++;
      // drive
      @(negedge clk iff phase == 4'd1);
      info = '0;
      info.vc = vc; info.vpi = vpi; info.vci = vci; info.out = vpi[7:4];
      info.pri = 1'($urandom);
      info_valid = 1;
      repeat (9) @(negedge clk);         // phase 10
      del = dodel;
      delqid = QID_W'(dodel ? dq : 0);
      @(negedge clk);                    // phase 11
      del = 0;
      repeat (3) @(negedge clk);         // phase 0 of the next cell time
      info_valid = 0;
      check(arr_valid == (e_qid >= 0), $sformatf("t %0d: arr_valid %b, expected decision %s", t, arr_valid, d.name()));
      if (e_qid >= 0) check(int'(arr_qid) == e_qid && arr_info.vci == vci,
                            $sformatf("t %0d: QID %0d expected %0d (%s)", t, arr_qid, e_qid, d.name()));
      if (arr_valid && arr_newvc) alive[int'(arr_qid)] = 1;
      check(arr_newvc == (d == NEW_SAM || d == NEW_CAM), "arr_newvc");
      check(ev_vp == (d == VP) && ev_sam_hit == (d == SAM) &&
            ev_cam_hit == (d == CAM || d == CAM_MIG) && ev_migrate == (d == CAM_MIG || mig_drop) &&
            ev_new_sam == (d == NEW_SAM) && ev_new_cam == (d == NEW_CAM) &&
            ev_overflow == (d == OVF) && ev_full_drop == (d == DROP),
            $sformatf("t %0d: events for %s", t, d.name()));
    end
    for (int i = 0; i < 8; i++) begin
      dec_t d;
      d = dec_t'(i);
      $display("decision %-8s : %0d", d.name(), seen[i]);
      check(seen[i] > 0, $sformatf("decision %s never made", d.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
