// tb_qmgr: unit test of the Queue Manager (8 VC + 256 VP queues, 1024 slots).
// The bench plays the Queue Selector (one arrival per cell time for a random
// queue), the Free Slot Manager (a pool of free slots), the Memory
// Controller (a model of the next-pointer field of every slot) and the Output
// Scheduler (one departure per cell time from a queue the bench knows to be
// non-empty). Its model keeps each queue as a list of slots. Checks: each
// cell is written to the queue's LAST slot with the new free slot as its next
// pointer; each departure reads the queue's oldest slot; the read slot is
// returned; new_q is raised exactly for an arrival to an empty queue, with
// its output and priority; del/delqid exactly when a queue becomes empty.
module tb_qmgr;
  import dqm_pkg::*;

  localparam int NVC = 8, SLOT_W = 10;
  localparam int NQ = NVC + NVP, QID_W = $clog2(NQ), NS = 1 << SLOT_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic init_done;
  logic arr_valid = 0;
  logic [QID_W-1:0] arr_qid = 0;
  cell_info_t arr_info = '0;
  logic [SLOT_W-1:0] fslt = 0, rtn_slt, wslt, nxtptr, rslt, ptr = 0;
  logic fslt_en = 1, rqs, rtn_en, wslt_en, rslt_en, ptr_en = 0;
  logic new_q, newpri, nxt_en = 0, del;
  logic [QID_W-1:0] newqid, nxtqid = 0, delqid;
  logic [OUT_W-1:0] newout;
  logic [WT_W-1:0] newwt;

  qmgr #(.NVC(NVC), .SLOT_W(SLOT_W)) dut (
    .clk, .rst_n, .phase, .init_done, .arr_valid, .arr_qid, .arr_info,
    .fslt, .fslt_en, .rqs, .rtn_en, .rtn_slt,
    .wslt_en, .wslt, .nxtptr, .rslt_en, .rslt, .ptr_en, .ptr,
    .new_q, .newqid, .newout, .newpri, .newwt, .nxt_en, .nxtqid, .del, .delqid);

  always @(posedge clk) if (init_done) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0, n_new = 0, n_del = 0;
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

  int pool [$];
  int qslots [NQ][$];       // cells of each queue, oldest first
  int last [NQ];
  logic [SLOT_W-1:0] nextp [NS];
  int qs [6] = '{0, 3, 7, NVC + 0, NVC + 200, NVC + 255};

  initial begin
    for (int s = NQ; s < NS; s++) pool.push_back(s);
    for (int q = 0; q < NQ; q++) last[q] = q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int t = 0; t < 8000; t++) begin
      int aq, dq, exp_slot, new_slot;
      bit arr, dep, was_empty, becomes_empty;
      arr = ($urandom % 100) < 35;
      aq  = qs[$urandom % 6];
      dq  = -1;
      begin
        int k;
        k = $urandom % 6;
        if (($urandom % 100) < 70 && qslots[qs[k]].size() > 0) dq = qs[k];
      end
      dep = dq >= 0;
      @(negedge clk iff phase == 4'd13);
      arr_valid = arr;
      arr_qid = QID_W'(aq);
      arr_info = '0;
      arr_info.out = 4'($urandom);
      arr_info.pri = 1'($urandom);
      new_slot = pool.pop_front();
      fslt = SLOT_W'(new_slot);
      @(negedge clk);                          // phase 0
      @(negedge clk);                          // phase 1
      check(rqs == arr, "rqs");
      // model: arrival
      was_empty = qslots[aq].size() == 0;
      if (arr) begin
        exp_slot = last[aq];
        qslots[aq].push_back(exp_slot);
        last[aq] = new_slot;
      end else pool.push_front(new_slot);
      nxt_en = dep;                            // scheduler output, phases 2..13
      nxtqid = QID_W'(dep ? dq : 0);
      @(negedge clk);                          // phase 2
      check(wslt_en == arr, "wslt_en");
      if (arr) begin
        check(int'(wslt) == exp_slot && int'(nxtptr) == new_slot,
              $sformatf("t %0d: cell to slot %0d next %0d, expected %0d %0d", t, wslt, nxtptr, exp_slot, new_slot));
        nextp[wslt] = nxtptr;
        check(new_q == was_empty, $sformatf("t %0d: new_q %b for a queue that was %s", t, new_q,
              was_empty ? "empty" : "not empty"));
        if (was_empty) begin
          n_new++;
          check(int'(newqid) == aq && newout == arr_info.out && newpri == arr_info.pri, "new queue fields");
        end
      end else check(!new_q, "new_q without an arrival");
      repeat (3) @(negedge clk);               // phase 5
      check(rslt_en == dep, "rslt_en");
      becomes_empty = 0;
      if (dep) begin
        exp_slot = qslots[dq].pop_front();
        check(int'(rslt) == exp_slot, $sformatf("t %0d: read slot %0d expected %0d", t, rslt, exp_slot));
        becomes_empty = qslots[dq].size() == 0;
      end
      repeat (4) @(negedge clk);               // phase 9: pointer from memory
      ptr_en = dep;
      ptr = nextp[rslt];
      #1;
      check(rtn_en == dep, "rtn_en");
      if (dep) begin
        check(rtn_slt == rslt, "returned slot");
        pool.push_back(int'(rslt));
      end
      @(negedge clk);                          // phase 10
      ptr_en = 0;
      check(del == becomes_empty && (!del || int'(delqid) == dq),
            $sformatf("t %0d: del %b qid %0d, expected %b %0d", t, del, delqid, becomes_empty, dq));
      n_del += int'(del);
      @(negedge clk);
      arr_valid = 0;
    end
    check(n_new > 100 && n_del > 100, $sformatf("%0d new queues, %0d emptied", n_new, n_del));
    $display("%0d new queues, %0d emptied", n_new, n_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
