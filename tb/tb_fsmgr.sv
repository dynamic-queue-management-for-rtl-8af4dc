// tb_fsmgr: unit test of the Free Slot Manager (1024 slots, 264 queues, so
// slots 264..1023 start free; 64-entry cache, blocks of 8, thresholds 16/48).
// The bench plays the Queue Manager (takes a slot in phase 1 of a cell time
// with an arrival, returns one in phase 9 of a cell time with a departure)
// and the Memory Controller (stores spilled blocks in a model of the Free
// Slot List and returns the head block in phase 9 when asked).
// Checks: every slot handed out is in range and not held already; no spill
// in a cell time with an arrival and no refill in one with a departure; after
// everything is returned, the cache, the list and the never-used slots hold
// exactly the 760 free slots once each; spills, refills and fresh loads occur.
module tb_fsmgr;
  import dqm_pkg::*;

  localparam int NVC = 8, SLOT_W = 10, CACHE_N = 64, BLK = 8;
  localparam int NQ = NVC + NVP, FSL_W = SLOT_W - 3, NS = 1 << SLOT_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic [SLOT_W-1:0] fslt, rtn_slt = 0;
  logic fslt_en, rqs = 0, rtn_en = 0, wr_busy = 0, rd_busy = 0;
  logic tlen, hden, rfslts_en = 0;
  logic [FSL_W-1:0] tail, head;
  logic [BLK*SLOT_W-1:0] wfslts, rfslts = 0;
  logic [$clog2(CACHE_N+1)-1:0] cache_cnt;
  logic ev_spill, ev_refill, ev_fresh;

  fsmgr #(.NVC(NVC), .SLOT_W(SLOT_W), .CACHE_N(CACHE_N), .BLK(BLK), .LOW(16), .HIGH(48)) dut (
    .clk, .rst_n, .en(1'b1), .phase, .fslt, .fslt_en, .rqs, .rtn_en, .rtn_slt,
    .wr_busy, .rd_busy, .tlen, .tail, .wfslts, .hden, .head, .rfslts_en, .rfslts,
    .cache_cnt, .ev_spill, .ev_refill, .ev_fresh);

  always @(posedge clk) if (rst_n) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0, n_spill = 0, n_refill = 0, n_fresh = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BLK*SLOT_W-1:0] fsl [1 << FSL_W];
  bit held [NS];
  int held_q [$];
  bit arr, dep;

  // Memory Controller side
  always @(posedge clk) if (rst_n) begin
    n_spill += int'(ev_spill); n_refill += int'(ev_refill); n_fresh += int'(ev_fresh);
    if (phase == 4'd2 && tlen) begin
      check(!arr, "spill in a cell time with an arrival");
      fsl[tail] <= wfslts;
    end
    if (phase == 4'd8 && hden) check(!dep, "refill in a cell time with a departure");
  end

  // one cell time; a_p / d_p: probability (percent) of an arrival / departure
  task automatic cell_time(input int a_p, input int d_p);
    @(negedge clk iff phase == 4'd13);
    arr = ($urandom % 100) < a_p && fslt_en;
    dep = ($urandom % 100) < d_p && held_q.size() > 0;
    wr_busy = arr;
    rd_busy = dep;
    @(negedge clk);                       // phase 0
    rqs = arr;
    if (arr) begin
      check(fslt >= SLOT_W'(NQ) && !held[fslt], $sformatf("slot %0d handed out twice or out of range", fslt));
      held[fslt] = 1;
      held_q.push_back(int'(fslt));
    end
    @(negedge clk);                       // phase 1
    rqs = 0;
    repeat (8) @(negedge clk);            // phase 9
    if (dep) begin
      int k;
      k = $urandom % held_q.size();
      rtn_slt = SLOT_W'(held_q[k]);
      held[held_q[k]] = 0;
      held_q.delete(k);
    end
    rtn_en = dep;
    rfslts_en = hden;
    rfslts = fsl[head];
    @(negedge clk);
    rtn_en = 0; rfslts_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) begin
      repeat (1500) cell_time(70, 20);   // fill
      repeat (2500) cell_time(20, 70);   // drain: spills
      repeat (1500) cell_time(50, 50);
    end
    while (held_q.size() > 0) cell_time(0, 100);
    repeat (20) cell_time(0, 0);
    // every free slot once in cache + list + fresh range
    begin
      int seen [NS];
      int cnt, fresh_from, dup = 0, total = 0;
      foreach (seen[i]) seen[i] = 0;
      cnt = int'(cache_cnt);
      for (int i = 0; i < cnt; i++) seen[dut.cache[i]]++;
      for (int b = int'(head); b != int'(tail); b = (b + 1) % (1 << FSL_W))
        for (int i = 0; i < BLK; i++) seen[fsl[b][i*SLOT_W +: SLOT_W]]++;
      fresh_from = int'(dut.fresh);
      for (int s = fresh_from; s < NS; s++) seen[s]++;
      for (int s = 0; s < NS; s++) begin
        if (seen[s] > 1 || (s < NQ && seen[s] != 0)) dup++;
        total += seen[s];
      end
      check(dup == 0 && total == NS - NQ, $sformatf("free slots: %0d counted, %0d wrong", total, dup));
    end
    check(n_spill > 0 && n_refill > 0 && n_fresh > 0,
          $sformatf("spills %0d refills %0d fresh loads %0d", n_spill, n_refill, n_fresh));
    $display("spills %0d refills %0d fresh loads %0d", n_spill, n_refill, n_fresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
