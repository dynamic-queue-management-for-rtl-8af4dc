// tb_oschl: unit test of the Output Scheduler (two-priority round robin; the
// weighted mode is covered by tb_bsw_ffc and the top-level bench) with
// 16 VC queues. Links: virtual ports 0-3 are OC-3 links 0-3, 4-7 one OC-12
// link 4, 8-15 one G-link 8. The bench plays the Queue Manager: it announces
// queues that become non-empty (new_q, random link and priority), gives each
// a random number of cells, and reports a queue empty (emp) when its last
// cell is scheduled. Interface readiness is random. The model keeps every
// list as a circle of QIDs plus the HIGH/LOW pointer (last queue served):
// a link is chosen by the bit-reversed counter, the queue after the pointer
// on the high list (else the low list) is served, an emptied queue is
// unlinked, and a new queue is inserted right after the pointer. Checks the
// scheduled QID and link every cell time, and that idle and blocked turns,
// both priorities and queue removal all occur.
module tb_oschl;
  import dqm_pkg::*;

  localparam int NVC = 16;
  localparam int NQ = NVC + NVP, QID_W = $clog2(NQ);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic [NOUT-1:0][OUT_W-1:0] cfg_mask, cfg_extra = '0;
  logic [NIF-1:0] if_ready = '1;
  logic nxt_en, new_q = 0, newpri = 0, emp = 0;
  logic [QID_W-1:0] nxtqid, newqid = 0;
  logic [OUT_W-1:0] nxtout, newout = 0;
  logic ev_high, ev_low, ev_idle, ev_blocked, ev_extra, ev_wheel;

  oschl #(.NVC(NVC)) dut (.clk, .rst_n, .en(1'b1), .phase, .cfg_mask, .if_ready,
    .cfg_wrr_en(1'b0), .cfg_credit_en(1'b0), .cfg_extra, .nxt_en, .nxtqid, .nxtout,
    .new_q, .newqid, .newout, .newpri, .newwt(5'd0), .emp,
    .ev_high, .ev_low, .ev_idle, .ev_blocked, .ev_extra, .ev_wheel);

  always @(posedge clk) if (rst_n) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0;
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

  int lst [2][NOUT][$];     // circle of QIDs per priority and link
  int hd  [2][NOUT];        // last served (valid when the list is not empty)
  int left [NQ];            // cells left in each listed queue, 0 = not listed
  int n_idle = 0, n_block = 0, n_high = 0, n_low = 0, n_emp = 0;

  function automatic int find(int p, int l, int q);
    foreach (lst[p][l][i]) if (lst[p][l][i] == q) return i;
    return -1;
  endfunction

  initial begin
    int cnt = 1;     // the block's first turn (vport 0) passes before the first cell time here
    for (int v = 0; v < NOUT; v++) cfg_mask[v] = (v < 4) ? 4'hF : (v < 8) ? 4'hC : 4'h8;
    for (int q = 0; q < NQ; q++) left[q] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int vport, link, p, served, nq, npri, nlink;
      bit go, room, em, add;
      logic [NIF-1:0] rdy;
      rdy = ($urandom % 4 == 0) ? 4'($urandom) : 4'hF;
      // model: selection
      vport = ((cnt & 1) << 3) | ((cnt & 2) << 1) | ((cnt & 4) >> 1) | ((cnt & 8) >> 3);
      cnt = (cnt + 1) % 16;
      link = vport & int'(cfg_mask[vport]);
      room = rdy[link / 4];
      p = (lst[1][link].size() > 0) ? 1 : 0;
      go = room && lst[p][link].size() > 0;
      if (lst[p][link].size() == 0) n_idle++;
      else if (!room) n_block++;
      served = -1;
      em = 0;
      if (go) begin
        served = lst[p][link][(find(p, link, hd[p][link]) + 1) % lst[p][link].size()];
        left[served]--;
        em = left[served] == 0;
        if (p == 1) n_high++; else n_low++;
      end
      // a new queue (not listed)
      nq = $urandom % NVC;
      add = left[nq] == 0 && nq != served && ($urandom % 3 != 0);
      npri = $urandom % 2;
      nlink = $urandom % 16;
      nlink = nlink & int'(cfg_mask[nlink]);
      if (t == 0) @(negedge clk iff phase == 4'd13);
      if_ready = rdy;
      @(negedge clk);                 // phase 0
      new_q = 0;
      @(negedge clk);                 // phase 1
      new_q = add;
      newqid = QID_W'(nq); newout = OUT_W'(nlink); newpri = npri[0];
      @(negedge clk);                 // phase 2
      check(nxt_en == go, $sformatf("t %0d: nxt_en %b expected %b (link %0d)", t, nxt_en, go, link));
      if (go) check(int'(nxtqid) == served && int'(nxtout) == link,
                    $sformatf("t %0d: queue %0d link %0d, expected %0d %0d", t, nxtqid, nxtout, served, link));
      repeat (8) @(negedge clk);      // phase 10
      emp = em;
      @(negedge clk);                 // phase 11
      emp = 0;
      // model: unlink or advance, then insert the new queue
      if (go) begin
        if (em) begin
          int i;
          i = find(p, link, served);
          lst[p][link].delete(i);
          n_emp++;
        end else hd[p][link] = served;
      end
      if (add) begin
        if (lst[npri][nlink].size() == 0) begin
          lst[npri][nlink].push_back(nq);
          hd[npri][nlink] = nq;
        end else lst[npri][nlink].insert(find(npri, nlink, hd[npri][nlink]) + 1, nq);
        left[nq] = 1 + $urandom % 6;
      end
      repeat (2) @(negedge clk);      // phase 13
    end
    check(n_idle > 0 && n_block > 0 && n_high > 0 && n_low > 0 && n_emp > 0,
          $sformatf("idle %0d blocked %0d high %0d low %0d emptied %0d", n_idle, n_block, n_high, n_low, n_emp));
    $display("idle %0d blocked %0d high %0d low %0d emptied %0d", n_idle, n_block, n_high, n_low, n_emp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
