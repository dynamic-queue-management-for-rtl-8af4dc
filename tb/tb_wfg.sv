// tb_wfg: unit test of the Weighted Fair Goodput discard block.
// Random AAL5 and non-AAL5 arrivals on five queues and random departures, one
// of each at most per cell time, against a reference model of the rules kept
// in this bench: at a packet boundary, above b_h an active queue longer than
// q0 turns inactive and an inactive one shorter than q0 turns active; at or
// below b_h an inactive queue turns active; an inactive AAL5 connection loses
// every cell of the packet. Checks keep for every arrival, the buffer level,
// and that discards, deactivations and reactivations all occur.
module tb_wfg;
  import dqm_pkg::*;

  localparam int NVC = 8, LEN_W = 8;
  localparam int NQ = NVC + NVP, QID_W = $clog2(NQ);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic en = 1;
  logic [LEN_W:0] cfg_bh = 9'd6;
  logic [LEN_W-1:0] cfg_q0 = 8'd3;
  logic init_done, arr_valid = 0, arr_a5 = 0, arr_u = 0, keep, dep_en;
  logic [QID_W-1:0] arr_qid = 0, dep_qid = 0;
  logic [LEN_W:0] level;
  logic ev_discard, ev_off, ev_on;
  logic dep_req = 0;

  wfg #(.NVC(NVC), .LEN_W(LEN_W)) dut (
    .clk, .rst_n, .phase, .en, .cfg_bh, .cfg_q0, .init_done,
    .arr_valid, .arr_qid, .arr_a5, .arr_u, .keep,
    .dep_en, .dep_qid, .level, .ev_discard, .ev_off, .ev_on);

  assign dep_en = dep_req && phase == P_PTR;
  always @(posedge clk) if (init_done) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0;
  int n_disc = 0, n_off = 0, n_on = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask
  always @(posedge clk) if (init_done) begin
    n_disc += int'(ev_discard); n_off += int'(ev_off); n_on += int'(ev_on);
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit m_act [NQ], m_bnd [NQ];
  int m_len [NQ];
  int m_lvl = 0;
  int qs [5] = '{0, 1, 2, 3, NVC + 7};
  bit a5_of [5] = '{1, 1, 1, 0, 1};
  int pos [5];

  initial begin
    for (int q = 0; q < NQ; q++) begin m_act[q] = 1; m_bnd[q] = 1; m_len[q] = 0; end
    for (int i = 0; i < 5; i++) pos[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int t = 0; t < 6000; t++) begin
      int c, d;
      bit arr, m_keep;
      if (t == 5000) en = 0;                      // disabled: nothing is discarded
      arr = ($urandom % 8) < 5;
      c = $urandom % 5;
      // departure from a random non-empty queue, less often than arrivals
      d = -1;
      if ($urandom % 4 != 0) begin
        int k;
        k = $urandom % 5;
        if (m_len[qs[k]] > 0) d = qs[k];
        else if (m_len[qs[3]] > 0) d = qs[3];
      end
      @(negedge clk iff phase == 4'd13);
      arr_valid = arr;
      arr_qid   = QID_W'(qs[c]);
      arr_a5    = a5_of[c];
      arr_u     = a5_of[c] && pos[c] == 3;      // 4-cell packets
      dep_req   = d >= 0;
      dep_qid   = QID_W'(d >= 0 ? d : 0);
      // model: arrival
      m_keep = 1;
      if (arr) begin
        int q;
        q = qs[c];
        if (en && a5_of[c] && m_bnd[q]) begin
          if (m_lvl > int'(cfg_bh)) begin
            if (m_act[q] && m_len[q] > int'(cfg_q0)) m_act[q] = 0;
            else if (!m_act[q] && m_len[q] < int'(cfg_q0)) m_act[q] = 1;
          end else if (!m_act[q]) m_act[q] = 1;
        end
        m_keep = !(en && a5_of[c] && !m_act[q]);
        m_bnd[q] = a5_of[c] ? arr_u : 1'b1;
        if (m_keep) begin m_len[q]++; m_lvl++; end
        if (a5_of[c]) pos[c] = (pos[c] + 1) % 4;
      end
      @(negedge clk);   // phase 0
      @(negedge clk);   // phase 1
      if (arr) check(keep == m_keep, $sformatf("t %0d queue %0d keep %b expected %b", t, qs[c], keep, m_keep));
      // model: departure
      if (d >= 0) begin
        m_len[d]--; m_lvl--;
        if (m_len[d] == 0) begin m_act[d] = 1; m_bnd[d] = 1; end
      end
      repeat (9) @(negedge clk);   // phase 10
      check(int'(level) == m_lvl, $sformatf("level %0d expected %0d", level, m_lvl));
      arr_valid = 0;
      dep_req = 0;
    end
    check(n_disc > 0 && n_off > 0 && n_on > 0,
          $sformatf("discards %0d, deactivations %0d, reactivations %0d", n_disc, n_off, n_on));
    $display("discards %0d, deactivations %0d, reactivations %0d", n_disc, n_off, n_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
