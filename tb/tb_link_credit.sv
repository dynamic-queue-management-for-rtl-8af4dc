// tb_link_credit: unit test of the credit-based virtual port scheduler.
// (1) Random link configurations, extra credits and ready patterns against a
//     model kept here: the port whose turn it is (bit-reversed counter) sends
//     if it has credit and its link is ready; otherwise the first port after
//     it in ring order that has credit and a ready link sends; every port's
//     credit is reloaded to 1 + extra after 16 turns, and a port that lets its
//     own turn pass loses that basic credit.
// (2) Rates: with 16 OC-3 links, only link 0 busy and 3 extra credits for
//     virtual port 0, link 0 gets 4 of every 16 cell times; without extra
//     credits it gets 1.
module tb_link_credit;
  import dqm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic step = 0;
  logic [NOUT-1:0][OUT_W-1:0] cfg_mask, cfg_extra;
  logic [NOUT-1:0] link_ready = '0;
  logic [OUT_W-1:0] sel, sel_link;
  logic sel_valid, sel_extra;

  link_credit dut (.clk, .rst_n, .step, .cfg_mask, .cfg_extra, .link_ready,
                   .sel, .sel_link, .sel_valid, .sel_extra);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt = 0;
  int m_cr [NOUT];

  function automatic int brev(int p);
    return ((p & 1) << 3) | ((p & 2) << 1) | ((p & 4) >> 1) | ((p & 8) >> 3);
  endfunction

  task automatic reload();
    for (int v = 0; v < NOUT; v++) m_cr[v] = 1 + int'(cfg_extra[v]);
  endtask

  // one cell time; returns the winning link or -1
  task automatic turn(output int lk);
    int win, own;
    bit ext;
    win = -1;
    own = brev(m_cnt);
    for (int d = 0; d < NOUT && win < 0; d++) begin
      int v;
      v = brev((m_cnt + d) % NOUT);
      if (m_cr[v] > 0 && link_ready[v & int'(cfg_mask[v])]) begin
        win = v;
        ext = d != 0;
      end
    end
    @(negedge clk);
    #1;
    check(sel_valid == (win >= 0), $sformatf("valid %b expected %0d", sel_valid, win));
    if (win >= 0)
      check(int'(sel) == win && sel_extra == ext && int'(sel_link) == (win & int'(cfg_mask[win])),
            $sformatf("port %0d extra %b, expected %0d %b", sel, sel_extra, win, ext));
    lk = (win >= 0) ? (win & int'(cfg_mask[win])) : -1;
    step = 1;
    @(negedge clk);
    step = 0;
    if (m_cnt == NOUT - 1) reload();
    else begin
      if (win >= 0) m_cr[win]--;
      if (win >= 0 && ext && m_cr[own] > 0) m_cr[own]--;
    end
    m_cnt = (m_cnt + 1) % NOUT;
  endtask

  initial begin
    int lk, got;
    // 16 OC-3 links; virtual port 0 has 3 extra credits
    for (int v = 0; v < NOUT; v++) begin cfg_mask[v] = 4'hF; cfg_extra[v] = 0; end
    cfg_extra[0] = 4'd3;
    reload();
    repeat (3) @(posedge clk);
    rst_n = 1;
    link_ready = 16'h0001;
    got = 0;
    for (int t = 0; t < 160; t++) begin turn(lk); if (lk == 0) got++; end
    check(got == 40, $sformatf("link 0 with 3 extra credits: %0d cells in 160", got));
    // random configurations (changed at round boundaries)
    for (int r = 0; r < 400; r++) begin
      if (r % 20 == 0) begin
        for (int v = 0; v < NOUT; v++) begin
          int kind;
          kind = $urandom % 3;
          cfg_mask[v] = (kind == 0) ? 4'hF : (kind == 1) ? 4'hC : 4'h8;
          cfg_extra[v] = 4'($urandom % 4);
        end
      end
      for (int t = 0; t < NOUT; t++) begin
        link_ready = 16'($urandom & $urandom);
        turn(lk);
      end
    end
    // no extra credit: one cell per round
    for (int v = 0; v < NOUT; v++) begin cfg_mask[v] = 4'hF; cfg_extra[v] = 0; end
    for (int t = 0; t < NOUT; t++) turn(lk);     // reload with the new values
    link_ready = 16'h0001;
    got = 0;
    for (int t = 0; t < 160; t++) begin turn(lk); if (lk == 0) got++; end
    check(got == 10, $sformatf("link 0 without extra credits: %0d cells in 160", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
