// tb_dqm_full: end-to-end test of the DQM chip at its full size (8192 VC
// queues, 160 x 64 lookup sets, 64 CAM entries, 2**20 cell slots in the
// external SRAM model), with the same scoreboard as the reduced test: every
// cell not reported dropped must come out once, unchanged, on its link and in
// order. Traffic: (1) a few VC and VP cells; (2) random mixed traffic on 24
// connections; (3) AAL5 packets overloading an OC-3 link with Weighted Fair
// Goodput on (whole packets dropped, none cut); (4) credit link scheduling;
// (5) weighted round robin, weight codes 0, 1 and 2 sharing a link 4:2:1.
// The buffer-full, overflow and free-slot-list paths need far more traffic at
// this size and are covered by the reduced test.
module tb_dqm_full;
  import dqm_pkg::*;

  localparam int NVC = 8192, SLOT_W = 20;
  localparam int ADDR_W = SLOT_W + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready, ct_sync;
  logic [31:0] data_opp = '0;
  logic valid_opp = 0, soc_opp = 0;
  logic [NOUT-1:0][OUT_W-1:0] cfg_mask;
  logic [ADDR_W-1:0] mem_addr;
  logic mem_we, mem_re;
  logic [MEM_W-1:0] mem_wdata, mem_rdata;
  logic [NIF-1:0][15:0] tdata;
  logic [NIF-1:0] tsoc, twren_n, txprty;
  logic [NIF-1:0][1:0] taddr;
  logic [NIF-1:0][3:0] tca;
  logic [20:0] events;
  logic cfg_wrr_en = 0;
  logic cfg_credit_en = 0;
  logic [NOUT-1:0][OUT_W-1:0] cfg_extra = '0;
  logic cfg_wfg_en = 0;
  logic [SLOT_W:0] cfg_bh = '0;
  logic [SLOT_W-1:0] cfg_q0 = '0;

  dqm_top dut (
    .clk, .rst_n, .ready, .ct_sync, .data_opp, .valid_opp, .soc_opp, .cfg_mask,
    .cfg_wrr_en, .cfg_credit_en, .cfg_extra, .cfg_wfg_en, .cfg_bh, .cfg_q0, .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata,
    .tdata, .tsoc, .twren_n, .txprty, .taddr, .tca, .events);

  ext_sram #(.ADDR_W(ADDR_W)) u_mem (.clk, .addr(mem_addr), .we(mem_we), .re(mem_re),
                                     .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- scoreboard ----------------
  int unsigned seq = 1;
  logic [23:0] conn_of [int unsigned];     // seq -> {vpi,vci}
  bit          vc_of   [int unsigned];
  bit          done_of [int unsigned];
  int unsigned last_out [logic [24:0]];    // {vc,vpi,vci} -> last delivered seq
  int unsigned prev_seq = 0, cur_seq = 0;
  int sent = 0, delivered = 0, dropped = 0, link0_cnt = 0;
  int ev_cnt [21];
  int vci_cnt [int];                        // link 0 deliveries per VCI
  int pkt_of [int unsigned];                // seq -> AAL5 packet number
  int pkt_len [int], pkt_got [int];

  function automatic logic [31:0] pay(int unsigned s, int w);
    return (s * 32'h9E3779B1) ^ (32'(w) << 24);
  endfunction

  // send one cell in the next cell time (s = 0: leave the cell time empty)
  task automatic send(input logic vc, pri, input logic [7:0] vpi, input logic [15:0] vci,
                      input bit empty = 0, input logic a5 = 0, u = 0,
                      input logic [4:0] wt = 0);
    logic [31:0] w [14];
    int unsigned s;
    @(posedge clk iff ct_sync);
    prev_seq = cur_seq;
    s = empty ? 0 : seq;
    cur_seq = s;
    w[0] = {vc, pri, a5, wt, 24'd0};
    w[1] = {4'd0, vpi, vci, 2'b00, u, 1'b0};  // PT = {0, 0, u}, CLP = 0
    w[2] = s;
    w[3] = {7'd0, vc, vpi, vci};
    for (int i = 4; i < 14; i++) w[i] = pay(s, i);
    if (!empty) begin
      conn_of[s] = {vpi, vci};
      vc_of[s] = vc;
      seq++;
      sent++;
    end
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      valid_opp = !empty;
      soc_opp   = !empty && i == 0;
      data_opp  = empty ? 32'h0 : w[i];
    end
  endtask

  task automatic idle(input int n);
    repeat (n) send(0, 0, 0, 0, 1);
  endtask

  // a cell's fate is decided in phase 13 of its cell time; the drop event
  // appears in the following clock, when cur_seq has just moved on
  always @(posedge clk) begin
    if (rst_n && ready) for (int i = 0; i < 21; i++) if (events[i]) ev_cnt[i]++;
    // a WFG discard is reported in phase 2 of the next cell time
    if (rst_n && ready && (events[5] || events[6] || events[16])) begin
      dropped++;
      if (prev_seq != 0) done_of[prev_seq] = 1;
    end
  end

  // ---------------- transmit side ----------------
  logic [15:0] rx [NIF][27];
  int          rk [NIF];
  always @(posedge clk) begin
    for (int i = 0; i < NIF; i++) begin
      if (!twren_n[i]) begin
        check(txprty[i] == ~^tdata[i], "parity");
        if (tsoc[i]) rk[i] = 0;
        rx[i][rk[i]] = tdata[i];
        rk[i]++;
        if (rk[i] == 27) check_cell(i, taddr[i]);
      end
    end
  end

  task automatic check_cell(input int itf, input logic [1:0] phy);
    logic [31:0] hdr, s, cn;
    logic [3:0] link;
    bit ok;
    hdr = {rx[itf][0], rx[itf][1]};
    s   = {rx[itf][3], rx[itf][4]};
    cn  = {rx[itf][5], rx[itf][6]};
    link = 4'(itf * 4 + int'(phy));
    delivered++;
    if (link == 0) begin
      link0_cnt++;
      vci_cnt[int'(cn[15:0])]++;
    end
    check(conn_of.exists(s) && !done_of.exists(s), $sformatf("unknown or repeated cell %0d", s));
    if (!conn_of.exists(s)) return;
    done_of[s] = 1;
    if (pkt_of.exists(s)) pkt_got[pkt_of[s]]++;
    check(cn[23:0] == conn_of[s] && hdr[27:4] == conn_of[s], $sformatf("header of cell %0d", s));
    // link: VPI high bits masked as configured
    check(link == (conn_of[s][23:20] & cfg_mask[conn_of[s][23:20]]),
          $sformatf("cell %0d on link %0d", s, link));
    ok = 1;
    for (int w = 4; w < 14; w++)
      if ({rx[itf][3 + 2*(w-2)], rx[itf][4 + 2*(w-2)]} != pay(s, w)) ok = 0;
    check(ok, $sformatf("payload of cell %0d", s));
    if (last_out.exists({vc_of[s], conn_of[s]}))
      check(last_out[{vc_of[s], conn_of[s]}] < s, $sformatf("order of cell %0d", s));
    last_out[{vc_of[s], conn_of[s]}] = s;
  endtask

  // ---------------- stimulus ----------------
  typedef struct { logic vc, pri; logic [7:0] vpi; logic [15:0] vci; } conn_t;
  conn_t cs [24];
  int blocked_ct = 0;

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] outs [6] = '{0, 1, 2, 3, 4, 8};
    for (int v = 0; v < 16; v++) cfg_mask[v] = (v < 4) ? 4'hF : (v < 8) ? 4'hC : 4'h8;
    tca = '1;
    for (int i = 0; i < 21; i++) ev_cnt[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);

    // (1) a few cells
    send(1, 1, 8'h10, 16'd2);    // VC on link 1, high
    send(1, 1, 8'h10, 16'd2);
    send(0, 0, 8'h22, 16'd3);    // VP on link 2, low
    send(1, 0, 8'h03, 16'd5);    // VC on link 0, low
    send(1, 1, 8'h10, 16'd2);
    idle(60);
    check(delivered == 5, $sformatf("phase 1 delivered %0d", delivered));

    // (2) random traffic over 24 connections
    for (int c = 0; c < 24; c++) begin
      cs[c].vc  = ($urandom % 4) != 0;
      cs[c].pri = $urandom % 2;
      cs[c].vpi = {outs[$urandom % 6], 4'($urandom)};
      cs[c].vci = 16'($urandom);
    end
    for (int n = 0; n < 600; n++) begin
      int c;
      c = $urandom % 24;
      if ($urandom % 3 == 0) idle(1);
      else send(cs[c].vc, cs[c].pri, cs[c].vpi, cs[c].vci);
    end
    idle(400);

    // (3) AAL5 packets of 5 cells, four connections, OC-3 link 0 at a fifth of the input rate
    cfg_bh = 21'd100;
    cfg_q0 = 20'd10;
    cfg_wfg_en = 1;
    begin
      int pos [4] = '{0, 0, 0, 0};
      int pk [4];
      int npk = 0;
      for (int n = 0; n < 1200; n++) begin
        int c;
        c = n % 4;
        if (pos[c] == 0) begin
          pk[c] = npk++;
          pkt_len[pk[c]] = 5;
          pkt_got[pk[c]] = 0;
        end
        pkt_of[seq] = pk[c];
        send(1, 0, 8'h05, 16'(200 + c), 0, 1, pos[c] == 4);
        idle(2);
        pos[c] = (pos[c] + 1) % 5;
      end
      idle(3000);
      begin
        int cut = 0, whole = 0;
        foreach (pkt_len[k]) begin
          if (pkt_got[k] != 0 && pkt_got[k] != pkt_len[k]) cut++;
          if (pkt_got[k] == pkt_len[k]) whole++;
        end
        check(cut == 0, $sformatf("%0d AAL5 packets partly delivered", cut));
        check(whole > 0 && whole < npk, $sformatf("%0d of %0d packets delivered", whole, npk));
        $display("WFG: %0d of %0d packets delivered whole", whole, npk);
      end
    end

    // (4) credit scheduling: virtual port 0 (OC-3 link 0) gets 3 extra
    // credits, so with the other links idle it sends 4 cells per round of 16
    cfg_wfg_en = 0;
    cfg_extra[0] = 4'd3;
    cfg_credit_en = 1;
    begin
      int c0, c1;
      for (int n = 0; n < 300; n++) begin
        send(1, 0, 8'h07, 16'd77);
        if (n == 100) c0 = link0_cnt;
        if (n == 260) c1 = link0_cnt;
      end
      check(c1 - c0 >= 38 && c1 - c0 <= 42,
            $sformatf("credit mode: link 0 sent %0d cells in 160 cell times, expected 40", c1 - c0));
      $display("credit mode: link 0 sent %0d cells in 160 cell times", c1 - c0);
    end
    idle(3000);
    cfg_credit_en = 0;

    // (5) weighted round robin (Binary Scheduling Wheels): on OC-3 link 0
    // three VCs with weight codes 0, 1 and 2 (wheels 0..2), all kept
    // backlogged, share the link 4:2:1
    cfg_wrr_en = 1;
    begin
      int c0 [3], c1 [3], d [3];
      // an OC-3 link sends in 1 of 16 cell times: 120 cells keep all three
      // queues busy for the cell times measured
      for (int n = 0; n < 40; n++) begin
        for (int k = 0; k < 3; k++) send(1, 0, 8'h07, 16'(200 + k), 0, 0, 0, 5'(k));
        if (n == 20)
          for (int k = 0; k < 3; k++) c0[k] = vci_cnt.exists(200 + k) ? vci_cnt[200 + k] : 0;
      end
      idle(560);
      for (int k = 0; k < 3; k++) begin
        c1[k] = vci_cnt.exists(200 + k) ? vci_cnt[200 + k] : 0;
        d[k] = c1[k] - c0[k];
      end
      check(d[2] > 0 && d[1] >= 2 * d[2] - 2 && d[1] <= 2 * d[2] + 2 &&
            d[0] >= 2 * d[1] - 2 && d[0] <= 2 * d[1] + 2,
            $sformatf("weighted round robin: wheels 0/1/2 sent %0d/%0d/%0d, expected 4:2:1",
                      d[0], d[1], d[2]));
      $display("weighted round robin: wheels 0/1/2 sent %0d/%0d/%0d", d[0], d[1], d[2]);
    end
    idle(2400);
    cfg_wrr_en = 0;

    // every cell either delivered or reported dropped
    begin
      int lost = 0;
      foreach (conn_of[s]) if (!done_of.exists(s)) begin
        lost++;
        if (lost < 6) $display("missing cell %0d conn %h vc %0d", s, conn_of[s], vc_of[s]);
      end
      check(lost == 0, $sformatf("%0d cells neither delivered nor dropped", lost));
    end
    check(delivered + dropped == sent, $sformatf("sent %0d delivered %0d dropped %0d",
          sent, delivered, dropped));

    // mechanisms
    begin
      string names [21] = '{"lookup hit", "CAM hit", "CAM->SAM migration", "new SAM entry",
        "new CAM entry", "set+CAM overflow", "buffer full drop", "queue freed",
        "output blocked", "low priority served", "high priority served",
        "fresh slots", "FSL refill", "FSL spill", "frame error", "omst drop",
        "WFG packet discard", "WFG inactive", "WFG active again", "credit: passed turn",
        "WRR: wheel visit"};
      for (int i = 0; i < 21; i++) begin
        // needs a full buffer, a full set or a cache spill: not at this size
        if (i inside {1, 2, 4, 5, 6, 8, 11, 12, 13, 14, 15}) continue;
        $display("mechanism %-22s : %0d", names[i], ev_cnt[i]);
        check(ev_cnt[i] > 0, $sformatf("mechanism %s never happened", names[i]));
      end
      check(ev_cnt[15] == 0, "Output Master dropped a cell");
      check(ev_cnt[14] == 0, "frame error");
    end
    $display("sent %0d delivered %0d dropped %0d", sent, delivered, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
