// tb_omst: unit test of the Output Master.
// Streams random cells (14 words, one per phase) for random links into the
// block, only while the target interface reports room (as the scheduler
// does), with each PHY's cell-available line toggled at random. A model kept
// here holds one queue of expected cells per interface. On each interface it
// checks: 27 consecutive 16-bit words per cell with tsoc on the first, the
// two header halves, a zero HEC/UDF word and the 12 payload words in order,
// odd parity, the PHY address, and FIFO order. Finally it fills one FIFO
// with its PHY held off and checks that the ninth cell is dropped.
module tb_omst;
  import dqm_pkg::*;

  localparam int FIFO_CELLS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic [31:0] data_mctrl = 0;
  logic dval_mctrl = 0, dsoc_mctrl = 0;
  logic [OUT_W-1:0] dout_mctrl = 0;
  logic [NIF-1:0] if_ready;
  logic [NIF-1:0][15:0] tdata;
  logic [NIF-1:0] tsoc, twren_n, txprty;
  logic [NIF-1:0][1:0] taddr;
  logic [NIF-1:0][3:0] tca = '1;
  logic ev_drop;

  omst #(.FIFO_CELLS(FIFO_CELLS)) dut (.clk, .rst_n, .phase, .data_mctrl, .dval_mctrl,
    .dsoc_mctrl, .dout_mctrl, .if_ready, .tdata, .tsoc, .twren_n, .txprty, .taddr, .tca, .ev_drop);

  always @(posedge clk) if (rst_n) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0, drops = 0, got = 0, sent = 0;
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

  typedef struct { logic [31:0] w [14]; logic [1:0] phy; } cell_t;
  cell_t exp_q [NIF][$];

  always @(posedge clk) if (rst_n && ev_drop) drops++;

  // receive side
  logic [15:0] rx [NIF][27];
  int k [NIF] = '{default: -1};
  logic [1:0] rphy [NIF];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NIF; i++) begin
      if (!twren_n[i]) begin
        check(txprty[i] == ~^tdata[i], "parity");
        if (tsoc[i]) begin
          check(k[i] == -1, "cell started inside a cell");
          k[i] = 0;
          rphy[i] = taddr[i];
        end
        if (k[i] >= 0) begin
          check(taddr[i] == rphy[i], "taddr changed inside a cell");
          rx[i][k[i]] = tdata[i];
          k[i]++;
          if (k[i] == 27) begin
            k[i] = -1;
            got++;
            if (exp_q[i].size() == 0) check(0, "unexpected cell");
            else begin
              cell_t c;
              bit ok;
              c = exp_q[i].pop_front();
              ok = rx[i][0] == c.w[1][31:16] && rx[i][1] == c.w[1][15:0] && rx[i][2] == 16'h0;
              for (int j = 0; j < 24; j++)
                if (rx[i][3 + j] != ((j % 2 == 0) ? c.w[2 + j/2][31:16] : c.w[2 + j/2][15:0])) ok = 0;
              check(ok, $sformatf("interface %0d cell contents", i));
              check(rphy[i] == c.phy, $sformatf("interface %0d PHY %0d expected %0d", i, rphy[i], c.phy));
            end
          end
        end
      end else if (k[i] >= 0) begin
        check(0, "gap inside a cell");
        k[i] = -1;
      end
    end

  task automatic put(input logic [3:0] link, input bit expect_drop = 0);
    cell_t c;
    for (int j = 0; j < 14; j++) c.w[j] = $urandom;
    c.phy = link[1:0];
    @(negedge clk iff phase == 4'd13);
    if (!expect_drop) exp_q[link[3:2]].push_back(c);
    sent++;
    for (int j = 0; j < 14; j++) begin
      @(negedge clk);
      dval_mctrl = 1;
      dsoc_mctrl = j == 0;
      dout_mctrl = link;
      data_mctrl = c.w[j];
    end
    @(negedge clk);
    dval_mctrl = 0; dsoc_mctrl = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < 3000; n++) begin
          logic [3:0] l;
          l = 4'($urandom);
          if (if_ready[l[3:2]]) put(l);
          else @(negedge clk iff phase == 4'd12);
        end
      end
      begin
        forever begin
          repeat ($urandom % 40) @(negedge clk);
          tca = 16'($urandom | $urandom);
        end
      end
    join_any
    disable fork;
    tca = '1;
    repeat (3000) @(posedge clk);
    foreach (exp_q[i]) check(exp_q[i].size() == 0, $sformatf("interface %0d: %0d cells not sent", i, exp_q[i].size()));
    check(drops == 0, "drop while the interface reported room");
    // overflow: PHY 1 of interface 3 not ready
    tca[3] = 4'b1101;
    for (int n = 0; n < FIFO_CELLS; n++) put(4'hD);
    put(4'hD, 1);
    repeat (30) @(posedge clk);
    check(drops == 1, $sformatf("%0d drops on a full FIFO", drops));
    tca[3] = 4'hF;
    repeat (FIFO_CELLS * 30 + 50) @(posedge clk);
    check(exp_q[3].size() == 0, "cells left after the overflow test");
    $display("sent %0d received %0d dropped %0d", sent, got, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
