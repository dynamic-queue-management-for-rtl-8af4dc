// tb_imst: unit test of the Input Master.
// Sends random cells aligned to a free-running cell-time phase counter and
// checks, against fields worked out here from the words sent, the extracted
// cell information (valid from phase 2), the word pass-through, and that a
// start-of-cell outside phase 0 or a missing word raises frame_err.
module tb_imst;
  import dqm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic [31:0] data_opp = 0;
  logic valid_opp = 0, soc_opp = 0;
  cell_info_t info;
  logic info_valid, data_valid, frame_err;
  logic [31:0] data_imst;

  imst dut (.clk, .rst_n, .en(1'b1), .phase, .data_opp, .valid_opp, .soc_opp,
            .info, .info_valid, .data_imst, .data_valid, .frame_err);

  always @(posedge clk) if (rst_n) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0, ferr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n && frame_err) ferr++;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one cell; gap = word index left out (-1: none), late = start in phase 1
  task automatic send_cell(input int gap = -1, input bit late = 0);
    logic [31:0] w [14];
    logic [4:0] wt;
    logic vc, pri, a5, u;
    logic [7:0] vpi;
    logic [15:0] vci;
    {vc, pri, a5, u} = 4'($urandom);
    wt = 5'($urandom); vpi = 8'($urandom); vci = 16'($urandom);
    w[0] = {vc, pri, a5, wt, 24'($urandom)};
    w[1] = {4'($urandom), vpi, vci, 1'($urandom), 1'($urandom), u, 1'($urandom)};
    for (int i = 2; i < 14; i++) w[i] = $urandom;
    @(negedge clk iff phase == (late ? 4'd1 : 4'd0));
    for (int i = 0; i < 14; i++) begin
      valid_opp = (i != gap);
      soc_opp   = (i == 0);
      data_opp  = w[i];
      #1;
      if (!late) begin
        check(data_valid && data_imst == ((i == gap) ? 32'h0 : w[i]), $sformatf("word %0d", i));
        if (i >= 2) begin
          check(info_valid, "info_valid");
          check(info.vc == vc && info.pri == pri && info.a5 == a5 && info.wt == wt &&
                info.u == u && info.vpi == vpi && info.vci == vci && info.out == vpi[7:4],
                "info fields");
        end
      end else check(!data_valid, "late cell accepted");
      @(negedge clk);
    end
    valid_opp = 0; soc_opp = 0; data_opp = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) send_cell();
    check(ferr == 0, "frame error on good cells");
    send_cell(.gap(7));
    repeat (2) @(posedge clk);
    check(ferr == 1, $sformatf("missing word: %0d frame errors", ferr));
    send_cell(.late(1));
    repeat (2) @(posedge clk);
    check(ferr == 2, $sformatf("late start: %0d frame errors", ferr));
    @(negedge clk iff phase == 4'd3);
    check(!info_valid, "info_valid without a cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
