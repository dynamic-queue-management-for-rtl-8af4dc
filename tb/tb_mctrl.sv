// tb_mctrl: unit test of the Memory Controller with a 64-slot cell store in
// the external SRAM model. Each cell time the bench streams a random cell in
// from the Input Master side and, playing the Queue Manager, has the
// previous cell written to a random slot with a random next pointer, then
// has a random written slot read. Cell times without a cell write carry a
// Free Slot List block write, those without a cell read an FSL block read.
// Checks, against the bench's own record of what was written: the pointer
// returned in phase 9, the cell streamed to the Output Master in the next
// cell time (14 words, soc in phase 0, link number), the FSL block returned
// in phase 9, and the memory access pattern (writes only in phases 2, 4, 6,
// reads only in 8, 10, 12).
module tb_mctrl;
  import dqm_pkg::*;

  localparam int SLOT_W = 6, BLK = 8;
  localparam int ADDR_W = SLOT_W + 2, FSL_W = SLOT_W - 3, NS = 1 << SLOT_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase = 0;
  logic [31:0] data_imst = 0;
  logic data_valid = 0, wslt_en = 0, rslt_en = 0, tlen = 0, hden = 0;
  logic [SLOT_W-1:0] wslt = 0, nxtptr = 0, rslt = 0, ptr;
  logic ptr_en, rfslts_en;
  logic [OUT_W-1:0] nxtout = 0, dout_mctrl;
  logic [FSL_W-1:0] tail = 0, head = 0;
  logic [BLK*SLOT_W-1:0] wfslts = 0, rfslts;
  logic [31:0] data_mctrl;
  logic dval_mctrl, dsoc_mctrl;
  logic [ADDR_W-1:0] mem_addr;
  logic mem_we, mem_re;
  logic [MEM_W-1:0] mem_wdata, mem_rdata;

  mctrl #(.SLOT_W(SLOT_W), .BLK(BLK)) dut (
    .clk, .rst_n, .phase, .data_imst, .data_valid,
    .wslt_en, .wslt, .nxtptr, .rslt_en, .rslt, .ptr_en, .ptr, .nxtout,
    .tlen, .tail, .wfslts, .hden, .head, .rfslts_en, .rfslts,
    .data_mctrl, .dval_mctrl, .dsoc_mctrl, .dout_mctrl,
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata);

  ext_sram #(.ADDR_W(ADDR_W)) u_mem (.clk, .addr(mem_addr), .we(mem_we), .re(mem_re),
                                     .wdata(mem_wdata), .rdata(mem_rdata));

  always @(posedge clk) if (rst_n) phase <= (phase == 4'd13) ? 4'd0 : phase + 1'b1;

  int checks = 0, failures = 0, n_out = 0, n_rd = 0, n_fsl = 0;
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

  typedef struct { logic [31:0] w [14]; logic [3:0] out; } ocell_t;
  logic [31:0] cells [NS][14];
  logic [SLOT_W-1:0] ptrs [NS];
  bit written [NS];
  logic [BLK*SLOT_W-1:0] fsl [1 << FSL_W];
  bit fsl_written [1 << FSL_W];
  ocell_t exp_q [$];

  // memory access pattern and the output stream
  always @(negedge clk) if (rst_n) begin
    if (mem_we) check(phase inside {4'd2, 4'd4, 4'd6}, $sformatf("write in phase %0d", phase));
    if (mem_re) check(phase inside {4'd8, 4'd10, 4'd12}, $sformatf("read in phase %0d", phase));
    if (dval_mctrl) begin
      check(exp_q.size() > 0, "unexpected output cell");
      if (exp_q.size() > 0) begin
        check(data_mctrl == exp_q[0].w[phase] && dout_mctrl == exp_q[0].out &&
              dsoc_mctrl == (phase == 4'd0), $sformatf("output word %0d", phase));
        if (phase == 4'd13) begin
          void'(exp_q.pop_front());
          n_out++;
        end
      end
    end
  end

  initial begin
    logic [31:0] prev [14];
    bit prev_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (written[i]) written[i] = 0;
    foreach (fsl_written[i]) fsl_written[i] = 0;
    @(negedge clk iff phase == 4'd13);
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] cur [14];
      bit cur_v, wr, rd, fw, fr;
      int ws, rs, b;
      cur_v = ($urandom % 5) != 0;
      for (int k = 0; k < 14; k++) cur[k] = $urandom;
      wr = prev_v;
      ws = $urandom % NS;
      rd = ($urandom % 4) != 0;
      begin
        int tries = 0;
        rs = $urandom % NS;
        while (!written[rs] && !(wr && rs == ws) && tries < 200) begin rs = $urandom % NS; tries++; end
        if (!written[rs] && !(wr && rs == ws)) rd = 0;
      end
      fw = !wr && ($urandom % 2 == 0);
      fr = !rd && ($urandom % 2 == 0);
      b = $urandom % (1 << FSL_W);
      if (fr && !fsl_written[b]) fr = 0;
      // phases 0..13: the new cell comes in; the other signals are set when
      // the Queue Manager / Free Slot Manager would set them
      for (int k = 0; k < 14; k++) begin
        @(negedge clk);                     // phase k
        data_valid = cur_v;
        data_imst  = cur_v ? cur[k] : 32'h0;
        case (k)
          0: rslt_en = 0;
          1: begin
            wslt_en = wr; wslt = SLOT_W'(ws); nxtptr = SLOT_W'($urandom);
            tlen = fw; tail = FSL_W'($urandom); wfslts = {BLK{SLOT_W'($urandom)}} ^ BLK*SLOT_W'($urandom);
            if (wr) begin
              cells[ws] = prev; ptrs[ws] = nxtptr; written[ws] = 1;
            end
            if (fw) begin fsl[tail] = wfslts; fsl_written[tail] = 1; end
          end
          3: begin
            tlen = 0;
            rslt_en = rd; rslt = SLOT_W'(rs);
            nxtout = 4'($urandom);
            if (rd) begin
              ocell_t o;
              o.w = cells[rs];
              o.out = nxtout;
              exp_q.push_back(o);
              n_rd++;
            end
          end
          5: begin hden = fr; head = FSL_W'(b); end
          9: begin
            check(ptr_en == rd && (!rd || ptr == ptrs[rs]), $sformatf("t %0d: pointer of slot %0d", t, rs));
            check(rfslts_en == fr && (!fr || rfslts == fsl[b]), $sformatf("t %0d: FSL block %0d", t, b));
            n_fsl += int'(fr);
          end
          13: begin wslt_en = 0; hden = 0; end
          default: ;
        endcase
      end
      prev = cur;
      prev_v = cur_v;
    end
    @(negedge clk);
    rslt_en = 0;
    repeat (30) @(negedge clk);
    check(n_out == n_rd && n_rd > 1000 && n_fsl > 100,
          $sformatf("%0d cells read, %0d sent on, %0d FSL blocks read", n_rd, n_out, n_fsl));
    $display("%0d cells read, %0d sent on, %0d FSL blocks read", n_rd, n_out, n_fsl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
