// mctrl: Memory Controller of the DQM chip.
//
// Drives the external synchronous SRAM that holds the Cell Store and the Free
// Slot List (FSL). The memory is MEM_W = 160 bits wide with a one-clock read
// latency. A cell slot takes three words: the 20-bit next pointer and the
// 448-bit cell packed as {ptr, cell, 12'b0}, word 0 first, at addresses
// 3*slot .. 3*slot+2. FSL block b (BLK slot numbers) is the word at
// 3*2**SLOT_W + b.
//
// The cell time of 14 clocks holds seven two-clock memory cycles: three
// writes (phases 2, 4, 6), a turnaround (phase 0) and three reads (phases 8,
// 10, 12). Incoming 32-bit words from the Input Master are gathered into a
// cell in the cell time they arrive and written in the next one, to slot wslt
// with pointer nxtptr. A departing cell is read from slot rslt; the pointer in
// its first word goes to the Queue Manager in phase 9 and the cell is sent to
// the Output Master as 14 32-bit words in the following cell time (phase k
// carries word k, with soc in phase 0 and the link number on dout).
// A write cycle left idle by the cells carries an FSL block write (phase 2);
// a read cycle left idle carries an FSL block read (phase 8, data in phase 9).
module mctrl
  import dqm_pkg::*;
#(
  parameter int SLOT_W = 20,
  parameter int BLK    = 8,
  localparam int ADDR_W = SLOT_W + 2,
  localparam int FSL_W  = SLOT_W - $clog2(BLK)
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            phase,
  // Input Master
  input  logic [31:0]           data_imst,
  input  logic                  data_valid,
  // Queue Manager
  input  logic                  wslt_en,
  input  logic [SLOT_W-1:0]     wslt,
  input  logic [SLOT_W-1:0]     nxtptr,
  input  logic                  rslt_en,
  input  logic [SLOT_W-1:0]     rslt,
  output logic                  ptr_en,
  output logic [SLOT_W-1:0]     ptr,
  // Output Scheduler: link of the departing cell
  input  logic [OUT_W-1:0]      nxtout,
  // Free Slot Manager
  input  logic                  tlen,
  input  logic [FSL_W-1:0]      tail,
  input  logic [BLK*SLOT_W-1:0] wfslts,
  input  logic                  hden,
  input  logic [FSL_W-1:0]      head,
  output logic                  rfslts_en,
  output logic [BLK*SLOT_W-1:0] rfslts,
  // Output Master
  output logic [31:0]           data_mctrl,
  output logic                  dval_mctrl,
  output logic                  dsoc_mctrl,
  output logic [OUT_W-1:0]      dout_mctrl,
  // external memory
  output logic [ADDR_W-1:0]     mem_addr,
  output logic                  mem_we,
  output logic                  mem_re,
  output logic [MEM_W-1:0]      mem_wdata,
  input  logic [MEM_W-1:0]      mem_rdata
);

  localparam logic [ADDR_W-1:0] FSL_BASE = ADDR_W'(3) << SLOT_W;

  logic [CELL_WORDS-1:0][31:0] asm_q;    // cell being received
  logic [CELL_WORDS-1:0][31:0] wbuf;     // cell to write this cell time
  logic [CELL_WORDS-1:0][31:0] obuf;     // cell being sent to the Output Master
  logic                        o_valid;
  logic [OUT_W-1:0]            o_out;
  logic                        fsl_rd;   // the read in phase 8 is an FSL read
  logic                        cell_rd;

  // 480-bit slot image: {pointer, cell, pad}
  wire [3*MEM_W-1:0] wimg = {nxtptr, wbuf, {(3*MEM_W - SLOT_W - CELL_BITS){1'b0}}};

  wire [1:0] widx = (phase == 4'd2) ? 2'd0 : (phase == 4'd4) ? 2'd1 : 2'd2;
  wire [1:0] ridx = (phase == 4'd8) ? 2'd0 : (phase == 4'd10) ? 2'd1 : 2'd2;
  wire wr_ph = (phase == 4'd2) || (phase == 4'd4) || (phase == 4'd6);
  wire rd_ph = (phase == 4'd8) || (phase == 4'd10) || (phase == 4'd12);
  wire [ADDR_W-1:0] slot3w = ADDR_W'(wslt) * ADDR_W'(3);
  wire [ADDR_W-1:0] slot3r = ADDR_W'(rslt) * ADDR_W'(3);

  always_comb begin
    mem_we    = 1'b0;
    mem_re    = 1'b0;
    mem_addr  = '0;
    mem_wdata = wimg[3*MEM_W-1 - 32'(widx)*MEM_W -: MEM_W];
    if (wr_ph && wslt_en) begin
      mem_we   = 1'b1;
      mem_addr = slot3w + ADDR_W'(widx);
    end else if (phase == 4'd2 && tlen) begin
      mem_we    = 1'b1;
      mem_addr  = FSL_BASE + ADDR_W'(tail);
      mem_wdata = MEM_W'(wfslts);
    end else if (rd_ph && rslt_en) begin
      mem_re   = 1'b1;
      mem_addr = slot3r + ADDR_W'(ridx);
    end else if (phase == 4'd8 && hden) begin
      mem_re   = 1'b1;
      mem_addr = FSL_BASE + ADDR_W'(head);
    end
  end

  // returned data, one clock after the read
  assign ptr_en    = (phase == P_PTR) && cell_rd;
  assign ptr       = mem_rdata[MEM_W-1 -: SLOT_W];
  assign rfslts_en = (phase == P_PTR) && fsl_rd;
  assign rfslts    = mem_rdata[BLK*SLOT_W-1:0];

  // output stream to the Output Master
  assign data_mctrl = obuf[CELL_WORDS-1 - int'(phase)];
  assign dval_mctrl = o_valid;
  assign dsoc_mctrl = o_valid && phase == 4'd0;
  assign dout_mctrl = o_out;

  logic [2*MEM_W-1:0] rtop;    // words 0 and 1 of the slot being read

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q   <= '0;
      wbuf    <= '0;
      obuf    <= '0;
      rtop    <= '0;
      o_valid <= 1'b0;
      o_out   <= '0;
      fsl_rd  <= 1'b0;
      cell_rd <= 1'b0;
    end else begin
      // gather incoming words; word k arrives in phase k
      if (data_valid) asm_q[CELL_WORDS-1 - int'(phase)] <= data_imst;
      if (phase == P_LAST) begin
        wbuf <= asm_q;
        wbuf[0] <= data_valid ? data_imst : 32'h0;
      end
      fsl_rd  <= (phase == 4'd8) && !rslt_en && hden;
      cell_rd <= (phase == 4'd8) && rslt_en;
      if (phase == 4'd9)  rtop[2*MEM_W-1 -: MEM_W] <= mem_rdata;
      if (phase == 4'd11) rtop[MEM_W-1:0]          <= mem_rdata;
      if (phase == P_LAST) begin
        o_valid <= rslt_en;
        o_out   <= nxtout;
        obuf    <= CELL_BITS'({rtop, mem_rdata} >> (3*MEM_W - SLOT_W - CELL_BITS));
      end
    end
  end

endmodule
