// fsmgr: Free Slot Manager of the DQM chip.
//
// Hands out free cell slots to the Queue Manager and takes them back, from a
// small on-chip recycling cache (a CACHE_N-entry stack of slot numbers). While
// arrivals and departures balance, every slot comes from and goes back to the
// cache, and the off-chip Free Slot List (FSL) is not touched. The FSL is a
// circular list in external memory stored in blocks of BLK slot numbers, one
// block per 160-bit memory word, with a head and a tail block pointer.
//   - Cache above HIGH and no arrival in this cell time (the memory write
//     cycle is idle): the top BLK entries are written to the FSL tail.
//   - Cache below LOW and no departure in this cell time (the read cycle is
//     idle): one block is read from the FSL head.
// So the FSL costs no memory bandwidth of its own.
// Slots NQ .. 2**SLOT_W-1 are free after reset (slots below NQ are the queues'
// initial empty slots). Rather than writing a million-entry list at power-up,
// the manager hands them out from a "fresh" counter, BLK at a time into the
// cache whenever it is below LOW, before it ever reads the FSL; the FSL starts
// empty. This start-up scheme is this design's choice.
//
// Timing: fslt/fslt_en show the top of the cache; rqs pops it (phase 1).
// rtn_en/rtn_slt push a slot (phase 9). A spill is decided in phase 1 and
// tlen/tail/wfslts are valid from phase 2 to phase 3; a refill is decided in
// phase 5, hden/head are valid from phase 6 to 13 and the block comes back on
// rfslts_en/rfslts in phase 9. Fresh refills happen in phase 11.
module fsmgr
  import dqm_pkg::*;
#(
  parameter int NVC     = 8192,
  parameter int SLOT_W  = 20,
  parameter int CACHE_N = 64,
  parameter int BLK     = 8,
  parameter int LOW     = 16,
  parameter int HIGH    = 48,
  localparam int NQ     = NVC + NVP,
  localparam int FSL_W  = SLOT_W - $clog2(BLK)   // FSL block index width
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [3:0]               phase,
  // Queue Manager
  output logic [SLOT_W-1:0]        fslt,
  output logic                     fslt_en,
  input  logic                     rqs,
  input  logic                     rtn_en,
  input  logic [SLOT_W-1:0]        rtn_slt,
  // memory cycles used by cells in this cell time
  input  logic                     wr_busy,     // sampled in phase 1
  input  logic                     rd_busy,     // sampled in phase 5
  // Memory Controller (Free Slot List)
  output logic                     tlen,
  output logic [FSL_W-1:0]         tail,
  output logic [BLK*SLOT_W-1:0]    wfslts,
  output logic                     hden,
  output logic [FSL_W-1:0]         head,
  input  logic                     rfslts_en,
  input  logic [BLK*SLOT_W-1:0]    rfslts,
  // status
  output logic [$clog2(CACHE_N+1)-1:0] cache_cnt,
  output logic                     ev_spill,
  output logic                     ev_refill,
  output logic                     ev_fresh
);

  localparam int CNT_W  = $clog2(CACHE_N + 1);
  localparam int NSLOTS = 1 << SLOT_W;

  logic [CACHE_N-1:0][SLOT_W-1:0] cache;
  logic [CNT_W-1:0]  cnt;
  logic [FSL_W:0]    nblk;         // blocks held in the FSL
  logic [SLOT_W:0]   fresh;        // next never-used slot

  assign cache_cnt = cnt;
  assign fslt_en   = (cnt != '0);
  assign fslt      = cache[cnt - 1'b1];

  wire fresh_left = (fresh < (SLOT_W+1)'(NSLOTS));
  wire do_spill   = en && phase == 4'd1 && !wr_busy && !rqs && cnt > CNT_W'(HIGH)
                    && nblk < (FSL_W+1)'(NSLOTS / BLK);
  wire do_refill  = en && phase == P_FSL_RQ && !rd_busy && cnt < CNT_W'(LOW)
                    && !fresh_left && nblk != '0;
  wire do_fresh   = en && phase == P_LOOK && cnt < CNT_W'(LOW) && fresh_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cache  <= '0;
      cnt    <= '0;
      nblk   <= '0;
      fresh  <= (SLOT_W+1)'(NQ);
      tlen   <= 1'b0;
      tail   <= '0;
      wfslts <= '0;
      hden   <= 1'b0;
      head   <= '0;
      {ev_spill, ev_refill, ev_fresh} <= '0;
    end else begin
      {ev_spill, ev_refill, ev_fresh} <= '0;
      if (phase == 4'd3) tlen <= 1'b0;
      if (phase == P_LAST) hden <= 1'b0;
      if (tlen && phase == 4'd3) tail <= tail + 1'b1;
      // one pop (arrival) in phase 1
      if (rqs && cnt != '0) cnt <= cnt - 1'b1;
      // spill a block to the FSL
      if (do_spill) begin
        for (int i = 0; i < BLK; i++)
          wfslts[i*SLOT_W +: SLOT_W] <= cache[int'(cnt) - BLK + i];
        cnt      <= cnt - CNT_W'(BLK);
        tlen     <= 1'b1;
        nblk     <= nblk + 1'b1;
        ev_spill <= 1'b1;
      end
      // request a block from the FSL
      if (do_refill) begin
        hden      <= 1'b1;
        nblk      <= nblk - 1'b1;
        ev_refill <= 1'b1;
      end
      // phase 9: a returned slot, or a block read from the FSL
      if (phase == P_PTR) begin
        if (rfslts_en && hden) begin
          for (int i = 0; i < BLK; i++)
            cache[int'(cnt) + i] <= rfslts[i*SLOT_W +: SLOT_W];
          cnt  <= cnt + CNT_W'(BLK) + CNT_W'(rtn_en);
          head <= head + 1'b1;
          if (rtn_en) cache[int'(cnt) + BLK] <= rtn_slt;
        end else if (rtn_en) begin
          cache[cnt] <= rtn_slt;
          cnt        <= cnt + 1'b1;
        end
      end
      // never-used slots
      if (do_fresh) begin
        for (int i = 0; i < BLK; i++)
          if (fresh + (SLOT_W+1)'(i) < (SLOT_W+1)'(NSLOTS))
            cache[int'(cnt) + i] <= SLOT_W'(fresh + (SLOT_W+1)'(i));
        if (fresh + (SLOT_W+1)'(BLK) <= (SLOT_W+1)'(NSLOTS)) begin
          cnt   <= cnt + CNT_W'(BLK);
          fresh <= fresh + (SLOT_W+1)'(BLK);
        end else begin
          cnt   <= cnt + CNT_W'((SLOT_W+1)'(NSLOTS) - fresh);
          fresh <= (SLOT_W+1)'(NSLOTS);
        end
        ev_fresh <= 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cnt) <= CACHE_N);

endmodule
