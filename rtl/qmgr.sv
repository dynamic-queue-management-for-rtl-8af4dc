// qmgr: Queue Manager of the DQM chip.
//
// Keeps, for every queue (NVC dynamic VC queues plus 256 static VP queues), a
// FIRST and a LAST pointer into the external cell store, where each queue is a
// linked list of cell slots. LAST always names an empty slot that will take
// the queue's next cell, so a queue is empty exactly when FIRST == LAST.
// After reset queue q owns the empty slot q (FIRST = LAST = q), written by an
// initialisation pass of NQ clocks; the free slot pool starts at slot NQ.
//
// Arrival (cell time after the Queue Selector's lookup):
//   phase 0  read the queue's entry;
//   phase 1  the cell goes into slot LAST with next pointer = a free slot taken
//            from the Free Slot Manager, which becomes the new LAST; if
//            FIRST == LAST the queue was empty and is announced to the Output
//            Scheduler as new (new_q, held to the end of the cell time).
// Departure (queue chosen by the Output Scheduler in the same cell time):
//   phase 3  read the queue's entry; FIRST is the slot to read (rslt);
//   phase 9  the pointer read with the cell becomes FIRST; the slot goes back
//            to the Free Slot Manager; if the pointer equals LAST the queue is
//            now empty and del/emp is raised during phase 10.
// The append always precedes the emptiness check in a cell time, so a queue
// that receives and sends a cell in the same cell time is never freed.
module qmgr
  import dqm_pkg::*;
#(
  parameter int NVC    = 8192,
  parameter int SLOT_W = 20,           // cell store of 2**SLOT_W slots
  localparam int NQ    = NVC + NVP,
  localparam int QID_W = $clog2(NQ)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        phase,
  output logic              init_done,
  // from the Queue Selector
  input  logic              arr_valid,
  input  logic [QID_W-1:0]  arr_qid,
  input  cell_info_t        arr_info,
  // Free Slot Manager
  input  logic [SLOT_W-1:0] fslt,
  input  logic              fslt_en,
  output logic              rqs,
  output logic              rtn_en,
  output logic [SLOT_W-1:0] rtn_slt,
  // Memory Controller
  output logic              wslt_en,
  output logic [SLOT_W-1:0] wslt,
  output logic [SLOT_W-1:0] nxtptr,
  output logic              rslt_en,
  output logic [SLOT_W-1:0] rslt,
  input  logic              ptr_en,
  input  logic [SLOT_W-1:0] ptr,
  // Output Scheduler
  output logic              new_q,
  output logic [QID_W-1:0]  newqid,
  output logic [OUT_W-1:0]  newout,
  output logic              newpri,
  output logic [WT_W-1:0]   newwt,
  input  logic              nxt_en,
  input  logic [QID_W-1:0]  nxtqid,
  // empty queue notice to QSEL and OSCHL (phase 10)
  output logic              del,
  output logic [QID_W-1:0]  delqid
);

  typedef struct packed {
    logic [SLOT_W-1:0] first;
    logic [SLOT_W-1:0] last;
  } qent_t;

  qent_t qlist [NQ];
  qent_t q_rdata;
  logic [QID_W-1:0]  init_cnt;
  logic [SLOT_W-1:0] dlast;

  // single-port queue list: init writes, or one access per phase
  logic             q_we;
  logic [QID_W-1:0] q_addr;
  qent_t            q_wdata;

  always_comb begin
    q_we    = 1'b0;
    q_addr  = arr_qid;
    q_wdata = '{first: q_rdata.first, last: fslt};
    if (!init_done) begin
      q_we    = 1'b1;
      q_addr  = init_cnt;
      q_wdata = '{first: SLOT_W'(init_cnt), last: SLOT_W'(init_cnt)};
    end else begin
      case (phase)
        P_ARR_RD: q_addr = arr_qid;
        P_ARR_WR: begin
          q_addr = arr_qid;
          q_we   = arr_valid;
        end
        P_DEP_RD: q_addr = nxtqid;
        P_PTR: begin
          q_addr  = delqid;
          q_we    = rslt_en && ptr_en;
          q_wdata = '{first: ptr, last: dlast};
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (q_we) qlist[q_addr] <= q_wdata;
    q_rdata <= qlist[q_addr];
  end

  assign rqs     = init_done && phase == P_ARR_WR && arr_valid;
  assign rtn_en  = init_done && phase == P_PTR && rslt_en && ptr_en;
  assign rtn_slt = rslt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_cnt  <= '0;
      wslt_en   <= 1'b0;
      wslt      <= '0;
      nxtptr    <= '0;
      rslt_en   <= 1'b0;
      rslt      <= '0;
      dlast     <= '0;
      new_q     <= 1'b0;
      newqid    <= '0;
      newout    <= '0;
      newpri    <= 1'b0;
      newwt     <= '0;
      del       <= 1'b0;
      delqid    <= '0;
    end else if (!init_done) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == QID_W'(NQ - 1)) init_done <= 1'b1;
    end else begin
      del <= 1'b0;
      if (phase == P_ARR_WR && arr_valid) begin
        wslt_en <= 1'b1;
        wslt    <= q_rdata.last;
        nxtptr  <= fslt;
        new_q   <= (q_rdata.first == q_rdata.last);
        newqid  <= arr_qid;
        newout  <= arr_info.out;
        newpri  <= arr_info.pri;
        newwt   <= arr_info.wt;
      end
      if (phase == 4'(P_DEP_RD + 1) && nxt_en) begin
        rslt_en <= 1'b1;
        rslt    <= q_rdata.first;
        dlast   <= q_rdata.last;
        delqid  <= nxtqid;
      end
      if (phase == P_PTR && rslt_en && ptr_en)
        del <= (ptr == dlast);
      if (phase == P_LAST) begin
        wslt_en <= 1'b0;
        rslt_en <= 1'b0;
        new_q   <= 1'b0;
      end
    end
  end

  // an arriving cell always finds a free slot (the Queue Selector drops it otherwise)
  a_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (init_done && phase == P_ARR_WR && arr_valid) |-> fslt_en);

endmodule
