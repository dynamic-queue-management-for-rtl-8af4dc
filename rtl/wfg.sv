// wfg: Weighted Fair Goodput packet discard for per-VC queues.
//
// Keeps, per queue, a cell count, an active/inactive state and whether the
// next cell starts a new AAL5 packet, plus the global buffer level (cells
// stored in the chip). When the first cell of a packet arrives on an AAL5
// connection (A5 set), the connection's state is re-evaluated:
//   level > b_h, active,   queue length > q0  -> inactive
//   level > b_h, inactive, queue length < q0  -> active
//   level <= b_h, inactive                    -> active
//   otherwise unchanged.
// Every cell of a packet that starts while the connection is inactive is
// discarded, so the link never carries partial packets; q0 (at least one
// packet length) keeps an inactive connection's queue from running dry before
// its next packet boundary. Cells of non-AAL5 connections are always kept.
// b_h, q0 and the enable are configuration inputs.
// Discarding the packet's last cell too, and starting a reused queue's state
// afresh (active, at a packet boundary, length 0), are this design's choices.
//
// Timing (phases of the cell time, one single-port state table): the
// arriving cell's queue state is read in phase 0 and keep is valid in phase 1,
// when the state is written back; a departure (dep_en/dep_qid, phase 9)
// decrements the length, its state having been read in phase 8.
module wfg
  import dqm_pkg::*;
#(
  parameter int NVC    = 8192,
  parameter int LEN_W  = 20,     // queue length counter (up to 2**20 cells)
  localparam int NQ    = NVC + NVP,
  localparam int QID_W = $clog2(NQ)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        phase,
  input  logic              en,
  input  logic [LEN_W:0]    cfg_bh,
  input  logic [LEN_W-1:0]  cfg_q0,
  output logic              init_done,
  // arriving cell (valid for the cell time)
  input  logic              arr_valid,
  input  logic [QID_W-1:0]  arr_qid,
  input  logic              arr_a5,
  input  logic              arr_u,
  output logic              keep,          // phase 1
  // departing cell
  input  logic              dep_en,        // phase 9
  input  logic [QID_W-1:0]  dep_qid,       // phases 8..9
  output logic [LEN_W:0]    level,
  output logic              ev_discard,
  output logic              ev_off,
  output logic              ev_on
);

  typedef struct packed {
    logic             active;
    logic             boundary;   // next cell starts a packet
    logic [LEN_W-1:0] len;
  } st_t;

  st_t st [NQ];
  st_t rd;
  logic [QID_W-1:0] init_cnt;

  // decision on the arriving cell (phase 1)
  logic active_n, change;
  always_comb begin
    active_n = rd.active;
    if (en && arr_a5 && rd.boundary) begin
      if (level > cfg_bh) begin
        if (rd.active && rd.len > cfg_q0)       active_n = 1'b0;
        else if (!rd.active && rd.len < cfg_q0) active_n = 1'b1;
      end else if (!rd.active) active_n = 1'b1;
    end
    change = active_n != rd.active;
    keep   = !(en && arr_a5 && !active_n);
  end

  logic            we;
  logic [QID_W-1:0] addr;
  st_t              wdata;
  always_comb begin
    we    = 1'b0;
    addr  = arr_qid;
    wdata = rd;
    if (!init_done) begin
      we    = 1'b1;
      addr  = init_cnt;
      wdata = '{active: 1'b1, boundary: 1'b1, len: '0};
    end else if (phase == 4'd1) begin
      we = arr_valid;
      wdata.active   = active_n;
      wdata.boundary = arr_a5 ? arr_u : 1'b1;
      if (keep) wdata.len = rd.len + 1'b1;
      // a queue that has just been handed out again starts afresh
    end else if (phase == 4'd8) begin
      addr = dep_qid;
    end else if (phase == P_PTR) begin
      addr = dep_qid;
      we   = dep_en;
      wdata.len = rd.len - 1'b1;
      if (rd.len == LEN_W'(1)) begin
        wdata.active   = 1'b1;
        wdata.boundary = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) st[addr] <= wdata;
    rd <= st[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_cnt  <= '0;
      level     <= '0;
      {ev_discard, ev_off, ev_on} <= '0;
    end else if (!init_done) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == QID_W'(NQ - 1)) init_done <= 1'b1;
    end else begin
      {ev_discard, ev_off, ev_on} <= '0;
      if (phase == 4'd1 && arr_valid) begin
        ev_discard <= !keep;
        ev_off     <= change && !active_n;
        ev_on      <= change && active_n;
      end
      level <= level + (LEN_W+1)'(phase == 4'd1 && arr_valid && keep)
                     - (LEN_W+1)'(phase == P_PTR && dep_en);
    end
  end

endmodule
