// dqm_pkg: types and constants shared by the blocks of the Dynamic Queue
// Management (DQM) chip.
//
// The chip works in cell times of 14 clocks (one 448-bit cell arrives on a
// 32-bit bus in 14 clocks at 120 MHz). Every block sequences its work by the
// phase (0..13) of a common cell-time counter; the phase assignments below are
// this design's own schedule, chosen so that within one cell time a queue is
// appended to before it is checked for emptiness, and freed before the next
// lookup can hand it out again.
//
// Cell format on the input bus (word 0 first):
//   word 0  switch control word: [31] VPT (1 = VC connection, 0 = VP
//           connection), [30] CS (1 = continuous stream = high priority),
//           [29] A5 (AAL5 connection), [28:24] WT (weight), rest unused
//   word 1  ATM UNI header without HEC: [31:28] GFC, [27:20] VPI,
//           [19:4] VCI, [3:1] PT, [0] CLP.  PT[0] (bit 1) is the AAL5
//           end-of-packet bit U.
//   words 2..13  the 48-byte payload.
package dqm_pkg;

  localparam int CELL_WORDS = 14;
  localparam int CELL_BITS  = 32 * CELL_WORDS;   // 448
  localparam int VPI_W      = 8;
  localparam int VCI_W      = 16;
  localparam int KEY_W      = VPI_W + VCI_W;     // 24-bit (VPI,VCI) key
  localparam int NVP        = 1 << VPI_W;        // 256 static VP queues
  localparam int OUT_W      = 4;
  localparam int NOUT       = 1 << OUT_W;        // 16 outputs / virtual ports
  localparam int WT_W       = 5;                 // 32 power-of-2 weights
  localparam int NIF        = 4;                 // UTOPIA interfaces
  localparam int MEM_W      = 160;               // external memory word
  localparam int MEM_PER_CELL = 3;               // 160-bit words per cell slot

  // ---- cell-time schedule (phase numbers) ----
  localparam logic [3:0] P_SEL      = 4'd0;   // OSCHL picks output and queue
  localparam logic [3:0] P_ARR_RD   = 4'd0;   // QMGR reads queue list (arrival)
  localparam logic [3:0] P_ARR_WR   = 4'd1;   // QMGR writes LAST, takes free slot
  localparam logic [3:0] P_MEM_W0   = 4'd2;   // cell writes at 2, 4, 6
  localparam logic [3:0] P_DEP_RD   = 4'd3;   // QMGR reads queue list (departure)
  localparam logic [3:0] P_FSL_RQ   = 4'd5;   // FSMGR decides on a free list read
  localparam logic [3:0] P_MEM_R0   = 4'd8;   // cell reads at 8, 10, 12
  localparam logic [3:0] P_PTR      = 4'd9;   // pointer of departing cell returns
  localparam logic [3:0] P_DEL      = 4'd10;  // empty-queue notice to QSEL/OSCHL
  localparam logic [3:0] P_LOOK     = 4'd11;  // QSEL reads its set
  localparam logic [3:0] P_COMMIT   = 4'd13;  // QSEL decides and commits
  localparam logic [3:0] P_LAST     = 4'd13;

  // Fields the Input Master extracts from a cell.
  typedef struct packed {
    logic             vc;    // VPT: 1 = VC connection, 0 = VP connection
    logic             pri;   // CS: 1 = high priority
    logic [WT_W-1:0]  wt;
    logic             a5;    // AAL5 connection
    logic             u;     // last cell of an AAL5 packet
    logic [VPI_W-1:0] vpi;
    logic [VCI_W-1:0] vci;
    logic [OUT_W-1:0] out;   // output link = high four bits of the VPI
  } cell_info_t;

  function automatic logic [OUT_W-1:0] bitrev4(input logic [OUT_W-1:0] v);
    for (int i = 0; i < OUT_W; i++) bitrev4[i] = v[OUT_W-1-i];
  endfunction

endpackage
