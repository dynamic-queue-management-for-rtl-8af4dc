// imst: Input Master of the DQM chip.
//
// Receives cells from the switch's Output Port Processor on a 32-bit bus, one
// word per clock, 14 words per cell, aligned to the chip's cell time: the
// first word (with soc_opp) must arrive in phase 0. It checks the framing,
// extracts the control fields the Queue Selector needs (VPI, VCI, connection
// type, priority, weight, A5, U and the output number) and forwards every
// word unchanged to the Memory Controller.
//
// Timing: word k of a cell is on data_opp in phase k. data_imst/data_valid
// follow data_opp combinationally. info/info_valid are registered and valid
// from phase 2 to the end of the cell time in which the cell arrives.
// A cell whose first word is not in phase 0 is ignored and counted in
// frame_err; a missing later word is stored as zero and counted too.
// The field layout (see dqm_pkg) and the output number taken from the high
// four VPI bits follow the document's signal list; the bit positions of the
// control word are this design's choice.
module imst
  import dqm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,          // chip initialised
  input  logic [3:0]           phase,
  input  logic [31:0]          data_opp,
  input  logic                 valid_opp,
  input  logic                 soc_opp,
  output cell_info_t           info,
  output logic                 info_valid,
  output logic [31:0]          data_imst,
  output logic                 data_valid,
  output logic                 frame_err     // one-clock pulse per framing error
);

  logic in_cell;       // a cell started in phase 0 of this cell time
  logic [31:0] ctrl_q;

  // A cell is being received from phase 0 (its soc word) to phase 13.
  wire start = en && valid_opp && soc_opp && (phase == 4'd0);
  wire cur   = start || (in_cell && phase != 4'd0);

  assign data_valid = cur;
  assign data_imst  = (cur && valid_opp) ? data_opp : 32'h0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cell    <= 1'b0;
      ctrl_q     <= '0;
      info       <= '0;
      info_valid <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      frame_err <= 1'b0;
      if (phase == 4'd0) begin
        in_cell    <= start;
        info_valid <= 1'b0;
        if (start) ctrl_q <= data_opp;
      end
      if (phase == 4'd1 && in_cell) begin
        info.vc    <= ctrl_q[31];
        info.pri   <= ctrl_q[30];
        info.a5    <= ctrl_q[29];
        info.wt    <= ctrl_q[28:24];
        info.vpi   <= data_imst[27:20];
        info.vci   <= data_imst[19:4];
        info.u     <= data_imst[1];
        info.out   <= data_imst[27:24];
        info_valid <= 1'b1;
      end
      // soc outside phase 0, or a missing word inside a cell
      if (en && valid_opp && soc_opp && phase != 4'd0) frame_err <= 1'b1;
      if (in_cell && phase != 4'd0 && !valid_opp) frame_err <= 1'b1;
    end
  end

endmodule
