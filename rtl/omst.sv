// omst: Output Master of the DQM chip.
//
// Buffers departing cells and sends them out on four UTOPIA-style transmit
// interfaces, one FIFO of FIFO_CELLS cells per interface. A cell for link L
// (0..15) goes to interface L[3:2] and, on that interface, to PHY address
// L[1:0], so each interface can serve one OC-12 or up to four OC-3 links.
//
// Input: the Memory Controller streams a cell as 14 32-bit words in phases
// 0..13 of a cell time (dsoc in phase 0, link number on dout). The cell is
// committed to its FIFO after the last word. if_ready[i] tells the Output
// Scheduler that FIFO i can still take the up to two cells that may be on
// their way (one being read from memory, one being streamed).
//
// Output, per interface: a cell is sent when the FIFO is not empty and the
// addressed PHY signals cell space (tca[phy]). It goes out as 27 16-bit words
// on tdata with twren_n low: the two header halves, a HEC/UDF word sent as
// zero (the PHY inserts the HEC), then the 48 payload bytes; tsoc marks the
// first word and txprty is odd parity over tdata. The switch control word
// (cell word 0) is not transmitted. The 16-bit bus, the direct cell-available
// handshake per PHY and the HEC placeholder are this design's reading of the
// UTOPIA signals the document lists.
module omst
  import dqm_pkg::*;
#(
  parameter int FIFO_CELLS = 8
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                phase,
  input  logic [31:0]               data_mctrl,
  input  logic                      dval_mctrl,
  input  logic                      dsoc_mctrl,
  input  logic [OUT_W-1:0]          dout_mctrl,
  output logic [NIF-1:0]            if_ready,
  // transmit interfaces
  output logic [NIF-1:0][15:0]      tdata,
  output logic [NIF-1:0]            tsoc,
  output logic [NIF-1:0]            twren_n,
  output logic [NIF-1:0]            txprty,
  output logic [NIF-1:0][1:0]       taddr,
  input  logic [NIF-1:0][3:0]       tca,
  output logic                      ev_drop
);

  localparam int FC_W = $clog2(FIFO_CELLS);
  localparam int FW   = FIFO_CELLS * CELL_WORDS;

  logic [31:0]        fmem  [NIF][FW];
  logic [1:0]         fphy  [NIF][FIFO_CELLS];
  logic [FC_W-1:0]    wp    [NIF];
  logic [FC_W-1:0]    rp    [NIF];
  logic [FC_W:0]      count [NIF];
  logic               busy  [NIF];
  logic [4:0]         k     [NIF];
  logic               wr_ok;         // current incoming cell has room

  wire [1:0] wif = dout_mctrl[3:2];

  always_comb
    for (int i = 0; i < NIF; i++)
      if_ready[i] = int'(count[i]) <= FIFO_CELLS - 3;

  // transmit word selection
  always_comb begin
    for (int i = 0; i < NIF; i++) begin
      logic [31:0] w;
      int m;
      m = int'(k[i]) - 3;
      if (k[i] < 5'd2) w = fmem[i][int'(rp[i]) * CELL_WORDS + 1];
      else if (k[i] == 5'd2) w = 32'h0;
      else w = fmem[i][int'(rp[i]) * CELL_WORDS + 2 + m / 2];
      if (k[i] == 5'd0)      tdata[i] = w[31:16];
      else if (k[i] == 5'd1) tdata[i] = w[15:0];
      else if (k[i] == 5'd2) tdata[i] = 16'h0;
      else tdata[i] = (m % 2 == 0) ? w[31:16] : w[15:0];
      if (!busy[i]) tdata[i] = 16'h0;
      tsoc[i]    = busy[i] && k[i] == 5'd0;
      twren_n[i] = !busy[i];
      txprty[i]  = ~^tdata[i];
      taddr[i]   = fphy[i][rp[i]];
    end
  end

  logic [NIF-1:0] push, pop;
  always_comb
    for (int i = 0; i < NIF; i++) begin
      push[i] = dval_mctrl && phase == P_LAST && wr_ok && wif == 2'(i);
      pop[i]  = busy[i] && k[i] == 5'd26;
    end

  always_ff @(posedge clk) begin
    if (dval_mctrl && (dsoc_mctrl ? int'(count[wif]) < FIFO_CELLS : wr_ok))
      fmem[wif][int'(wp[wif]) * CELL_WORDS + int'(phase)] <= data_mctrl;
    if (dval_mctrl && dsoc_mctrl && int'(count[wif]) < FIFO_CELLS)
      fphy[wif][wp[wif]] <= dout_mctrl[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIF; i++) begin
        wp[i] <= '0; rp[i] <= '0; count[i] <= '0; busy[i] <= 1'b0; k[i] <= '0;
      end
      wr_ok   <= 1'b0;
      ev_drop <= 1'b0;
    end else begin
      ev_drop <= 1'b0;
      if (dval_mctrl && dsoc_mctrl) begin
        wr_ok <= int'(count[wif]) < FIFO_CELLS;
        if (int'(count[wif]) >= FIFO_CELLS) ev_drop <= 1'b1;
      end
      for (int i = 0; i < NIF; i++) begin
        if (push[i]) wp[i] <= (int'(wp[i]) == FIFO_CELLS - 1) ? '0 : wp[i] + 1'b1;
        if (pop[i])  rp[i] <= (int'(rp[i]) == FIFO_CELLS - 1) ? '0 : rp[i] + 1'b1;
        count[i] <= count[i] + (FC_W+1)'(push[i]) - (FC_W+1)'(pop[i]);
        if (busy[i]) begin
          k[i] <= k[i] + 1'b1;
          if (pop[i]) begin
            busy[i] <= 1'b0;
            k[i]    <= '0;
          end
        end else if (count[i] != '0 && tca[i][fphy[i][rp[i]]]) begin
          busy[i] <= 1'b1;
          k[i]    <= '0;
        end
      end
    end
  end

endmodule
