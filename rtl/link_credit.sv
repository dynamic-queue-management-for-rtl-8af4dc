// link_credit: credit-based virtual port scheduler for links configured with
// more total bandwidth than the chip's 2.4 Gb/s.
//
// The chip's output cell times are split over 16 virtual ports (155 Mb/s
// each), visited in bit-reversed counter order. A link owns one or more
// virtual ports (link = vport & mask). Each virtual port has one credit
// counter, reloaded every 16 cell times with 1 (its basic credit) plus its
// extra credit (cfg_extra): the extra cells the link may take in a round when
// other ports leave their cell times unused, such that basic plus extra never
// exceeds what the link can carry.
// Each cell time the port whose turn it is holds the token. If it has credit
// and its link has a cell to send (ME), it sends and spends a credit. If its
// link has nothing to send, its basic credit lapses (the counter is still
// decremented) and the token travels the ring in the same bit-reversed order;
// the first port with ME catches it and sends, spending one of its credits.
// If nobody wants it the cell time is idle. The ring is evaluated in one
// clock as a rotating priority search, equivalent to the token passing ring of
// per-port cells.
//
// Interface: step (one clock per cell time) advances the round; sel/sel_link
// and sel_valid (combinational, for the step clock) name the winner;
// sel_extra tells whether it won by catching a passed token.
module link_credit
  import dqm_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       step,
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_mask,    // per virtual port
  input  logic [NOUT-1:0][OUT_W-1:0] cfg_extra,   // extra credits per virtual port
  input  logic [NOUT-1:0]            link_ready,  // link has a cell and room
  output logic [OUT_W-1:0]           sel,         // winning virtual port
  output logic [OUT_W-1:0]           sel_link,
  output logic                       sel_valid,
  output logic                       sel_extra
);

  logic [OUT_W-1:0]                cnt;
  logic [NOUT-1:0][OUT_W:0]        credit;

  logic [NOUT-1:0] me;     // indexed by ring position (counter value)
  always_comb begin
    for (int p = 0; p < NOUT; p++) begin
      logic [OUT_W-1:0] v;
      v = bitrev4(OUT_W'(p));
      me[p] = credit[v] != '0 && link_ready[v & cfg_mask[v]];
    end
    sel_valid = 1'b0;
    sel_extra = 1'b0;
    sel       = bitrev4(cnt);
    // the token starts at the current position and moves along the ring
    for (int d = NOUT - 1; d >= 0; d--) begin
      logic [OUT_W-1:0] p;
      p = cnt + OUT_W'(d);
      if (me[p]) begin
        sel_valid = 1'b1;
        sel_extra = (d != 0);
        sel       = bitrev4(p);
      end
    end
    sel_link = sel & cfg_mask[sel];
  end

  wire [OUT_W-1:0] own = bitrev4(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int v = 0; v < NOUT; v++) credit[v] <= (OUT_W+1)'(1) + (OUT_W+1)'(cfg_extra[v]);
    end else if (step) begin
      cnt <= cnt + 1'b1;
      if (cnt == OUT_W'(NOUT - 1)) begin
        for (int v = 0; v < NOUT; v++) credit[v] <= (OUT_W+1)'(1) + (OUT_W+1)'(cfg_extra[v]);
      end else begin
        // the winner spends a credit; an unused basic turn lapses
        if (sel_valid) credit[sel] <= credit[sel] - 1'b1;
        if (sel_extra && credit[own] != '0) credit[own] <= credit[own] - 1'b1;
      end
    end
  end

endmodule
