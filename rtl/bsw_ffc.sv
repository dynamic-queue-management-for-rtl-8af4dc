// bsw_ffc: fast-forward wheel selector of the Binary Scheduling Wheels
// (weighted round robin with power-of-2 weights).
//
// There is one scheduling wheel per weight 2**0 .. 2**(W-1); wheel i must be
// visited half as often as wheel i-1. A W-bit pass counter does this: at the
// start of a pass it is incremented and every wheel whose counter bit changed
// is served once in that pass, lowest index first. To never waste a pass on
// empty wheels, the increment is not 1 but a one-hot carry-in at the lowest
// non-empty wheel (the least significant 1 of the non-empty mask), so the
// lowest changing bit always belongs to a non-empty wheel.
//   pass start: carry = lsb1(mask); prev = cnt; cnt += carry;
//               pend = mask & (prev ^ cnt)
//   each request: serve lsb1(pend & mask), clear it in pend.
// mask is the wheels' non-empty flags, kept by the owner of the wheels; a
// wheel that empties during a pass is skipped, one that fills waits for the
// next pass.
//
// Interface: when nxt is high (the previous wheel is finished), wheel/valid
// name the wheel to serve now (combinational) and the state advances on the
// clock edge; pass_start is high when that request began a new pass. valid
// is low only when every wheel is empty.
module bsw_ffc #(
  parameter int W = 32,
  localparam int WI = (W > 1) ? $clog2(W) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  mask,        // non-empty wheels
  input  logic          nxt,
  output logic [WI-1:0] wheel,
  output logic          valid,
  output logic          pass_start,
  output logic [W-1:0]  counter
);

  logic [W-1:0] pend;

  function automatic logic [W-1:0] lsb1(input logic [W-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  function automatic logic [WI-1:0] idx(input logic [W-1:0] onehot);
    idx = '0;
    for (int i = 0; i < W; i++) if (onehot[i]) idx = WI'(i);
  endfunction

  logic [W-1:0] carry, cnt_n, pend_n, pick;

  always_comb begin
    pass_start = (pend & mask) == '0;
    carry  = lsb1(mask);
    cnt_n  = counter + carry;
    pend_n = pass_start ? (mask & (counter ^ cnt_n)) : (pend & mask);
    pick   = lsb1(pend_n);
    valid  = mask != '0;
    wheel  = idx(pick);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter <= '0;
      pend    <= '0;
    end else if (nxt && valid) begin
      if (pass_start) counter <= cnt_n;
      pend <= pend_n & ~pick;
    end
  end

endmodule
