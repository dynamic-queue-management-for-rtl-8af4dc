// ext_sram: behavioural model of the external synchronous SRAM bank that holds
// the DQM chip's Cell Store and Free Slot List (a stand-in for commercial
// SRAM chips, not synthesizable). One access per clock: a write stores wdata
// at addr; a read returns the word at addr on rdata one clock later. Words
// never written read as zero. Storage is sparse, so the full 2**22-word
// address space costs memory only for the words actually used.
module ext_sram #(
  parameter int ADDR_W = 22,
  parameter int DATA_W = 160
)(
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];

  initial rdata = '0;

  always @(posedge clk) begin
    if (we) mem[addr] = wdata;
    if (re) rdata <= mem.exists(addr) ? mem[addr] : '0;
  end
endmodule
