// acm_nvm_array: storage array of the access-control memory (on-chip
// non-volatile memory, STT-RAM in the FESSD proposal's evaluation).
//
// Single-port synchronous memory of DEPTH words: a write takes effect at the
// clock edge, read data appears the cycle after en is raised. The contents
// have no reset because the array is non-volatile. Cell technology and the
// per-sector STT-RAM latencies are not modelled; the single-cycle port is this
// design's choice. Default depth holds a 1 MB sector buffer plus a 16-byte key
// per 512-byte sector, in 32-bit words.
module acm_nvm_array #(
  parameter int unsigned DEPTH  = 270336,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
