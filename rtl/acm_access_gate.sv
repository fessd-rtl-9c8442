// acm_access_gate: the AND gates that put access control on the memory port.
//
// An array write is passed on only while the matching register is set, and
// read data is passed to the bus only when the read was issued while matched;
// otherwise the bus sees RESET_VALUE. This is the FESSD proposal's "additional AND
// gates"; the choice of RESET_VALUE is this design's. Purely combinational:
// matched gates the write of the current cycle, rd_matched (the match state
// registered with the read) gates the data returned one cycle later.
module acm_access_gate #(
  parameter int unsigned            DATA_W      = 32,
  parameter logic [DATA_W-1:0]      RESET_VALUE = '0
) (
  input  logic              matched,     // matching register, current cycle
  input  logic              we_in,       // requested array write
  output logic              we_out,      // gated array write
  input  logic              rd_matched,  // match state of the read being returned
  input  logic [DATA_W-1:0] rdata_in,    // array read data
  output logic [DATA_W-1:0] rdata_out    // data seen on the bus
);
  always_comb begin
    we_out    = we_in & matched;
    rdata_out = (rdata_in & {DATA_W{rd_matched}}) | (RESET_VALUE & {DATA_W{~rd_matched}});
  end
endmodule
