// acm_code_compare: access-code comparison logic of the access-control memory.
//
// Compares the code presented by the firmware with the code stored in the
// memory and raises eq when all CODE_W bits agree. It is purely
// combinational; its result is captured by the matching register so that the
// wide comparison stays off the memory's access path, as the FESSD proposal argues.
// The XNOR-reduce structure is this design's own choice.
module acm_code_compare #(
  parameter int unsigned CODE_W = 128
) (
  input  logic [CODE_W-1:0] a,   // presented code
  input  logic [CODE_W-1:0] b,   // stored code
  output logic              eq   // 1 when a == b
);
  logic [CODE_W-1:0] same;
  always_comb begin
    same = ~(a ^ b);
    eq   = &same;
  end
endmodule
