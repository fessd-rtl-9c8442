// acm_match_reg: the volatile matching register of the access-control memory.
//
// Every clock it reloads the comparator result, so a flipped bit (for example
// from fault injection) is corrected on the next cycle while the code remains
// unmatched. It resets to 0 (no access) and is forced to 0 while lock is high,
// which models the bus-disconnect lock against hot-plug attacks. Reset to
// false and per-cycle reload follow the FESSD proposal; the lock input is this
// design's own mapping of the suggested countermeasure.
module acm_match_reg (
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low: power-on state
  input  logic eq,       // comparator result
  input  logic lock,     // force "not matched"
  output logic matched
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    matched <= 1'b0;
    else if (lock) matched <= 1'b0;
    else           matched <= eq;
  end
endmodule
