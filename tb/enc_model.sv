// enc_model: behavioural stand-in for the sector encryption engine (an AES
// accelerator in the real drive). Not synthesizable and not AES.
//
// A key is taken on key_valid/key_ready, then data words stream through
// in_* and come out on out_* LAT cycles later (at least), each XORed with a
// key stream word  ks(i) = key[32*(i%4) +: 32] ^ (i * 32'h9e3779b9),  i being
// the word index since the key was loaded. Testbenches use the same formula
// (enc_model_ks) to predict what must reach flash. Word rate is one per cycle
// once the pipeline is full; LAT sets the per-sector latency.
module enc_model #(
  parameter int unsigned LAT = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_valid,
  output logic         key_ready,
  input  logic [127:0] key,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [31:0]  in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [31:0]  out_data
);
  logic [127:0] key_q;
  int unsigned  idx;
  longint       cyc;
  logic [31:0]  q_data[$];
  longint       q_time[$];

  function automatic logic [31:0] ks(logic [127:0] k, int unsigned i);
    return k[32*(i%4) +: 32] ^ (i * 32'h9e3779b9);
  endfunction

  assign key_ready = (q_data.size() == 0);
  assign in_ready  = (q_data.size() < 16);
  assign out_valid = (q_data.size() != 0) && (cyc >= q_time[0]);
  assign out_data  = (q_data.size() != 0) ? q_data[0] : 32'h0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc   <= 0;
      idx   <= 0;
      key_q <= '0;
      q_data.delete();
      q_time.delete();
    end else begin
      cyc <= cyc + 1;
      if (out_valid && out_ready) begin
        void'(q_data.pop_front());
        void'(q_time.pop_front());
      end
      if (key_valid && key_ready) begin
        key_q <= key;
        idx   <= 0;
      end else if (in_valid && in_ready) begin
        q_data.push_back(in_data ^ ks(key_q, idx));
        q_time.push_back(cyc + longint'(LAT));
        idx <= idx + 1;
      end
    end
  end
endmodule
