// ldpc_top: the complete design. A layered LDPC decoder with Channel-RAM
// bypassing (layered_decoder) runs next to a node-state recorder
// (node_state_recorder) that views the decoder as a state machine whose
// states are the check nodes it processes.
//
// Every time the decoder finishes a layer it enters state s(m+1), m being
// the layer, and its output for that state is its current hard-decision
// word (the N = 7 decision bits, zero-extended to 8 bits). When decoding
// ends the machine returns to s0 with the final hard decisions as output.
// The recorder stores each distinct output word once, so layers whose
// decisions did not change share a memory word, and reports for each
// state the previous state, the state entered and the address of its
// output. start clears the recorder together with the decoder.
//
// Ports: the decoder's load interface (start, in_valid, in_llr, in_ready),
// its results (done, success, hard_out, iterations, soft_addr/soft_data)
// and Channel RAM access counters, and the recorder's per-state report
// (rec_*), memory use, overflow flag and read port. Which decoder word is
// taken as a state's output is this design's choice; the decoder and the
// deduplicating state memory follow the design.
module ldpc_top
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER  = 10,
  parameter int REC_DEPTH = 4,
  localparam int IW  = $clog2(MAX_ITER + 1),
  localparam int RAW = $clog2(REC_DEPTH + 1),
  localparam int STATE_W = 3,
  localparam int DATA_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // decoder
  input  logic               start,
  input  logic               in_valid,
  input  llr_t               in_llr,
  output logic               in_ready,
  output logic               busy,
  output logic               done,
  output logic               success,
  output row_t               hard_out,
  output logic [IW-1:0]      iterations,
  input  col_t               soft_addr,
  output llr_t               soft_data,
  output logic [15:0]        ram_reads,
  output logic [15:0]        ram_writes,
  output logic [15:0]        bypasses,
  // node-state recorder
  output logic               rec_valid,
  output logic [STATE_W-1:0] rec_pres_state,
  output logic [STATE_W-1:0] rec_next_state,
  output logic [RAW-1:0]     rec_curr_state,
  output logic               rec_new,
  output logic [RAW-1:0]     rec_used,
  output logic               rec_overflow,
  output logic [15:0]        rec_visits,
  output logic [15:0]        rec_saved,
  input  logic [RAW-1:0]     rec_rd_addr,
  output logic [DATA_W-1:0]  rec_rd_data
);

  logic          layer_done;
  logic [LW-1:0] layer_idx;

  layered_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n, .start, .in_valid, .in_llr, .in_ready, .busy, .done,
    .success, .hard_out, .iterations, .soft_addr, .soft_data,
    .layer_done, .layer_idx, .ram_reads, .ram_writes, .bypasses
  );

  logic               step_valid;
  logic [STATE_W-1:0] step_state;
  logic [DATA_W-1:0]  step_data;

  always_comb begin
    step_valid = layer_done || done;
    step_state = layer_done ? STATE_W'(layer_idx) + 1'b1 : '0;
    step_data  = DATA_W'(hard_out);
  end

  node_state_recorder #(.STATE_W(STATE_W), .DATA_W(DATA_W), .DEPTH(REC_DEPTH)) u_rec (
    .clk, .rst_n, .clear(start && !busy),
    .step_valid, .step_state, .step_data,
    .rec_valid, .pres_state(rec_pres_state), .next_state(rec_next_state),
    .curr_state(rec_curr_state), .rec_new, .used(rec_used),
    .overflow(rec_overflow), .visits(rec_visits), .saved(rec_saved),
    .rd_addr(rec_rd_addr), .rd_data(rec_rd_data)
  );

endmodule
