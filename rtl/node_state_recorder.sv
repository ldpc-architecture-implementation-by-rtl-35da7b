// node_state_recorder: the decoder seen as a finite state machine whose
// states are the nodes it visits (s0 is the idle state, s1..sM the check
// nodes / layers). For every state the decoder enters, the recorder keeps
// the previous state (pres_state), the state entered (next_state) and the
// address at which that state's output word is stored (curr_state). The
// output words go into a dedup_mem, so states whose outputs are equal share
// one entry: the sequence s1, s2, s3 with outputs A, B, A is recorded as
// curr_state 1, 2, 1 and uses two words of memory instead of three.
//
// Interface: clear returns the recorder to s0 and empties the memory.
// step_valid with step_state and step_data reports one state transition;
// one cycle later rec_valid is high with pres_state, next_state and
// curr_state for it (rec_new when its output took a new word). visits
// counts transitions and saved counts those whose output was already
// stored (the words a one-word-per-state memory would have spent extra);
// both counters include a transition from the cycle after its rec_valid.
// rd_addr/rd_data read the stored words. The three fields follow the
// design's description of the state machine; the state width (3 bits,
// states s0..s7) matches its state names, and the memory size (4 words)
// is this design's default.
module node_state_recorder #(
  parameter int STATE_W = 3,
  parameter int DATA_W  = 8,
  parameter int DEPTH   = 4,
  localparam int AW = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               step_valid,
  input  logic [STATE_W-1:0] step_state,
  input  logic [DATA_W-1:0]  step_data,
  output logic               rec_valid,
  output logic [STATE_W-1:0] pres_state,
  output logic [STATE_W-1:0] next_state,
  output logic [AW-1:0]      curr_state,
  output logic               rec_new,
  output logic [AW-1:0]      used,
  output logic               overflow,
  output logic [15:0]        visits,
  output logic [15:0]        saved,
  input  logic [AW-1:0]      rd_addr,
  output logic [DATA_W-1:0]  rd_data
);

  logic res_hit;

  dedup_mem #(.DEPTH(DEPTH), .DATA_W(DATA_W)) u_mem (
    .clk, .rst_n, .clear,
    .wr_valid(step_valid), .wr_data(step_data),
    .res_valid(rec_valid), .res_addr(curr_state), .res_hit, .res_new(rec_new),
    .overflow, .used, .rd_addr, .rd_data
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      pres_state <= '0;
      next_state <= '0;
      visits     <= '0;
      saved      <= '0;
    end else begin
      if (step_valid) begin
        pres_state <= next_state;
        next_state <= step_state;
      end
      if (rec_valid) visits <= visits + 1'b1;
      if (res_hit)   saved  <= saved + 1'b1;
    end
  end

endmodule
