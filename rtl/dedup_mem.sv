// dedup_mem: the memory-saving store for state outputs. A conventional
// state memory keeps one word per visited state even when several states
// produce the same output. This memory keeps every distinct output word
// only once: a new word is compared against all stored words in parallel
// (pattern matching); on a match the address of the stored copy is
// returned and nothing is written, otherwise the word goes to the next free
// entry and that address is returned. Three visits whose outputs are A, B,
// A therefore occupy two entries, at addresses 1 and 2.
//
// Addresses are 1-based; address 0 means "not stored". When the memory is
// full and a word matches nothing, it is dropped, res_addr is 0 and the
// sticky overflow flag is set. clear empties the memory.
//
// Timing: a write request (wr_valid, wr_data) is answered one cycle later
// with res_valid, res_addr, res_hit (matched a stored word) and res_new
// (was written). A request in the cycle right after another sees the
// earlier word already stored. rd_addr/rd_data read a stored word
// combinationally. The depth (4 words) and the word width (8 bits, the
// width of the example outputs) are defaults chosen for this design.
module dedup_mem #(
  parameter int DEPTH  = 4,
  parameter int DATA_W = 8,
  localparam int AW = $clog2(DEPTH + 1),
  localparam int IXW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              wr_valid,
  input  logic [DATA_W-1:0] wr_data,
  output logic              res_valid,
  output logic [AW-1:0]     res_addr,
  output logic              res_hit,
  output logic              res_new,
  output logic              overflow,
  output logic [AW-1:0]     used,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  match;
  logic              any_match, is_full;
  logic [AW-1:0]     match_addr;

  always_comb begin
    match_addr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      match[i] = (AW'(i) < used) && (mem[i] == wr_data);
    end
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match[i]) match_addr = AW'(i + 1);
    end
    any_match = |match;
    is_full   = (used == AW'(DEPTH));
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !any_match && !is_full && !clear) mem[IXW'(used)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      used      <= '0;
      overflow  <= 1'b0;
      res_valid <= 1'b0;
      res_addr  <= '0;
      res_hit   <= 1'b0;
      res_new   <= 1'b0;
    end else begin
      res_valid <= wr_valid;
      res_hit   <= 1'b0;
      res_new   <= 1'b0;
      if (wr_valid) begin
        if (any_match) begin
          res_addr <= match_addr;
          res_hit  <= 1'b1;
        end else if (!is_full) begin
          res_addr <= used + 1'b1;
          res_new  <= 1'b1;
          used     <= used + 1'b1;
        end else begin
          res_addr <= '0;
          overflow <= 1'b1;
        end
      end
    end
  end

  assign rd_data = (rd_addr != '0 && rd_addr <= AW'(DEPTH)) ? mem[IXW'(rd_addr - 1'b1)] : '0;

  // A stored word is never stored a second time.
  a_onehot_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match));

endmodule
