// check_node_unit: the check node process of belief propagation, done
// serially over the DC edges of one row, with two register sets so that
// one row can be accumulated while the previous row's messages are output.
//
// Accumulate side (acc_valid): for each Gamma (the variable-to-check
// message Q of one edge) the unit adds Phi(|Q|) into a running sum and
// XORs the sign into a running sign; acc_first starts a new row. With
// acc_last on the row's final edge, the finished row total (including that
// edge) is copied to the output registers at the same clock edge.
// Output side: for an edge's Gamma on out_q it returns, combinationally
// from the output registers,
//   |R| = Phi( sum - Phi(|Q|) )         (magnitude over all other edges)
//   sgn(R) = row sign XOR sgn(Q)        (sign product over all other edges)
// which is the exact-sum form of the check update, with the own edge left
// out by subtraction. Phi(x) = -ln(tanh(x/2)) is a 32-entry table in
// ldpc_pkg; its input is the magnitude saturated to 31 (7.75), and its
// output, also at most 31, is the message magnitude. The update equations
// follow the design; the quantisation and the serial, double-registered
// organisation are this design's choices.
module check_node_unit
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic acc_valid,
  input  logic acc_first,
  input  logic acc_last,
  input  llr_t acc_q,
  input  llr_t out_q,
  output msg_t r_out
);

  logic [SUM_W-1:0] sum_a, sum_o, sum_next;
  logic             sign_a, sign_o, sign_next;

  always_comb begin
    sum_next  = (acc_first ? '0 : sum_a) + SUM_W'(phi(sat_mag(acc_q)));
    sign_next = (acc_first ? 1'b0 : sign_a) ^ acc_q[LLR_W-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_a  <= '0;
      sign_a <= 1'b0;
      sum_o  <= '0;
      sign_o <= 1'b0;
    end else if (acc_valid) begin
      sum_a  <= sum_next;
      sign_a <= sign_next;
      if (acc_last) begin
        sum_o  <= sum_next;
        sign_o <= sign_next;
      end
    end
  end

  logic [SUM_W-1:0] ext;
  mag_t             ext_mag, r_mag;
  logic             r_sign;

  always_comb begin
    ext     = sum_o - SUM_W'(phi(sat_mag(out_q)));
    ext_mag = (ext > SUM_W'(MAG_MAX)) ? mag_t'(MAG_MAX) : mag_t'(ext);
    r_mag   = phi(ext_mag);
    r_sign  = sign_o ^ out_q[LLR_W-1];
    r_out   = r_sign ? -msg_t'({1'b0, r_mag}) : msg_t'({1'b0, r_mag});
  end

endmodule
