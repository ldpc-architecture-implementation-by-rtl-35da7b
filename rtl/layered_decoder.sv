// layered_decoder: layered belief-propagation LDPC decoder for the 3x7
// matrix of ldpc_pkg, built around a Channel RAM with memory bypassing.
//
// Decoding walks the rows of H one after another (one row = one layer =
// one check node). Two engines work on consecutive layers at once:
//  - the read engine takes, one edge per cycle, the posterior Lambda of each
//    column of its layer, subtracts the layer's old message
//    (Gamma = Lambda - R_old), pushes Gamma into the FIFO and feeds it to
//    the check node unit;
//  - the write engine, one layer behind, pops the Gammas of the previous
//    layer, gets the new messages R_new from the check node unit, adds them
//    (Lambda = Gamma + R_new), stores R_new in the message RAM and hands
//    Lambda on.
// So in the steady state the Channel RAM and the FIFO are read and written
// in every cycle. At the end of every pass over all rows (one iteration)
// the hard decisions are checked against all parity checks; decoding stops
// when they all hold or after MAX_ITER iterations.
//
// Memory bypassing: when the next layer also has a non-null entry in column
// n, the updated Lambda is not written to the Channel RAM. If the read
// engine wants that column in the same cycle, the add-array output goes
// straight to it (forwarding); otherwise it waits in a bypass register for
// the next layer. One bypass saves one RAM write and one RAM read; with the
// default matrix 6 of the 12 column accesses of every iteration are
// bypassed. If the read engine needs a column that the write engine has not
// produced yet, it stalls for that cycle. The read engine finishes a layer
// (hands its row total to the check node's output side) only when the
// write engine is free to take the layer in the next cycle.
//
// Iteration boundary: the read engine does not start layer 0 of the next
// iteration before the parity check of the current one, so no work is
// thrown away when decoding stops. When it stops, the values still held in
// bypass registers are written to the Channel RAM (FLUSH, N cycles) so the
// RAM ends with the final soft output of every column.
//
// Interface: pulse start, then give the N intrinsic LLRs, column 0 first,
// one per cycle with in_valid while in_ready is high. done pulses for one
// cycle when decoding ends; hard_out, success and iterations are then
// valid and stay so until the next start, and soft_addr/soft_data read the
// final soft output combinationally. layer_done pulses one cycle after
// each layer is finished, with layer_idx naming it and hard_out already
// updated. ram_reads, ram_writes and bypasses count Channel RAM accesses
// of the decoding (loading not counted).
//
// Timing: N load cycles, then per iteration the cycles of the overlapped
// schedule plus one check cycle, then N flush cycles. For the default
// matrix an iteration takes 18 cycles (12 reads, one stall, the last
// layer's 4 writes and the check), and done rises 2*N + 18*I + 1 clock
// edges after the edge that samples start (I = iterations run).
// The update equations, the Channel RAM / FIFO / add-array structure, the
// bypass rule and the every-cycle access follow the design; the stall
// interlock, the iteration-boundary wait, the number formats and MAX_ITER
// are this design's choices.
module layered_decoder
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10,
  localparam int IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  llr_t          in_llr,
  output logic          in_ready,
  output logic          busy,
  output logic          done,
  output logic          success,
  output row_t          hard_out,
  output logic [IW-1:0] iterations,
  input  col_t          soft_addr,
  output llr_t          soft_data,
  output logic          layer_done,
  output logic [LW-1:0] layer_idx,
  output logic [15:0]   ram_reads,
  output logic [15:0]   ram_writes,
  output logic [15:0]   bypasses
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_FLUSH} state_t;

  state_t          state;
  logic [IW-1:0]   iter;
  col_t            cnt;          // load / flush column counter
  llr_t            byp_val [N];
  logic [N-1:0]    byp_valid;
  row_t            hd;
  logic            check_now;    // parity check of the finished iteration

  // Read engine
  logic            r_busy;
  logic [LW-1:0]   r_layer;
  logic [KW-1:0]   r_k;
  // Write engine
  logic            w_busy;
  logic [LW-1:0]   w_layer;
  logic [KW-1:0]   w_k;
  row_t            pending;      // columns of the write layer not yet produced

  col_t            rc, wc;
  logic [EW-1:0]   r_edge, w_edge;
  logic [LW-1:0]   w_next;
  logic            r_last, w_last, w_last_layer;

  always_comb begin
    rc           = COLS[r_layer][r_k];
    wc           = COLS[w_layer][w_k];
    r_edge       = EW'(r_layer) * EW'(DC) + EW'(r_k);
    w_edge       = EW'(w_layer) * EW'(DC) + EW'(w_k);
    r_last       = (r_k == KW'(DC - 1));
    w_last       = (w_k == KW'(DC - 1));
    w_last_layer = (w_layer == LW'(M - 1));
    w_next       = w_last_layer ? '0 : w_layer + 1'b1;
  end

  // Engine handshakes
  logic w_go, r_fwd, r_stall, r_go, r_handoff, bypass_wr, r_from_byp;

  always_comb begin
    w_go       = (state == S_RUN) && w_busy;
    r_fwd      = w_go && pending[rc] && (wc == rc);
    r_stall    = pending[rc] && !r_fwd;
    r_go       = (state == S_RUN) && r_busy && !r_stall && (!r_last || !w_busy || w_last);
    r_handoff  = r_go && r_last;
    r_from_byp = !r_fwd && byp_valid[rc];
    bypass_wr  = w_go && H_ROWS[w_next][wc];
  end

  // Channel RAM
  logic  cr_we;
  col_t  cr_waddr, cr_raddr;
  llr_t  cr_wdata, cr_rdata;

  channel_ram #(.DEPTH(N), .WIDTH(LLR_W)) u_chan (
    .clk, .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata),
    .raddr(cr_raddr), .rdata(cr_rdata)
  );

  // Datapath
  msg_t  mr_rdata, r_old, r_new;
  llr_t  lam_rd, gamma_rd, gamma_wr, lam_new;
  logic  fifo_empty, fifo_full;

  assign lam_rd = r_fwd ? lam_new : r_from_byp ? byp_val[rc] : cr_rdata;
  assign r_old  = (iter == '0) ? '0 : mr_rdata;

  msg_ram #(.DEPTH(E), .WIDTH(R_W)) u_msg (
    .clk, .we(w_go), .waddr(w_edge), .wdata(r_new),
    .raddr(r_edge), .rdata(mr_rdata)
  );

  add_array u_add (
    .lam_in(lam_rd), .r_old, .gamma_out(gamma_rd),
    .gamma_in(gamma_wr), .r_new, .lam_out(lam_new)
  );

  gamma_fifo #(.DEPTH(DC), .WIDTH(LLR_W)) u_fifo (
    .clk, .rst_n, .push(r_go), .din(gamma_rd), .pop(w_go),
    .dout(gamma_wr), .empty(fifo_empty), .full(fifo_full)
  );

  check_node_unit u_cnu (
    .clk, .rst_n, .acc_valid(r_go), .acc_first(r_k == '0), .acc_last(r_last),
    .acc_q(gamma_rd), .out_q(gamma_wr), .r_out(r_new)
  );

  always_comb begin
    cr_raddr = (state == S_RUN) ? rc : soft_addr;
    cr_we    = 1'b0;
    cr_waddr = cnt;
    cr_wdata = in_llr;
    unique case (state)
      S_LOAD:  cr_we = in_valid;
      S_RUN: begin
        cr_we    = w_go && !bypass_wr;
        cr_waddr = wc;
        cr_wdata = lam_new;
      end
      S_FLUSH: begin
        cr_we    = byp_valid[cnt];
        cr_wdata = byp_val[cnt];
      end
      default: ;
    endcase
  end

  assign soft_data  = cr_rdata;
  assign in_ready   = (state == S_LOAD);
  assign busy       = (state != S_IDLE);
  assign hard_out   = hd;
  assign iterations = iter;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      iter       <= '0;
      cnt        <= '0;
      byp_valid  <= '0;
      hd         <= '0;
      check_now  <= 1'b0;
      r_busy     <= 1'b0;
      r_layer    <= '0;
      r_k        <= '0;
      w_busy     <= 1'b0;
      w_layer    <= '0;
      w_k        <= '0;
      pending    <= '0;
      done       <= 1'b0;
      success    <= 1'b0;
      layer_done <= 1'b0;
      layer_idx  <= '0;
      ram_reads  <= '0;
      ram_writes <= '0;
      bypasses   <= '0;
      for (int n = 0; n < N; n++) byp_val[n] <= '0;
    end else begin
      done       <= 1'b0;
      layer_done <= 1'b0;
      check_now  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state      <= S_LOAD;
            cnt        <= '0;
            iter       <= '0;
            byp_valid  <= '0;
            pending    <= '0;
            r_busy     <= 1'b0;
            w_busy     <= 1'b0;
            success    <= 1'b0;
            ram_reads  <= '0;
            ram_writes <= '0;
            bypasses   <= '0;
          end
        end
        S_LOAD: begin
          if (in_valid) begin
            hd[cnt] <= in_llr[LLR_W-1];
            cnt     <= cnt + 1'b1;
            if (cnt == col_t'(N - 1)) begin
              state   <= S_RUN;
              r_busy  <= 1'b1;
              r_layer <= '0;
              r_k     <= '0;
            end
          end
        end
        S_RUN: begin
          // write engine
          if (w_go) begin
            hd[wc]      <= lam_new[LLR_W-1];
            pending[wc] <= 1'b0;
            if (bypass_wr) begin
              if (!(r_go && r_fwd)) begin
                byp_val[wc]   <= lam_new;
                byp_valid[wc] <= 1'b1;
              end
            end else begin
              ram_writes <= ram_writes + 1'b1;
            end
            w_k <= w_last ? '0 : w_k + 1'b1;
            if (w_last) begin
              layer_done <= 1'b1;
              layer_idx  <= w_layer;
              w_busy     <= 1'b0;
              if (w_last_layer) check_now <= 1'b1;
            end
          end
          // read engine
          if (r_go) begin
            if (r_fwd || r_from_byp) bypasses <= bypasses + 1'b1;
            else                     ram_reads <= ram_reads + 1'b1;
            if (r_from_byp) byp_valid[rc] <= 1'b0;
            r_k <= r_last ? '0 : r_k + 1'b1;
            if (r_handoff) begin
              w_busy  <= 1'b1;
              w_layer <= r_layer;
              w_k     <= '0;
              pending <= H_ROWS[r_layer];
              if (r_layer == LW'(M - 1)) begin
                r_busy <= 1'b0;
              end else begin
                r_layer <= r_layer + 1'b1;
              end
            end
          end
          // parity check after the last layer of an iteration
          if (check_now) begin
            iter <= iter + 1'b1;
            if (syndrome(hd) == '0 || iter == IW'(MAX_ITER - 1)) begin
              success <= (syndrome(hd) == '0);
              state   <= S_FLUSH;
              cnt     <= '0;
            end else begin
              r_busy  <= 1'b1;
              r_layer <= '0;
              r_k     <= '0;
            end
          end
        end
        S_FLUSH: begin
          if (byp_valid[cnt]) begin
            byp_valid[cnt] <= 1'b0;
            ram_writes     <= ram_writes + 1'b1;
          end
          cnt <= cnt + 1'b1;
          if (cnt == col_t'(N - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The check cycle only comes when both engines are idle.
  a_check_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 check_now |-> (!r_busy && !w_busy));
  // A read never takes a value the write engine has not produced yet.
  a_no_stale_read: assert property (@(posedge clk) disable iff (!rst_n)
                                    r_go |-> (!pending[rc] || r_fwd));
  // The write engine always has its layer's Gamma in the FIFO, the whole
  // row of it when it starts the layer.
  a_fifo_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 w_go |-> !fifo_empty);
  a_fifo_row: assert property (@(posedge clk) disable iff (!rst_n)
                               (w_go && w_k == '0) |-> fifo_full);
  // A bypassed value is always consumed by the very next layer.
  a_bypass_consumed: assert property (@(posedge clk) disable iff (!rst_n)
                                      check_now |-> (byp_valid & ~H_ROWS[0]) == '0);

endmodule
