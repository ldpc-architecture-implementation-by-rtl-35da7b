// ldpc_pkg: shared constants, types and functions of the layered LDPC decoder.
//
// The parity-check matrix is the 3x7 example matrix of the design:
//
//        col 0 1 2 3 4 5 6
//   row 0:   1 1 1 0 0 1 0
//   row 1:   1 0 1 1 1 0 0
//   row 2:   1 1 0 1 0 0 1
//
// Each row is one layer (one check node); every row has four non-null
// entries, so there are 12 edges in all. The columns of every layer are
// derived from the matrix by a constant function, so changing H_ROWS (and
// M, N, DC to match) is all it takes to decode another small code.
//
// Number format (a choice of this design, the matrix itself is the only
// size given): soft values are two's complement with two fraction bits,
// LLR_W = 8 bits for intrinsic values, posterior values and Gamma, and
// R_W = 6 bits for check-to-variable messages. The check node works in the
// Phi domain, Phi(x) = -ln(tanh(x/2)), with 5-bit magnitudes in and out.
package ldpc_pkg;

  localparam int M  = 3;            // check nodes = layers
  localparam int N  = 7;            // variable nodes = columns
  localparam int DC = 4;            // non-null entries per row
  localparam int E  = M * DC;       // edges (non-null entries)

  localparam int LLR_W = 8;         // intrinsic, posterior and Gamma width
  localparam int R_W   = 6;         // check-to-variable message width
  localparam int MAG_W = 5;         // Phi-domain magnitude width
  localparam int MAG_MAX = (1 << MAG_W) - 1;
  localparam int SUM_W = MAG_W + $clog2(DC) + 1;

  localparam int CW = $clog2(N);    // column index width
  localparam int LW = (M > 1) ? $clog2(M) : 1;  // layer index width
  localparam int KW = (DC > 1) ? $clog2(DC) : 1; // position-in-row width
  localparam int EW = $clog2(E);    // edge index width

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [R_W-1:0]   msg_t;
  typedef logic [MAG_W-1:0]        mag_t;
  typedef logic [CW-1:0]           col_t;

  // Row m of H, bit n set when column n takes part in check m.
  typedef logic [N-1:0] row_t;
  localparam row_t H_ROWS [M] = '{7'b0100111, 7'b0011101, 7'b1001011};

  // COLS[m][k]: column of the k-th non-null entry of row m.
  typedef logic [M-1:0][DC-1:0][CW-1:0] col_tab_t;

  function automatic col_tab_t make_cols();
    col_tab_t t = '0;
    int k;
    for (int m = 0; m < M; m++) begin
      k = 0;
      for (int n = 0; n < N; n++) begin
        if (H_ROWS[m][n] && k < DC) begin
          t[m][k] = col_t'(n);
          k++;
        end
      end
    end
    return t;
  endfunction

  localparam col_tab_t COLS = make_cols();

  // Phi(x) = -ln(tanh(x/2)) on magnitudes with two fraction bits:
  // phi(m) = min(31, round(4 * Phi(m/4))), phi(0) = 31 stands for infinity.
  // Phi is its own inverse, so the same table serves both directions.
  function automatic mag_t phi(mag_t m);
    case (m)
      5'd0:    return 5'd31;
      5'd1:    return 5'd8;
      5'd2:    return 5'd6;
      5'd3:    return 5'd4;
      5'd4:    return 5'd3;
      5'd5:    return 5'd2;
      5'd6:    return 5'd2;
      5'd7:    return 5'd1;
      5'd8:    return 5'd1;
      5'd9:    return 5'd1;
      5'd10:   return 5'd1;
      5'd11:   return 5'd1;
      default: return 5'd0;
    endcase
  endfunction

  // Saturated magnitude of a soft value, clipped to the Phi table range.
  function automatic mag_t sat_mag(llr_t v);
    logic [LLR_W-1:0] a;
    a = v[LLR_W-1] ? LLR_W'(-v) : LLR_W'(v);
    if (v == {1'b1, {(LLR_W-1){1'b0}}}) return mag_t'(MAG_MAX);
    return (a > LLR_W'(MAG_MAX)) ? mag_t'(MAG_MAX) : mag_t'(a);
  endfunction

  // Parity check of a hard-decision word: bit m is 1 when check m fails.
  function automatic logic [M-1:0] syndrome(row_t hd);
    logic [M-1:0] s;
    for (int m = 0; m < M; m++) s[m] = ^(hd & H_ROWS[m]);
    return s;
  endfunction

endpackage
