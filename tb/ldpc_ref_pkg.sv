// ldpc_ref_pkg: reference model used by the testbenches. It decodes with
// plain integer arithmetic and floating-point Phi, independently of the
// RTL's tables, using the same layered schedule and number formats
// (soft values: 8-bit two's complement with two fraction bits, messages
// of at most 31 = 7.75 in magnitude). It also counts the Channel RAM
// reads, writes and bypasses the bypass rule implies.
package ldpc_ref_pkg;

  localparam int RM = 3;
  localparam int RN = 7;
  localparam int MAX_LAYERS = 256;

  // The example parity-check matrix, row by row.
  localparam bit HREF [RM][RN] = '{'{1, 1, 1, 0, 0, 1, 0},
                                   '{1, 0, 1, 1, 1, 0, 0},
                                   '{1, 1, 0, 1, 0, 0, 1}};

  typedef struct {
    int           lam [RN];
    bit [RN-1:0]  hd;
    int           iters;
    bit           ok;
    int           reads;
    int           writes;
    int           byps;
    int           layers;
    bit [RN-1:0]  layer_hd [MAX_LAYERS];
    int           layer_id [MAX_LAYERS];
  } ref_result_t;

  // round(4 * -ln(tanh(x/2))) for x = m/4, limited to 31; 31 for m = 0.
  function automatic int phi_ref(int m);
    real x, v;
    if (m <= 0) return 31;
    x = m / 4.0;
    v = -$ln($tanh(x / 2.0)) * 4.0;
    if (v >= 31.0) return 31;
    return int'(v);
  endfunction

  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int mag31(int v);
    int a;
    a = (v < 0) ? -v : v;
    return (a > 31) ? 31 : a;
  endfunction

  function automatic bit [RM-1:0] synd(bit [RN-1:0] hd);
    bit [RM-1:0] s;
    for (int m = 0; m < RM; m++) begin
      s[m] = 1'b0;
      for (int n = 0; n < RN; n++) if (HREF[m][n]) s[m] ^= hd[n];
    end
    return s;
  endfunction

  // Codeword from four data bits: c0..c3 free, c4, c5, c6 from the checks.
  function automatic bit [RN-1:0] encode(bit [3:0] d);
    bit [RN-1:0] c;
    c[3:0] = d;
    c[5] = d[0] ^ d[1] ^ d[2];
    c[4] = d[0] ^ d[2] ^ d[3];
    c[6] = d[0] ^ d[1] ^ d[3];
    return c;
  endfunction

  function automatic ref_result_t ref_decode(int lam_in [RN], int max_iter);
    ref_result_t r;
    int R [RM][RN];
    int G [RN];
    int newR [RN];
    int prev_m, next_m, s, sg, mag;
    r.reads = 0; r.writes = 0; r.byps = 0; r.layers = 0; r.ok = 0; r.iters = 0;
    for (int m = 0; m < RM; m++) for (int n = 0; n < RN; n++) R[m][n] = 0;
    for (int n = 0; n < RN; n++) begin
      r.lam[n] = lam_in[n];
      r.hd[n]  = (lam_in[n] < 0);
    end
    for (int i = 0; i < MAX_LAYERS; i++) begin
      r.layer_hd[i] = '0;
      r.layer_id[i] = 0;
    end
    prev_m = -1;
    for (int it = 0; it < max_iter; it++) begin
      for (int m = 0; m < RM; m++) begin
        next_m = (m + 1) % RM;
        for (int n = 0; n < RN; n++) if (HREF[m][n]) begin
          if (prev_m >= 0 && HREF[prev_m][n]) r.byps++;
          else r.reads++;
          if (!HREF[next_m][n]) r.writes++;
          G[n] = sat(r.lam[n] - R[m][n], 8);
        end
        for (int n = 0; n < RN; n++) if (HREF[m][n]) begin
          s = 0; sg = 0;
          for (int j = 0; j < RN; j++) if (HREF[m][j] && j != n) begin
            s += phi_ref(mag31(G[j]));
            sg ^= (G[j] < 0) ? 1 : 0;
          end
          mag = phi_ref((s > 31) ? 31 : s);
          newR[n] = (sg != 0) ? -mag : mag;
        end
        for (int n = 0; n < RN; n++) if (HREF[m][n]) begin
          R[m][n]  = newR[n];
          r.lam[n] = sat(G[n] + newR[n], 8);
          r.hd[n]  = (r.lam[n] < 0);
        end
        r.layer_hd[r.layers] = r.hd;
        r.layer_id[r.layers] = m;
        r.layers++;
        prev_m = m;
      end
      r.iters = it + 1;
      if (synd(r.hd) == '0) begin
        r.ok = 1;
        break;
      end
    end
    // Values of the last layer that were held for layer 0 are written at the end.
    for (int n = 0; n < RN; n++) if (HREF[RM-1][n] && HREF[0][n]) r.writes++;
    return r;
  endfunction

endpackage
