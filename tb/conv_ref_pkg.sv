// conv_ref_pkg: reference models used by the testbenches, written without
// reference to the RTL structure.
//
//   ref_encode    bit-serial encoder with generators 111 and 101, all-zero
//                 start, returning one symbol pair per message bit as
//                 {g111 output, g101 output}.
//   ref_viterbi   textbook Viterbi decoder over integer metrics with
//                 register-exchange survivor paths. Ties are broken towards
//                 the lower predecessor / final state number, matching the
//                 compare units of the design (a candidate wins unless it is
//                 strictly larger). State numbering: {older bit, newer bit}.
package conv_ref_pkg;

  localparam int MAXN = 16;
  localparam int BIG  = 1000;   // metric of a state that cannot be reached yet

  typedef struct {
    int          pm   [MAXN][4];   // pm[j-1][s]: metric of state s at stage j
    bit          dec  [MAXN][4];   // 1: predecessor with dropped bit 1 kept
    int          final_state;
    int          final_pm;
    bit [MAXN-1:0] bits;           // decoded bits, bits[0] first
    int          path [MAXN];      // survivor state at stage j (index j-1)
  } ref_result_t;

  function automatic int popcount2(bit [1:0] v);
    return int'(v[0]) + int'(v[1]);
  endfunction

  // encode msg[0..n-1]; returns pairs in code[0..n-1]
  function automatic void ref_encode(input bit msg [MAXN], input int n, output bit [1:0] code [MAXN]);
    bit d1, d2;   // previous and older message bit
    d1 = 0; d2 = 0;
    for (int i = 0; i < MAXN; i++) code[i] = '0;
    for (int i = 0; i < n; i++) begin
      code[i] = {msg[i] ^ d1 ^ d2, msg[i] ^ d2};
      d2 = d1;
      d1 = msg[i];
    end
  endfunction

  function automatic ref_result_t ref_viterbi(input bit [1:0] rx [MAXN], input int n);
    ref_result_t r;
    int            cur [4];
    int            nxt [4];
    bit [MAXN-1:0] surv [4];
    bit [MAXN-1:0] nsurv [4];
    int            hist [MAXN][4];  // predecessor chosen for state s at stage j
    for (int s = 0; s < 4; s++) begin
      cur[s]  = (s == 0) ? 0 : BIG;
      surv[s] = '0;
    end
    for (int j = 0; j < n; j++) begin
      for (int t = 0; t < 4; t++) begin
        int best, bestp;
        best = -1; bestp = 0;
        for (int k = 0; k < 2; k++) begin
          int p, m, u;
          bit [1:0] w;
          p = (t >> 1) | (k << 1);     // predecessor: newer bit = t's older bit
          u = t & 1;
          w = {bit'(u ^ (p & 1) ^ (p >> 1)), bit'(u ^ (p >> 1))};
          m = (cur[p] >= BIG) ? BIG : cur[p] + popcount2(w ^ rx[j]);
          if (best < 0 || m < best) begin
            best = m; bestp = p;
          end
        end
        nxt[t]   = best;
        hist[j][t] = bestp;
        r.dec[j][t] = bit'(bestp >> 1);
        nsurv[t] = surv[bestp];
        nsurv[t][j] = bit'(t & 1);
      end
      for (int t = 0; t < 4; t++) begin
        cur[t] = nxt[t];
        surv[t] = nsurv[t];
        r.pm[j][t] = nxt[t];
      end
    end
    r.final_state = 0;
    for (int t = 1; t < 4; t++) if (cur[t] < cur[r.final_state]) r.final_state = t;
    r.final_pm = cur[r.final_state];
    r.bits = surv[r.final_state];
    r.path[n-1] = r.final_state;
    for (int j = n - 1; j > 0; j--) r.path[j-1] = hist[j][r.path[j]];
    return r;
  endfunction

endpackage
