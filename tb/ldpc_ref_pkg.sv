// ldpc_ref_pkg: testbench reference for the decoder: encoder, noisy channel
// and a plain layered min-sum model.
//
// make_codeword draws random information bits and computes the parity blocks
// by accumulation in original block-row order: parity block m equals parity
// block m-1 plus the information contributions of original row m, where
// original row m is layer m/2 (m even) or 6 + (m-1)/2 (m odd).
// unsatisfied() counts the parity checks a word violates.
// channel() maps bit b to amplitude 1-2b, adds noise of deviation sigma (sum
// of twelve uniform variables, an approximation of a Gaussian) and quantises
// to 6 bits with 8 steps per unit amplitude.
// ref_decode() runs the layered min-sum algorithm sequentially in natural
// variable order, with no rotation and no pipeline: L = sat8(P - R_old),
// R = 0.75 x (sign product x minimum over the other edges of |L| clipped to
// 31), with the scaling done as (m>>1)+(m>>2), and P = sat8(L + R).
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  function automatic int satv(int v, int m);
    if (v > m) return m;
    if (v < -m) return -m;
    return v;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int var_of(int l, int s, int r);
    return int'(BASE[l][s].col) * Q + (r + int'(BASE[l][s].shift)) % Q;
  endfunction

  task automatic make_codeword(output bit cw [N]);
    bit par [NCOL-KCOL][Q];
    for (int v = 0; v < K; v++) cw[v] = 1'($urandom_range(0, 1));
    for (int m = 0; m < NCOL - KCOL; m++) begin
      int l;
      l = (m % 2 == 0) ? m / 2 : LAYERS / 2 + (m - 1) / 2;
      for (int r = 0; r < Q; r++) begin
        bit acc;
        acc = (m > 0) ? par[m-1][r] : 1'b0;
        for (int s = 0; s < DEG; s++)
          if (int'(BASE[l][s].col) < KCOL) acc ^= cw[var_of(l, s, r)];
        par[m][r] = acc;
      end
    end
    for (int m = 0; m < NCOL - KCOL; m++)
      for (int r = 0; r < Q; r++) cw[K + m * Q + r] = par[m][r];
  endtask

  function automatic int unsatisfied(const ref bit cw [N]);
    int bad;
    bad = 0;
    for (int l = 0; l < LAYERS; l++)
      for (int r = 0; r < Q; r++) begin
        bit x;
        x = 1'b0;
        for (int s = 0; s < DEG; s++) x ^= cw[var_of(l, s, r)];
        if (x) bad++;
      end
    return bad;
  endfunction

  task automatic channel(const ref bit cw [N], input real sigma, output int ch [N]);
    for (int v = 0; v < N; v++) begin
      real nz, y;
      nz = 0.0;
      for (int k = 0; k < 12; k++) nz += real'($urandom_range(0, 65535)) / 65536.0;
      nz -= 6.0;
      y  = (cw[v] ? -1.0 : 1.0) + sigma * nz;
      ch[v] = satv(int'(y * 8.0), 31);
    end
  endtask

  task automatic ref_decode(const ref int ch [N], input int iters, output int p [N]);
    int rm [LAYERS][DEG][Q];
    for (int v = 0; v < N; v++) p[v] = ch[v];
    for (int l = 0; l < LAYERS; l++)
      for (int s = 0; s < DEG; s++)
        for (int r = 0; r < Q; r++) rm[l][s][r] = 0;
    for (int it = 0; it < iters; it++) begin
      for (int l = 0; l < LAYERS; l++) begin
        for (int r = 0; r < Q; r++) begin
          int lv [DEG];
          int vi [DEG];
          for (int s = 0; s < DEG; s++) begin
            vi[s] = var_of(l, s, r);
            lv[s] = satv(p[vi[s]] - rm[l][s][r], 127);
          end
          for (int s = 0; s < DEG; s++) begin
            int m, sg, rn;
            m = 1000; sg = 0;
            for (int t = 0; t < DEG; t++) begin
              if (t != s) begin
                if (satv(iabs(lv[t]), 31) < m) m = satv(iabs(lv[t]), 31);
                if (lv[t] < 0) sg ^= 1;
              end
            end
            rn = (m >> 1) + (m >> 2);
            if (sg) rn = -rn;
            rm[l][s][r] = rn;
            p[vi[s]] = satv(lv[s] + rn, 127);
          end
        end
      end
    end
  endtask

endpackage
