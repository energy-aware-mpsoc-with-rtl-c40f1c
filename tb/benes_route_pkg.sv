`timescale 1ns/1ps
// Testbench helpers for the Benes network: the looping algorithm, which
// finds switch settings that realise any permutation, and a reference
// evaluation of a set of switch modes. Switch s,i of the reference works on
// the same numbering as the RTL: column s, switch i at wire positions 2i and
// 2i+1 of that column; a sub-network of size n at base position b spans
// positions b..b+n-1 of its columns.
package benes_route_pkg;
  import mpsoc_pkg::*;

  localparam int MAXN = 64;
  localparam int MAXS = 11;

  typedef int unsigned perm_t [MAXN];
  typedef sw_mode_e    modes_t [MAXS][MAXN/2];

  // Route permutation perm (input -> output, local numbering 0..n-1) through
  // the sub-network of size n whose first column is col and first wire base.
  function automatic void route(input int n, input int col, input int base,
                                input perm_t perm, inout modes_t m);
    perm_t inv, up, lo;
    int    sub [MAXN];
    int    last;
    last = col + 2 * $clog2(n) - 2;
    if (n == 2) begin
      m[col][base/2] = (perm[0] == 0) ? SW_STRAIGHT : SW_CROSS;
      return;
    end
    for (int k = 0; k < n; k++) begin
      inv[perm[k]] = k;
      sub[k] = -1;
    end
    for (int start = 0; start < n; start++) begin
      int x;
      x = start;
      while (sub[x] == -1) begin
        sub[x]     = 0;
        sub[x ^ 1] = 1;
        x = int'(inv[perm[x ^ 1] ^ 1]);
      end
    end
    for (int i = 0; i < n / 2; i++) begin
      int u, l;
      u = (sub[2*i] == 0) ? 2 * i : 2 * i + 1;
      l = u ^ 1;
      m[col][(base + 2 * i) / 2] = (u == 2 * i) ? SW_STRAIGHT : SW_CROSS;
      up[i] = perm[u] / 2;
      lo[i] = perm[l] / 2;
    end
    for (int j = 0; j < n / 2; j++) begin
      // Output switch j: port 0 from the upper sub-network's output j.
      int src_up;
      src_up = int'(inv[2 * j]);
      m[last][(base + 2 * j) / 2] = (sub[src_up] == 0) ? SW_STRAIGHT : SW_CROSS;
    end
    route(n / 2, col + 1, base, up, m);
    route(n / 2, col + 1, base + n / 2, lo, m);
  endfunction

  // For every output, the input that reaches it under modes m (-1: none).
  function automatic void evaluate(input int n, input modes_t m, output int src [MAXN]);
    int cur [MAXN];
    int nxt [MAXN];
    int s_cnt;
    s_cnt = 2 * $clog2(n) - 1;
    for (int p = 0; p < n; p++) cur[p] = p;
    for (int s = 0; s < s_cnt; s++) begin
      for (int i = 0; i < n / 2; i++) begin
        unique case (m[s][i])
          SW_STRAIGHT: begin nxt[2*i] = cur[2*i];   nxt[2*i+1] = cur[2*i+1]; end
          SW_CROSS:    begin nxt[2*i] = cur[2*i+1]; nxt[2*i+1] = cur[2*i];   end
          SW_BCAST0:   begin nxt[2*i] = cur[2*i];   nxt[2*i+1] = cur[2*i];   end
          default:     begin nxt[2*i] = cur[2*i+1]; nxt[2*i+1] = cur[2*i+1]; end
        endcase
      end
      if (s < s_cnt - 1)
        for (int p = 0; p < n; p++) cur[benes_link(n, s, p)] = nxt[p];
      else
        for (int p = 0; p < n; p++) cur[p] = nxt[p];
    end
    for (int p = 0; p < n; p++) src[p] = cur[p];
  endfunction


  // Ready seen at every input under modes m for the given output readies:
  // a path that a broadcast switch drops is never ready.
  function automatic void evaluate_ready(input int n, input modes_t m,
                                         input bit out_rdy [MAXN], output bit in_rdy [MAXN]);
    bit ro [MAXN];
    bit ri [MAXN];
    int s_cnt;
    s_cnt = 2 * $clog2(n) - 1;
    for (int p = 0; p < n; p++) ro[p] = out_rdy[p];
    for (int s = s_cnt - 1; s >= 0; s--) begin
      if (s < s_cnt - 1)
        for (int p = 0; p < n; p++) ro[p] = ri[benes_link(n, s, p)];
      for (int i = 0; i < n / 2; i++) begin
        unique case (m[s][i])
          SW_STRAIGHT: begin ri[2*i] = ro[2*i];   ri[2*i+1] = ro[2*i+1]; end
          SW_CROSS:    begin ri[2*i] = ro[2*i+1]; ri[2*i+1] = ro[2*i];   end
          SW_BCAST0:   begin ri[2*i] = ro[2*i] && ro[2*i+1]; ri[2*i+1] = 0; end
          default:     begin ri[2*i] = 0; ri[2*i+1] = ro[2*i] && ro[2*i+1]; end
        endcase
      end
    end
    for (int p = 0; p < n; p++) in_rdy[p] = ri[p];
  endfunction

  // A random permutation of 0..n-1 (Fisher-Yates).
  function automatic perm_t random_perm(input int n);
    perm_t p;
    for (int k = 0; k < n; k++) p[k] = k;
    for (int k = n - 1; k > 0; k--) begin
      int j;
      int unsigned t;
      j = int'($urandom_range(k, 0));
      t = p[k]; p[k] = p[j]; p[j] = t;
    end
    return p;
  endfunction
endpackage
