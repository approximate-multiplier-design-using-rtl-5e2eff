// Reference models shared by the testbenches. They are written from the
// compressors' published truth table and equations, and from the reduction
// schedule described in the multiplier headers, as plain behavioural code on
// bit lists, so that they do not reuse any RTL module.
package mult_ref_pkg;

  // Published truth table of the high-speed compressor, value 2*CARRY+SUM,
  // indexed by {A1,A2,A3,A4} with A1 the most significant index bit.
  localparam int HS_TABLE [16] = '{0, 1, 1, 1, 2, 2, 2, 3, 2, 2, 2, 3, 2, 3, 3, 3};

  typedef enum int {K_EXACT, K_HS, K_NOVEL} kind_e;

  // {carry, sum} of the high-speed (and dual-stage pair) compressor;
  // a1..a4 are the inputs in order.
  function automatic logic [1:0] hs_ref(input logic a1, a2, a3, a4);
    return 2'(HS_TABLE[{a1, a2, a3, a4}]);
  endfunction

  // {carry, sum} of the new compressor: exact bit count, but 4 becomes 2.
  function automatic logic [1:0] novel_ref(input logic a1, a2, a3, a4);
    int n;
    n = int'(a1) + int'(a2) + int'(a3) + int'(a4);
    return (n == 4) ? 2'b10 : 2'(n);
  endfunction

  function automatic logic maj(input logic x, y, w);
    return (int'(x) + int'(y) + int'(w)) >= 2;
  endfunction

  function automatic kind_e region(input bit is16, input bit m8_dual, input int col);
    if (!is16) return m8_dual ? K_HS : K_NOVEL;
    if (col >= 18) return K_EXACT;
    return K_HS;  // dual-stage pair and high-speed compute the same function
  endfunction

  localparam int MAXC = 36;
  localparam int MAXH = 40;

  // Approximate product of the n x n tree (n = 8 or 16) for operands a, b;
  // m8_dual selects the dual-stage compressors of the 8x8 tree.
  function automatic longint unsigned ref_mult(input bit is16, input longint unsigned a,
                                               input longint unsigned b, input bit m8_dual = 1'b0);
    int n, nc, nst;
    int tg [3];
    logic pool [MAXC][MAXH];
    int   pn   [MAXC];
    logic nxt  [MAXC][MAXH];
    int   nn   [MAXC];
    logic coq  [MAXC+1][MAXH];
    int   con  [MAXC+1];
    logic caq  [MAXC+1][MAXH];
    int   can  [MAXC+1];
    logic cur  [MAXH];
    logic sums [MAXH];
    int   curn, hd, sn, excess;
    logic s_mid, t1, t2;
    logic [1:0] r;
    kind_e k;
    longint unsigned x, y;

    n   = is16 ? 16 : 8;
    nc  = 2 * n + 2;
    nst = is16 ? 3 : 2;
    tg  = is16 ? '{8, 4, 2} : '{4, 2, 0};
    for (int c = 0; c < MAXC; c++) pn[c] = 0;
    for (int c = 0; c < 2 * n - 1; c++)
      for (int i = 0; i < n; i++)
        if (c - i >= 0 && c - i < n) begin
          pool[c][pn[c]] = b[i] & a[c-i];
          pn[c]++;
        end

    for (int s = 0; s < nst; s++) begin
      for (int c = 0; c <= MAXC; c++) begin con[c] = 0; can[c] = 0; end
      for (int c = 0; c < nc; c++) begin
        curn = 0;
        for (int i = 0; i < con[c]; i++) begin cur[curn] = coq[c][i]; curn++; end
        for (int i = 0; i < pn[c]; i++) begin cur[curn] = pool[c][i]; curn++; end
        hd = 0; sn = 0;
        excess = curn + can[c] - tg[s];
        k = region(is16, m8_dual, c);
        while (excess > 0) begin
          if (k == K_EXACT && excess >= 4 && curn - hd >= 5) begin
            // cin = cur[hd], A1..A4 = cur[hd+1..hd+4]; first adder takes A1..A3
            s_mid = cur[hd+1] ^ cur[hd+2] ^ cur[hd+3];
            coq[c+1][con[c+1]] = maj(cur[hd+1], cur[hd+2], cur[hd+3]); con[c+1]++;
            sums[sn] = s_mid ^ cur[hd+4] ^ cur[hd]; sn++;
            caq[c+1][can[c+1]] = maj(s_mid, cur[hd+4], cur[hd]); can[c+1]++;
            hd += 5; excess -= 4;
          end else if (excess >= 3 && curn - hd >= 4) begin
            if (k == K_EXACT) begin
              s_mid = cur[hd] ^ cur[hd+1] ^ cur[hd+2];
              coq[c+1][con[c+1]] = maj(cur[hd], cur[hd+1], cur[hd+2]); con[c+1]++;
              sums[sn] = s_mid ^ cur[hd+3]; sn++;
              caq[c+1][can[c+1]] = s_mid & cur[hd+3]; can[c+1]++;
            end else begin
              r = (k == K_HS) ? hs_ref(cur[hd], cur[hd+1], cur[hd+2], cur[hd+3])
                              : novel_ref(cur[hd], cur[hd+1], cur[hd+2], cur[hd+3]);
              sums[sn] = r[0]; sn++;
              caq[c+1][can[c+1]] = r[1]; can[c+1]++;
            end
            hd += 4; excess -= 3;
          end else if (excess >= 2 && curn - hd >= 3) begin
            t1 = cur[hd]; t2 = cur[hd+1];
            sums[sn] = t1 ^ t2 ^ cur[hd+2]; sn++;
            caq[c+1][can[c+1]] = maj(t1, t2, cur[hd+2]); can[c+1]++;
            hd += 3; excess -= 2;
          end else begin
            sums[sn] = cur[hd] ^ cur[hd+1]; sn++;
            caq[c+1][can[c+1]] = cur[hd] & cur[hd+1]; can[c+1]++;
            hd += 2; excess -= 1;
          end
        end
        nn[c] = 0;
        for (int i = 0; i < can[c]; i++) begin nxt[c][nn[c]] = caq[c][i]; nn[c]++; end
        for (int i = 0; i < sn; i++)     begin nxt[c][nn[c]] = sums[i];   nn[c]++; end
        for (int i = hd; i < curn; i++)  begin nxt[c][nn[c]] = cur[i];    nn[c]++; end
      end
      for (int c = 0; c < nc; c++) begin
        pn[c] = nn[c];
        for (int i = 0; i < nn[c]; i++) pool[c][i] = nxt[c][i];
      end
    end

    x = 0; y = 0;
    for (int c = 0; c < nc; c++) begin
      if (pn[c] > 0) x[c] = pool[c][0];
      if (pn[c] > 1) y[c] = pool[c][1];
    end
    return x + y;
  endfunction

endpackage
