// Reference model of the 8x8 Dadda multiplier for the testbenches.
//
// A procedural, bit-list model of the two-stage reduction written separately
// from the RTL: each column is a queue of bits, and every half adder, full
// adder and 4-2 compressor pops its inputs from the column and pushes its
// outputs where they belong. The compressor functions are given here as
// arithmetic rules and truth-table cases rather than gate equations.
package dadda_ref_pkg;

  // kind: 0 exact, 1 Design 1, 2 Design 2 (same encoding as the RTL enum)

  // 4-2 compressor: returns {cout, carry, sum}
  function automatic logic [2:0] ref_c42(input int kind, input logic x1, x2, x3, x4, cin);
    int n12, n34, tot;
    logic s, ca, co;
    n12 = int'(x1) + int'(x2);
    n34 = int'(x3) + int'(x4);
    tot = n12 + n34 + int'(cin);
    case (kind)
      0: begin
        co = (int'(x1) + int'(x2) + int'(x3)) >= 2;
        s  = tot[0];
        ca = ((tot - int'(co) * 2) >= 2);
      end
      1: begin
        ca = cin;
        co = (n12 > 0) && (n34 > 0);
        // sum is 1 unless cin is set or both pairs hold exactly one 1
        s  = !cin && !((n12 == 1) && (n34 == 1));
      end
      default: begin
        co = 1'b0;
        ca = (n12 > 0) && (n34 > 0);
        s  = !((n12 == 1) && (n34 == 1));
      end
    endcase
    return {co, ca, s};
  endfunction

  // Reduction of a*b to two 15-bit rows
  function automatic void ref_rows(input int kind, input logic [7:0] a, b,
                          output logic [14:0] r0, output logic [14:0] r1);
    logic col [15][$];
    logic s1  [15][$];
    logic cq  [15][$];   // carries entering a column
    logic sq  [15][$];   // sums produced in a column
    logic [2:0] o;
    logic x [8];
    logic co_prev;
    logic [14:0] ca2;
    for (int k = 0; k < 15; k++)
      for (int j = 0; j < 8; j++)
        if (k - j >= 0 && k - j < 8) col[k].push_back(a[k-j] & b[j]);

    // ---- stage 1 ----
    // HA col 4
    x[0] = col[4].pop_front(); x[1] = col[4].pop_front();
    cq[5].push_back(x[0] & x[1]);
    sq[4].push_back(x[0] ^ x[1]);
    // compressor rows: {column, cin source} handled in order
    // C5
    for (int i = 0; i < 4; i++) x[i] = col[5].pop_front();
    o = ref_c42(kind, x[0], x[1], x[2], x[3], 1'b0);
    sq[5].push_back(o[0]); cq[6].push_back(o[1]); co_prev = o[2];
    // C6 (cin from C5), HA6
    for (int i = 0; i < 4; i++) x[i] = col[6].pop_front();
    o = ref_c42(kind, x[0], x[1], x[2], x[3], co_prev);
    sq[6].push_back(o[0]); cq[7].push_back(o[1]); co_prev = o[2];
    x[0] = col[6].pop_front(); x[1] = col[6].pop_front();
    sq[6].push_back(x[0] ^ x[1]); cq[7].push_back(x[0] & x[1]);
    begin
      logic co7a, co7b, ca7a, co8a, co8b, co9;
      // C7a (cin from C6), C7b (cin 0)
      for (int i = 0; i < 4; i++) x[i] = col[7].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], x[3], co_prev);
      sq[7].push_back(o[0]); ca7a = o[1]; co7a = o[2];
      for (int i = 0; i < 4; i++) x[i] = col[7].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], x[3], 1'b0);
      sq[7].push_back(o[0]); cq[8].push_back(o[1]); co7b = o[2];
      // C8a (cin C7a), C8b (3 pp + C7a carry, cin C7b)
      for (int i = 0; i < 4; i++) x[i] = col[8].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], x[3], co7a);
      sq[8].push_back(o[0]); cq[9].push_back(o[1]); co8a = o[2];
      for (int i = 0; i < 3; i++) x[i] = col[8].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], ca7a, co7b);
      sq[8].push_back(o[0]); cq[9].push_back(o[1]); co8b = o[2];
      // C9 (cin C8a), FA9 (2 pp + C8b cout)
      for (int i = 0; i < 4; i++) x[i] = col[9].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], x[3], co8a);
      sq[9].push_back(o[0]); cq[10].push_back(o[1]); co9 = o[2];
      x[0] = col[9].pop_front(); x[1] = col[9].pop_front();
      sq[9].push_back(x[0] ^ x[1] ^ co8b);
      cq[10].push_back((int'(x[0]) + int'(x[1]) + int'(co8b)) >= 2);
      // C10 (cin C9)
      for (int i = 0; i < 4; i++) x[i] = col[10].pop_front();
      o = ref_c42(kind, x[0], x[1], x[2], x[3], co9);
      sq[10].push_back(o[0]); cq[11].push_back(o[1]); co_prev = o[2];
      // FA11 (2 pp + C10 cout)
      x[0] = col[11].pop_front(); x[1] = col[11].pop_front();
      sq[11].push_back(x[0] ^ x[1] ^ co_prev);
      cq[12].push_back((int'(x[0]) + int'(x[1]) + int'(co_prev)) >= 2);
    end
    // column order after stage 1: leftover partial products (row order),
    // then carries from the column below, then sums made in this column
    for (int k = 0; k < 15; k++) begin
      while (col[k].size() > 0) s1[k].push_back(col[k].pop_front());
      while (cq[k].size()  > 0) s1[k].push_back(cq[k].pop_front());
      while (sq[k].size()  > 0) s1[k].push_back(sq[k].pop_front());
    end

    // ---- stage 2 ----
    r0 = '0; r1 = '0;
    for (int k = 0; k < 15; k++)
      if (s1[k].size() > 4) $error("reference: column %0d has %0d bits after stage 1", k, s1[k].size());
    r0[0] = s1[0][0];
    r0[1] = s1[1][0]; r1[1] = s1[1][1];
    // HA col 2 on two of the three bits, the third passes
    r0[2] = s1[2][0] ^ s1[2][1];
    r1[3] = s1[2][0] & s1[2][1];
    r1[2] = s1[2][2];
    co_prev = 1'b0;
    for (int k = 3; k <= 12; k++) begin
      for (int i = 0; i < 4; i++) x[i] = (i < s1[k].size()) ? s1[k][i] : 1'b0;
      o = ref_c42(kind, x[0], x[1], x[2], x[3], co_prev);
      r0[k] = o[0]; ca2[k] = o[1]; co_prev = o[2];
      if (k >= 4) r1[k] = ca2[k-1];
    end
    r0[13] = s1[13][0] ^ s1[13][1] ^ co_prev;
    r1[13] = ca2[12];
    r0[14] = s1[14][0];
    r1[14] = (int'(s1[13][0]) + int'(s1[13][1]) + int'(co_prev)) >= 2;
  endfunction

  function automatic logic [15:0] ref_mult(input int kind, input logic [7:0] a, b);
    logic [14:0] r0, r1;
    ref_rows(kind, a, b, r0, r1);
    return 16'(r0) + 16'(r1);
  endfunction

endpackage
