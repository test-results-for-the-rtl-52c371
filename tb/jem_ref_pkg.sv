// jem_ref_pkg: behavioural reference models used by the JEM testbenches.
//
// Written independently of the RTL, as plain loops over integers: window
// sums of the jet algorithm, the local-maximum rule, thresholds and
// multiplicities; Et/Ex/Ey with coefficients computed from $cos/$sin; the
// quad-linear code with odd parity. Testbenches compare the RTL with them.
package jem_ref_pkg;

  typedef int je_arr_t [11][7];

  function automatic int sumwin(je_arr_t a, int p0, int e0, int n);
    int s = 0;
    for (int p = p0; p < p0 + n; p++)
      for (int e = e0; e < e0 + n; e++) s += a[p][e];
    return s;
  endfunction

  // results of the jet algorithm for one crossing
  typedef struct {
    int mult [8];
    bit is_max [32];
    bit hit [32][8];
  } jet_res_t;

  function automatic jet_res_t jet_ref(je_arr_t a, int thr [8], int win [8]);
    jet_res_t r;
    for (int t = 0; t < 8; t++) r.mult[t] = 0;
    for (int p = 0; p < 8; p++)
      for (int e = 0; e < 4; e++) begin
        int idx = p * 4 + e;
        int pp = p + 1, ee = e + 1;
        int c = sumwin(a, pp, ee, 2);
        bit m = 1;
        int w3 = 0;
        for (int dp = -1; dp <= 1; dp++)
          for (int de = -1; de <= 1; de++) begin
            int n = sumwin(a, pp + dp, ee + de, 2);
            if (dp == 0 && de == 0) continue;
            if (dp == -1 || (dp == 0 && de == -1)) begin
              if (c <= n) m = 0;
            end else if (c < n) m = 0;
          end
        for (int dp = -1; dp <= 0; dp++)
          for (int de = -1; de <= 0; de++)
            if (sumwin(a, pp + dp, ee + de, 3) > w3) w3 = sumwin(a, pp + dp, ee + de, 3);
        r.is_max[idx] = m;
        for (int t = 0; t < 8; t++) begin
          int w = (win[t] == 0) ? c : (win[t] == 1) ? w3 : sumwin(a, pp - 1, ee - 1, 4);
          r.hit[idx][t] = m && (w > thr[t]);
          if (r.hit[idx][t] && r.mult[t] < 7) r.mult[t]++;
        end
      end
    return r;
  endfunction

  // Et, Ex, Ey; loopback uses columns 0, 5, 6
  function automatic void energy_ref(je_arr_t a, int quadrant, bit loopback,
                                     output int et, output int ex, output int ey);
    longint sx = 0, sy = 0;
    et = 0;
    for (int r = 0; r < 8; r++) begin
      int row = 0;
      real phi = ((r + 0.5) * 360.0 / 32.0 + 90.0 * quadrant) * 3.14159265358979 / 180.0;
      longint cx = longint'($floor($cos(phi) * 1024.0 + 0.5));
      longint cy = longint'($floor($sin(phi) * 1024.0 + 0.5));
      if (loopback) row = a[r + 1][0] + a[r + 1][5] + a[r + 1][6];
      else for (int e = 1; e <= 4; e++) row += a[r + 1][e];
      et += row;
      sx += row * cx;
      sy += row * cy;
    end
    ex = int'(sx >>> 10);
    ey = int'(sy >>> 10);
  endfunction

  function automatic int qenc_u(int v);
    for (int r = 0; r < 4; r++)
      if (v / (1 << (2 * r)) < 64) return r * 64 + v / (1 << (2 * r));
    return 255;
  endfunction

  function automatic int qenc_s(int v);
    for (int r = 0; r < 4; r++) begin
      int d = 1 << (2 * r);
      int m = (v >= 0) ? v / d : -((-v + d - 1) / d);   // floor division
      if (m >= -32 && m <= 31) return r * 64 + (m & 63);
    end
    return (v < 0) ? 3 * 64 + 32 : 3 * 64 + 31;
  endfunction

  function automatic logic [24:0] qword(int et, int ex, int ey);
    logic [23:0] f = {8'(qenc_u(et)), 8'(qenc_s(ey)), 8'(qenc_s(ex))};
    int ones = $countones(f);
    return {(ones % 2 == 0) ? 1'b1 : 1'b0, f};
  endfunction

endpackage
