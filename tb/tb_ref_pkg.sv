// tb_ref_pkg: independent reference models used by the testbenches.
// Transforms are plain matrix products with the HEVC matrices; intra
// prediction follows the standard's sample-by-sample equations; the
// deblocking reference takes beta and tc from literal tables. None of these
// reuse the design's functions.
package tb_ref_pkg;

  localparam int T4  [4][4] = '{'{64, 64, 64, 64}, '{83, 36, -36, -83},
                                '{64, -64, -64, 64}, '{36, -83, 83, -36}};
  localparam int D4  [4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0, -74},
                                '{84, -29, -74, 55}, '{55, -84, 74, -29}};
  localparam int T8  [8][8] = '{
    '{64, 64, 64, 64, 64, 64, 64, 64}, '{89, 75, 50, 18, -18, -50, -75, -89},
    '{83, 36, -36, -83, -83, -36, 36, 83}, '{75, -18, -89, -50, 50, 89, 18, -75},
    '{64, -64, -64, 64, 64, -64, -64, 64}, '{50, -89, 18, 75, -75, -18, 89, -50},
    '{36, -83, 83, -36, -36, 83, -83, 36}, '{18, -50, 75, -89, 89, -75, 50, -18}};

  localparam int BETA_T [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,6,7,8,9,10,11,12,13,14,15,16,17,18,
                                 20,22,24,26,28,30,32,34,36,38,40,42,44,46,48,50,52,54,56,58,60,62,64};
  localparam int TC_T [54] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,2,2,2,2,
                               3,3,3,3,4,4,4,5,5,6,6,7,8,9,10,11,13,14,16,18,20,22,24};
  localparam int ANG [35] = '{0, 0, 32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                              -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};

  function automatic int cl(input int lo, input int hi, input int v);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int ab(input int v); return v < 0 ? -v : v; endfunction

  // y[i] = sum_k c[k] * M[k][i]  (inverse = transpose product), N = 4 or 8
  function automatic void inv1d(input int n, input bit dst, input int c[8], output int y[8]);
    for (int i = 0; i < 8; i++) begin
      y[i] = 0;
      if (i < n)
        for (int k = 0; k < n; k++)
          y[i] += c[k] * (n == 8 ? T8[k][i] : (dst ? D4[k][i] : T4[k][i]));
    end
  endfunction

  // full 2-D inverse transform, row-major 8x8 arrays
  function automatic void inv2d(input int n, input bit dst, input int c[64], output int r[64]);
    int tmp[64]; int v[8]; int y[8];
    for (int x = 0; x < n; x++) begin
      for (int k = 0; k < 8; k++) v[k] = (k < n) ? c[8*k + x] : 0;
      inv1d(n, dst, v, y);
      for (int k = 0; k < n; k++) tmp[8*k + x] = cl(-32768, 32767, (y[k] + 64) >>> 7);
    end
    for (int i = 0; i < 64; i++) r[i] = 0;
    for (int yy = 0; yy < n; yy++) begin
      for (int k = 0; k < 8; k++) v[k] = (k < n) ? tmp[8*yy + k] : 0;
      inv1d(n, dst, v, y);
      for (int k = 0; k < n; k++) r[8*yy + k] = cl(-32768, 32767, (y[k] + 2048) >>> 12);
    end
  endfunction

  // HEVC 4x4 intra prediction, p(x,y) with x,y in -1..7; result pred[y*4+x]
  function automatic int pget(input int x, input int y, input int corner,
                              input int top[8], input int left[8]);
    if (x == -1 && y == -1) return corner;
    if (y == -1) return top[x];
    return left[y];
  endfunction

  function automatic void intra4(input int mode, input bit luma, input int corner,
                                 input int top[8], input int left[8], output int pred[16]);
    int refv[int];
    int ang, inv, dc, s, idx, fct, a, b;
    if (mode == 0) begin
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        pred[4*y+x] = ((3-x)*left[y] + (x+1)*top[4] + (3-y)*top[x] + (y+1)*left[4] + 4) >> 3;
      return;
    end
    if (mode == 1) begin
      s = 4;
      for (int k = 0; k < 4; k++) s += top[k] + left[k];
      dc = s >> 3;
      for (int i = 0; i < 16; i++) pred[i] = dc;
      if (luma) begin
        pred[0] = (left[0] + 2*dc + top[0] + 2) >> 2;
        for (int x = 1; x < 4; x++) pred[x] = (top[x] + 3*dc + 2) >> 2;
        for (int y = 1; y < 4; y++) pred[4*y] = (left[y] + 3*dc + 2) >> 2;
      end
      return;
    end
    ang = ANG[mode];
    case (ang)
      -2: inv = -4096; -5: inv = -1638; -9: inv = -910; -13: inv = -630;
      -17: inv = -482; -21: inv = -390; -26: inv = -315; -32: inv = -256; default: inv = 0;
    endcase
    if (mode >= 18) begin
      for (int x = 0; x <= 8; x++) refv[x] = pget(-1 + x, -1, corner, top, left);
      if (ang < 0 && ((4*ang) >>> 5) < -1)
        for (int x = (4*ang) >>> 5; x <= -1; x++)
          refv[x] = pget(-1, -1 + ((x*inv + 128) >>> 8), corner, top, left);
      for (int y = 0; y < 4; y++) begin
        idx = ((y+1)*ang) >>> 5; fct = ((y+1)*ang) & 31;
        for (int x = 0; x < 4; x++) begin
          a = refv[x+idx+1];
          b = (fct != 0) ? refv[x+idx+2] : 0;
          pred[4*y+x] = ((32-fct)*a + fct*b + 16) >> 5;
        end
      end
      if (mode == 26 && luma)
        for (int y = 0; y < 4; y++) pred[4*y] = cl(0, 255, top[0] + ((left[y] - corner) >>> 1));
    end else begin
      for (int x = 0; x <= 8; x++) refv[x] = pget(-1, -1 + x, corner, top, left);
      if (ang < 0 && ((4*ang) >>> 5) < -1)
        for (int x = (4*ang) >>> 5; x <= -1; x++)
          refv[x] = pget(-1 + ((x*inv + 128) >>> 8), -1, corner, top, left);
      for (int x = 0; x < 4; x++) begin
        idx = ((x+1)*ang) >>> 5; fct = ((x+1)*ang) & 31;
        for (int y = 0; y < 4; y++) begin
          a = refv[y+idx+1];
          b = (fct != 0) ? refv[y+idx+2] : 0;
          pred[4*y+x] = ((32-fct)*a + fct*b + 16) >> 5;
        end
      end
      if (mode == 10 && luma)
        for (int x = 0; x < 4; x++) pred[x] = cl(0, 255, left[0] + ((top[x] - corner) >>> 1));
    end
  endfunction

  // deblocking decision of one segment: 0 off, 1 weak, 2 strong
  function automatic void df_dec(input int p[4][4], input int q[4][4], input int bs, input int qp,
                                 input int boff, input int toff, output int mode, output int tc,
                                 output bit dep, output bit deq, output bit pred, output int beta);
    int dp0, dp3, dq0, dq3, d, side;
    bit s0, s3;
    beta = BETA_T[cl(0, 51, qp + boff)];
    tc   = TC_T[cl(0, 53, qp + 2*(bs-1) + toff)];
    dp0 = ab(p[0][2] - 2*p[0][1] + p[0][0]); dp3 = ab(p[3][2] - 2*p[3][1] + p[3][0]);
    dq0 = ab(q[0][2] - 2*q[0][1] + q[0][0]); dq3 = ab(q[3][2] - 2*q[3][1] + q[3][0]);
    d = dp0 + dq0 + dp3 + dq3;
    s0 = (2*(dp0+dq0) < (beta >> 2)) && (ab(p[0][3]-p[0][0]) + ab(q[0][0]-q[0][3]) < (beta >> 3))
         && (ab(p[0][0]-q[0][0]) < ((5*tc+1) >> 1));
    s3 = (2*(dp3+dq3) < (beta >> 2)) && (ab(p[3][3]-p[3][0]) + ab(q[3][0]-q[3][3]) < (beta >> 3))
         && (ab(p[3][0]-q[3][0]) < ((5*tc+1) >> 1));
    side = (beta + (beta >> 1)) >> 3;
    dep = (dp0 + dp3) < side;
    deq = (dq0 + dq3) < side;
    mode = (bs == 0 || d >= beta) ? 0 : ((s0 && s3) ? 2 : 1);
    pred = (bs != 0) && (2 * (dp0 + dp3) < beta);
  endfunction

  // filter one line p[0..3], q[0..3] in place
  function automatic void df_line(input int mode, input int tc, input bit dep, input bit deq,
                                  inout int p[4], inout int q[4]);
    int P[4]; int Q[4]; int dl, dd;
    P = p; Q = q;
    if (mode == 2) begin
      p[0] = cl(P[0]-2*tc, P[0]+2*tc, (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) >> 3);
      p[1] = cl(P[1]-2*tc, P[1]+2*tc, (P[2] + P[1] + P[0] + Q[0] + 2) >> 2);
      p[2] = cl(P[2]-2*tc, P[2]+2*tc, (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) >> 3);
      q[0] = cl(Q[0]-2*tc, Q[0]+2*tc, (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) >> 3);
      q[1] = cl(Q[1]-2*tc, Q[1]+2*tc, (P[0] + Q[0] + Q[1] + Q[2] + 2) >> 2);
      q[2] = cl(Q[2]-2*tc, Q[2]+2*tc, (P[0] + Q[0] + Q[1] + 3*Q[2] + 2*Q[3] + 4) >> 3);
    end else if (mode == 1) begin
      dl = (9*(Q[0]-P[0]) - 3*(Q[1]-P[1]) + 8) >>> 4;
      if (ab(dl) < 10*tc) begin
        dl = cl(-tc, tc, dl);
        p[0] = cl(0, 255, P[0] + dl);
        q[0] = cl(0, 255, Q[0] - dl);
        if (dep) begin
          dd = cl(-(tc >> 1), tc >> 1, (((P[2] + P[0] + 1) >> 1) - P[1] + dl) >>> 1);
          p[1] = cl(0, 255, P[1] + dd);
        end
        if (deq) begin
          dd = cl(-(tc >> 1), tc >> 1, (((Q[2] + Q[0] + 1) >> 1) - Q[1] - dl) >>> 1);
          q[1] = cl(0, 255, Q[1] + dd);
        end
      end
    end
  endfunction

  // ALF for one pixel at (y,x) of a picture accessor array img[rows][cols]
  localparam int AY [19] = '{-3,-2,-1,-1,-1,0,0,0,0,0,0,0,0,0,1,1,1,2,3};
  localparam int AX [19] = '{0,0,-1,0,1,-4,-3,-2,-1,0,1,2,3,4,-1,0,1,0,0};

endpackage
