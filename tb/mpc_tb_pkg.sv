// mpc_tb_pkg: reference models and problem data for the MPC testbenches.
//
// * obs_ref / qp_ref recompute the observer and the primal-dual iteration in
//   plain integer arithmetic (Q8.8 data, Q5.12 coefficients, exact products,
//   one floor-and-saturate per row), written from the algorithm, not from the
//   RTL's schedule.
// * build_tank_data forms, with real arithmetic, a complete MPC problem for a
//   quadruple-tank model (Euler discretisation with a 5 s step of the
//   linearised four-tank equations; tank areas, outlet areas, pump gains and
//   valve ratios are textbook values, not taken from any measurement), with
//   Q = I, R = 0.1 I, P = Q, pump voltages bounded to 0..3.3 V, D = diag(H),
//   W = diag(E D^-1 E'), a = 1 and w = 0.5, and the observer matrix for
//   Lx = 0.2 [I; 0], Ld = 0.5 I.
package mpc_tb_pkg;

  localparam int CF = 12;  // coefficient fraction bits

  function automatic int sat16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int to_coef(input real v);
    longint q;
    q = longint'($rtoi(v * 4096.0 + (v >= 0 ? 0.5 : -0.5)));
    if (q > 131071)  q = 131071;
    if (q < -131072) q = -131072;
    return int'(q);
  endfunction

  function automatic int to_q88(input real v);
    return sat16(longint'($rtoi(v * 256.0 + (v >= 0 ? 0.5 : -0.5))));
  endfunction

  // s+ = M * v, M is ns x nv row-major.
  function automatic void obs_ref(input int m[], input int ns, input int nv,
                                  input int v[], ref int s[]);
    longint acc;
    s = new[ns];
    for (int i = 0; i < ns; i++) begin
      acc = 0;
      for (int k = 0; k < nv; k++) acc += longint'(m[i*nv+k]) * longint'(v[k]);
      s[i] = sat16(acc >>> CF);
    end
  endfunction

  // Primal-dual iteration on the memory image used by pd_qp_solver.
  // Returns z and lambda after iters iterations and counts clipped rows.
  function automatic void qp_ref(input int mem[], input int zlo[], input int zhi[],
                                 input int th[], input int nz, input int nl,
                                 input int np, input int iters,
                                 ref int z[], ref int lam[], ref int clips);
    int qv[], ev[], zn[];
    longint acc;
    int gw, ew, res;
    gw = nz * (nz + nl);
    ew = nl * nz;
    z = new[nz]; lam = new[nl]; qv = new[nz]; ev = new[nl]; zn = new[nz];
    clips = 0;
    for (int i = 0; i < nz + nl; i++) begin
      acc = 0;
      for (int p = 0; p < np; p++) acc += longint'(mem[gw + ew + i*np + p]) * longint'(th[p]);
      if (i < nz) qv[i] = sat16(acc >>> CF);
      else        ev[i-nz] = sat16(acc >>> CF);
    end
    foreach (z[i]) z[i] = 0;
    foreach (lam[i]) lam[i] = 0;
    for (int it = 0; it < iters; it++) begin
      for (int i = 0; i < nz; i++) begin
        acc = (longint'(z[i]) - longint'(qv[i])) <<< CF;
        for (int c = 0; c < nz; c++) acc -= longint'(mem[i*(nz+nl)+c]) * longint'(z[c]);
        for (int c = 0; c < nl; c++) acc -= longint'(mem[i*(nz+nl)+nz+c]) * longint'(lam[c]);
        res = sat16(acc >>> CF);
        if (res < zlo[i])      begin zn[i] = zlo[i]; clips++; end
        else if (res > zhi[i]) begin zn[i] = zhi[i]; clips++; end
        else                   zn[i] = res;
      end
      z = zn;
      for (int l = 0; l < nl; l++) begin
        acc = (longint'(lam[l]) - longint'(ev[l])) <<< CF;
        for (int c = 0; c < nz; c++) acc += longint'(mem[gw + l*nz + c]) * longint'(z[c]);
        lam[l] = sat16(acc >>> CF);
      end
    end
  endfunction

  // In-place inverse of an n x n real matrix (Gauss-Jordan, partial pivoting).
  function automatic void inv_real(ref real a[], input int n);
    real b[];
    real t, p;
    int piv;
    b = new[n*n];
    foreach (b[i]) b[i] = ((i / n) == (i % n)) ? 1.0 : 0.0;
    for (int c = 0; c < n; c++) begin
      piv = c;
      for (int r = c + 1; r < n; r++)
        if ((a[r*n+c] < 0 ? -a[r*n+c] : a[r*n+c]) > (a[piv*n+c] < 0 ? -a[piv*n+c] : a[piv*n+c])) piv = r;
      for (int k = 0; k < n; k++) begin
        t = a[c*n+k]; a[c*n+k] = a[piv*n+k]; a[piv*n+k] = t;
        t = b[c*n+k]; b[c*n+k] = b[piv*n+k]; b[piv*n+k] = t;
      end
      p = a[c*n+c];
      for (int k = 0; k < n; k++) begin a[c*n+k] /= p; b[c*n+k] /= p; end
      for (int r = 0; r < n; r++) if (r != c) begin
        t = a[r*n+c];
        for (int k = 0; k < n; k++) begin
          a[r*n+k] -= t * a[c*n+k];
          b[r*n+k] -= t * b[c*n+k];
        end
      end
    end
    a = b;
  endfunction

  // Linearised quadruple-tank model, Euler discretisation with a 5 s step.
  // States are tank levels (cm) around the operating point, inputs pump
  // voltages (V), outputs level-sensor voltages (0.5 V/cm).
  function automatic void tank_abc(output real a[4][4], output real b[4][2], output real c[2][4]);
    real ts;
    ts = 5.0;
    foreach (a[i, j]) a[i][j] = 0.0;
    foreach (b[i, j]) b[i][j] = 0.0;
    foreach (c[i, j]) c[i][j] = 0.0;
    a[0][0] = 1.0 - ts/62.0; a[1][1] = 1.0 - ts/90.0;
    a[2][2] = 1.0 - ts/23.0; a[3][3] = 1.0 - ts/30.0;
    a[0][2] = ts/23.0;       a[1][3] = ts/30.0;
    b[0][0] = ts*0.7*3.33/28.0; b[1][1] = ts*0.6*3.35/32.0;
    b[2][1] = ts*0.4*3.35/28.0; b[3][0] = ts*0.3*3.33/32.0;
    c[0][0] = 0.5; c[1][1] = 0.5;
  endfunction

  // Quadruple-tank problem data for horizon n (NX = 4, NU = 2, NY = 2).
  // mem: solver memory image; zlo/zhi: bounds (Q8.8); om: observer matrix.
  function automatic void build_tank_data(input int n, ref int mem[], ref int zlo[],
                                          ref int zhi[], ref int om[]);
    localparam int NX = 4, NU = 2, NY = 2;
    int nb, nz, nl, np, gw, ew, row, col;
    real a[4][4], b[4][2], c[2][4];
    real hd[], e[], wd[], kk[], mx[4][2], mu[2][2];
    real ts, alpha, omega, qw, rw, lx, ld, s;
    ts = 5.0; alpha = 1.0; omega = 0.5; qw = 1.0; rw = 0.1; lx = 0.2; ld = 0.5;
    tank_abc(a, b, c);
    // steady-state target: [A-I B; C 0][x; u] = [0; r-d]
    kk = new[36];
    foreach (kk[i]) kk[i] = 0.0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) kk[i*6+j] = a[i][j] - (i == j ? 1.0 : 0.0);
      for (int j = 0; j < 2; j++) kk[i*6+4+j] = b[i][j];
    end
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++) kk[(4+i)*6+j] = c[i][j];
    inv_real(kk, 6);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 2; j++) mx[i][j] = kk[i*6+4+j];
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) mu[i][j] = kk[(4+i)*6+4+j];

    nb = NX + NU; nz = nb * n; nl = NX * n; np = NX + 2*NY + 1;
    gw = nz * (nz + nl); ew = nl * nz;
    hd = new[nz]; e = new[nl*nz]; wd = new[nl];
    foreach (e[i]) e[i] = 0.0;
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < NU; k++) hd[i*nb+k] = rw;
      for (int k = 0; k < NX; k++) hd[i*nb+NU+k] = qw;   // P = Q at the end
      for (int r = 0; r < NX; r++) begin
        row = i*NX + r;
        e[row*nz + i*nb + NU + r] = 1.0;
        for (int k = 0; k < NU; k++) e[row*nz + i*nb + k] = -b[r][k];
        if (i > 0) for (int k = 0; k < NX; k++) e[row*nz + (i-1)*nb + NU + k] = -a[r][k];
      end
    end
    for (int l = 0; l < nl; l++) begin
      s = 0.0;
      for (int k = 0; k < nz; k++) s += e[l*nz+k] * e[l*nz+k] / hd[k];
      wd[l] = s;
    end
    mem = new[gw + ew + (nz+nl)*np];
    foreach (mem[i]) mem[i] = 0;
    // G = [aD^-1 H | aD^-1 E']  (H diagonal here)
    for (int i = 0; i < nz; i++) begin
      mem[i*(nz+nl) + i] = to_coef(alpha);
      for (int l = 0; l < nl; l++) mem[i*(nz+nl) + nz + l] = to_coef(alpha * e[l*nz+i] / hd[i]);
    end
    // Ew = wW^-1 E
    for (int l = 0; l < nl; l++)
      for (int k = 0; k < nz; k++) mem[gw + l*nz + k] = to_coef(omega * e[l*nz+k] / wd[l]);
    // F: theta = [x(4); d(2); r(2); 1]
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < NU; k++) begin
        row = i*nb + k;   // q = -R ubar, ubar = Mu (r - d)
        for (int j = 0; j < NY; j++) begin
          mem[gw + ew + row*np + NX + j]      = to_coef(alpha * ( rw * mu[k][j]) / hd[row]);
          mem[gw + ew + row*np + NX + NY + j] = to_coef(alpha * (-rw * mu[k][j]) / hd[row]);
        end
      end
      for (int k = 0; k < NX; k++) begin
        row = i*nb + NU + k;  // q = -Q xbar, xbar = Mx (r - d)
        for (int j = 0; j < NY; j++) begin
          mem[gw + ew + row*np + NX + j]      = to_coef(alpha * ( qw * mx[k][j]) / hd[row]);
          mem[gw + ew + row*np + NX + NY + j] = to_coef(alpha * (-qw * mx[k][j]) / hd[row]);
        end
      end
    end
    for (int r = 0; r < NX; r++)   // e0 = A x
      for (int k = 0; k < NX; k++)
        mem[gw + ew + (nz + r)*np + k] = to_coef(omega * a[r][k] / wd[r]);
    zlo = new[nz]; zhi = new[nz];
    for (int i = 0; i < nz; i++) begin
      if ((i % nb) < NU) begin zlo[i] = 0;      zhi[i] = to_q88(3.3);   end
      else               begin zlo[i] = -30720; zhi[i] = 30720;        end
    end
    // observer: s+ = M [x; d; u; y; 1], Lx = lx [I; 0], Ld = ld I
    om = new[6*11];
    foreach (om[i]) om[i] = 0;
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 4; k++)
        om[r*11 + k] = to_coef(a[r][k] - ((r < 2) ? lx * c[r][k] : 0.0));
      if (r < 2) begin
        om[r*11 + 4 + r] = to_coef(-lx);
        om[r*11 + 8 + r] = to_coef(lx);
      end
      for (int k = 0; k < 2; k++) om[r*11 + 6 + k] = to_coef(b[r][k]);
    end
    for (int j = 0; j < 2; j++) begin
      for (int k = 0; k < 4; k++) om[(4+j)*11 + k] = to_coef(-ld * c[j][k]);
      om[(4+j)*11 + 4 + j] = to_coef(1.0 - ld);
      om[(4+j)*11 + 8 + j] = to_coef(ld);
    end
  endfunction

endpackage
