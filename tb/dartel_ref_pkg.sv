// dartel_ref_pkg: integer reference model of the deformation datapath, used
// by the testbenches to compute expected results independently of the RTL.
//
// Values are plain ints holding Q9.7 numbers. Floor division, clamping and
// saturation are written out arithmetically (no shifts, no packed types) so
// that a slip in the RTL's bit manipulation shows up as a mismatch.
package dartel_ref_pkg;

  typedef struct {
    int p [3];        // position, Q9.7 voxels
    int j [3][3];     // Jacobian [row][col], Q9.7
  } rdef_t;

  typedef rdef_t rvol_t [];

  int clamp_events;   // sample points that fell outside the volume

  function automatic int fdiv(input int a, input int d);
    int r;
    r = a % d;
    if (r < 0) r += d;
    return (a - r) / d;
  endfunction

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int vidx(input int x, input int y, input int z, input int nx, input int ny);
    return x + nx * (y + ny * z);
  endfunction

  // Phi = x + u/2^k, J = I + forward difference of u / 2^k (zero at upper border).
  function automatic void small_def(input int u [][3], input int nx, input int ny, input int nz,
                                    input int k, ref rvol_t out);
    int d;
    d = 1 << k;
    out = new[nx * ny * nz];
    for (int z = 0; z < nz; z++)
      for (int y = 0; y < ny; y++)
        for (int x = 0; x < nx; x++) begin
          int i, nb [3];
          i = vidx(x, y, z, nx, ny);
          nb[0] = (x + 1 < nx) ? vidx(x + 1, y, z, nx, ny) : i;
          nb[1] = (y + 1 < ny) ? vidx(x, y + 1, z, nx, ny) : i;
          nb[2] = (z + 1 < nz) ? vidx(x, y, z + 1, nx, ny) : i;
          out[i].p[0] = sat16(longint'(x) * 128 + fdiv(u[i][0], d));
          out[i].p[1] = sat16(longint'(y) * 128 + fdiv(u[i][1], d));
          out[i].p[2] = sat16(longint'(z) * 128 + fdiv(u[i][2], d));
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++)
              out[i].j[r][c] = sat16((r == c ? 128 : 0) + fdiv(u[nb[c]][r] - u[i][r], d));
        end
  endfunction

  function automatic int lin(input int a, input int b, input int f);
    return a + fdiv((b - a) * f, 128);
  endfunction

  // out = a o b, with Jacobian (J_a o b) * J_b.
  function automatic void compose(input rvol_t a, input rvol_t b, input int nx, input int ny,
                                  input int nz, ref rvol_t out);
    int n [3];
    n[0] = nx; n[1] = ny; n[2] = nz;
    out = new[nx * ny * nz];
    for (int i = 0; i < nx * ny * nz; i++) begin
      int i0 [3], f [3];
      int w [8][12];
      int v [12];
      for (int d = 0; d < 3; d++) begin
        int c;
        c = b[i].p[d];
        if (c < 0) begin
          i0[d] = 0; f[d] = 0; clamp_events++;
        end else if (fdiv(c, 128) >= n[d] - 1) begin
          i0[d] = n[d] - 2; f[d] = 128;
          if (c > (n[d] - 1) * 128) clamp_events++;
        end else begin
          i0[d] = fdiv(c, 128); f[d] = c - 128 * i0[d];
        end
      end
      for (int cz = 0; cz < 2; cz++)
        for (int cy = 0; cy < 2; cy++)
          for (int cx = 0; cx < 2; cx++) begin
            int ci, cn;
            ci = vidx(i0[0] + cx, i0[1] + cy, i0[2] + cz, nx, ny);
            cn = cz * 4 + cy * 2 + cx;
            for (int q = 0; q < 3; q++) w[cn][q] = a[ci].p[q];
            for (int q = 0; q < 9; q++) w[cn][3 + q] = a[ci].j[q / 3][q % 3];
          end
      for (int q = 0; q < 12; q++) begin
        int y0, y1;
        y0 = lin(lin(w[0][q], w[1][q], f[0]), lin(w[2][q], w[3][q], f[0]), f[1]);
        y1 = lin(lin(w[4][q], w[5][q], f[0]), lin(w[6][q], w[7][q], f[0]), f[1]);
        v[q] = lin(y0, y1, f[2]);
      end
      for (int q = 0; q < 3; q++) out[i].p[q] = v[q];
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          longint s;
          s = 0;
          for (int m = 0; m < 3; m++) s += longint'(v[3 + 3 * r + m]) * b[i].j[m][c];
          out[i].j[r][c] = sat16(fdiv64(s, 128));
        end
    end
  endfunction

  function automatic longint fdiv64(input longint a, input longint d);
    longint r;
    r = a % d;
    if (r < 0) r += d;
    return (a - r) / d;
  endfunction

  // Conversions to and from the RTL's packed sample.
  function automatic dartel_pkg::def_t to_def(input rdef_t r);
    dartel_pkg::def_t d;
    d.phi.x = 16'(r.p[0]);
    d.phi.y = 16'(r.p[1]);
    d.phi.z = 16'(r.p[2]);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) d.jac[a][b] = 16'(r.j[a][b]);
    return d;
  endfunction

  function automatic rdef_t from_def(input dartel_pkg::def_t d);
    rdef_t r;
    r.p[0] = int'(d.phi.x);
    r.p[1] = int'(d.phi.y);
    r.p[2] = int'(d.phi.z);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) r.j[a][b] = int'($signed(d.jac[a][b]));
    return r;
  endfunction

  function automatic bit same(input rdef_t a, input rdef_t b);
    for (int q = 0; q < 3; q++) if (a.p[q] != b.p[q]) return 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) if (a.j[r][c] != b.j[r][c]) return 0;
    return 1;
  endfunction

endpackage
