// dartel_pkg: types and helpers shared by the DARTEL deformation datapath.
//
// All data in the datapath is 16-bit signed fixed point. The word length of
// 16 bits follows the design's accuracy/resource trade-off; the split into 9
// integer bits (sign included) and FX_F = 7 fraction bits is this design's
// choice, made so that absolute voxel positions up to 255 are representable
// (image axes are at most 145 voxels long).
//
// A deformation sample (def_t) holds the mapped position phi (x, y, z in
// voxel units) and the 3x3 Jacobian matrix of the mapping at that voxel,
// jac[row][col] = d phi_row / d x_col.
package dartel_pkg;

  localparam int FX_W = 16;             // word length
  localparam int FX_F = 7;              // fraction bits
  localparam int FX_ONE = 1 << FX_F;    // 1.0

  typedef logic signed [FX_W-1:0] fx_t;
  localparam fx_t FX_ONE_FX = fx_t'(FX_ONE);

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;

  typedef fx_t [2:0][2:0] mat3_t;       // [row][col]

  typedef struct packed {
    vec3_t phi;
    mat3_t jac;
  } def_t;

  // Saturate a wide signed value to the fx_t range.
  function automatic fx_t sat_fx(input logic signed [47:0] v);
    if (v > 48'sd32767) return fx_t'(16'sh7fff);
    if (v < -48'sd32768) return fx_t'(16'sh8000);
    return fx_t'(v[FX_W-1:0]);
  endfunction

  // A def_t seen as its 12 fixed-point words (bit-identical packing).
  typedef fx_t [11:0] defv_t;

  // Linear interpolation a + (b - a) * f, f in [0, FX_ONE], floor rounding.
  function automatic fx_t lerp(input fx_t a, input fx_t b, input logic [FX_F:0] f);
    logic signed [FX_W:0]      d;
    logic signed [FX_W+FX_F+2:0] p;
    d = (FX_W+1)'(b) - (FX_W+1)'(a);
    p = d * $signed({1'b0, f});
    return fx_t'((FX_W+FX_F+3)'(a) + (p >>> FX_F));
  endfunction

  // 3x3 matrix product with Q9.7 rescaling and saturation: c = a * b.
  function automatic mat3_t mat3_mul(input mat3_t a, input mat3_t b);
    mat3_t c;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++) begin
        logic signed [47:0] acc;
        acc = '0;
        for (int j = 0; j < 3; j++)
          acc += 48'($signed(a[r][j])) * 48'($signed(b[j][k]));
        c[r][k] = sat_fx(acc >>> FX_F);
      end
    return c;
  endfunction

endpackage
