// compose_unit: one composition sweep of the scaling-and-squaring scheme,
// Phi_C = Phi_A o Phi_B with Jacobian J_C = (J_A o Phi_B) * J_B.
//
// For every voxel x (x-fastest order) the unit reads Phi_B(x) and J_B(x),
// takes the position Phi_B(x) as the point at which Phi_A and J_A are
// resampled, reads the 8 surrounding voxels of A and interpolates all 12
// words trilinearly (x, then y, then z, each step a + (b - a) * f with
// floor rounding). The composed position is the interpolated Phi_A; the
// composed Jacobian is the interpolated J_A times J_B (3x3 product, Q9.7,
// saturated). For squaring, A and B are the same buffer. The composition and
// its Jacobian follow the registration scheme (chain rule); trilinear
// resampling and clamping of sample points to the volume are this design's
// choice.
//
// Interface: pulse start while idle; busy stays high for the sweep; done
// pulses together with the write of the last voxel. Pipeline, one voxel per
// cycle: b_raddr in cycle t; b_rdata in t+1, from which the corner
// addresses a_raddr are formed combinationally; a_rdata in t+2; the
// interpolation takes one stage per axis (x in t+3, y in t+4, z in t+5); the
// Jacobian product is registered as the write (we, waddr, wdata) in t+6. With
// start high in cycle s, done is high in cycle s + N + 6.
module compose_unit
  import dartel_pkg::*;
#(
  parameter int NX = 121,
  parameter int NY = 145,
  parameter int NZ = 121,
  parameter int AW = $clog2(NX * NY * NZ)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] b_raddr,
  input  def_t          b_rdata,
  output logic [AW-1:0] a_raddr [8],
  input  def_t          a_rdata [8],
  output logic          we,
  output logic [AW-1:0] waddr,
  output def_t          wdata
);

  localparam int N = NX * NY * NZ;

  typedef struct packed {
    logic [15:0]   i0;   // lower corner index
    logic [FX_F:0] f;    // weight of the upper corner, 0..FX_ONE
  } samp_t;

  // Split a Q9.7 coordinate into corner index and weight, clamped to [0, n-1].
  function automatic samp_t clamp_coord(input fx_t c, input int n);
    samp_t s;
    fx_t   ci;
    ci = c >>> FX_F;
    if (c < 0) begin
      s.i0 = '0;
      s.f  = '0;
    end else if (int'(ci) >= n - 1) begin
      s.i0 = 16'(n - 2);
      s.f  = (FX_F+1)'(FX_ONE);
    end else begin
      s.i0 = 16'(ci);
      s.f  = {1'b0, c[FX_F-1:0]};
    end
    return s;
  endfunction

  // Issue stage.
  logic          run;
  logic [AW-1:0] idx;
  logic          last;

  assign last    = (idx == AW'(N - 1));
  assign b_raddr = idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0;
    end else if (!run && start && !busy) begin
      run <= 1'b1;
      idx <= '0;
    end else if (run) begin
      idx <= idx + 1'b1;
      if (last) run <= 1'b0;
    end
  end

  // Stage 1: Phi_B(x), J_B(x) arrive; form the corner addresses.
  logic          v1, last1;
  logic [AW-1:0] idx1;
  samp_t         sx, sy, sz;

  always_ff @(posedge clk) begin
    v1    <= rst ? 1'b0 : run;
    last1 <= run && last;
    idx1  <= idx;
  end

  always_comb begin
    logic [AW-1:0] base;
    sx = clamp_coord(b_rdata.phi.x, NX);
    sy = clamp_coord(b_rdata.phi.y, NY);
    sz = clamp_coord(b_rdata.phi.z, NZ);
    base = AW'(sx.i0) + AW'(NX) * (AW'(sy.i0) + AW'(NY) * AW'(sz.i0));
    // corner k = {dz, dy, dx}
    for (int k = 0; k < 8; k++)
      a_raddr[k] = base + (k[0] ? AW'(1) : '0) + (k[1] ? AW'(NX) : '0) +
                   (k[2] ? AW'(NX * NY) : '0);
  end

  logic          v2, last2;
  logic [AW-1:0] idx2;
  logic [FX_F:0] fx2, fy2, fz2;
  mat3_t         jb2;

  always_ff @(posedge clk) begin
    v2    <= rst ? 1'b0 : v1;
    last2 <= v1 && last1;
    idx2  <= idx1;
    fx2   <= sx.f;
    fy2   <= sy.f;
    fz2   <= sz.f;
    jb2   <= b_rdata.jac;
  end

  // Stages 2-4: trilinear interpolation of the 12 words of A, one axis per
  // stage (x: 4 lerps per word, y: 2, z: 1).
  logic          v3, last3;
  logic [AW-1:0] idx3;
  logic [FX_F:0] fy3, fz3;
  defv_t         cx3 [4];     // x-interpolated edges {dz, dy}
  mat3_t         jb3;

  always_ff @(posedge clk) begin
    defv_t c [8];
    for (int k = 0; k < 8; k++) c[k] = defv_t'(a_rdata[k]);
    for (int e = 0; e < 4; e++)
      for (int w = 0; w < 12; w++)
        cx3[e][w] <= lerp(c[2*e][w], c[2*e+1][w], fx2);
    v3    <= rst ? 1'b0 : v2;
    last3 <= v2 && last2;
    idx3  <= idx2;
    fy3   <= fy2;
    fz3   <= fz2;
    jb3   <= jb2;
  end

  logic          v4, last4;
  logic [AW-1:0] idx4;
  logic [FX_F:0] fz4;
  defv_t         cy4 [2];     // xy-interpolated faces {dz}
  mat3_t         jb4;

  always_ff @(posedge clk) begin
    for (int e = 0; e < 2; e++)
      for (int w = 0; w < 12; w++)
        cy4[e][w] <= lerp(cx3[2*e][w], cx3[2*e+1][w], fy3);
    v4    <= rst ? 1'b0 : v3;
    last4 <= v3 && last3;
    idx4  <= idx3;
    fz4   <= fz3;
    jb4   <= jb3;
  end

  logic          v5, last5;
  logic [AW-1:0] idx5;
  defv_t         ai5;
  mat3_t         jb5;

  always_ff @(posedge clk) begin
    for (int w = 0; w < 12; w++)
      ai5[w] <= lerp(cy4[0][w], cy4[1][w], fz4);
    v5    <= rst ? 1'b0 : v4;
    last5 <= v4 && last4;
    idx5  <= idx4;
    jb5   <= jb4;
  end

  // Stage 5: Jacobian product and write.
  always_ff @(posedge clk) begin
    def_t a;
    def_t d;
    a = def_t'(ai5);
    d.phi = a.phi;
    d.jac = mat3_mul(a.jac, jb5);
    we    <= rst ? 1'b0 : v5;
    waddr <= idx5;
    wdata <= d;
    done  <= rst ? 1'b0 : (v5 && last5);
  end

  assign busy = run || v1 || v2 || v3 || v4 || v5 || we;

endmodule
