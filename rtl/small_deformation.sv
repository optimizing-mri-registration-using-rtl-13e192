// small_deformation: builds the first scaling-and-squaring step of a DARTEL
// deformation, Phi(x) = x + u(x) / 2^K, together with its Jacobian.
//
// The unit sweeps the volume once in x-fastest order. For every voxel it
// reads the velocity u at the voxel and at its +x, +y and +z neighbours from
// a 4-port memory, then writes a def_t: phi = absolute position x + u/2^K
// (Q9.7 voxels) and jac[r][c] = delta(r,c) + (u_r(x + e_c) - u_r(x)) / 2^K.
// The first formula is the Euler step of the scaling-and-squaring scheme
// with 2^K time steps (K = 3, eight steps); the forward-difference Jacobian,
// the clamped neighbour at the upper border (zero derivative there), the
// floor shift for the division and the saturation are this design's choice.
//
// Interface: pulse start while idle; busy stays high for the sweep; done
// pulses together with the write of the last voxel. A voxel is issued every
// cycle (initiation interval 1): u_raddr in cycle t, u_rdata in t+1, the
// write (we/waddr/wdata) in t+2. With start high in cycle s, done is high in
// cycle s + N + 2 for a sweep of N voxels.
module small_deformation
  import dartel_pkg::*;
#(
  parameter int NX = 121,
  parameter int NY = 145,
  parameter int NZ = 121,
  parameter int K_STEPS = 3,
  parameter int AW = $clog2(NX * NY * NZ)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] u_raddr [4],
  input  vec3_t         u_rdata [4],
  output logic          we,
  output logic [AW-1:0] waddr,
  output def_t          wdata
);

  localparam int N = NX * NY * NZ;

  // Issue stage: voxel counters.
  logic          run;
  logic [AW-1:0] idx;
  logic [15:0]   cx, cy, cz;
  logic          last;

  assign last = (idx == AW'(N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0;
    end else if (!run && start && !busy) begin
      run <= 1'b1;
      idx <= '0;
      cx <= '0; cy <= '0; cz <= '0;
    end else if (run) begin
      idx <= idx + 1'b1;
      if (cx == 16'(NX - 1)) begin
        cx <= '0;
        if (cy == 16'(NY - 1)) begin
          cy <= '0;
          cz <= cz + 1'b1;
        end else cy <= cy + 1'b1;
      end else cx <= cx + 1'b1;
      if (last) run <= 1'b0;
    end
  end

  always_comb begin
    u_raddr[0] = idx;
    u_raddr[1] = (cx < 16'(NX - 1)) ? idx + AW'(1) : idx;
    u_raddr[2] = (cy < 16'(NY - 1)) ? idx + AW'(NX) : idx;
    u_raddr[3] = (cz < 16'(NZ - 1)) ? idx + AW'(NX * NY) : idx;
  end

  // Stage 1: read data arrives.
  logic          v1, last1;
  logic [AW-1:0] idx1;
  logic [15:0]   x1, y1, z1;

  always_ff @(posedge clk) begin
    v1    <= rst ? 1'b0 : run;
    last1 <= run && last;
    idx1  <= idx;
    x1 <= cx; y1 <= cy; z1 <= cz;
  end

  // Stage 2: compute and write.
  always_ff @(posedge clk) begin
    def_t  d;
    vec3_t u0;
    fx_t   uc, un;
    u0 = u_rdata[0];
    d.phi.x = sat_fx(48'(signed'({1'b0, x1})) * FX_ONE + 48'(u0.x >>> K_STEPS));
    d.phi.y = sat_fx(48'(signed'({1'b0, y1})) * FX_ONE + 48'(u0.y >>> K_STEPS));
    d.phi.z = sat_fx(48'(signed'({1'b0, z1})) * FX_ONE + 48'(u0.z >>> K_STEPS));
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        uc = (r == 0) ? u0.x : (r == 1) ? u0.y : u0.z;
        un = (r == 0) ? u_rdata[c+1].x : (r == 1) ? u_rdata[c+1].y : u_rdata[c+1].z;
        d.jac[r][c] = sat_fx(((r == c) ? 48'sd128 : 48'sd0) +
                             ((48'(un) - 48'(uc)) >>> K_STEPS));
      end
    we    <= rst ? 1'b0 : v1;
    waddr <= idx1;
    wdata <= d;
    done  <= rst ? 1'b0 : (v1 && last1);
  end

  assign busy = run || v1 || we;

endmodule
