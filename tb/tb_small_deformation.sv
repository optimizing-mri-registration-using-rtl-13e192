// tb_small_deformation: self-checking test of the small-deformation sweep.
// A 5x4x3 volume of random velocities (large enough to saturate) is served
// from a behavioural synchronous memory. Every voxel must be written exactly
// once with the reference Phi = x + u/8 and Jacobian I + Du/8, the sweep
// must take N + 2 cycles from start to done (one voxel per cycle), and a
// second sweep must behave the same.
module tb_small_deformation;
  import dartel_pkg::*;
  import dartel_ref_pkg::*;

  localparam int NX = 5, NY = 4, NZ = 3, K = 3, N = NX * NY * NZ, AW = $clog2(N);
  logic          clk = 0, rst = 1, start = 0, busy, done, we;
  logic [AW-1:0] u_raddr [4], waddr;
  vec3_t         u_rdata [4];
  def_t          wdata;
  int checks = 0, failures = 0, cyc = 0;

  small_deformation #(.NX(NX), .NY(NY), .NZ(NZ), .K_STEPS(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  vec3_t umem [N];
  int    u [][3];
  rvol_t ref_v;
  int    hits [N];

  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++) u_rdata[i] <= umem[u_raddr[i]];

  always @(negedge clk) begin
    if (we) begin
      hits[waddr]++;
      checks++;
      if (!same(from_def(wdata), ref_v[waddr])) begin
        failures++;
        $display("FAIL: voxel %0d phi (%0d %0d %0d) expected (%0d %0d %0d)", waddr,
                 wdata.phi.x, wdata.phi.y, wdata.phi.z,
                 ref_v[waddr].p[0], ref_v[waddr].p[1], ref_v[waddr].p[2]);
      end
    end
  end

  initial begin
    int t0;
    u = new[N];
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c < 3; c++)
        u[i][c] = (i == 7) ? 32767 - 32767 * (c % 2) * 2 : $signed(16'($urandom_range(6000))) - 3000;
      umem[i] = '{x: 16'(u[i][0]), y: 16'(u[i][1]), z: 16'(u[i][2])};
    end
    small_def(u, NX, NY, NZ, K, ref_v);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < N; i++) hits[i] = 0;
      @(negedge clk);
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != N + 2) begin
        failures++;
        $display("FAIL: sweep took %0d cycles, expected %0d", cyc - t0, N + 2);
      end
      @(negedge clk);
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL: busy after done");
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (hits[i] != 1) begin
          failures++;
          $display("FAIL: voxel %0d written %0d times", i, hits[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
