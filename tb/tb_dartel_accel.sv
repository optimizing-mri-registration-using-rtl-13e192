// tb_dartel_accel: end-to-end test of the DARTEL deformation accelerator on a 6x5x4 volume.
//
// The host side loads a velocity field, starts a run and reads back
// Phi^(1) and its Jacobian for every voxel, comparing each with the integer
// reference model (small deformation, then K_STEPS self-compositions). It
// checks the run length, one voxel per cycle per sweep:
// (N + 2) + K_STEPS * (N + 7) + 1 cycles from start to done. Mechanisms
// counted, each must occur: the small-deformation sweep, every composition
// sweep (ping-pong between the two buffers), sample points clamped at the
// volume border, and each of the four arithmetic-port functions.
module tb_dartel_accel;
  import dartel_pkg::*;
  import dartel_ref_pkg::*;

  localparam int NX = 6, NY = 5, NZ = 4, K = 3;
  localparam int N = NX * NY * NZ, AW = $clog2(N);

  logic          clk = 0, rst = 1;
  logic          vel_we = 0, start = 0, busy, done;
  logic [AW-1:0] vel_addr = '0, res_addr = '0;
  vec3_t         vel_data = '0;
  logic [7:0]    sweeps;
  def_t          res_data;
  logic          m_valid = 0, m_rvalid;
  logic [1:0]    m_op = '0;
  fx_t           m_a = '0, m_b = '0, m_result;
  int checks = 0, failures = 0, cyc = 0;

  dartel_accel #(.NX(NX), .NY(NY), .NZ(NZ), .K_STEPS(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  int    u [][3];
  rvol_t r0, r1;
  int    mech_sweeps, mech_clamp, mech_math [4], mech_runs;

  task automatic load_and_run(input int run);
    int t0, s0, bad;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      vel_we = 1;
      vel_addr = AW'(i);
      vel_data = '{x: 16'(u[i][0]), y: 16'(u[i][1]), z: 16'(u[i][2])};
    end
    @(negedge clk);
    vel_we = 0;
    // reference
    clamp_events = 0;
    small_def(u, NX, NY, NZ, K, r0);
    for (int k = 0; k < K; k++) begin
      compose(r0, r0, NX, NY, NZ, r1);
      r0 = r1;
    end
    mech_clamp += clamp_events;
    s0 = int'(sweeps);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != (N + 2) + K * (N + 7) + 1) begin
      failures++;
      $display("FAIL: run %0d took %0d cycles, expected %0d", run, cyc - t0, (N + 2) + K * (N + 7) + 1);
    end
    mech_sweeps += int'(8'(sweeps - 8'(s0)));
    mech_runs++;
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL: busy after done");
    end
    bad = 0;
    for (int i = 0; i <= N; i++) begin
      if (i > 0) begin
        checks++;
        if (!same(from_def(res_data), r0[i - 1])) begin
          failures++;
          if (bad++ < 5)
            $display("FAIL: run %0d voxel %0d phi (%0d %0d %0d) expected (%0d %0d %0d)", run, i - 1,
                     res_data.phi.x, res_data.phi.y, res_data.phi.z,
                     r0[i - 1].p[0], r0[i - 1].p[1], r0[i - 1].p[2]);
        end
      end
      res_addr = AW'((i < N) ? i : 0);
      @(negedge clk);
    end
  endtask

  // Arithmetic port: a few requests of each kind, exact-latency and value checks.
  task automatic math_check();
    int ea [4][3] = '{'{640, 128, -1280}, '{512, 32767, 2}, '{128, 348, 1}, '{0, 128, -700}};
    int eb [3] = '{256, -384, 3};
    int want [4][3];
    want[0] = '{320, -42, -32768};                 // 5/2, 1/-3 (trunc), -10/0.0234
    want[1] = '{256, 2047, 16};                    // sqrt(4), sqrt(255.99), sqrt(1/64)
    want[2] = '{0, 128, -621};                     // ln 1, ln e, ln(1/128)
    want[3] = '{128, 348, 0};                      // e^0, e^1, e^-5.47
    for (int o = 0; o < 4; o++)
      for (int i = 0; i < 3; i++) begin
        int t0, d;
        @(negedge clk);
        m_valid = 1; m_op = 2'(o); m_a = fx_t'(ea[o][i]); m_b = fx_t'(eb[i]);
        t0 = cyc;
        @(negedge clk);
        m_valid = 0;
        while (!m_rvalid && cyc - t0 < 20) @(negedge clk);
        d = int'(m_result) - want[o][i];
        checks++;
        if (!m_rvalid || cyc - t0 != 6 || d > 1 || d < -1) begin
          failures++;
          $display("FAIL: op %0d a %0d -> %0d expected %0d, latency %0d", o, ea[o][i], m_result, want[o][i], cyc - t0);
        end else mech_math[o]++;
      end
  endtask

  initial begin
    mech_sweeps = 0; mech_clamp = 0; mech_runs = 0;
    for (int o = 0; o < 4; o++) mech_math[o] = 0;
    u = new[N];
    repeat (3) @(negedge clk);
    rst = 0;
    math_check();
    for (int run = 0; run < 2; run++) begin
      for (int z = 0; z < NZ; z++)
        for (int y = 0; y < NY; y++)
          for (int x = 0; x < NX; x++) begin
            int i;
            i = x + NX * (y + NY * z);
            // random velocities up to +-3 voxels after scaling: many
            // sample points leave the volume
            for (int c = 0; c < 3; c++) u[i][c] = $urandom_range(6144) - 3072;
          end
      load_and_run(run);
    end
    checks++;
    if (mech_sweeps != 2 * (K + 1)) begin
      failures++;
      $display("FAIL: %0d sweeps, expected %0d", mech_sweeps, 2 * (K + 1));
    end
    checks++;
    if (mech_clamp == 0) begin
      failures++;
      $display("FAIL: no sample point clamped at the border");
    end
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (mech_math[o] == 0) begin
        failures++;
        $display("FAIL: arithmetic op %0d never exercised", o);
      end
    end
    $display("mechanisms: runs %0d, sweeps %0d (small deformation + compositions), border clamps %0d, div %0d sqrt %0d log %0d exp %0d",
             mech_runs, mech_sweeps, mech_clamp, mech_math[0], mech_math[1], mech_math[2], mech_math[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
