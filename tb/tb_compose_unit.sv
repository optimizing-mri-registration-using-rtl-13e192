// tb_compose_unit: self-checking test of one composition sweep.
// A 5x4x3 deformation with random positions (many outside the volume, to
// exercise clamping) and random Jacobians (large enough to saturate the
// product) is composed with itself. Every voxel must be written exactly once
// with the reference Phi_A(Phi_B(x)) and (J_A o Phi_B) J_B, the sweep must
// take N + 6 cycles from start to done, and clamping must have occurred.
module tb_compose_unit;
  import dartel_pkg::*;
  import dartel_ref_pkg::*;

  localparam int NX = 5, NY = 4, NZ = 3, N = NX * NY * NZ, AW = $clog2(N);
  logic          clk = 0, rst = 1, start = 0, busy, done, we;
  logic [AW-1:0] b_raddr, waddr;
  logic [AW-1:0] a_raddr [8];
  def_t          b_rdata, wdata;
  def_t          a_rdata [8];
  int checks = 0, failures = 0, cyc = 0;

  compose_unit #(.NX(NX), .NY(NY), .NZ(NZ)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  def_t  dmem [N];
  rvol_t src, ref_v;
  int    hits [N];

  always_ff @(posedge clk) begin
    b_rdata <= dmem[b_raddr];
    for (int i = 0; i < 8; i++) a_rdata[i] <= dmem[a_raddr[i]];
  end

  always @(negedge clk) begin
    if (we) begin
      hits[waddr]++;
      checks++;
      if (!same(from_def(wdata), ref_v[waddr])) begin
        rdef_t g;
        g = from_def(wdata);
        failures++;
        $display("FAIL: voxel %0d phi (%0d %0d %0d) j00 %0d expected (%0d %0d %0d) j00 %0d", waddr,
                 g.p[0], g.p[1], g.p[2], g.j[0][0],
                 ref_v[waddr].p[0], ref_v[waddr].p[1], ref_v[waddr].p[2], ref_v[waddr].j[0][0]);
      end
    end
  end

  initial begin
    int t0, n [3];
    n[0] = NX; n[1] = NY; n[2] = NZ;
    src = new[N];
    for (int i = 0; i < N; i++) begin
      for (int d = 0; d < 3; d++)
        src[i].p[d] = $urandom_range((n[d] + 2) * 128) - 256;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          src[i].j[r][c] = (i == 3) ? 30000 : $urandom_range(800) - 400;
      dmem[i] = to_def(src[i]);
    end
    clamp_events = 0;
    compose(src, src, NX, NY, NZ, ref_v);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) hits[i] = 0;
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != N + 6) begin
      failures++;
      $display("FAIL: sweep took %0d cycles, expected %0d", cyc - t0, N + 6);
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
    checks++;
    if (clamp_events == 0) begin
      failures++;
      $display("FAIL: no sample point outside the volume");
    end
    $display("clamped sample coordinates: %0d", clamp_events);
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
