// dartel_accel: FPGA accelerator for the deformation part of DARTEL
// diffeomorphic registration, with a fixed-point arithmetic function port.
//
// A DARTEL deformation is the exponential of a stationary velocity field u:
// Phi^(1) is reached by scaling and squaring, Phi^(1/2^K) = x + u/2^K
// followed by K self-compositions Phi^(2t) = Phi^(t) o Phi^(t), each also
// composing the Jacobian field by the chain rule. With K = 3 this is the
// eight-time-step Euler scheme of the method. The accelerator runs it as
// K + 1 sweeps over the whole volume, each at one voxel per clock:
//
//   sweep 0       small_deformation: velocity memory -> buffer 0
//   sweep 1..K    compose_unit: buffer s -> buffer 1-s (s = 0, 1, 0, ...)
//
// The result lands in buffer K mod 2. Velocity volume and the two
// deformation buffers are full-image on-chip arrays (vol_mem); the host loads
// u through vel_* and reads Phi^(1) and its Jacobian through res_* (stand-ins
// for the PCIe link, whose IP is not part of this RTL). The fx_math_unit
// (Newton-Raphson divide and sqrt, table log and exp) is reachable through
// the m_* port; which DARTEL expressions the host evaluates with it is left
// to the host. The full multigrid solver and the velocity-to-momentum
// function of the accelerated DARTEL code are not part of this RTL.
//
// Interface and timing: load u (one word per cycle, vel_we), pulse start,
// wait for the done pulse (busy high meanwhile). With start high in cycle
// s, done is high in cycle s + (N + 2) + K * (N + 7) + 1 for N = NX*NY*NZ
// voxels (8,491,804 cycles at the default size). Then res_data shows the
// buffer word at res_addr one cycle after the address. sweeps counts
// finished sweeps since reset (wraps at 256). Arithmetic requests on m_*
// return on m_rvalid/m_result six cycles later, one per cycle. Do not load
// u or read results while busy.
module dartel_accel
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
  // velocity load
  input  logic          vel_we,
  input  logic [AW-1:0] vel_addr,
  input  vec3_t         vel_data,
  // run control
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [7:0]    sweeps,
  // result read
  input  logic [AW-1:0] res_addr,
  output def_t          res_data,
  // arithmetic functions
  input  logic          m_valid,
  input  logic [1:0]    m_op,
  input  fx_t           m_a,
  input  fx_t           m_b,
  output logic          m_rvalid,
  output fx_t           m_result
);

  localparam int N = NX * NY * NZ;
  localparam int RES_BUF = K_STEPS % 2;

  // ---------------------------------------------------------------- memories
  logic [AW-1:0] u_raddr [4];
  logic [47:0]   u_rdata_w [4];
  vec3_t         u_rdata [4];

  vol_mem #(.DEPTH(N), .WIDTH(48), .NRD(4), .AW(AW)) u_vel (
    .clk, .we(vel_we), .waddr(vel_addr), .wdata(vel_data),
    .raddr(u_raddr), .rdata(u_rdata_w));

  for (genvar i = 0; i < 4; i++) begin : g_u
    assign u_rdata[i] = vec3_t'(u_rdata_w[i]);
  end

  logic          sd_start, sd_busy, sd_done, sd_we;
  logic [AW-1:0] sd_waddr;
  def_t          sd_wdata;

  logic          c_start, c_busy, c_done, c_we;
  logic [AW-1:0] c_waddr, c_braddr;
  logic [AW-1:0] c_araddr [8];
  def_t          c_wdata, c_brdata;
  def_t          c_ardata [8];

  logic          src;        // buffer read by the current composition

  logic [AW-1:0] b_raddr [10];
  logic [191:0]  b_rdata [2][10];
  logic          b_we [2];
  logic [AW-1:0] b_waddr [2];
  def_t          b_wdata [2];

  always_comb begin
    for (int k = 0; k < 8; k++) b_raddr[k] = c_araddr[k];
    b_raddr[8] = c_braddr;
    b_raddr[9] = res_addr;
    // buffer 0 is written by the small deformation or by a composition
    b_we[0]    = sd_we || (c_we && src == 1'b1);
    b_waddr[0] = sd_we ? sd_waddr : c_waddr;
    b_wdata[0] = sd_we ? sd_wdata : c_wdata;
    b_we[1]    = c_we && src == 1'b0;
    b_waddr[1] = c_waddr;
    b_wdata[1] = c_wdata;
    for (int k = 0; k < 8; k++) c_ardata[k] = def_t'(b_rdata[src][k]);
    c_brdata = def_t'(b_rdata[src][8]);
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    vol_mem #(.DEPTH(N), .WIDTH(192), .NRD(10), .AW(AW)) u_buf (
      .clk, .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b]),
      .raddr(b_raddr), .rdata(b_rdata[b]));
  end

  assign res_data = def_t'(b_rdata[RES_BUF][9]);

  // ---------------------------------------------------------------- sweeps
  small_deformation #(.NX(NX), .NY(NY), .NZ(NZ), .K_STEPS(K_STEPS), .AW(AW)) u_sd (
    .clk, .rst, .start(sd_start), .busy(sd_busy), .done(sd_done),
    .u_raddr, .u_rdata, .we(sd_we), .waddr(sd_waddr), .wdata(sd_wdata));

  compose_unit #(.NX(NX), .NY(NY), .NZ(NZ), .AW(AW)) u_cmp (
    .clk, .rst, .start(c_start), .busy(c_busy), .done(c_done),
    .b_raddr(c_braddr), .b_rdata(c_brdata), .a_raddr(c_araddr), .a_rdata(c_ardata),
    .we(c_we), .waddr(c_waddr), .wdata(c_wdata));

  // ---------------------------------------------------------------- control
  typedef enum logic [2:0] {S_IDLE, S_SD, S_CSTART, S_CWAIT} state_t;
  state_t     state;
  logic [7:0] k;             // compositions finished in this run

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      k      <= '0;
      src    <= 1'b0;
      done   <= 1'b0;
      sweeps <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            state <= S_SD;
            k     <= '0;
            src   <= 1'b0;
          end
        S_SD:
          if (sd_done) begin
            sweeps <= sweeps + 1'b1;
            if (K_STEPS == 0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else state <= S_CSTART;
          end
        S_CSTART:
          state <= S_CWAIT;
        S_CWAIT:
          if (c_done) begin
            sweeps <= sweeps + 1'b1;
            if (k + 1'b1 == 8'(K_STEPS)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              k     <= k + 1'b1;
              src   <= ~src;
              state <= S_CSTART;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sd_start = (state == S_IDLE) && start;
  assign c_start  = (state == S_CSTART);
  assign busy     = (state != S_IDLE);

  // A composition never starts while the previous sweep is still writing.
  assert property (@(posedge clk) disable iff (rst) c_start |-> !c_busy && !sd_busy);
  // The two sweep units never write in the same cycle.
  assert property (@(posedge clk) disable iff (rst) !(sd_we && c_we));

  // ---------------------------------------------------------------- arithmetic
  fx_math_unit u_math (
    .clk, .rst, .in_valid(m_valid), .op(m_op), .a(m_a), .b(m_b),
    .out_valid(m_rvalid), .result(m_result));

endmodule
