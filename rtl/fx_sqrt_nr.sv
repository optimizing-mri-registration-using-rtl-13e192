// fx_sqrt_nr: pipelined fixed-point square root, r = sqrt(a) (Q9.7 in/out).
//
// The root comes from a Newton-Raphson iteration, as the design prescribes
// for square roots. The operand, scaled to N = a * 2^7 so that the result is
// floor(sqrt(N)), is normalised by an even power of two to m in [0.25, 1).
// The inverse root y = 1/sqrt(m) is refined from the linear start value
// 7/3 - 4/3*m by ITERS iterations y <- y*(3 - m*y^2)/2, then sqrt(m) = m*y
// is shifted back by half the normalisation exponent. The inverse-root form,
// the start value, the iteration count and the Q30 internal format are this
// implementation's choice. Negative operands give 0.
//
// One iteration per pipeline stage, initiation interval 1. in_valid/a
// presented in cycle t appear as out_valid/r in cycle t + ITERS + 2 (6 by
// default); the result is within one LSB below the exact root.
module fx_sqrt_nr
  import dartel_pkg::*;
#(
  parameter int ITERS = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fx_t  a,
  output logic out_valid,
  output fx_t  r
);

  localparam logic [63:0] C7_3 = 64'd2505397589;   // 7/3 in Q30
  localparam logic [63:0] C4_3 = 64'd1431655765;   // 4/3 in Q30
  localparam logic [63:0] THREE_Q30 = 64'd3 << 30;

  typedef struct packed {
    logic        valid;
    logic        zero;    // operand <= 0
    logic [4:0]  e;       // even normalisation exponent, N = m * 2^e
    logic [63:0] m;       // normalised operand, Q30
    logic [63:0] y;       // inverse-root estimate, Q30
  } stage_t;

  stage_t st [ITERS+1];

  function automatic logic [4:0] lead_one(input logic [21:0] v);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < 22; i++)
      if (v[i]) p = 5'(i);
    return p;
  endfunction

  always_ff @(posedge clk) begin
    logic [21:0] n;
    logic [4:0]  p, e;
    logic [63:0] m;
    n = a[FX_W-1] ? '0 : {a[14:0], 7'd0};
    p = lead_one(n);
    e = (p + 5'd2) & 5'b11110;
    m = 64'(n) << (6'd30 - 6'(e));
    st[0].valid <= rst ? 1'b0 : in_valid;
    st[0].zero  <= (n == '0);
    st[0].e     <= e;
    st[0].m     <= m;
    st[0].y     <= C7_3 - ((C4_3 * m) >> 30);
  end

  for (genvar k = 1; k <= ITERS; k++) begin : g_iter
    always_ff @(posedge clk) begin
      logic [63:0] y2, t;
      y2 = (st[k-1].y * st[k-1].y) >> 30;
      t  = THREE_Q30 - ((st[k-1].m * y2) >> 30);
      st[k]       <= st[k-1];
      st[k].valid <= rst ? 1'b0 : st[k-1].valid;
      st[k].y     <= (st[k-1].y * t) >> 31;
    end
  end

  always_ff @(posedge clk) begin
    logic [63:0] my;
    my = (st[ITERS].m * st[ITERS].y) >> 30;        // sqrt(m), Q30
    out_valid <= rst ? 1'b0 : st[ITERS].valid;
    r <= st[ITERS].zero ? '0 : fx_t'(my >> (6'd30 - 6'(st[ITERS].e >> 1)));
  end

endmodule
