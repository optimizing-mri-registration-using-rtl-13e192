// fx_div_nr: pipelined fixed-point divider, q = a / b (Q9.7 in, Q9.7 out).
//
// The quotient is formed the Newton-Raphson way: the divisor magnitude is
// normalised to m in [0.5, 1), its reciprocal is refined from the linear
// start value 48/17 - 32/17*m by ITERS iterations x <- x*(2 - m*x), and the
// reciprocal is multiplied by the dividend and shifted back by the
// normalisation exponent. Reciprocal and quotient via Newton-Raphson follow
// the design description; the start value, the iteration count, the Q30
// internal format and truncating arithmetic are this implementation's own.
//
// Each iteration is one pipeline stage, so the unit accepts one operand pair
// every cycle (initiation interval 1). Timing: in_valid/a/b presented in
// cycle t appear as out_valid/q in cycle t + ITERS + 2 (5 by default). The
// quotient is truncated toward zero within one LSB and saturated to the
// 16-bit range; b = 0 gives the largest value with the sign of a.
module fx_div_nr
  import dartel_pkg::*;
#(
  parameter int ITERS = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  output logic out_valid,
  output fx_t  q
);

  localparam int LATENCY = ITERS + 2;
  // Q30 constants for the start value 48/17 - 32/17*m.
  localparam logic [63:0] C48_17 = 64'd3031741621;
  localparam logic [63:0] C32_17 = 64'd2021161081;
  localparam logic [63:0] TWO_Q30 = 64'd1 << 31;

  typedef struct packed {
    logic        valid;
    logic        neg;     // quotient sign
    logic        dz;      // divide by zero
    logic [16:0] amag;    // |a|
    logic [3:0]  p;       // leading-one position of |b|
    logic [15:0] m;       // normalised |b|, value m / 2^16 in [0.5, 1)
    logic [63:0] x;       // reciprocal estimate, Q30
  } stage_t;

  stage_t st [ITERS+1];   // st[0] after normalisation, st[k] after iteration k

  function automatic logic [3:0] lead_one(input logic [16:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < 16; i++)
      if (v[i]) r = 4'(i);
    return r;
  endfunction

  // Stage 0: magnitudes, normalisation and start value.
  always_ff @(posedge clk) begin
    logic [16:0] am, bm;
    logic [3:0]  p;
    logic [15:0] m;
    am = a[FX_W-1] ? 17'(-{a[FX_W-1], a}) : 17'({1'b0, a});
    bm = b[FX_W-1] ? 17'(-{b[FX_W-1], b}) : 17'({1'b0, b});
    p  = lead_one(bm);
    m  = 16'(bm << (4'd15 - p));
    st[0].valid <= rst ? 1'b0 : in_valid;
    st[0].neg   <= a[FX_W-1] ^ b[FX_W-1];
    st[0].dz    <= (bm == '0);
    st[0].amag  <= am;
    st[0].p     <= p;
    st[0].m     <= m;
    st[0].x     <= C48_17 - ((C32_17 * 64'(m)) >> 16);
  end

  // Newton-Raphson stages.
  for (genvar k = 1; k <= ITERS; k++) begin : g_iter
    always_ff @(posedge clk) begin
      logic [63:0] mx, t;
      mx = (64'(st[k-1].m) * st[k-1].x) >> 16;  // m*x, Q30
      t  = TWO_Q30 - mx;                         // 2 - m*x, Q30
      st[k]       <= st[k-1];
      st[k].valid <= rst ? 1'b0 : st[k-1].valid;
      st[k].x     <= (st[k-1].x * t) >> 30;
    end
  end

  // Final stage: multiply by the dividend, undo the normalisation, saturate.
  always_ff @(posedge clk) begin
    logic [63:0] mag;
    stage_t s;
    s   = st[ITERS];
    mag = (64'(s.amag) * s.x) >> (6'd24 + 6'(s.p));
    out_valid <= rst ? 1'b0 : s.valid;
    if (s.dz || (!s.neg && mag > 64'd32767))
      q <= s.neg ? fx_t'(16'sh8000) : fx_t'(16'sh7fff);
    else if (s.neg && mag > 64'd32768)
      q <= fx_t'(16'sh8000);
    else
      q <= s.neg ? fx_t'(-mag[15:0]) : fx_t'(mag[15:0]);
  end

endmodule
