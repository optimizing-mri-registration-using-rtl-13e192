// fx_log_lut: natural logarithm by table look-up, r = ln(a) (Q9.7 in/out).
//
// A look-up table replaces the iterative log, as in the design's treatment
// of elementary functions. The operand is normalised at its leading one,
// a = 2^(p-7) * (1 + f) with f in [0, 1); the LUT_BITS bits of f right
// below the leading one index a table holding ln(1 + i/2^LUT_BITS) in Q2.14,
// and ln(a) = (p - 7) * ln 2 + table[i], rounded to Q9.7. The table is
// computed at elaboration from that formula. Table size and indexing are
// this implementation's choice; the error stays within one LSB.
// Operands <= 0 give the most negative value.
//
// Two pipeline stages, initiation interval 1: in_valid/a presented in cycle
// t appear as out_valid/r in cycle t + 2.
module fx_log_lut
  import dartel_pkg::*;
#(
  parameter int LUT_BITS = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fx_t  a,
  output logic out_valid,
  output fx_t  r
);

  localparam int TF = 14;                          // table fraction bits
  localparam logic signed [31:0] LN2_Q14 = 32'sd11357;
  localparam int ENTRIES = 1 << LUT_BITS;

  typedef logic [15:0] table_t [ENTRIES];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < ENTRIES; i++)
      t[i] = 16'($rtoi($ln(1.0 + real'(i) / real'(ENTRIES)) * real'(1 << TF) + 0.5));
    return t;
  endfunction

  localparam table_t LN_TABLE = make_table();

  logic                valid1;
  logic                bad1;
  logic [3:0]          p1;
  logic [LUT_BITS-1:0] idx1;

  function automatic logic [3:0] lead_one(input logic [14:0] v);
    logic [3:0] p;
    p = '0;
    for (int i = 0; i < 15; i++)
      if (v[i]) p = 4'(i);
    return p;
  endfunction

  always_ff @(posedge clk) begin
    logic [3:0]  p;
    logic [13:0] frac;
    p = lead_one(a[14:0]);
    frac = 14'({a[14:0], 14'd0} >> p);  // bits below the leading one
    valid1 <= rst ? 1'b0 : in_valid;
    bad1   <= a[FX_W-1] || (a == '0);
    p1     <= p;
    idx1   <= frac[13 -: LUT_BITS];
  end

  always_ff @(posedge clk) begin
    logic signed [31:0] acc;
    acc = (32'(signed'({1'b0, p1})) - 32'sd7) * LN2_Q14 + 32'(LN_TABLE[idx1]);
    out_valid <= rst ? 1'b0 : valid1;
    r <= bad1 ? fx_t'(16'sh8000) : fx_t'((acc + 32'sd64) >>> (TF - FX_F));
  end

endmodule
