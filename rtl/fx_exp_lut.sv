// fx_exp_lut: exponential by table look-up, r = e^a (Q9.7 in/out).
//
// A look-up table replaces the iterative exponential, as in the design's
// treatment of elementary functions. The operand is turned into a power of
// two, a * log2(e) = i + f with integer i and f in [0, 1); the top LUT_BITS
// bits of f index a table holding 2^(k/2^LUT_BITS) in Q1.14, computed at
// elaboration, and the entry is shifted by i. Table size and indexing are
// this implementation's choice; the relative error is below 0.4 %. Results
// above the 16-bit range saturate, results below one LSB give 0.
//
// Two pipeline stages, initiation interval 1: in_valid/a presented in cycle
// t appear as out_valid/r in cycle t + 2.
module fx_exp_lut
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

  localparam int TF = 14;                              // table fraction bits
  localparam logic signed [31:0] LOG2E_Q14 = 32'sd23637;
  localparam int ENTRIES = 1 << LUT_BITS;
  localparam int YF = FX_F + TF;                       // fraction bits of a*log2(e)

  typedef logic [15:0] table_t [ENTRIES];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < ENTRIES; k++)
      t[k] = 16'($rtoi($pow(2.0, real'(k) / real'(ENTRIES)) * real'(1 << TF) + 0.5));
    return t;
  endfunction

  localparam table_t POW2_TABLE = make_table();

  logic                valid1;
  logic signed [31:0]  i1;
  logic [LUT_BITS-1:0] idx1;

  always_ff @(posedge clk) begin
    logic signed [31:0] y;
    y = 32'(a) * LOG2E_Q14;                            // Q.21
    valid1 <= rst ? 1'b0 : in_valid;
    i1     <= y >>> YF;
    idx1   <= y[YF-1 -: LUT_BITS];
  end

  always_ff @(posedge clk) begin
    logic [47:0] v;
    logic signed [31:0] sh;
    sh = i1 - 32'(TF - FX_F);                        // net left shift of the entry
    if (sh > 32'sd16)      v = 48'hffff_ffff_ffff;
    else if (sh >= 0)      v = 48'(POW2_TABLE[idx1]) << sh[4:0];
    else if (sh < -32'sd20) v = '0;
    else                   v = 48'(POW2_TABLE[idx1]) >> (-sh);
    out_valid <= rst ? 1'b0 : valid1;
    r <= (v > 48'd32767) ? fx_t'(16'sh7fff) : fx_t'(v[15:0]);
  end

endmodule
