// fx_math_unit: the accelerator's fixed-point arithmetic functions behind a
// single request port.
//
// It holds the Newton-Raphson divider and square root and the table-based
// logarithm and exponential, the replacements the design uses for costly
// division, root, log and exp operations. A request (in_valid, op, a, b)
// goes to the unit selected by op: 0 divide a/b, 1 sqrt(a), 2 ln(a),
// 3 e^a. The faster units' outputs are delayed so that every op takes
// LATENCY = 6 cycles (request in cycle t, result in cycle t + 6); results
// therefore leave in request order, one per cycle, and a new request may
// enter every cycle. Grouping the functions
// behind one port with equal latency is this implementation's choice.
module fx_math_unit
  import dartel_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [1:0] op,
  input  fx_t        a,
  input  fx_t        b,
  output logic       out_valid,
  output fx_t        result
);

  localparam int DIV_ITERS  = 3;
  localparam int SQRT_ITERS = 4;
  localparam int LATENCY    = SQRT_ITERS + 2;
  localparam int UNIT_LAT [4] = '{DIV_ITERS + 2, SQRT_ITERS + 2, 2, 2};

  logic [3:0] u_valid;
  fx_t        u_res [4];

  fx_div_nr #(.ITERS(DIV_ITERS)) u_div (
    .clk, .rst, .in_valid(in_valid && op == 2'd0), .a, .b,
    .out_valid(u_valid[0]), .q(u_res[0]));

  fx_sqrt_nr #(.ITERS(SQRT_ITERS)) u_sqrt (
    .clk, .rst, .in_valid(in_valid && op == 2'd1), .a,
    .out_valid(u_valid[1]), .r(u_res[1]));

  fx_log_lut u_log (
    .clk, .rst, .in_valid(in_valid && op == 2'd2), .a,
    .out_valid(u_valid[2]), .r(u_res[2]));

  fx_exp_lut u_exp (
    .clk, .rst, .in_valid(in_valid && op == 2'd3), .a,
    .out_valid(u_valid[3]), .r(u_res[3]));

  // Pad every unit to LATENCY.
  logic [3:0] d_valid;
  fx_t        d_res [4];

  for (genvar u = 0; u < 4; u++) begin : g_pad
    localparam int PAD = LATENCY - UNIT_LAT[u];
    if (PAD == 0) begin : g_none
      assign d_valid[u] = u_valid[u];
      assign d_res[u]   = u_res[u];
    end else begin : g_dly
      logic [PAD-1:0] v_sr;
      fx_t            r_sr [PAD];
      always_ff @(posedge clk) begin
        v_sr[0] <= rst ? 1'b0 : u_valid[u];
        r_sr[0] <= u_res[u];
        for (int k = 1; k < PAD; k++) begin
          v_sr[k] <= rst ? 1'b0 : v_sr[k-1];
          r_sr[k] <= r_sr[k-1];
        end
      end
      assign d_valid[u] = v_sr[PAD-1];
      assign d_res[u]   = r_sr[PAD-1];
    end
  end

  always_comb begin
    out_valid = |d_valid;
    result = '0;
    for (int u = 0; u < 4; u++)
      if (d_valid[u]) result = d_res[u];
  end

  // Equal latencies mean at most one unit can finish per cycle.
  assert property (@(posedge clk) disable iff (rst) $onehot0(d_valid));

endmodule
