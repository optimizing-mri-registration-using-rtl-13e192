// tb_fx_exp_lut: self-checking test of the table-based exponential.
// Results are compared with e^(a / 128) * 128 from real arithmetic, within
// 2 LSB + 0.4 %; results beyond the range must saturate to 32767.
// Requests are issued with random gaps; each result must appear exactly
// LAT cycles after its request and in order.
module tb_fx_exp_lut;
  import dartel_pkg::*;

  localparam int LAT = 2;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fx_t  a = '0, r;
  int   checks = 0, failures = 0, cyc = 0;

  fx_exp_lut #(.LUT_BITS(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  typedef struct { int a; int t; } req_t;
  req_t pend[$];

  function automatic bit ok(input int x, input int got);
    real e;
    e = $exp(real'(x) / 128.0) * 128.0;
    if (e >= 32767.0 * 1.004 + 2.0) return got == 32767;
    return (real'(got) - e <= 2.0 + 0.004 * e) && (e - real'(got) <= 2.0 + 0.004 * e);
  endfunction

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      req_t q;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %0d", r);
      end else begin
        q = pend.pop_front();
        if (!ok(q.a, int'(r)) || cyc - q.t != LAT) begin
          failures++;
          $display("FAIL: f(%0d) -> %0d, latency %0d", q.a, r, cyc - q.t);
        end
      end
    end
  end

  initial begin
    int ca [8] = '{0, 128, -128, 32767, -32768, 700, 711, -900};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = (i < 8) || ($urandom_range(3) != 0);
      if (i < 8) a = fx_t'(ca[i]);
      else a = fx_t'($signed(16'($urandom_range(2047))) - 16'sd1280);
      if (in_valid) pend.push_back('{int'(a), cyc});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", pend.size());
    end
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
