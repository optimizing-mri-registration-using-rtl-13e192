// tb_fx_div_nr: self-checking test of the Newton-Raphson divider.
// Random and corner operands (zero divisor, most negative values, tiny
// divisors that saturate) are issued with random gaps; each result is
// compared with the exact quotient trunc(a * 128 / b), saturated, within one
// LSB, and must appear exactly LATENCY = ITERS + 2 cycles after its request.
module tb_fx_div_nr;
  import dartel_pkg::*;

  localparam int LAT = 5;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fx_t  a = '0, b = '0, q;
  int   checks = 0, failures = 0, cyc = 0;

  fx_div_nr #(.ITERS(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  typedef struct { int a; int b; int t; } req_t;
  req_t pend[$];

  function automatic int expect_q(input int x, input int y);
    longint e;
    if (y == 0) return (x < 0) ? -32768 : 32767;
    e = (longint'(x) * 128) / y;                  // truncates toward zero
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    return int'(e);
  endfunction

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      req_t r;
      int e, d;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %0d", q);
      end else begin
        r = pend.pop_front();
        e = expect_q(r.a, r.b);
        d = int'(q) - e;
        if (d > 1 || d < -1 || cyc - r.t != LAT) begin
          failures++;
          $display("FAIL: %0d / %0d -> %0d, expected %0d, latency %0d", r.a, r.b, q, e, cyc - r.t);
        end
      end
    end
  end

  initial begin
    int ca [10] = '{0, 128, -128, 32767, -32768, 1, 300, -5000, 32767, 640};
    int cb [10] = '{128, 0, 0, 1, 1, 32767, -32768, 3, -32768, 7};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = (i < 10) || ($urandom_range(3) != 0);
      if (i < 10) begin
        a = fx_t'(ca[i]); b = fx_t'(cb[i]);
      end else begin
        a = fx_t'($urandom);
        b = ($urandom_range(1) == 0) ? fx_t'($urandom) : fx_t'($signed(16'($urandom_range(2047))) - 16'sd1024);
      end
      if (in_valid) pend.push_back('{int'(a), int'(b), cyc});
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
