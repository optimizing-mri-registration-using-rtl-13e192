// tb_fx_sqrt_nr: self-checking test of the Newton-Raphson square root.
// Results are compared with floor(sqrt(a * 128)) from real arithmetic, within one LSB;
// negative operands must give 0.
// Requests are issued with random gaps; each result must appear exactly
// LAT cycles after its request and in order.
module tb_fx_sqrt_nr;
  import dartel_pkg::*;

  localparam int LAT = 6;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fx_t  a = '0, r;
  int   checks = 0, failures = 0, cyc = 0;

  fx_sqrt_nr #(.ITERS(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  typedef struct { int a; int t; } req_t;
  req_t pend[$];

  function automatic bit ok(input int x, input int got);
    int e;
    if (x <= 0) return got == 0;
    e = $rtoi($floor($sqrt(real'(x) * 128.0) + 1e-9));
    return (got - e <= 1) && (e - got <= 1);
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
    int ca [8] = '{0, 1, 128, 32767, -1, -32768, 2, 512};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = (i < 8) || ($urandom_range(3) != 0);
      if (i < 8) a = fx_t'(ca[i]);
      else a = ($urandom_range(3) == 0) ? fx_t'($urandom_range(255)) : fx_t'($urandom);
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
