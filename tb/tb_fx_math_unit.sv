// tb_fx_math_unit: self-checking test of the arithmetic function port.
// A random mix of divide, sqrt, log and exp requests, back to back and with
// gaps, is checked against real-arithmetic references (tolerances as in the
// unit tests), for request order and for the fixed 6-cycle latency. Each op
// must have been exercised.
module tb_fx_math_unit;
  import dartel_pkg::*;

  localparam int LAT = 6;
  logic       clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [1:0] op = '0;
  fx_t        a = '0, b = '0, result;
  int         checks = 0, failures = 0, cyc = 0;
  int         seen [4] = '{0, 0, 0, 0};

  fx_math_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  typedef struct { int op; int a; int b; int t; } req_t;
  req_t pend[$];

  function automatic bit ok(input req_t q, input int got);
    real e;
    longint d;
    case (q.op)
      0: begin
        if (q.b == 0) return got == ((q.a < 0) ? -32768 : 32767);
        d = (longint'(q.a) * 128) / q.b;
        if (d > 32767) d = 32767;
        if (d < -32768) d = -32768;
        return (got - d <= 1) && (d - got <= 1);
      end
      1: begin
        if (q.a <= 0) return got == 0;
        e = $floor($sqrt(real'(q.a) * 128.0) + 1e-9);
        return (real'(got) - e <= 1.0) && (e - real'(got) <= 1.0);
      end
      2: begin
        if (q.a <= 0) return got == -32768;
        e = $floor($ln(real'(q.a) / 128.0) * 128.0 + 0.5);
        return (real'(got) - e <= 1.0) && (e - real'(got) <= 1.0);
      end
      default: begin
        e = $exp(real'(q.a) / 128.0) * 128.0;
        if (e >= 32767.0 * 1.004 + 2.0) return got == 32767;
        return (real'(got) - e <= 2.0 + 0.004 * e) && (e - real'(got) <= 2.0 + 0.004 * e);
      end
    endcase
  endfunction

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      req_t q;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        q = pend.pop_front();
        seen[q.op]++;
        if (!ok(q, int'(result)) || cyc - q.t != LAT) begin
          failures++;
          $display("FAIL: op %0d (%0d, %0d) -> %0d, latency %0d", q.op, q.a, q.b, result, cyc - q.t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 1000) || ($urandom_range(2) != 0);
      op = 2'($urandom_range(3));
      a = (op == 2'd3) ? fx_t'($signed(16'($urandom_range(2047))) - 16'sd1280) : fx_t'($urandom);
      b = fx_t'($signed(16'($urandom_range(4095))) - 16'sd2048);
      if (in_valid) pend.push_back('{int'(op), int'(a), int'(b), cyc});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", pend.size());
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: op %0d never exercised", k);
      end
    end
    $display("ops: div %0d sqrt %0d log %0d exp %0d", seen[0], seen[1], seen[2], seen[3]);
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
