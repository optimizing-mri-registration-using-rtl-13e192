// tb_vol_mem: self-checking test of the multi-port volume memory.
// Random writes and reads on all ports against a shadow array: every read
// port must return the word at its address one cycle later, with a read of
// the address being written returning the old word.
module tb_vol_mem;
  localparam int DEPTH = 60, WIDTH = 20, NRD = 3, AW = 6;
  logic             clk = 0, we = 0;
  logic [AW-1:0]    waddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [AW-1:0]    raddr [NRD];
  logic [WIDTH-1:0] rdata [NRD];
  int checks = 0, failures = 0, collisions = 0;

  vol_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(NRD), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] exp_q [NRD];
  bit               exp_v = 0;

  initial begin
    for (int i = 0; i < NRD; i++) raddr[i] = '0;
    // initialise every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom);
      shadow[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check reads issued in the previous cycle
      if (exp_v)
        for (int i = 0; i < NRD; i++) begin
          checks++;
          if (rdata[i] !== exp_q[i]) begin
            failures++;
            $display("FAIL: port %0d read %h expected %h", i, rdata[i], exp_q[i]);
          end
        end
      we = $urandom_range(1);
      waddr = AW'($urandom_range(DEPTH - 1));
      wdata = WIDTH'($urandom);
      for (int i = 0; i < NRD; i++) begin
        raddr[i] = ($urandom_range(3) == 0) ? waddr : AW'($urandom_range(DEPTH - 1));
        exp_q[i] = shadow[raddr[i]];
        if (we && raddr[i] == waddr) collisions++;
      end
      exp_v = 1;
      if (we) shadow[waddr] = wdata;
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL: no read-during-write case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
