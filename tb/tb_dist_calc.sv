// tb_dist_calc: random operands against dist_in + |pixel - center| mod 2^16,
// checking the one-clock latency, the synchronous clear and the asynchronous
// reset.
module tb_dist_calc;
  logic        clk = 0, rst = 1, clr = 0;
  logic [15:0] pixel = 0, center = 0, dist_in = 0, dist_out;
  int checks = 0, failures = 0;

  dist_calc #(.PIX_W(16), .DIST_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] exp, string what);
    checks++;
    if (dist_out !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, dist_out, exp);
    end
  endtask

  initial begin
    int p, c, d, e;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(16'd0, "after reset");
    for (int i = 0; i < 2000; i++) begin
      p = (i < 4) ? (i * 3) : int'($urandom_range(0, 16383));
      c = (i < 4) ? (5 - i) : int'($urandom_range(0, 16383));
      d = int'($urandom_range(0, 65535));
      e = (d + ((p > c) ? p - c : c - p)) % 65536;
      pixel = 16'(p); center = 16'(c); dist_in = 16'(d);
      @(posedge clk); #1;
      check(16'(e), "step");
    end
    // clear from the user-logic reset register
    clr = 1; @(posedge clk); #1; check(16'd0, "clr"); clr = 0;
    pixel = 100; center = 40; dist_in = 7;
    @(posedge clk); #1; check(16'd67, "after clr");
    // async reset acts without a clock edge
    #2 rst = 1; #1 check(16'd0, "async reset"); rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
