// tb_center_mem: random writes and same-cycle asynchronous reads of a
// 224-word center memory, against an array model; also checks that a write
// becomes visible on the clock edge and that contents start at zero.
module tb_center_mem;
  localparam int DEPTH = 224;
  logic clk = 0, we = 0;
  logic [7:0]  waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  center_mem #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int a);
    raddr = 8'(a); #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++; $display("FAIL addr %0d: %0h expected %0h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) chk(i);
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom_range(0, 1));
      waddr = 8'($urandom_range(0, DEPTH - 1));
      wdata = 16'($urandom);
      chk(int'($urandom_range(0, DEPTH - 1)));
      // the old value is still read before the edge
      chk(int'(waddr));
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      chk(int'(waddr));
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) chk(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
