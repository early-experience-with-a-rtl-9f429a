// tb_array_accel: the second accelerator's register interface, 4 classes of
// 3 bands and a 2-entry result buffer. Loads centers (one class inactive)
// through the control and data registers, streams pixels, and reads the
// results back, comparing class and distance with a direct nearest-center
// search. Streams more pixels than the buffer holds to check the status
// count, the stalled flag and that a data write waits while stalled. Also
// checks that a read of the result register waits while the buffer is empty.
module tb_array_accel;
  import kmeans_pkg::*;
  localparam int NC = 4, NB = 3, RD = 2;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  pio_bus_if #(.ADDR_W(2), .DATA_W(32)) bus ();
  array_accel #(.NB_CLASS(NC), .NB_BAND(NB), .RES_DEPTH(RD)) dut (.clk, .rst, .bus(bus));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // write; returns the number of clocks waitrequest was high. With limit > 0
  // the write is given up after that many waiting clocks.
  task automatic wr(int a, logic [31:0] d, int limit, output int waited);
    bus.address = 2'(a); bus.write = 1; bus.read = 0; bus.writedata = d;
    waited = 0;
    #1;
    while (bus.waitrequest && (limit == 0 || waited < limit)) begin
      @(posedge clk); #1; waited++;
    end
    @(posedge clk); #1;
    bus.write = 0;
  endtask

  task automatic rd(int a, output logic [31:0] q, output int waited);
    bus.address = 2'(a); bus.read = 1; bus.write = 0;
    waited = 0;
    #1;
    while (bus.waitrequest) begin @(posedge clk); #1; waited++; end
    q = bus.readdata;
    @(posedge clk); #1;
    bus.read = 0;
  endtask

  pix_t cen [NC][NB];
  logic act [NC];
  logic [31:0] expq [$];

  task automatic load_centers();
    int w;
    for (int k = 0; k < NC; k++) begin
      act[k] = (k != 1);
      wr(0, {22'd0, 1'b1, act[k], 8'(k)}, 0, w);
      for (int b = 0; b < NB; b++) begin
        cen[k][b] = pix_t'($urandom_range(0, 1000));
        wr(1, 32'(cen[k][b]), 0, w);
      end
    end
  endtask

  task automatic send_pixel(int limit, output int waited);
    pix_t px [NB];
    dist_t bd = DIST_MAX;
    class_t bi = 0;
    int w;
    waited = 0;
    for (int b = 0; b < NB; b++) px[b] = pix_t'($urandom_range(0, 1000));
    for (int k = 0; k < NC; k++) if (act[k]) begin
      dist_t d = 0;
      for (int b = 0; b < NB; b++)
        d += dist_t'((px[b] > cen[k][b]) ? px[b] - cen[k][b] : cen[k][b] - px[b]);
      if (d < bd) begin bd = d; bi = class_t'(k); end
    end
    expq.push_back({bi, bd});
    for (int b = 0; b < NB; b++) begin
      wr(1, 32'(px[b]), limit, w);
      waited += w;
    end
  endtask

  task automatic drain();
    logic [31:0] q;
    int w;
    while (expq.size() > 0) begin
      rd(2, q, w);
      expect_true(q == expq[0], $sformatf("result %h expected %h", q, expq[0]));
      void'(expq.pop_front());
    end
  endtask

  initial begin
    logic [31:0] q;
    int w;
    bus.address = 0; bus.read = 0; bus.write = 0; bus.writedata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rd(0, q, w);
    expect_true(q == 0, "status idle");
    for (int blk = 0; blk < 10; blk++) begin
      load_centers();
      for (int p = 0; p < 10; p++) begin
        send_pixel(0, w);
        repeat (NC + 2) @(posedge clk);
        #1;
        drain();
      end
    end
    // fill the result buffer: RD results, then one more stalls the array
    for (int p = 0; p < RD + 1; p++) send_pixel(0, w);
    repeat (NC + 3) @(posedge clk);
        #1;
    rd(0, q, w);
    expect_true(q[15:0] == 16'(RD) && q[16], $sformatf("status full and stalled: %h", q));
    wr(1, 32'd5, 8, w);   // this component cannot enter
    expect_true(w == 8, "data write waits while stalled");
    drain();
    // the refused component was never taken: send a full pixel again
    wr(0, 32'd0, 0, w);   // restart the band count
    send_pixel(0, w);
    repeat (NC + 3) @(posedge clk);
        #1;
    drain();
    // a result read waits until a result exists
    send_pixel(0, w);
    rd(2, q, w);
    expect_true(w > 0 && q == expq[0], "result read waited for the result");
    void'(expq.pop_front());
    rd(3, q, w);
    expect_true(q == 0, "unmapped reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
