// tb_dist_pio: software-style use of the first accelerator. For random
// pixel/center vectors it runs the modified inner loop: per band write
// center, dist_in and pixel, then read dist_out and feed it back as the next
// dist_in. The final value must equal the 16-bit Manhattan distance. Also
// checks register read-back and the clear through the ul_reset register.
module tb_dist_pio;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  pio_bus_if #(.ADDR_W(3), .DATA_W(32)) bus ();
  dist_pio #(.PIX_W(16), .DIST_W(16)) dut (.clk, .rst, .bus(bus));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    bus.address = 3'(a); bus.write = 1; bus.read = 0; bus.writedata = d;
    @(posedge clk); #1;
    while (bus.waitrequest) begin @(posedge clk); #1; end
    bus.write = 0;
  endtask

  task automatic rd(int a, output logic [31:0] q);
    bus.address = 3'(a); bus.read = 1; bus.write = 0;
    #1 q = bus.readdata;
    @(posedge clk); #1;
    bus.read = 0;
  endtask

  initial begin
    logic [31:0] q;
    bus.address = 0; bus.read = 0; bus.write = 0; bus.writedata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int v = 0; v < 50; v++) begin
      int nb, ref_d;
      logic [15:0] dacc;
      nb = (v < 25) ? 8 : 224;
      ref_d = 0; dacc = 0;
      for (int d = 0; d < nb; d++) begin
        int p, c;
        p = int'($urandom_range(0, 16383));
        c = int'($urandom_range(0, 16383));
        ref_d += (p > c) ? p - c : c - p;
        // send_data(0, center, dacc, pixel); dacc = get_result();
        wr(0, 0); wr(1, 32'(c)); wr(2, 32'(dacc)); wr(3, 32'(p));
        @(posedge clk); #1;   // dist_out follows one clock after the operands
        rd(4, q);
        dacc = q[15:0];
      end
      expect_true(dacc == 16'(ref_d), $sformatf("distance %0d expected %0d", dacc, ref_d % 65536));
    end
    // read-back of the operand registers
    wr(1, 32'h1234); wr(2, 32'h0042); wr(3, 32'h1200);
    rd(4, q); expect_true(q != 32'h0076, "dist_out not yet updated in the clock after the write");
    rd(1, q); expect_true(q == 32'h1234, "center read-back");
    rd(2, q); expect_true(q == 32'h0042, "dist_in read-back");
    rd(3, q); expect_true(q == 32'h1200, "pixel read-back");
    rd(4, q); expect_true(q == 32'h0076, "dist_out");
    rd(5, q); expect_true(q == 0, "unmapped reads zero");
    // ul_reset clears dist_out while set
    wr(0, 1);
    @(posedge clk); #1;
    rd(0, q); expect_true(q == 1, "ul_reset read-back");
    rd(4, q); expect_true(q == 0, "dist_out cleared");
    wr(0, 0);
    @(posedge clk); #1;
    rd(4, q); expect_true(q == 32'h0076, "dist_out after clear released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
