// tb_pio_decoder: a host performs random reads and writes through the
// decoder to two register-file agents modelled here; the upper agent adds
// random waitrequest cycles of its own. Checks routing by the top address
// bit, that each access reaches its agent exactly once, the read data, and
// that a transfer takes exactly WAIT_STATES + 1 clocks plus the agent's own
// wait cycles.
module tb_pio_decoder;
  localparam int WS = 2;
  logic clk = 0, rst = 1;
  logic [3:0]  address = 0;
  logic        read = 0, write = 0, waitrequest;
  logic [31:0] writedata = 0, readdata;
  int checks = 0, failures = 0, agent_waits = 0;

  pio_bus_if #(.ADDR_W(3), .DATA_W(32)) lo ();
  pio_bus_if #(.ADDR_W(2), .DATA_W(32)) hi ();

  pio_decoder #(.ADDR_W(4), .DATA_W(32), .WAIT_STATES(WS), .LO_ADDR_W(3), .HI_ADDR_W(2))
    dut (.clk, .rst, .address, .read, .write, .writedata, .readdata, .waitrequest,
         .lo(lo), .hi(hi));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // agent models
  logic [31:0] lo_regs [8], hi_regs [4];
  int lo_hits = 0, hi_hits = 0, hi_wait_left = 0;
  logic hi_busy;
  assign lo.waitrequest = 1'b0;
  assign lo.readdata    = lo_regs[lo.address];
  assign hi.waitrequest = hi_busy;
  assign hi.readdata    = hi_regs[hi.address];
  always @(posedge clk) begin
    if (lo.write) lo_regs[lo.address] <= lo.writedata;
    if (lo.read || lo.write) lo_hits++;
    if ((hi.read || hi.write) && !hi_busy) begin
      hi_hits++;
      if (hi.write) hi_regs[hi.address] <= hi.writedata;
    end
  end
  initial hi_busy = 0;

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(logic wr, logic [3:0] a, logic [31:0] d, output logic [31:0] q,
                        output int clocks);
    address = a; write = wr; read = !wr; writedata = d;
    clocks = 0;
    forever begin
      #1;
      clocks++;
      if (!waitrequest) break;
      @(posedge clk); #1;
    end
    q = readdata;
    @(posedge clk); #1;
    read = 0; write = 0;
  endtask

  logic [31:0] m_lo [8], m_hi [4];

  initial begin
    logic [31:0] q;
    int clocks, extra, lh, hh;
    for (int i = 0; i < 8; i++) begin lo_regs[i] = 0; m_lo[i] = 0; end
    for (int i = 0; i < 4; i++) begin hi_regs[i] = 0; m_hi[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic wr;
      logic [3:0] a;
      logic [31:0] d;
      wr = 1'($urandom_range(0, 1));
      a = 4'($urandom_range(0, 15));
      d = $urandom;
      extra = a[3] ? int'($urandom_range(0, 3)) : 0;
      if (extra > 0) agent_waits++;
      lh = lo_hits; hh = hi_hits;
      // the upper agent stalls the first 'extra' clocks it is addressed
      fork
        begin
          hi_busy = extra > 0;
          for (int i = 0; i < extra; i++) @(posedge clk iff (hi.read || hi.write));
          #1 hi_busy = 0;
        end
        access(wr, a, d, q, clocks);
      join
      expect_true(clocks == WS + 1 + extra, $sformatf("clocks %0d expected %0d", clocks, WS + 1 + extra));
      if (a[3]) begin
        expect_true(hi_hits == hh + 1 && lo_hits == lh, "routed to upper agent once");
        if (wr) m_hi[a[1:0]] = d; else expect_true(q == m_hi[a[1:0]], "upper read data");
      end else begin
        expect_true(lo_hits == lh + 1 && hi_hits == hh, "routed to lower agent once");
        if (wr) m_lo[a[2:0]] = d; else expect_true(q == m_lo[a[2:0]], "lower read data");
      end
      if ($urandom_range(0, 1) == 1) begin @(posedge clk); #1; end
    end
    expect_true(agent_waits > 0, "agent wait seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
