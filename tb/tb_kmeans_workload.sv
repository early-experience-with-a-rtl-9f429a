// tb_kmeans_workload: the two accelerators on the evaluated problem sizes.
//
// Part 1, 64 pixels, 8 classes, 8 bands (8-bit components): K-Means run to
// convergence twice from the same random start, once with the first
// accelerator (every band of every pixel/center distance sent through the
// distance registers, the class loop in software) and once with the second
// (the linear array of 8 cells returns the nearest class of each pixel; the
// software only moves pixels and recomputes centers, in blocks of B = 8).
// Both must give the same classes in every pass as a plain software model,
// and the same final clustering.
// Part 2, 224 pixels against 224 classes (8 bands): one assignment pass with
// the first accelerator, checked against the software model.
module tb_kmeans_workload;
  localparam int NC = 8, NB = 8, NPIX = 64, B = 8, NC2 = 224, NPIX2 = 224;

  logic clk = 0, rst = 1;
  logic [3:0]  bus_address = 0;
  logic        bus_read = 0, bus_write = 0, bus_waitrequest;
  logic [31:0] bus_writedata = 0, bus_readdata;
  int checks = 0, failures = 0, cycles = 0;

  kmeans_hybrid_top #(.NB_CLASS(NC), .NB_BAND(NB), .WAIT_STATES(2), .RES_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic xfer(logic wr, int a, logic [31:0] d, output logic [31:0] q);
    int clocks = 0;
    bus_address = 4'(a); bus_write = wr; bus_read = !wr; bus_writedata = d;
    #1;
    while (bus_waitrequest) begin
      @(posedge clk); #1; clocks++;
      if (clocks > 1000) begin
        failures++;
        $display("FAIL access to %0d never completes", a);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    q = bus_readdata;
    @(posedge clk); #1;
    bus_write = 0; bus_read = 0;
  endtask
  task automatic wr(int a, logic [31:0] d);
    logic [31:0] q;
    xfer(1, a, d, q);
  endtask
  task automatic rd(int a, output logic [31:0] q);
    xfer(0, a, 32'd0, q);
  endtask

  localparam int A_UL_RESET = 0, A_CENTER = 1, A_DIST_IN = 2, A_PIXEL = 3, A_DIST_OUT = 4;
  localparam int A_CTRL = 8, A_DATA = 9, A_RESULT = 10;

  int pixel [NPIX2][NB];
  int center [NC2][NB];
  longint acc [NC2][NB];
  int ncent [NC2];
  int cls [NPIX2];

  function automatic int l1(int p, int k);
    int d = 0;
    for (int b = 0; b < NB; b++) d += (pixel[p][b] > center[k][b]) ? pixel[p][b] - center[k][b]
                                                                  : center[k][b] - pixel[p][b];
    return d;
  endfunction

  function automatic int nearest_sw(int p, int nc);
    int best = -1, bd = 0;
    for (int k = 0; k < nc; k++) if (ncent[k] != 0) begin
      int d = l1(p, k);
      if (best < 0 || d < bd) begin best = k; bd = d; end
    end
    return best;
  endfunction

  // first accelerator: the class loop in software, every band in hardware
  task automatic nearest_hw1(int p, int nc, output int best);
    int bd = 0;
    logic [31:0] q;
    best = -1;
    for (int k = 0; k < nc; k++) if (ncent[k] != 0) begin
      logic [15:0] dacc = 0;
      for (int b = 0; b < NB; b++) begin
        wr(A_CENTER, 32'(center[k][b]));
        wr(A_DIST_IN, 32'(dacc));
        wr(A_PIXEL, 32'(pixel[p][b]));
        rd(A_DIST_OUT, q);
        dacc = q[15:0];
      end
      if (best < 0 || int'(dacc) < bd) begin best = k; bd = int'(dacc); end
    end
  endtask

  task automatic init_classes(int npix, int nc);
    for (int k = 0; k < nc; k++) begin
      ncent[k] = 0;
      for (int b = 0; b < NB; b++) acc[k][b] = 0;
    end
    for (int p = 0; p < npix; p++) begin
      cls[p] = (p < nc) ? p : int'($urandom_range(0, nc - 1));
      ncent[cls[p]]++;
      for (int b = 0; b < NB; b++) acc[cls[p]][b] += pixel[p][b];
    end
    for (int k = 0; k < nc; k++) recompute(k);
  endtask

  task automatic recompute(int k);
    if (ncent[k] != 0)
      for (int b = 0; b < NB; b++) center[k][b] = int'(acc[k][b] / ncent[k]);
  endtask

  function automatic bit move(int p, int k);
    if (cls[p] == k) return 0;
    ncent[cls[p]]--;
    for (int b = 0; b < NB; b++) acc[cls[p]][b] -= pixel[p][b];
    cls[p] = k; ncent[k]++;
    for (int b = 0; b < NB; b++) acc[k][b] += pixel[p][b];
    return 1;
  endfunction

  task automatic load_center(int k);
    wr(A_CTRL, {22'd0, 1'b1, ncent[k] != 0, 8'(k)});
    for (int b = 0; b < NB; b++) wr(A_DATA, 32'(center[k][b]));
  endtask

  // K-Means to convergence; mode 1 or 2 selects the accelerator
  task automatic kmeans(int mode, output int passes, output int t);
    int moved;
    int t0 = cycles;
    logic [31:0] q;
    init_classes(NPIX, NC);
    if (mode == 2) for (int k = 0; k < NC; k++) load_center(k);
    passes = 0;
    do begin
      moved = 0;
      for (int i = 0; i < NPIX; i += B) begin
        int idx [B];
        bit change [NC];
        for (int k = 0; k < NC; k++) change[k] = 0;
        if (mode == 2) begin
          for (int j = 0; j < B; j++)
            for (int b = 0; b < NB; b++) wr(A_DATA, 32'(pixel[i + j][b]));
          for (int j = 0; j < B; j++) begin rd(A_RESULT, q); idx[j] = int'(q[31:24]); end
        end else
          for (int j = 0; j < B; j++) nearest_hw1(i + j, NC, idx[j]);
        for (int j = 0; j < B; j++) begin
          int exp_k = nearest_sw(i + j, NC);
          expect_true(idx[j] == exp_k, $sformatf("mode %0d pixel %0d: class %0d expected %0d",
                                                 mode, i + j, idx[j], exp_k));
        end
        for (int j = 0; j < B; j++) begin
          int old = cls[i + j];
          if (move(i + j, idx[j])) begin moved++; change[old] = 1; change[idx[j]] = 1; end
        end
        for (int k = 0; k < NC; k++) if (change[k]) begin
          recompute(k);
          if (mode == 2) load_center(k);
        end
      end
      passes++;
    end while (moved != 0 && passes < 30);
    expect_true(moved == 0, $sformatf("mode %0d converged", mode));
    t = cycles - t0;
  endtask

  task automatic run();
    int final1 [NPIX];
    int seed_classes [NPIX];
    int p1, p2, t1, t2;
    // 64 pixels of 8 bands in 4 loose groups, 8-bit components
    for (int p = 0; p < NPIX; p++) begin
      int g = p % 4;
      for (int b = 0; b < NB; b++)
        pixel[p][b] = (g * 50 + b * 7) % 200 + int'($urandom_range(0, 55));
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    // same start for both runs
    process::self().srandom(7);
    kmeans(1, p1, t1);
    for (int p = 0; p < NPIX; p++) final1[p] = cls[p];
    process::self().srandom(7);
    kmeans(2, p2, t2);
    expect_true(p1 == p2, "same number of passes");
    for (int p = 0; p < NPIX; p++) expect_true(cls[p] == final1[p], "same final classes");
    $display("64 pixels, 8 classes, 8 bands: %0d passes; first accelerator %0d clocks, array %0d clocks",
             p1, t1, t2);
    // 224 pixels, 224 classes, one assignment pass on the first accelerator
    for (int p = 0; p < NPIX2; p++)
      for (int b = 0; b < NB; b++) pixel[p][b] = int'($urandom_range(0, 255));
    init_classes(NPIX2, NC2);
    for (int p = 0; p < NPIX2; p++) begin
      int k;
      nearest_hw1(p, NC2, k);
      expect_true(k == nearest_sw(p, NC2), $sformatf("224 classes, pixel %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run();
endmodule
