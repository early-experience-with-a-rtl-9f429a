// tb_kmeans_hybrid_top: the whole user logic at its default size (32 classes,
// 224 bands, 2 wait states) running K-Means clustering end to end, with this
// testbench as the processor and its software.
//
// A 120-pixel, 224-band image is generated from 5 random cluster means plus
// noise (14-bit components). The pixels start in random classes among the
// first 8; the other 24 classes are empty and therefore inactive. Each pass
// over the image works in blocks of B = 17 pixels, one more than the result
// buffer holds: the software streams the block, waits until the status
// register shows the array stalled on the 17th result, then reads all 17
// results. Each result is checked against a nearest-center search done here.
// The software then moves pixels, updates the per-class sums and counts and
// reloads the centers of the classes that changed (deactivating classes that
// became empty), exactly as the reference loop does. Passes repeat until no
// pixel moves. Finally the first accelerator recomputes some pixel/center
// distances band by band through its registers, and its clear register is
// used once. Every bus access must take WAIT_STATES + 1 clocks, except a
// result read issued before the result has left the array (the short last
// block), which waits for it. Counted and required: wait-stated accesses,
// array stalls, center reloads, inactive classes, clears of the distance
// register, pixel moves and waiting result reads.
module tb_kmeans_hybrid_top;
  import kmeans_pkg::*;
  localparam int NC = 32, NB = 224, WS = 2, RD = 16;
  localparam int NPIX = 120, B = RD + 1, NCLUST = 5, NINIT = 8;

  logic clk = 0, rst = 1;
  logic [3:0]  bus_address = 0;
  logic        bus_read = 0, bus_write = 0, bus_waitrequest;
  logic [31:0] bus_writedata = 0, bus_readdata;
  int checks = 0, failures = 0;
  int n_access = 0, n_stall = 0, n_reload = 0, n_inactive = 0, n_clear = 0, n_moves = 0,
      n_result_wait = 0;

  kmeans_hybrid_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // one bus transfer; address, data and strobe held until waitrequest drops
  task automatic xfer(logic wr, int a, logic [31:0] d, output logic [31:0] q);
    int clocks = 1;
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
    n_access++;
    // only a result read may wait longer: until the array has produced it
    if (a == 10 && clocks > WS + 1) n_result_wait++;
    else if (clocks != WS + 1) begin
      checks++; failures++;
      if (failures < 20) $display("FAIL access to %0d took %0d clocks", a, clocks);
    end
  endtask

  task automatic wr(int a, logic [31:0] d);
    logic [31:0] q;
    xfer(1, a, d, q);
  endtask

  task automatic rd(int a, output logic [31:0] q);
    xfer(0, a, 32'd0, q);
  endtask

  // register map of the top
  localparam int A_UL_RESET = 0, A_CENTER = 1, A_DIST_IN = 2, A_PIXEL = 3, A_DIST_OUT = 4;
  localparam int A_CTRL = 8, A_DATA = 9, A_RESULT = 10;

  // the software's data
  int pixel  [NPIX][NB];
  int center [NC][NB];
  longint acc [NC][NB];
  int ncent  [NC];
  int cls    [NPIX];
  bit change [NC];

  function automatic int l1(int p, int k);
    int d = 0;
    for (int b = 0; b < NB; b++) d += (pixel[p][b] > center[k][b]) ? pixel[p][b] - center[k][b]
                                                                  : center[k][b] - pixel[p][b];
    return d;
  endfunction

  task automatic load_center(int k);
    bit act = ncent[k] != 0;
    wr(A_CTRL, {22'd0, 1'b1, act, 8'(k)});
    for (int b = 0; b < NB; b++) wr(A_DATA, 32'(center[k][b]));
    n_reload++;
    if (!act) n_inactive++;
  endtask

  task automatic recompute(int k);
    if (ncent[k] != 0)
      for (int b = 0; b < NB; b++) center[k][b] = int'(acc[k][b] / ncent[k]);
  endtask

  // the software; automatic, so that every loop-local variable is fresh
  task automatic run();
    int mean [NCLUST][NB];
    logic [31:0] q;
    int moved, pass;
    // image
    for (int c = 0; c < NCLUST; c++)
      for (int b = 0; b < NB; b++) mean[c][b] = int'($urandom_range(1000, 15000));
    for (int p = 0; p < NPIX; p++) begin
      int c = int'($urandom_range(0, NCLUST - 1));
      for (int b = 0; b < NB; b++) pixel[p][b] = mean[c][b] + int'($urandom_range(0, 800)) - 400;
    end
    // random initial classes, sums and centers
    for (int k = 0; k < NC; k++) begin
      ncent[k] = 0;
      for (int b = 0; b < NB; b++) begin acc[k][b] = 0; center[k][b] = 0; end
    end
    for (int p = 0; p < NPIX; p++) begin
      cls[p] = (p < NINIT) ? p : int'($urandom_range(0, NINIT - 1));
      ncent[cls[p]]++;
      for (int b = 0; b < NB; b++) acc[cls[p]][b] += pixel[p][b];
    end
    for (int k = 0; k < NC; k++) recompute(k);

    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    for (int k = 0; k < NC; k++) load_center(k);

    pass = 0;
    do begin
      moved = 0;
      for (int i = 0; i < NPIX; i += B) begin
        int nblk = (NPIX - i < B) ? NPIX - i : B;
        int idx [B];
        // stream the block
        for (int j = 0; j < nblk; j++)
          for (int b = 0; b < NB; b++) wr(A_DATA, 32'(pixel[i + j][b]));
        // a full block stalls the array on its last result
        if (nblk == B) begin
          int polls = 0;
          do begin rd(A_CTRL, q); polls++; end while (!q[16] && polls < 1000);
          expect_true(q[16] && q[15:0] == 16'(RD), $sformatf("stalled with full buffer: %h", q));
          if (q[16]) n_stall++;
        end
        // read the results and check them
        for (int j = 0; j < nblk; j++) begin
          int best = -1, bd = 0;
          rd(A_RESULT, q);
          for (int k = 0; k < NC; k++)
            if (ncent[k] != 0) begin
              int d = l1(i + j, k);
              if (best < 0 || d < bd) begin best = k; bd = d; end
            end
          expect_true(int'(q[31:24]) == best && int'(q[23:0]) == bd,
                      $sformatf("pixel %0d: class %0d dist %0d, expected %0d %0d",
                                i + j, q[31:24], q[23:0], best, bd));
          idx[j] = int'(q[31:24]);
        end
        // reassign, as in the reference loop
        for (int k = 0; k < NC; k++) change[k] = 0;
        for (int j = 0; j < nblk; j++) begin
          int p = i + j;
          if (cls[p] != idx[j]) begin
            moved++;
            ncent[cls[p]]--; change[cls[p]] = 1;
            for (int b = 0; b < NB; b++) acc[cls[p]][b] -= pixel[p][b];
            cls[p] = idx[j]; ncent[cls[p]]++; change[cls[p]] = 1;
            for (int b = 0; b < NB; b++) acc[cls[p]][b] += pixel[p][b];
          end
        end
        for (int k = 0; k < NC; k++) if (change[k]) begin
          recompute(k);
          load_center(k);
        end
      end
      n_moves += moved;
      pass++;
      $display("pass %0d: %0d pixels moved", pass, moved);
    end while (moved != 0 && pass < 12);
    expect_true(moved == 0, "clustering converged");

    // first accelerator: distance of some pixels to their class center
    for (int p = 0; p < 4; p++) begin
      logic [15:0] dacc = 0;
      wr(A_UL_RESET, 0);
      for (int b = 0; b < NB; b++) begin
        wr(A_CENTER, 32'(center[cls[p]][b]));
        wr(A_DIST_IN, 32'(dacc));
        wr(A_PIXEL, 32'(pixel[p][b]));
        rd(A_DIST_OUT, q);
        dacc = q[15:0];
      end
      expect_true(dacc == 16'(l1(p, cls[p])), $sformatf("distance unit: %0d", dacc));
    end
    wr(A_UL_RESET, 1);
    rd(A_DIST_OUT, q);
    expect_true(q == 0, "distance register cleared");
    if (q == 0) n_clear++;
    wr(A_UL_RESET, 0);

    $display("accesses=%0d stalls=%0d reloads=%0d inactive=%0d clears=%0d moves=%0d waited_reads=%0d passes=%0d",
             n_access, n_stall, n_reload, n_inactive, n_clear, n_moves, n_result_wait, pass);
    expect_true(n_access > 0 && n_stall > 0 && n_reload > NC && n_inactive > 0 && n_clear > 0
                && n_moves > 0 && n_result_wait > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run();
endmodule
