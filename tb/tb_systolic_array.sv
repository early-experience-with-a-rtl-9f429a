// tb_systolic_array: an array of 6 cells with 5 bands. Loads centers (one
// class inactive), streams random pixels with bubbles and random stalls,
// then reloads the centers right behind the pixels of the previous block.
// Each result leaving the array is checked against a direct nearest-center
// search (strictly smaller distance wins, lowest class on ties, inactive
// classes skipped) using the centers in force when the pixel entered; with a
// full stream it checks that a result leaves NB_CLASS clocks after the last
// component entered.
module tb_systolic_array;
  import kmeans_pkg::*;
  localparam int NC = 6, NB = 5;

  logic clk = 0, rst = 1, adv = 1;
  stream_t in_w, out_w;
  int checks = 0, failures = 0, results = 0, ties = 0;

  systolic_array #(.NB_CLASS(NC), .NB_BAND(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t  cen [NC][NB];
  logic  act [NC];
  typedef struct { class_t idx; dist_t d; } exp_t;
  exp_t  expq [$];
  int    random_stalls = 1;

  // random stalls, independent of the stimulus
  always @(negedge clk) adv <= random_stalls ? ($urandom_range(0, 4) != 0) : 1'b1;

  // checker at the output
  always @(posedge clk) if (!rst && adv && out_w.valid && out_w.kind == W_PIXEL && out_w.last) begin
    exp_t e;
    e = expq.pop_front();
    checks++; results++;
    if (out_w.bidx !== e.idx || out_w.bdist !== e.d) begin
      failures++;
      $display("FAIL result: got class %0d dist %0d, expected %0d %0d",
               out_w.bidx, out_w.bdist, e.idx, e.d);
    end
  end

  task automatic put(stream_t w);
    in_w = w;
    @(posedge clk);
    while (!adv) @(posedge clk);
    #1 in_w = '0;
  endtask

  task automatic load_centers();
    for (int k = 0; k < NC; k++) begin
      act[k] = (k != 2);
      for (int b = 0; b < NB; b++) begin
        stream_t w = '0;
        cen[k][b] = pix_t'($urandom_range(0, 255));
        w.valid = 1; w.kind = W_CENTER; w.band = band_t'(b); w.last = (b == NB - 1);
        w.cls = class_t'(k); w.active = act[k]; w.data = cen[k][b];
        put(w);
      end
    end
  endtask

  task automatic send_pixel(logic bubbles);
    pix_t px [NB];
    exp_t e = '{idx: '0, d: DIST_MAX};
    int best_cnt = 0;
    for (int b = 0; b < NB; b++) px[b] = pix_t'($urandom_range(0, 255));
    for (int k = 0; k < NC; k++) if (act[k]) begin
      dist_t d = 0;
      for (int b = 0; b < NB; b++)
        d += dist_t'((px[b] > cen[k][b]) ? px[b] - cen[k][b] : cen[k][b] - px[b]);
      if (d < e.d) begin e.d = d; e.idx = class_t'(k); end
      else if (d == e.d) ties++;
    end
    expq.push_back(e);
    for (int b = 0; b < NB; b++) begin
      stream_t w = '0;
      w.valid = 1; w.kind = W_PIXEL; w.band = band_t'(b); w.last = (b == NB - 1);
      w.data = px[b]; w.bdist = DIST_MAX;
      put(w);
      if (bubbles && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    in_w = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int blk = 0; blk < 20; blk++) begin
      load_centers();
      for (int p = 0; p < 30; p++) send_pixel(1);
    end
    // identical centers for classes 0 and 1 force ties
    for (int b = 0; b < NB; b++) begin cen[1][b] = cen[0][b]; end
    for (int k = 0; k < 2; k++) for (int b = 0; b < NB; b++) begin
      stream_t w = '0;
      w.valid = 1; w.kind = W_CENTER; w.band = band_t'(b); w.last = (b == NB - 1);
      w.cls = class_t'(k); w.active = 1; w.data = cen[0][b];
      put(w);
    end
    for (int p = 0; p < 30; p++) send_pixel(0);
    // latency with a free-running array
    repeat (NC + 2) @(posedge clk);
    random_stalls = 0;
    @(posedge clk); #1;
    begin
      int t0, t1;
      fork
        send_pixel(0);
        begin
          // from the clock the last component is presented to cell 0
          // until the clock its result is presented to the collector
          wait (in_w.valid && in_w.last); t0 = $time;
          wait (out_w.valid && out_w.last); t1 = $time;
        end
      join
      checks++;
      if ((t1 - t0 + 5) / 10 != NC) begin
        failures++; $display("FAIL latency %0d clocks", (t1 - t0 + 5) / 10);
      end
    end
    repeat (NC + 5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || ties == 0) begin
      failures++; $display("FAIL: %0d results missing, ties=%0d", expq.size(), ties);
    end
    $display("results=%0d ties=%0d", results, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
