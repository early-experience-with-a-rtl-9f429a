// tb_kmeans_cell: drives one cell (class 3, 8 bands) with center words for
// itself and for another class, then with random pixels, random incoming best
// pairs, bubbles and stalls. Each clock the registered output is compared
// with a behavioural model of the cell's rule: pass every word on, store own
// center words, and on a pixel's last band replace the best pair when the
// active class is strictly nearer.
module tb_kmeans_cell;
  import kmeans_pkg::*;
  localparam int NB = 8;
  localparam class_t ME = 8'd3;

  logic clk = 0, rst = 1, adv = 1;
  stream_t in_w, out_w, exp_w;
  int checks = 0, failures = 0, wins = 0, losses = 0, stalls = 0;

  kmeans_cell #(.NB_BAND(NB), .MY_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  pix_t  m_center [NB];
  logic  m_active = 0;
  dist_t m_acc = 0;

  function automatic stream_t model_step(stream_t w);
    stream_t o = w;
    dist_t   d;
    if (w.valid && w.kind == W_CENTER && w.cls == ME) begin
      m_center[w.band] = w.data;
      m_active = w.active;
    end
    if (w.valid && w.kind == W_PIXEL) begin
      d = dist_t'((w.data > m_center[w.band]) ? w.data - m_center[w.band]
                                              : m_center[w.band] - w.data);
      m_acc = (w.band == 0) ? d : m_acc + d;
      if (w.last) begin
        if (m_active && m_acc < w.bdist) begin o.bdist = m_acc; o.bidx = ME; wins++; end
        else losses++;
      end
    end
    return o;
  endfunction

  function automatic stream_t mk(word_kind_e k, int band, class_t c, logic act,
                                 pix_t data, dist_t bd, class_t bi);
    stream_t w = '0;
    w.valid = 1; w.kind = k; w.band = band_t'(band); w.last = (band == NB - 1);
    w.cls = c; w.active = act; w.data = data; w.bdist = bd; w.bidx = bi;
    return w;
  endfunction

  // apply one word; while adv is low, the output must hold
  task automatic apply(stream_t w);
    stream_t held;
    while ($urandom_range(0, 4) == 0) begin
      held = out_w;
      in_w = mk(W_PIXEL, 0, 0, 0, pix_t'($urandom), '0, '0);  // ignored while stalled
      adv = 0;
      @(posedge clk); #1;
      checks++; stalls++;
      if (out_w !== held) begin failures++; $display("FAIL: output moved during stall"); end
    end
    adv = 1;
    in_w = w;
    exp_w = model_step(w);
    @(posedge clk); #1;
    checks++;
    if (out_w !== exp_w) begin
      failures++;
      $display("FAIL: out %p expected %p", out_w, exp_w);
    end
  endtask

  initial begin
    in_w = '0;
    for (int b = 0; b < NB; b++) m_center[b] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 40; round++) begin
      // centers: for another class first, then for this one
      for (int b = 0; b < NB; b++)
        apply(mk(W_CENTER, b, 8'd2, 1, pix_t'($urandom_range(0, 16383)), '0, '0));
      for (int b = 0; b < NB; b++)
        apply(mk(W_CENTER, b, ME, (round % 5) != 4, pix_t'($urandom_range(0, 16383)), '0, '0));
      for (int p = 0; p < 20; p++) begin
        dist_t bd = (p % 3 == 0) ? DIST_MAX : dist_t'($urandom_range(0, 8 * 16384));
        class_t bi = class_t'($urandom_range(0, 2));
        for (int b = 0; b < NB; b++) begin
          apply(mk(W_PIXEL, b, 0, 0, pix_t'($urandom_range(0, 16383)), bd, bi));
          if ($urandom_range(0, 3) == 0) apply('0);   // bubble
        end
      end
    end
    checks++;
    if (wins == 0 || losses == 0 || stalls == 0) begin
      failures++;
      $display("FAIL: coverage wins=%0d losses=%0d stalls=%0d", wins, losses, stalls);
    end
    $display("wins=%0d losses=%0d stalls=%0d", wins, losses, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
