// tb_stream_sender: control and data writes into the sender (8 bands), with
// random stalls. Checks every stream word it emits: kind, band number, last
// flag, class, active flag, data and the initial best pair; that a center
// load returns to pixel mode after one vector; that a control write restarts
// the band count; that data writes are refused while the array is stalled
// and that the emitted word holds during a stall.
module tb_stream_sender;
  import kmeans_pkg::*;
  localparam int NB = 8;

  logic clk = 0, rst = 1, adv = 1, wr_valid = 0, wr_ctrl = 0, wr_ready;
  logic [31:0] wr_data = 0;
  stream_t out_w;
  int checks = 0, failures = 0, refused = 0;

  stream_sender #(.NB_BAND(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ctrl(logic load, logic act, int cls);
    wr_valid = 1; wr_ctrl = 1; wr_data = {22'd0, load, act, 8'(cls)};
    adv = 1'($urandom_range(0, 1));
    @(posedge clk); #1;
    wr_valid = 0;
  endtask

  // send one component; returns once it was taken
  task automatic data(pix_t v, word_kind_e k, int band, int cls, logic act);
    stream_t held;
    wr_valid = 1; wr_ctrl = 0; wr_data = {$urandom_range(0, 65535), v};
    while ($urandom_range(0, 3) == 0) begin
      adv = 0; held = out_w; #0;
      expect_true(!wr_ready, "ready while stalled");
      refused++;
      @(posedge clk); #1;
      expect_true(out_w === held, "word held in stall");
    end
    adv = 1;
    @(posedge clk); #1;
    wr_valid = 0;
    expect_true(out_w.valid && out_w.kind == k && int'(out_w.band) == band
                && out_w.last == (band == NB - 1) && out_w.data == v,
                $sformatf("word band %0d", band));
    if (k == W_CENTER)
      expect_true(int'(out_w.cls) == cls && out_w.active == act, "center tag");
    else
      expect_true(out_w.bdist == DIST_MAX && out_w.bidx == '0, "initial best pair");
    // a clock without data inserts a bubble
    if ($urandom_range(0, 2) == 0) begin
      @(posedge clk); #1;
      expect_true(!out_w.valid, "bubble");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_true(!out_w.valid, "idle after reset");
    for (int r = 0; r < 30; r++) begin
      int c;
      logic a;
      c = int'($urandom_range(0, 31));
      a = 1'($urandom_range(0, 1));
      ctrl(1, a, c);
      for (int b = 0; b < NB; b++) data(pix_t'($urandom), W_CENTER, b, c, a);
      // falls back to pixel mode without a control write
      for (int p = 0; p < 3; p++)
        for (int b = 0; b < NB; b++) data(pix_t'($urandom), W_PIXEL, b, 0, 0);
      // a partial pixel, then a control write restarts the count
      for (int b = 0; b < 3; b++) data(pix_t'($urandom), W_PIXEL, b, 0, 0);
      ctrl(0, 0, 0);
      for (int b = 0; b < NB; b++) data(pix_t'($urandom), W_PIXEL, b, 0, 0);
    end
    expect_true(refused > 0, "stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
