// tb_result_collector: feeds words as they leave the last cell (results,
// other pixel components, center words, bubbles) into a collector with a
// 4-entry buffer and pops at random. Checks the order and content of the
// results against a queue, the count, and that adv drops exactly when a
// result meets a full buffer.
module tb_result_collector;
  import kmeans_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 0, rst = 1, adv, pop = 0, res_valid;
  stream_t in_w;
  class_t res_idx;
  dist_t res_dist;
  logic [15:0] count;
  int checks = 0, failures = 0, stalls = 0, pushed = 0;
  logic [31:0] q [$];
  logic adv_q;

  result_collector #(.DEPTH(DEPTH)) dut (.*);

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

  initial begin
    in_w = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 5000; n++) begin
      logic is_res;
      int kind_sel;
      kind_sel = int'($urandom_range(0, 3));
      // the word only changes when the array advanced at the last edge
      if (n == 0 || adv_q) begin
        in_w = '0;
        in_w.valid = kind_sel != 0;
        in_w.kind  = (kind_sel == 3) ? W_CENTER : W_PIXEL;
        in_w.last  = 1'($urandom_range(0, 1));
        in_w.bdist = dist_t'($urandom);
        in_w.bidx  = class_t'($urandom);
      end
      pop = (q.size() > 0) && ($urandom_range(0, 2) == 0);
      #1;
      is_res = in_w.valid && in_w.kind == W_PIXEL && in_w.last;
      expect_true(int'(count) == q.size(), $sformatf("count %0d model %0d n=%0d", count, q.size(), n));
      expect_true(res_valid == (q.size() > 0), "res_valid");
      expect_true(adv == !(is_res && q.size() == DEPTH), "adv");
      if (pop) expect_true({res_idx, res_dist} == q[0], "result order/content");
      if (!adv) stalls++;
      adv_q = adv;
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (is_res && adv_q) begin q.push_back({in_w.bidx, in_w.bdist}); pushed++; end
    end
    expect_true(stalls > 0 && pushed > 100, "stall and results seen");
    $display("stalls=%0d results=%0d", stalls, pushed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
