// array_accel: the second accelerator, which finds the nearest class of
// whole pixels by streaming them through a linear array of one cell per
// class.
//
// It joins the sender, the array and the collector and gives the processor
// four word registers:
//   0  write: control (stream_sender: [9] load center, [8] class active,
//      [7:0] class); read: status ([15:0] results waiting, [16] array stalled)
//   1  write: one component (pixel or center, bits [15:0]); waits while the
//      array is stalled
//   2  read: oldest result, {class[31:24], distance[23:0]}, removed by the
//      read; waits until a result is there
//   3  reads zero
// Software loads the centers (once per block of pixels), streams pixels and
// reads one result per pixel; the pixel reassignment and the center update
// stay in software, as in the document. The register layout is this design's.
module array_accel
  import kmeans_pkg::*;
#(
  parameter int NB_CLASS  = 32,
  parameter int NB_BAND   = 224,
  parameter int RES_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst,
  pio_bus_if.agent bus
);

  stream_t     s_head, s_tail;
  logic        adv, wr_valid, wr_ctrl, wr_ready, pop, res_valid;
  class_t      res_idx;
  dist_t       res_dist;
  logic [15:0] res_count;
  logic [1:0]  a;

  always_comb begin
    a        = 2'(bus.address);
    wr_ctrl  = a == 2'd0;
    wr_valid = bus.write && (a == 2'd0 || a == 2'd1);
    pop      = bus.read && a == 2'd2 && res_valid;
    bus.waitrequest = (bus.write && a == 2'd1 && !wr_ready)
                   || (bus.read  && a == 2'd2 && !res_valid);
    unique case (a)
      2'd0:    bus.readdata = {15'd0, !adv, res_count};
      2'd2:    bus.readdata = {res_idx, res_dist};
      default: bus.readdata = '0;
    endcase
  end

  stream_sender #(.NB_BAND(NB_BAND)) u_send (
    .clk, .rst, .adv,
    .wr_valid, .wr_ctrl,
    .wr_data (bus.writedata),
    .wr_ready,
    .out_w   (s_head)
  );

  systolic_array #(.NB_CLASS(NB_CLASS), .NB_BAND(NB_BAND)) u_array (
    .clk, .rst, .adv,
    .in_w (s_head),
    .out_w(s_tail)
  );

  result_collector #(.DEPTH(RES_DEPTH)) u_coll (
    .clk, .rst,
    .in_w (s_tail),
    .adv,
    .pop,
    .res_valid,
    .res_idx,
    .res_dist,
    .count(res_count)
  );

endmodule
