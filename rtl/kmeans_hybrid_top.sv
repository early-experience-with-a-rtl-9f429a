// kmeans_hybrid_top: the user logic of the hybrid processor for K-Means
// clustering, as seen from the processor's memory-mapped bus.
//
// Both accelerators of the design sit behind one bus decoder that adds the
// platform's wait states:
//   word addresses 0-4   first accelerator (dist_pio): one distance step,
//                        dist_out = dist_in + |pixel - center|, per call
//   word addresses 8-10  second accelerator (array_accel): a linear array of
//                        NB_CLASS cells that returns the nearest class of
//                        each streamed pixel
// The processor, its instruction and data memory and the outer loop of the
// algorithm (reassigning pixels, updating the centers) are outside this
// module; the processor drives the bus ports. Defaults are the configuration
// the document synthesised: 32 classes of 224 bands, 2 wait states. The
// result buffer depth is this design's choice.
module kmeans_hybrid_top
  import kmeans_pkg::*;
#(
  parameter int NB_CLASS    = 32,
  parameter int NB_BAND     = 224,
  parameter int WAIT_STATES = 2,
  parameter int RES_DEPTH   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [3:0]        bus_address,
  input  logic              bus_read,
  input  logic              bus_write,
  input  logic [DATA_W-1:0] bus_writedata,
  output logic [DATA_W-1:0] bus_readdata,
  output logic              bus_waitrequest
);

  pio_bus_if #(.ADDR_W(3), .DATA_W(DATA_W)) dist_bus ();
  pio_bus_if #(.ADDR_W(2), .DATA_W(DATA_W)) arr_bus ();

  pio_decoder #(.ADDR_W(4), .DATA_W(DATA_W), .WAIT_STATES(WAIT_STATES),
                .LO_ADDR_W(3), .HI_ADDR_W(2)) u_dec (
    .clk, .rst,
    .address    (bus_address),
    .read       (bus_read),
    .write      (bus_write),
    .writedata  (bus_writedata),
    .readdata   (bus_readdata),
    .waitrequest(bus_waitrequest),
    .lo         (dist_bus),
    .hi         (arr_bus)
  );

  dist_pio #(.PIX_W(16), .DIST_W(16)) u_dist (
    .clk, .rst,
    .bus(dist_bus)
  );

  array_accel #(.NB_CLASS(NB_CLASS), .NB_BAND(NB_BAND), .RES_DEPTH(RES_DEPTH)) u_arr (
    .clk, .rst,
    .bus(arr_bus)
  );

endmodule
