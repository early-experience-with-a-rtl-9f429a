// dist_pio: register block of the first accelerator (one distance step per
// call).
//
// The processor writes the pixel component, the center component and the
// running distance into three registers and reads the updated distance back,
// one memory-mapped word at a time, exactly as the software calls
// send_data() and get_result(). A fourth register drives a synchronous clear
// of the result. Register map (word offsets): 0 ul_reset (bit 0), 1 center,
// 2 dist_in, 3 pixel, 4 dist_out (read only). Registers 0 to 3 read back
// what was written; unmapped offsets read zero. The register names follow
// the document; the offsets, widths and read-back are this design's choices.
// Accesses never wait here: the wait states are added by the bus decoder.
// dist_out is valid one clock after the last operand write.
module dist_pio
  import kmeans_pkg::DATA_W;
#(
  parameter int PIX_W  = 16,
  parameter int DIST_W = 16
) (
  input  logic     clk,
  input  logic     rst,
  pio_bus_if.agent bus
);

  typedef enum logic [2:0] {
    R_UL_RESET = 3'd0,
    R_CENTER   = 3'd1,
    R_DIST_IN  = 3'd2,
    R_PIXEL    = 3'd3,
    R_DIST_OUT = 3'd4
  } reg_e;

  logic              ul_reset;
  logic [PIX_W-1:0]  center_q, pixel_q;
  logic [DIST_W-1:0] dist_in_q, dist_out;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ul_reset  <= 1'b0;
      center_q  <= '0;
      pixel_q   <= '0;
      dist_in_q <= '0;
    end else if (bus.write) begin
      unique case (reg_e'(bus.address))
        R_UL_RESET: ul_reset  <= bus.writedata[0];
        R_CENTER:   center_q  <= PIX_W'(bus.writedata);
        R_DIST_IN:  dist_in_q <= DIST_W'(bus.writedata);
        R_PIXEL:    pixel_q   <= PIX_W'(bus.writedata);
        default: ;
      endcase
    end
  end

  dist_calc #(.PIX_W(PIX_W), .DIST_W(DIST_W)) u_dist (
    .clk, .rst,
    .clr     (ul_reset),
    .pixel   (pixel_q),
    .center  (center_q),
    .dist_in (dist_in_q),
    .dist_out(dist_out)
  );

  always_comb begin
    bus.waitrequest = 1'b0;
    unique case (reg_e'(bus.address))
      R_UL_RESET: bus.readdata = DATA_W'(ul_reset);
      R_CENTER:   bus.readdata = DATA_W'(center_q);
      R_DIST_IN:  bus.readdata = DATA_W'(dist_in_q);
      R_PIXEL:    bus.readdata = DATA_W'(pixel_q);
      R_DIST_OUT: bus.readdata = DATA_W'(dist_out);
      default:    bus.readdata = '0;
    endcase
  end

endmodule
