// center_mem: the small embedded memory of one systolic cell ("M"), holding
// the center of one class, one word per spectral band.
//
// One write port, written while centers are streamed in, and one read port
// that the cell reads every clock while pixels stream through. The read is
// asynchronous (distributed memory), so the center component of the band
// that arrives at the cell is available in the same cycle; this keeps the
// cell to one pipeline stage. The document gives the memory's content and
// size (NB_BAND values per class); the ports and read timing are this
// design's choices. Contents start at zero.
module center_mem #(
  parameter int DEPTH  = 224,
  parameter int WIDTH  = 16,
  parameter int ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
