// pio_decoder: the processor's memory-mapped path into the user logic.
//
// It takes one word-addressed bus from the processor and splits it, by the top
// address bit, between the first accelerator (dist_pio, lower half) and the
// second (array_accel, upper half). Every access is held for WAIT_STATES
// clocks before it is passed to the selected block (two by default, the count
// the document gives for its measured 11-cycle word transfer); the block may
// then stretch it further with its own waitrequest, e.g. while the array is
// stalled. The host sees waitrequest high until the cycle in which the
// transfer completes, and read data is valid in that cycle. The split of the
// address space and the place where the wait states are inserted are this
// design's choices.
module pio_decoder #(
  parameter int ADDR_W      = 4,
  parameter int DATA_W      = 32,
  parameter int WAIT_STATES = 2,
  parameter int LO_ADDR_W   = 3,   // address width of the lower block
  parameter int HI_ADDR_W   = 2    // address width of the upper block
) (
  input  logic              clk,
  input  logic              rst,
  // processor side
  input  logic [ADDR_W-1:0] address,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] readdata,
  output logic              waitrequest,
  // user-logic blocks
  pio_bus_if.host           lo,
  pio_bus_if.host           hi
);

  localparam int CW = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic          access, sel_hi, issue, agent_wait, done;
  logic [CW-1:0] wcnt;

  always_comb begin
    access     = read | write;
    sel_hi     = address[ADDR_W-1];
    issue      = access && (int'(wcnt) >= WAIT_STATES);
    agent_wait = sel_hi ? hi.waitrequest : lo.waitrequest;
    done       = issue && !agent_wait;
    waitrequest = access && !done;
    readdata   = sel_hi ? hi.readdata : lo.readdata;

    lo.address   = LO_ADDR_W'(address);
    hi.address   = HI_ADDR_W'(address);
    lo.writedata = writedata;
    hi.writedata = writedata;
    lo.read      = issue && !sel_hi && read;
    lo.write     = issue && !sel_hi && write;
    hi.read      = issue &&  sel_hi && read;
    hi.write     = issue &&  sel_hi && write;
  end

  // wait-state counter: counts the held cycles of the current access
  always_ff @(posedge clk or posedge rst) begin
    if (rst)                                       wcnt <= '0;
    else if (!access || done)                      wcnt <= '0;
    else if (int'(wcnt) < WAIT_STATES)             wcnt <= wcnt + 1'b1;
  end

  // bus rules the host must keep
  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(read && write));
  a_hold:  assert property (@(posedge clk) disable iff (rst)
                            waitrequest |=> (read || write) && $stable(address)
                                            && $stable(writedata));

endmodule
