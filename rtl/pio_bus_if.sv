// pio_bus_if: memory-mapped register port between the bus decoder and one
// block of user logic. Word addressed; a transfer completes in the cycle in
// which read or write is high and waitrequest is low, and the host keeps
// address, write data and strobes steady until then. Read data is valid in
// that same cycle. The signal set follows the usual memory-mapped slave style
// of the processor's system bus; the document only says that data goes
// through memory-mapped I/O with two wait states.
interface pio_bus_if #(
  parameter int ADDR_W = 3,
  parameter int DATA_W = 32
);
  logic [ADDR_W-1:0] address;
  logic              read;
  logic              write;
  logic [DATA_W-1:0] writedata;
  logic [DATA_W-1:0] readdata;
  logic              waitrequest;

  modport host  (output address, read, write, writedata, input  readdata, waitrequest);
  modport agent (input  address, read, write, writedata, output readdata, waitrequest);
endinterface
