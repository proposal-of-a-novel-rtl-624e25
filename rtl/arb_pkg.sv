// arb_pkg: types and constants shared by the hybrid bus arbiter.
//
// The bus is always in one of three phases. BUS_IDLE: nobody owns the bus and
// nobody asks for it. BUS_ARB: requests are pending and the arbiter is spending
// its arbitration cycles choosing the next owner. BUS_EXEC: one master owns the
// bus and its transfer (burst data plus slave latency) is in progress. These
// follow the idle / arbitration / transfer-execution phases of the bus model the
// design is built around; the two-bit encoding is this design's choice.
package arb_pkg;

  typedef enum logic [1:0] {
    BUS_IDLE = 2'd0,
    BUS_ARB  = 2'd1,
    BUS_EXEC = 2'd2
  } bus_state_e;

endpackage
