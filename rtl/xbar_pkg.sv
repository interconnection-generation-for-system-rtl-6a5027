// Shared types and constants of the circuit-switched crossbar.
//
// The crossbar links NM masters to NS slaves through one star-shaped block
// of arbitration and multiplexing logic. Every transfer has an address
// phase (the master raises its address strobe and waits for an address
// acknowledge from the network) and a data phase (data strobes for a write,
// read/write-acknowledge strobes from the slave for a read). The transfer
// direction is carried on a one-bit mode line, which this package names.
// The encoding (1 = write) is this design's choice.
package xbar_pkg;

  // Transfer direction on the "mode (read/write)" line.
  typedef enum logic {
    MODE_READ  = 1'b0,
    MODE_WRITE = 1'b1
  } xfer_mode_e;

  // Acknowledge value on the "read/write ack" line, qualified by its strobe.
  localparam logic ACK_OK  = 1'b1;
  localparam logic ACK_ERR = 1'b0;

  // Number of bits needed to hold an index in 0..n-1 (at least 1).
  function automatic int unsigned idx_width(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
