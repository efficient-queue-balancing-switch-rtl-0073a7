// qbs_pkg: shared constants of the queue-balancing switch.
//
// Holds the default configuration used by every module of the switch: a
// 16x16 switch (the port count of the latency and packet-loss studies and the
// larger of the two FPGA builds), 256-bit packets (the packet size used to
// turn the clock frequency into aggregate bandwidth) and output FIFOs of depth
// 8 (the FIFO depth of the FPGA builds). The helper function gives the width
// of an index into N items, never less than one bit.
package qbs_pkg;

  localparam int unsigned DEFAULT_NUM_IN     = 16;
  localparam int unsigned DEFAULT_NUM_OUT    = 16;
  localparam int unsigned DEFAULT_DATA_W     = 256;
  localparam int unsigned DEFAULT_FIFO_DEPTH = 8;

  // Width of an index that can address n items (at least 1 bit).
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
