// sfifo_pkg: configuration constants shared by the interleaved synchronizing FIFO.
//
// The FIFO stores NV*NH words in an NV-row by NH-column array of latches. The
// defaults describe the 16-stage configuration (4 x 4, 8-bit words, two-flop
// synchronizers) that the design is characterised around; NV and NH must be
// even and NV should be at least SYNC_DEPTH for one transfer per clock.
package sfifo_pkg;

  localparam int unsigned DEF_NV    = 4;  // rows, one synchronizer per row
  localparam int unsigned DEF_NH    = 4;  // columns (words per row)
  localparam int unsigned DEF_WIDTH = 8;  // data word width in bits
  localparam int unsigned DEF_SYNC  = 2;  // flip-flops per synchronizer

endpackage : sfifo_pkg
