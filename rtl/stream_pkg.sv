// stream_pkg: types and constants shared by the streaming kernels.
//
// Every stream in this design carries 32-bit integers, the sample width of
// both applications (autocorrelation and FIR filter), and every FIFO between
// kernels is four elements deep. Both numbers come from the design's
// evaluation setup. The write-kernel combine modes are this design's own
// encoding.
package stream_pkg;

  // Width of one stream element (a C 'int').
  localparam int unsigned DATA_W = 32;

  // Depth of the FIFO between two kernels.
  localparam int unsigned FIFO_DEPTH = 4;

  // Width of the byte address the write kernel drives on its memory port.
  localparam int unsigned ADDR_W = 32;

  typedef logic [DATA_W-1:0] word_t;

  // How the write kernel treats the elements that arrive on its lanes.
  typedef enum logic {
    WR_MERGE = 1'b0,  // take one element per lane in turn, store each one
    WR_SUM   = 1'b1   // take one element from every lane, store their sum
  } write_mode_e;

endpackage
