// dfifo_pkg: constants shared by the distributed FIFO blocks.
//
// DATA_WIDTH is the number of data lines that one control cell gates; the
// 32-line bus is the width the scheme was sized and characterised for.
// NUM_STAGES is the number of control cells (and buffer columns) strung along
// the global wire. The scheme places one stage every few millimetres of wire
// and leaves the count to the floorplan; eight stages is this design's own
// default.
package dfifo_pkg;
  parameter int unsigned DATA_WIDTH = 32;
  parameter int unsigned NUM_STAGES = 8;
endpackage
