// cardio_pkg: types and constants shared by the cardiotachometer blocks.
//
// The recorder's operating state is held in two flip-flops, Q1 and Q2. The
// state type below encodes the four states as the pair {Q1, Q2}:
//   START   (0,0)  memory is being cleared, R is high
//   WRITE   (0,1)  a beat period is to be stored on the next fall of CG
//   WRITE_N (1,1)  acquiring, no storage pending ("not Write")
//   HALT    (1,0)  blocked; only an external reset leaves it
// PRESET_OFFSET is -51 as an 8-bit two's complement number: the value loaded
// into the beat period counter before each measurement, so that a count of
// 8'h00 means 0.25 s and 8'hFF means 1.5 s at the 204-Hz count clock.
package cardio_pkg;

  typedef enum logic [1:0] {
    START   = 2'b00,
    WRITE   = 2'b01,
    HALT    = 2'b10,
    WRITE_N = 2'b11
  } ctrl_state_t;

  localparam logic [7:0] PRESET_OFFSET = 8'hCD;

endpackage
