// xbar_pkg: constants and types shared by the crossbar switch.
//
// The switch has 256 ports. Each port carries 2 bits per 1 GHz core cycle
// (2 bit-slices, matching a 2 Gb/s serial link). A frame on a port is
// 36 cycles long: a one-byte control word in the first 4 cycles, then
// 64 data bits in 32 cycles. These numbers follow the design description.
// The bit order inside a frame is this design's choice: the first cycle
// of the control word carries control bits [7:6], and in every cycle
// slice 1 is the more significant bit.
package xbar_pkg;

  localparam int unsigned N_PORTS      = 256; // crossbar ports
  localparam int unsigned SLICES       = 2;   // bit-slices per port
  localparam int unsigned CTRL_BITS    = 8;   // control word per frame
  localparam int unsigned DATA_BITS    = 64;  // payload per frame
  localparam int unsigned CTRL_CYCLES  = CTRL_BITS / SLICES;            // 4
  localparam int unsigned FRAME_CYCLES = (CTRL_BITS + DATA_BITS) / SLICES; // 36

  // Pipeline latency of the crossbar core, input register to output
  // SDFF 2-to-1 MUX, in core clock cycles.
  localparam int unsigned CORE_LATENCY = 4;

  // Phase of the frame counter.
  typedef enum logic {
    PH_CTRL = 1'b0,  // cycles 0..3: control word
    PH_DATA = 1'b1   // cycles 4..35: payload
  } frame_phase_e;

endpackage
