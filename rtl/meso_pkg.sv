// meso_pkg: constants shared by the mesochronous dual-clock FIFO.
//
// The defaults describe the main configuration: 128-bit words, a 128-entry
// buffer, and 4-slot mesochronous synchronizers whose read counter starts two
// slots behind the write counter. The width, the depth of the 128-bit
// configuration, the four synchronizer slots and the gap of two come from the
// original scheme; the startup hold is this implementation's choice.
package meso_pkg;

  // Data word width in bits.
  localparam int unsigned DATA_W_DEF      = 128;
  // Number of FIFO entries held in the transmitter domain.
  localparam int unsigned DEPTH_DEF       = 128;
  // Slot registers in each single-bit mesochronous synchronizer.
  localparam int unsigned SYNC_SLOTS_DEF  = 4;
  // Distance, in slots, between the write and the read counter after reset.
  localparam int unsigned SYNC_GAP_DEF    = 2;
  // Flip-flops in each brute-force reset synchronizer.
  localparam int unsigned RST_STAGES_DEF  = 2;
  // Cycles the transmitter waits after reset before it accepts data.
  localparam int unsigned STARTUP_DEF     = 4;

endpackage
