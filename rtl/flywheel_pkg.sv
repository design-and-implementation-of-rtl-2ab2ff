// flywheel_pkg: constants and types shared by the flywheel blocks.
//
// All counts are in bit periods: the flywheel runs on the serial bit clock,
// so one clock cycle is one received bit. The sync window is 148 bits long:
// a 128-bit slot for the 127-bit PN sync code plus a 10-bit guard on each
// side. The window opens (decoder pulse) 138 bits before the expected FS
// pulse, which the frame synchronizer raises in the bit after the last sync
// bit, and closes 10 bits after it. The 148-bit window, the 10-bit guards, the
// 127-bit code and the three-in-a-row lock rule follow the document. The
// 20-bit frame counter is this design's choice: it holds frames of up to
// 2^20 bits (128 Kbytes), the longest IRS format.
package flywheel_pkg;

  // Frame sync code length (PN sequence 2^7-1)
  localparam int unsigned FS_CODE_BITS = 127;
  // Slot reserved for the code inside the window
  localparam int unsigned FS_SLOT_BITS = FS_CODE_BITS + 1;
  // Guard before and after the slot
  localparam int unsigned GUARD_BITS   = 10;
  // Whole window: 10 + 128 + 10 = 148
  localparam int unsigned WIN_BITS     = GUARD_BITS + FS_SLOT_BITS + GUARD_BITS;
  // Frame-counter value (bits before the expected FS pulse) at which the
  // decoder pulse opens the window: 10 + 128 = 138
  localparam int unsigned DEC_LEAD     = GUARD_BITS + FS_SLOT_BITS;
  // Width of the frame length counter
  localparam int unsigned FL_W         = 20;
  // Successive FS (or NFS) pulses needed to gain (or lose) lock
  localparam int unsigned LOCK_RUN     = 3;

endpackage
