// ph_pkg: types and constants shared by the packet handler blocks.
//
// A descriptor is 48 bits: a 32-bit due time (arrival time on the local
// cycle counter plus the programmed delay) and a 16-bit byte count, which
// covers frames up to 65,535 bytes. The transmit state machine has the five
// states idle, latch_desc, sop, reg and eop. The register map holds sixteen
// 32-bit words, of which Command (0x0), NumInPFIFO (0x1) and TimeBase (0x2)
// are used; the rest read as zero. All of this follows the delay device's
// description; the encodings of the enums are this design's choice.
package ph_pkg;

  localparam int unsigned DATA_W   = 32;  // Avalon-ST data bus, 4 bytes per beat
  localparam int unsigned EMPTY_W  = 2;   // empty symbols on the last beat
  localparam int unsigned TIME_W   = 32;  // local free-running cycle counter
  localparam int unsigned BCOUNT_W = 16;  // byte count field of a descriptor
  localparam int unsigned ERROR_W  = 6;   // sink error bus from the MAC
  localparam int unsigned CSR_AW   = 4;   // word address of the register slave

  // Maximum untagged frame (bytes) that must still fit once reception starts.
  localparam int unsigned MAX_FRAME_BYTES = 1518;

  typedef struct packed {
    logic [BCOUNT_W-1:0] bytes;     // bytes in the Avalon packet
    logic [TIME_W-1:0]   due_time;  // arrival time + delay
  } descriptor_t;

  typedef enum logic [2:0] {
    S_IDLE       = 3'd0,
    S_LATCH_DESC = 3'd1,
    S_SOP        = 3'd2,
    S_REG        = 3'd3,
    S_EOP        = 3'd4
  } tx_state_e;

  typedef enum logic [CSR_AW-1:0] {
    REG_COMMAND    = 4'h0,
    REG_NUMINPFIFO = 4'h1,
    REG_TIMEBASE   = 4'h2
  } csr_addr_e;

  // Delay loaded into TimeBase by a hard or soft reset (clock cycles).
  localparam logic [TIME_W-1:0] TIMEBASE_RESET = 32'd50000;

endpackage
