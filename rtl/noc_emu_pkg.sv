// Shared types and constants of the NoC emulation platform.
//
// Flit link: 32-bit data with head/tail marks, carried with a valid bit;
// the receiver answers with ready (a flit moves, and is acknowledged, in a
// cycle where valid and ready are both high).
//
// Packet layout (this design's own choice; the platform only needs the
// receptor to find source, injection time and a check word in each packet):
//   flit 0        header  {dest[31:22], src[21:12], len[11:6], 6'b0}
//   flit 1        injection time stamp (global cycle counter)
//   flit 2..len-2 payload from the generator's LFSR
//   flit len-1    CRC-32 of all earlier flits of the packet (tail)
// len counts all flits and is at least MIN_LEN = 3.
//
// Trace descriptor (32 bits, used by trace generators and trace receptors):
//   [31:26] packet length, [25:16] destination (or source in a report),
//   [15:0] relative time stamp.
//
// Register bus: one strobe per device, 6-bit word address, 32-bit data,
// read data returned one cycle after the read strobe.
package noc_emu_pkg;

  localparam int FLIT_W   = 32;
  localparam int NODE_W   = 10;    // up to 1024 traffic devices of each kind
  localparam int LEN_W    = 6;
  localparam int DT_W     = 16;
  localparam int TIME_W   = 32;
  localparam int REG_AW   = 6;     // 64 registers per device
  localparam int MIN_LEN  = 3;

  typedef logic [NODE_W-1:0] node_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [TIME_W-1:0] stamp_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  typedef struct packed {
    len_t              len;
    node_t             node;
    logic [DT_W-1:0]   dt;
  } desc_t;

  // Broadcast control from a control module to its devices.
  typedef struct packed {
    logic   run;   // emulation running
    logic   clr;   // one-cycle clear of state and statistics
    stamp_t etime; // cycles elapsed while running
  } bcast_t;

  function automatic logic [FLIT_W-1:0] make_header(node_t dest, node_t src, len_t len);
    return {dest, src, len, 6'b0};
  endfunction

  // CRC-32 (reflected, polynomial 0xEDB88320) advanced by one 32-bit word.
  function automatic logic [31:0] crc32_word(logic [31:0] crc, logic [31:0] d);
    logic [31:0] c;
    c = crc ^ d;
    for (int i = 0; i < 32; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // 32-bit Galois LFSR step (taps 32,22,2,1).
  function automatic logic [31:0] lfsr32(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

endpackage
