// pon_pkg: constants and types shared by the OLT and ONU logic of the
// passive-optical-network timing link.
//
// Downstream (OLT -> ONUs, 1.6 Gb/s, 8b/10b): a superframe of 260 characters,
// 1.625 us long: one K28.5 comma, 64 subframes T F D1 D2 (one per ONU slot,
// 25 ns each) and a 65th subframe T F R. The parallel interface carries two
// characters per 80 MHz cycle, so a superframe is 130 words and the trigger
// byte T recurs every 2 cycles (every 25 ns, the 40 MHz bunch clock).
//
// Upstream (ONU -> OLT, 800 Mb/s, 8b/10b): one character per 80 MHz cycle.
// A burst is a 32-byte preamble of 0x55 (transition rich on the line), a 2-byte start-of-frame
// delimiter (K28.5 then SFD2_BYTE), a 2-byte ONU address and 90 data bytes.
//
// Code groups are written code[9:0] = {j,h,g,f,i,e,d,c,b,a}; bit a (code[0])
// is sent first. In every parallel word the lowest bit is the earliest.
// The sizes above follow the published protocol; the SFD's second byte, the
// NOP command value and the address encodings are this design's choices.
// Not every module uses every constant, so a lint run on a single module
// reports the others as unused parameters.
package pon_pkg;

  // ---- protocol sizes -----------------------------------------------------
  localparam int unsigned N_SLOTS        = 64;   // ONU slots per superframe
  localparam int unsigned SF_CHARS       = 1 + 4*N_SLOTS + 3; // 260
  localparam int unsigned SF_WORDS       = SF_CHARS / 2;      // 130
  localparam int unsigned UP_PREAMBLE_B  = 32;
  localparam int unsigned UP_SFD_B       = 2;
  localparam int unsigned UP_ADDR_B      = 2;
  localparam int unsigned UP_DATA_B      = 90;
  localparam int unsigned UP_FRAME_B     = UP_PREAMBLE_B + UP_SFD_B + UP_ADDR_B + UP_DATA_B; // 126

  // ---- characters ---------------------------------------------------------
  localparam logic [7:0] K28_5     = 8'hBC;   // comma, K=1
  localparam logic [7:0] PREAMBLE_BYTE = 8'h55;  // D21.2: code group 1010100101 (bit a first), either disparity
  localparam logic [7:0] SFD2_BYTE = 8'hD5;   // second SFD byte (data)
  // K28.5 code groups, code[9:0] = {j..a}
  localparam logic [9:0] K28_5_RDN = 10'b0101111100; // abcdei fghj = 001111 1010
  localparam logic [9:0] K28_5_RDP = 10'b1010000011; // abcdei fghj = 110000 0101

  // ---- addressing ---------------------------------------------------------
  // ONU addresses are 1..64 (ONU1..ONU64); 0 in an R character means "no grant".
  typedef logic [6:0] onu_addr_t;

  // A downstream command: D1 = {individual, payload[14:8]}, D2 = payload[7:0].
  // D1 MSB 0 = broadcast, 1 = individually addressed. Payload 0 is the idle
  // (no command) value.
  typedef struct packed {
    logic        bcast;
    logic [14:0] payload;
  } dn_cmd_t;

  // One character with its K flag.
  typedef struct packed {
    logic       k;
    logic [7:0] d;
  } char_t;

endpackage
