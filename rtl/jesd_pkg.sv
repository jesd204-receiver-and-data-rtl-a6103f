// jesd_pkg: constants and types shared by the JESD204B receiver blocks.
//
// The control characters are the decoded octet values of the 8b/10b
// K-codes that JESD204B uses for synchronisation and alignment:
//   /K/ = K28.5 (0xBC) code group synchronisation
//   /R/ = K28.0 (0x1C) start of an ILA multiframe
//   /Q/ = K28.4 (0x9C) start of the ILA link configuration data
//   /A/ = K28.3 (0x7C) end of a multiframe
//   /F/ = K28.7 (0xFC) end of a frame
// These values are those of the JESD204B standard; the receiver sees them as
// plain octets because the 8b/10b decoder sits in front of it.
package jesd_pkg;

  localparam logic [7:0] CHAR_K = 8'hBC;
  localparam logic [7:0] CHAR_R = 8'h1C;
  localparam logic [7:0] CHAR_Q = 8'h9C;
  localparam logic [7:0] CHAR_A = 8'h7C;
  localparam logic [7:0] CHAR_F = 8'hFC;

  // Number of link configuration octets that follow /Q/ in the second
  // multiframe of the initial lane alignment sequence.
  localparam int unsigned ILA_CFG_OCTETS = 14;

  // States of the link-layer controller.
  typedef enum logic [1:0] {
    LL_IDLE = 2'd0,
    LL_CGS  = 2'd1,
    LL_ILA  = 2'd2,
    LL_DATA = 2'd3
  } ll_state_e;

  // States of the code group synchronisation FSM of the standard.
  typedef enum logic [1:0] {
    CS_INIT  = 2'd0,
    CS_CHECK = 2'd1,
    CS_DATA  = 2'd2
  } cs_state_e;

  // States of the initial frame synchronisation FSM of the standard.
  typedef enum logic [1:0] {
    FS_INIT  = 2'd0,
    FS_CHECK = 2'd1,
    FS_DATA  = 2'd2
  } fs_state_e;

endpackage
