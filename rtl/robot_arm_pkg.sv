// robot_arm_pkg: types and constants shared by the robot arm position
// controller. The controller records four arm positions (states S0..S3)
// and then plays them back in a loop (states S4..S7). The 3-bit state
// encoding is the binary one of the original design: S2 selects
// playback, S1S0 are the register-file address. The 12-bit position
// counter starts at the middle of its range, 1000_0000_0000 (2048), so
// the arm can move equally far in both directions. Only the upper 8
// bits of a position are stored and compared.
package robot_arm_pkg;

  localparam int unsigned POS_W     = 12;  // position counter width
  localparam int unsigned STORE_W   = 8;   // stored / compared bits
  localparam int unsigned N_POS     = 4;   // number of stored positions
  localparam int unsigned ADDR_W    = 2;   // register-file address width
  localparam logic [POS_W-1:0] ORIGIN = 12'h800;  // reset position

  // S0..S3 record position 1..4, S4..S7 play back position 1..4.
  typedef enum logic [2:0] {
    S0 = 3'b000,
    S1 = 3'b001,
    S2 = 3'b010,
    S3 = 3'b011,
    S4 = 3'b100,
    S5 = 3'b101,
    S6 = 3'b110,
    S7 = 3'b111
  } state_t;

endpackage
