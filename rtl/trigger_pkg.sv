// trigger_pkg: constants and types shared by the trigger controller modules.
//
// The configuration path stores 32 registers of four octets (128 octets in all),
// addressed by the first octet of a five-octet write frame. The register map used
// by the trigger generator (which register holds the rep rate divisor, the group
// time slots and the per-channel start/stop times) is this design's own choice;
// only the kinds of setting and the 8.4 ns time unit come from the device's
// description.
package trigger_pkg;

  // Register block geometry: 32 four-octet registers.
  localparam int unsigned NUM_REGS   = 32;
  localparam int unsigned REG_W      = 32;
  localparam int unsigned ADDR_W     = $clog2(NUM_REGS);
  localparam int unsigned OCTETS     = REG_W / 8;   // data octets per register
  localparam int unsigned FRAME_LEN  = OCTETS + 1;  // address octet + data octets

  // Trigger outputs: eight channels, six in group 1 and two in group 2.
  localparam int unsigned NUM_CH     = 8;
  localparam int unsigned GROUP1_CH  = 6;

  // Register map (design choice).
  localparam int unsigned REG_REP_DIV   = 0;   // 360 Hz pulses per trigger cycle (360 / rep rate)
  localparam int unsigned REG_SLOT_G1   = 1;   // group 1 time slot, 1..REP_DIV
  localparam int unsigned REG_SLOT_G2   = 2;   // group 2 time slot, 1..REP_DIV
  localparam int unsigned REG_CH_START  = 8;   // channel n start time at 8 + n
  localparam int unsigned REG_CH_STOP   = 16;  // channel n stop time at 16 + n

  typedef logic [7:0]       octet_t;
  typedef logic [REG_W-1:0] reg_word_t;
  typedef logic [ADDR_W-1:0] reg_addr_t;

  // Index of an octet inside the five-octet frame (the count selector's value).
  typedef enum logic [2:0] {
    OCT_ADDR  = 3'd0,
    OCT_ZERO  = 3'd1,
    OCT_ONE   = 3'd2,
    OCT_TWO   = 3'd3,
    OCT_THREE = 3'd4
  } octet_idx_e;

  // Control from the timing controller to the five-octet register.
  typedef struct packed {
    logic       load;   // capture the bus into the octet selected by idx
    octet_idx_e idx;
  } frame_ctrl_t;

endpackage
