// trigger_controller_top: FPGA logic of a klystron test-station trigger
// controller. A host PC sets the configuration registers over USB. The trigger
// generator turns them into eight timed trigger outputs.
//
// Configuration path: the USB stamp's FT245BM-style FIFO presents host octets
// on an 8-bit bus. The timing controller (count selector and control logic),
// running at about 1 MHz from clk_divide, reads them into five_byte_register.
// A five-octet frame (address, four data octets) is stored in one of the 32
// four-octet registers of big_byte_register. A lone address octet makes the
// controller send that register's four octets back through the pad. The
// register block's outputs are re-registered on the 119 MHz clock (its SYNC
// input) and feed trigger_generator.
//
// The data pad's tri-state buffer is outside this module. usb_d_i is the pad's
// input (O pin), usb_d_o what the logic drives (I pin), and usb_d_t the enable
// (T pin, 1 = released). All logic runs on clk. The slow path advances on the
// divider's enable pulse, and clk_div_out is the divided clock for a scope.
// Reset is asynchronous and active low. It clears every register.
//
// The block structure, the frame protocol, the register count and size, the
// 119 MHz clock and the ~1 MHz divided rate follow the device. The pin-level
// handshake details, the register map and the trigger generator's insides are
// this design's own.
module trigger_controller_top
  import trigger_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 119,  // 119 MHz -> 1 MHz
  parameter int unsigned WAIT_STEPS = 2,    // read/write decision window, in slow steps
  parameter int unsigned TIME_W     = 20    // trigger time counter width, 8.4 ns ticks
) (
  input  logic              clk,          // 119 MHz
  input  logic              rst_n,
  // USB FIFO (USBMOD4 / FT245BM)
  input  logic [7:0]        usb_d_i,
  output logic [7:0]        usb_d_o,
  output logic              usb_d_t,
  input  logic              usb_rxf_n,
  input  logic              usb_txe_n,
  output logic              usb_rd_n,
  output logic              usb_wr,
  // trigger side
  input  logic              fiducial,     // 360 Hz timing input
  output logic [NUM_CH-1:0] trig,
  output logic [1:0]        group_fire,   // pulse when group 1 / group 2 fires
  output logic              clk_div_out
);

  logic        ce;
  frame_ctrl_t frame_ctrl;
  logic        reg_wr_en;
  logic [1:0]  reg_byte_sel;
  octet_t      byte_address, byte_zero, byte_one, byte_two, byte_three;
  octet_t      obus;
  reg_word_t   cfg [NUM_REGS];

  clk_divide #(.DIV(CLK_DIV)) u_clk_divide (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce     (ce),
    .clkout (clk_div_out)
  );

  timing_controller #(.WAIT_STEPS(WAIT_STEPS)) u_timing_controller (
    .clk          (clk),
    .rst_n        (rst_n),
    .ce           (ce),
    .usb_rxf_n    (usb_rxf_n),
    .usb_txe_n    (usb_txe_n),
    .usb_rd_n     (usb_rd_n),
    .usb_wr       (usb_wr),
    .pad_t        (usb_d_t),
    .frame_ctrl   (frame_ctrl),
    .reg_wr_en    (reg_wr_en),
    .reg_byte_sel (reg_byte_sel)
  );

  five_byte_register u_five_byte_register (
    .clk           (clk),
    .rst_n         (rst_n),
    .ce            (ce),
    .Bus           (usb_d_i),
    .Control_Input (frame_ctrl),
    .byte_address  (byte_address),
    .byte_zero     (byte_zero),
    .byte_one      (byte_one),
    .byte_two      (byte_two),
    .byte_three    (byte_three)
  );

  big_byte_register u_big_byte_register (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce),
    .wr_en       (reg_wr_en),
    .Bus_address (byte_address),
    .Bus_zero    (byte_zero),
    .Bus_one     (byte_one),
    .Bus_two     (byte_two),
    .Bus_three   (byte_three),
    .byte_sel    (reg_byte_sel),
    .SYNC        (clk),
    .reg_out     (cfg),
    .OBus        (obus)
  );

  assign usb_d_o = obus;

  trigger_generator #(.TIME_W(TIME_W)) u_trigger_generator (
    .clk        (clk),
    .rst_n      (rst_n),
    .fiducial   (fiducial),
    .cfg        (cfg),
    .trig       (trig),
    .group_fire (group_fire)
  );

endmodule
