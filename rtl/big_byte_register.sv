// big_byte_register: the 128-octet register block that holds the trigger
// device's configuration, as 32 registers of four octets.
//
// Write: when the timing controller pulses wr_en (qualified by ce) after a full
// five-octet frame, the four data octets are stored in the register that the
// address octet selects. Bus_zero becomes bits 7:0, Bus_three bits 31:24.
// Read: OBus is the octet selected by byte_sel of the register that Bus_address
// selects. It is combinational, so the controller can put it on the USB bus in
// the step it asks for it.
// Sync: the outputs reg_out[0..31] are copied from the store on every rising
// edge of SYNC, the 119 MHz clock of the trigger logic. This matches the block's
// synchronisation input. The trigger logic then sees registers that change only
// on its own clock.
//
// The number and size of the registers and the SYNC input follow the device.
// The octet order, the use of only the low five address bits (the upper three
// are ignored) and the reset to zero are this design's choices.
module big_byte_register
  import trigger_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,            // step enable from the clock divider
  input  logic       wr_en,         // store the frame (from the timing controller)
  input  octet_t     Bus_address,
  input  octet_t     Bus_zero,
  input  octet_t     Bus_one,
  input  octet_t     Bus_two,
  input  octet_t     Bus_three,
  input  logic [1:0] byte_sel,      // octet of the addressed register to put on OBus
  input  logic       SYNC,          // clock of the trigger logic
  output reg_word_t  reg_out [NUM_REGS],
  output octet_t     OBus
);

  reg_word_t store [NUM_REGS];
  reg_addr_t addr;

  assign addr = Bus_address[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) store[i] <= '0;
    end else if (ce && wr_en) begin
      store[addr] <= {Bus_three, Bus_two, Bus_one, Bus_zero};
    end
  end

  always_comb OBus = store[addr][8*byte_sel +: 8];

  always_ff @(posedge SYNC or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) reg_out[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_REGS; i++) reg_out[i] <= store[i];
    end
  end

endmodule
