// five_byte_register: the intermediate five-octet register. It turns the
// octet stream read from the USB FIFO into one address octet and four data
// octets that the register block can read in parallel.
//
// The timing controller picks which octet to capture (Control_Input.idx, its
// count selector value) and strobes Control_Input.load while the octet is on
// Bus. The octet is captured at that clock edge. The five outputs hold their
// values until they are overwritten. Port names follow the block diagram of the
// device. The split of Control_Input into a load strobe and an octet index, the
// enable qualifier and the reset to zero are this design's choices.
module five_byte_register
  import trigger_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,             // step enable from the clock divider
  input  octet_t      Bus,            // octet from the USB data bus
  input  frame_ctrl_t Control_Input,  // from the timing controller
  output octet_t      byte_address,
  output octet_t      byte_zero,
  output octet_t      byte_one,
  output octet_t      byte_two,
  output octet_t      byte_three
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_address <= '0;
      byte_zero    <= '0;
      byte_one     <= '0;
      byte_two     <= '0;
      byte_three   <= '0;
    end else if (ce && Control_Input.load) begin
      unique case (Control_Input.idx)
        OCT_ADDR:  byte_address <= Bus;
        OCT_ZERO:  byte_zero    <= Bus;
        OCT_ONE:   byte_one     <= Bus;
        OCT_TWO:   byte_two     <= Bus;
        OCT_THREE: byte_three   <= Bus;
        default:   ;
      endcase
    end
  end

endmodule
