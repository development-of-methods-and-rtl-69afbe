// timing_controller: the count selector and control logic of the USB
// configuration path. It drives the handshake of the FT245BM-style USB FIFO,
// the tri-state control of the data pad and the two registers.
//
// Protocol on the USB side, as the device defines it:
//   write: the host sends five octets, an address octet and four data octets;
//          the data is stored in the register the address selects.
//   read:  the host sends the address octet alone; the four data octets of
//          that register are sent back to the host.
// The controller reads the address octet. It then waits up to WAIT_STEPS steps
// for another octet. If one arrives, the frame is a write: the count selector
// steps through the four data octets and the frame is stored. If none arrives,
// the frame is a read. A frame that stops after two to four octets is dropped.
// The device runs this logic at about 1 MHz. At that rate a five-octet frame
// sent by the host in one transfer is in the FIFO before the controller looks
// for the second octet.
//
// FIFO handshake (active levels follow the FT245BM): rxf_n low = data waiting;
// rd_n low = FIFO drives D, the octet is taken before rd_n rises; txe_n low =
// room for an octet; wr high then low = the FIFO takes D on the falling edge.
// pad_t is the pad's T pin: 1 releases the bus, 0 drives OBus onto it.
//
// Timing: everything advances by one step per ce pulse (one step = 1 us with
// the default divider). One step each for: rd_n low, rd_n high, and each check
// of rxf_n/txe_n. A write frame is stored 15 steps after the step in which
// rd_n first falls; a read request raises wr for its first octet 5 steps
// after it (with WAIT_STEPS = 2). Outputs are registered. rxf_n and txe_n pass
// through a two-flop synchroniser. The number of steps, the wait window, the
// handling of short frames and the order of the read-back octets (octet zero,
// bits 7:0, first) are this design's choices.
module timing_controller
  import trigger_pkg::*;
#(
  parameter int unsigned WAIT_STEPS = 2   // steps to wait for a second octet
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // USB FIFO control ("USB Control")
  input  logic        usb_rxf_n,
  input  logic        usb_txe_n,
  output logic        usb_rd_n,
  output logic        usb_wr,
  // pad control ("Tri-State Buffer Control")
  output logic        pad_t,
  // five-octet register control ("5 Byte Register Control")
  output frame_ctrl_t frame_ctrl,
  // register block control
  output logic        reg_wr_en,
  output logic [1:0]  reg_byte_sel
);

  typedef enum logic [3:0] {
    S_IDLE,       // wait for rxf_n
    S_RD_LOW,     // rd_n low, octet captured at the end of the step
    S_RD_HIGH,    // rd_n high again, FIFO moves to the next octet
    S_WAIT,       // look for the next octet of the frame
    S_STORE,      // write the frame into the register block
    S_TX_WAIT,    // wait for txe_n
    S_TX_DRIVE,   // drive the octet, wr high
    S_TX_STROBE   // wr low: FIFO takes the octet
  } state_e;

  localparam int unsigned WW = (WAIT_STEPS > 1) ? $clog2(WAIT_STEPS) : 1;

  state_e        state, next;
  logic [2:0]    cnt;       // count selector: octet of the frame, 0..4
  logic [1:0]    sel;       // read-back octet, 0..3
  logic [WW-1:0] wait_cnt;
  logic [1:0]    rxf_sync, txe_sync;
  logic          rxf_n_s, txe_n_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_sync <= 2'b11;
      txe_sync <= 2'b11;
    end else begin
      rxf_sync <= {rxf_sync[0], usb_rxf_n};
      txe_sync <= {txe_sync[0], usb_txe_n};
    end
  end
  assign rxf_n_s = rxf_sync[1];
  assign txe_n_s = txe_sync[1];

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:      if (!rxf_n_s) next = S_RD_LOW;
      S_RD_LOW:    next = S_RD_HIGH;
      S_RD_HIGH:   next = (cnt == 3'(FRAME_LEN - 1)) ? S_STORE : S_WAIT;
      S_WAIT: begin
        if (!rxf_n_s)                              next = S_RD_LOW;
        else if (wait_cnt == WW'(WAIT_STEPS - 1))  next = (cnt == 3'd0) ? S_TX_WAIT : S_IDLE;
      end
      S_STORE:     next = S_IDLE;
      S_TX_WAIT:   if (!txe_n_s) next = S_TX_DRIVE;
      S_TX_DRIVE:  next = S_TX_STROBE;
      S_TX_STROBE: next = (sel == 2'(OCTETS - 1)) ? S_IDLE : S_TX_WAIT;
      default:     next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      sel      <= '0;
      wait_cnt <= '0;
      usb_rd_n <= 1'b1;
      usb_wr   <= 1'b0;
      pad_t    <= 1'b1;
    end else if (ce) begin
      state <= next;
      // count selector
      if (state == S_IDLE)                        cnt <= '0;
      else if (state == S_WAIT && next == S_RD_LOW) cnt <= cnt + 1'b1;
      // read-back octet
      if (state == S_IDLE)                          sel <= '0;
      else if (state == S_TX_STROBE)                sel <= sel + 1'b1;
      // wait window
      wait_cnt <= (state == S_WAIT) ? wait_cnt + 1'b1 : '0;
      // registered pin controls
      usb_rd_n <= (next != S_RD_LOW);
      usb_wr   <= (next == S_TX_DRIVE);
      pad_t    <= !(next == S_TX_DRIVE || next == S_TX_STROBE);
    end
  end

  assign frame_ctrl.load = (state == S_RD_LOW);
  assign frame_ctrl.idx  = octet_idx_e'(cnt);
  assign reg_wr_en       = (state == S_STORE);
  assign reg_byte_sel    = sel;

  // The pad never drives while the FIFO drives the bus, and wr only moves
  // while the pad drives.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(usb_rd_n == 1'b0 && pad_t == 1'b0));
  a_wr_driven:     assert property (@(posedge clk) disable iff (!rst_n)
                                    usb_wr |-> !pad_t);

endmodule
