// ft245_model: behavioural model of the FIFO side of an FT245BM USB FIFO chip,
// as fitted on a USBMOD4 stamp, together with the bidirectional data pad.
// Testbench use only.
//
// Host side: host_send() puts an octet in the receive FIFO, as if the PC had
// written it over USB. Octets the logic writes collect in txq, which the
// testbench reads as the PC's received data.
// Logic side: rxf_n is low while the receive FIFO holds data. While rd_n is low
// the model drives the front octet onto the bus. The rising edge of rd_n
// removes it, and rxf_n then stays high for RXF_GAP clocks. txe_n is low while
// there is room. On the falling edge of wr the octet on the bus joins txq, and
// txe_n stays high for TXE_GAP clocks. The bus shows, in this order: the
// FIFO's octet (rd_n low), the logic's octet (pad_t low), or 8'hFF (released
// bus, pulled up).
// Everything is sampled on clk, and the gaps are counted in clk cycles.
// Contention (rd_n low while pad_t is low) and a write with txe_n high, or
// with the pad released, are counted in errors.
module ft245_model #(
  parameter int unsigned RXF_GAP  = 2,
  parameter int unsigned TXE_GAP  = 2,
  parameter int unsigned TX_DEPTH = 384
) (
  input  logic       clk,
  input  logic [7:0] d_from_logic,   // pad I pin
  input  logic       pad_t,          // pad T pin, 1 = released
  output logic [7:0] d_to_logic,     // pad O pin (bus value)
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr
);

  logic [7:0] rxq [$];
  logic [7:0] txq [$];
  logic [7:0] front;
  int unsigned rx_hold = 0, tx_hold = 0;
  logic rd_n_q = 1'b1, wr_q = 1'b0;
  int unsigned errors = 0;
  int unsigned reads = 0, writes = 0;

  task automatic host_send(input logic [7:0] b);
    rxq.push_back(b);
  endtask

  function automatic int unsigned tx_count();
    return txq.size();
  endfunction

  function automatic logic [7:0] host_recv();
    return txq.pop_front();
  endfunction

  function automatic int unsigned rx_count();
    return rxq.size();
  endfunction

  initial begin
    rxf_n = 1'b1;
    txe_n = 1'b1;
    front = 8'hFF;
  end

  always @(posedge clk) begin
    rd_n_q <= rd_n;
    wr_q   <= wr;
    if (rx_hold > 0) rx_hold <= rx_hold - 1;
    if (tx_hold > 0) tx_hold <= tx_hold - 1;
    // read strobe released: octet consumed
    if (rd_n && !rd_n_q) begin
      if (rxq.size() > 0) void'(rxq.pop_front());
      else errors++;
      reads++;
      rx_hold <= RXF_GAP;
    end
    // write strobe falling edge: octet taken
    if (!wr && wr_q) begin
      if (pad_t || txe_n) errors++;
      txq.push_back(d_from_logic);
      writes++;
      tx_hold <= TXE_GAP;
    end
    if (!rd_n && !pad_t) errors++;
  end

  always @(negedge clk) begin
    rxf_n <= (rxq.size() == 0) || (rx_hold > 0);
    txe_n <= (txq.size() >= TX_DEPTH) || (tx_hold > 0);
    front <= (rxq.size() > 0) ? rxq[0] : 8'hFF;
  end

  always_comb begin
    if (!rd_n)       d_to_logic = front;
    else if (!pad_t) d_to_logic = d_from_logic;
    else             d_to_logic = 8'hFF;
  end

endmodule
