// clk_divide: slows the 119 MHz system clock down to about 1 MHz for the
// USB read/write logic.
//
// The configuration path runs at about 1 MHz so that the whole five-octet frame
// from the host is already in the USB FIFO when the controller looks for the
// octet after the address. That rate is the device's; the way it is reached is
// this design's choice. Nothing is clocked by a derived clock. A counter runs
// on clk and, every DIV cycles, gives a one-cycle enable pulse (ce) that the
// slow logic uses as its step. clkout is a square wave of the same period
// (high for the first DIV/2 cycles), brought out for a scope. It is not used
// as a clock.
//
// Timing: ce is high in cycle DIV-1, 2*DIV-1, ... counted from reset release.
module clk_divide #(
  parameter int unsigned DIV = 119   // 119 MHz / 119 = 1 MHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce,       // one clk cycle wide, every DIV cycles
  output logic clkout    // divided square wave, for observation
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign ce     = (cnt == CW'(DIV - 1));
  assign clkout = (cnt < CW'(DIV / 2));

  initial assert (DIV >= 2) else $error("clk_divide: DIV must be at least 2");

endmodule
