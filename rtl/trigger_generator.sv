// trigger_generator: makes the eight trigger outputs from the configuration
// registers. Each trigger is a pulse with a delay, a width and a repetition
// rate. Channels 1-6 form group 1 and channels 7-8 group 2. Each group fires
// in its own time slot.
//
// Timing source: a 360 Hz fiducial pulse on one of the board's inputs. It is
// synchronised to clk (119 MHz, one tick = 8.4 ns) and its rising edges are
// counted in a slot counter that runs 1, 2, ..., REP_DIV, 1, ... REP_DIV is
// 360 / rep rate, so a 60 Hz rep rate has six slots. A group fires on the
// fiducial whose slot number equals the group's slot register. When it fires,
// the group's time counter restarts at zero and counts clk ticks. It stops at
// its maximum value. A channel's output is high while start <= time < stop.
// So the delay is start * 8.4 ns and the width is (stop - start) * 8.4 ns.
// These are the start and stop times the host computes from the delay and
// width it is given.
//
// Registers used (see trigger_pkg): REG_REP_DIV, REG_SLOT_G1, REG_SLOT_G2,
// REG_CH_START + n and REG_CH_STOP + n for channel n = 0..7. A REP_DIV or slot
// value of zero never fires, so the reset state gives no triggers.
//
// Latency: if the fiducial is first sampled high at clock edge k, the output
// of a firing channel rises at edge k + LATENCY + start and falls at
// k + LATENCY + stop, with LATENCY = 3 (two synchroniser flops, the counter
// restart, the output register).
//
// The kinds of setting (rep rate, time slot, delay, width), the 360 Hz base,
// the 8.4 ns unit, the eight channels and the 6+2 grouping come from the
// device's description. The register map, the fiducial input, the counter
// widths and the pulse timing structure are this design's choices.
module trigger_generator
  import trigger_pkg::*;
#(
  parameter int unsigned TIME_W = 20   // 2^20 ticks of 8.4 ns = 8.8 ms > 1/360 Hz
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fiducial,        // 360 Hz timing pulse, asynchronous
  input  reg_word_t           cfg [NUM_REGS],  // configuration registers, clk domain
  output logic [NUM_CH-1:0]   trig,            // trigger outputs, channel 1 = bit 0
  output logic [1:0]          group_fire       // one-cycle pulse when a group fires
);

  logic [2:0]        fid_sync;   // two synchroniser flops and the previous value
  logic              fid_edge;
  logic [15:0]       rep_div, slot_g1, slot_g2, slot, slot_next;
  logic [TIME_W-1:0] tcnt    [2];
  logic [1:0]        running;
  logic [NUM_CH-1:0] trig_d;

  assign rep_div = cfg[REG_REP_DIV][15:0];
  assign slot_g1 = cfg[REG_SLOT_G1][15:0];
  assign slot_g2 = cfg[REG_SLOT_G2][15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fid_sync <= '0;
    else        fid_sync <= {fid_sync[1:0], fiducial};
  end
  assign fid_edge = fid_sync[1] && !fid_sync[2];

  // Slot counter: 1..rep_div, one step per fiducial.
  always_comb slot_next = (slot >= rep_div) ? 16'd1 : slot + 16'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          slot <= '0;
    else if (fid_edge && rep_div != '0)  slot <= slot_next;
  end

  always_comb begin
    group_fire = '0;
    if (fid_edge && rep_div != '0) begin
      group_fire[0] = (slot_next == slot_g1);
      group_fire[1] = (slot_next == slot_g2);
    end
  end

  // Group time counters.
  for (genvar g = 0; g < 2; g++) begin : g_group
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tcnt[g]    <= '0;
        running[g] <= 1'b0;
      end else if (group_fire[g]) begin
        tcnt[g]    <= '0;
        running[g] <= 1'b1;
      end else if (running[g]) begin
        if (tcnt[g] == '1) running[g] <= 1'b0;
        else               tcnt[g]    <= tcnt[g] + 1'b1;
      end
    end
  end

  // Channel comparators.
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      automatic bit g = (c >= GROUP1_CH);
      automatic logic [TIME_W-1:0] t_start = cfg[REG_CH_START + c][TIME_W-1:0];
      automatic logic [TIME_W-1:0] t_stop  = cfg[REG_CH_STOP  + c][TIME_W-1:0];
      trig_d[c] = running[g] && (tcnt[g] >= t_start) && (tcnt[g] < t_stop);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= '0;
    else        trig <= trig_d;
  end

  initial assert (TIME_W >= 1 && TIME_W <= REG_W) else $error("trigger_generator: bad TIME_W");

endmodule
