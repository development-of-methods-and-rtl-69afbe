// tb_trigger_generator: self-checking test of the trigger generator.
// The configuration array is driven directly. The 360 Hz fiducial is
// shortened to a pulse every FID_PERIOD clocks. A reference model in the
// testbench keeps its own slot counter (1..REP_DIV). Every clock it predicts
// each channel's output: high while start <= t < stop, where t counts clocks
// from the fiducial that fired the channel's group, less the 3-clock latency.
// Runs: rep divisor 3 with group 1 in slot 1 and group 2 in slot 3; a switch
// to divisor 2; divisor 1 (every fiducial); divisor 0 (off). Channel 1 uses
// the 107-tick delay and 3-tick width of the example setting (899.16 ns and
// 25.21 ns at 8.4034 ns per tick). One channel has stop <= start and never
// fires.
module tb_trigger_generator;
  import trigger_pkg::*;

  localparam int unsigned FID_PERIOD = 3000;
  localparam int unsigned LATENCY    = 3;

  logic clk = 1'b0, rst_n = 1'b0, fiducial = 1'b0;
  reg_word_t cfg [NUM_REGS];
  logic [NUM_CH-1:0] trig;
  logic [1:0] group_fire;
  int checks = 0, failures = 0;

  always #4.2 clk = ~clk;

  trigger_generator dut (.clk, .rst_n, .fiducial, .cfg, .trig, .group_fire);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Reference model state
  int unsigned m_slot = 0;
  longint m_fire [2] = '{-1, -1};
  int unsigned m_fires [2] = '{0, 0};
  int unsigned seen_fires [2] = '{0, 0};
  int unsigned pulses [NUM_CH];
  int unsigned skipped = 0;
  logic [NUM_CH-1:0] trig_q = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One fiducial pulse, 20 clocks wide, driven at a falling edge.
  task automatic fiducial_pulse();
    longint k;
    int unsigned n = cfg[REG_REP_DIV][15:0];
    @(negedge clk);
    fiducial = 1'b1;
    k = cyc + 1;   // first rising edge that samples it high
    if (n != 0) begin
      bit any = 1'b0;
      m_slot = (m_slot >= n) ? 1 : m_slot + 1;
      if (m_slot == cfg[REG_SLOT_G1][15:0]) begin m_fire[0] = k; m_fires[0]++; any = 1'b1; end
      if (m_slot == cfg[REG_SLOT_G2][15:0]) begin m_fire[1] = k; m_fires[1]++; any = 1'b1; end
      if (!any) skipped++;
    end
    repeat (20) @(negedge clk);
    fiducial = 1'b0;
    repeat (FID_PERIOD - 21) @(negedge clk);
  endtask

  // Every clock: compare all outputs with the prediction.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        automatic int g = (c < GROUP1_CH) ? 0 : 1;
        automatic longint t = cyc - m_fire[g] - LATENCY;
        automatic bit exp_v = (m_fire[g] >= 0) && (t >= 0) &&
                    (t >= longint'(cfg[REG_CH_START + c])) && (t < longint'(cfg[REG_CH_STOP + c]));
        check(trig[c] == exp_v, $sformatf("clock %0d channel %0d: %b exp %b", cyc, c + 1, trig[c], exp_v));
        if (trig[c] && !trig_q[c]) pulses[c]++;
      end
      trig_q = trig;
      for (int g = 0; g < 2; g++) if (group_fire[g]) seen_fires[g]++;
    end
  end

  task automatic set_channels();
    for (int c = 0; c < NUM_CH; c++) begin
      int unsigned s = $urandom % 2000;
      cfg[REG_CH_START + c] = s;
      cfg[REG_CH_STOP + c]  = s + 1 + ($urandom % 400);
    end
    cfg[REG_CH_START + 0] = 107;   // example: 899.16 ns delay
    cfg[REG_CH_STOP + 0]  = 110;   //          25.21 ns width
    cfg[REG_CH_START + 4] = 500;   // stop <= start: never high
    cfg[REG_CH_STOP + 4]  = 500;
  endtask

  initial begin
    int unsigned p1;
    foreach (cfg[i]) cfg[i] = '0;
    foreach (pulses[i]) pulses[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Reset configuration: no triggers at all.
    repeat (2) fiducial_pulse();
    check(pulses.sum() == 0, "no triggers with the reset configuration");

    // 120 Hz: three slots, group 1 in slot 1, group 2 in slot 3.
    set_channels();
    cfg[REG_REP_DIV] = 3; cfg[REG_SLOT_G1] = 1; cfg[REG_SLOT_G2] = 3;
    repeat (9) fiducial_pulse();
    check(m_fires[0] == 3 && m_fires[1] == 3, "model: three firings per group in nine fiducials");
    check(pulses[0] == 3, $sformatf("channel 1: %0d pulses, exp 3", pulses[0]));
    check(pulses[6] == 3, $sformatf("channel 7: %0d pulses, exp 3", pulses[6]));
    check(pulses[4] == 0, "channel 5 (stop <= start) never fires");

    // Mode switch: 180 Hz, group 2 in slot 2, new times.
    set_channels();
    cfg[REG_REP_DIV] = 2; cfg[REG_SLOT_G2] = 2;
    repeat (6) fiducial_pulse();

    // 360 Hz: every fiducial, both groups in slot 1.
    cfg[REG_REP_DIV] = 1; cfg[REG_SLOT_G2] = 1;
    p1 = pulses[0];
    repeat (4) fiducial_pulse();
    check(pulses[0] - p1 == 4, "360 Hz: channel 1 fires on every fiducial");

    // Off.
    cfg[REG_REP_DIV] = 0;
    p1 = pulses.sum();
    repeat (2) fiducial_pulse();
    check(pulses.sum() == p1, "rep divisor 0: no triggers");

    check(seen_fires[0] == m_fires[0] && seen_fires[1] == m_fires[1],
          $sformatf("group firings %0d/%0d exp %0d/%0d", seen_fires[0], seen_fires[1], m_fires[0], m_fires[1]));
    check(skipped > 0, "some fiducials fire no group");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * FID_PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
