// tb_trigger_controller_top: end-to-end test of the trigger controller at its
// default parameters (119 MHz clock, 1 MHz configuration logic).
//
// The testbench plays the host software against a behavioural USB FIFO:
//   1. at start-up it reads all 32 registers (all must be zero);
//   2. it writes each setting and reads it straight back to verify it, the
//      way the control program does. The settings are a 120 Hz rep rate
//      (divisor 3), group 1 in slot 1, group 2 in slot 3, channel 1 at 899 ns
//      delay and 25 ns width (107 and 110 ticks of 1/119 MHz after rounding),
//      the other channels random. Some writes use address octets with the
//      upper bits set;
//   3. it sends a broken frame (two octets), which must change nothing;
//   4. it drives a 360 Hz fiducial (330556 clocks apart) and compares every
//      trigger output, every clock, with a reference model;
//   5. it switches to 360 Hz (divisor 1) over USB between fiducials and
//      checks that both groups then fire on every fiducial.
// It also checks the rate of the configuration logic: rd_n is low for exactly
// 119 clocks (1 us). Mechanisms counted, each of which must happen: register
// write, read-back, dropped short frame, address aliasing, group 1 firing,
// group 2 firing, a fiducial in which no group fires, and the rate switch.
module tb_trigger_controller_top;
  import trigger_pkg::*;

  localparam int unsigned DIV        = 119;
  localparam int unsigned FID_PERIOD = 330556;   // 119 MHz / 360 Hz
  localparam int unsigned LATENCY    = 3;
  localparam real         TICK_NS    = 1000.0 / 119.0;

  logic clk = 1'b0, rst_n = 1'b1, fiducial = 1'b0;
  logic [7:0] d_i, d_o;
  logic d_t, rxf_n, txe_n, rd_n, wr, clk_div_out;
  logic [NUM_CH-1:0] trig;
  logic [1:0] group_fire;

  int checks = 0, failures = 0;

  always #4.2 clk = ~clk;

  trigger_controller_top dut (
    .clk, .rst_n,
    .usb_d_i (d_i), .usb_d_o (d_o), .usb_d_t (d_t),
    .usb_rxf_n (rxf_n), .usb_txe_n (txe_n), .usb_rd_n (rd_n), .usb_wr (wr),
    .fiducial, .trig, .group_fire, .clk_div_out
  );

  ft245_model u_ft (
    .clk, .d_from_logic (d_o), .pad_t (d_t), .d_to_logic (d_i),
    .rxf_n, .txe_n, .rd_n, .wr
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- host side ----------------
  reg_word_t ref_r [NUM_REGS];
  int unsigned n_write = 0, n_read = 0, n_short = 0, n_alias = 0, n_switch = 0;

  task automatic steps(input int n);
    repeat (n * DIV) @(posedge clk);
  endtask

  task automatic host_write(input logic [7:0] addr, input reg_word_t data);
    u_ft.host_send(addr);
    for (int n = 0; n < 4; n++) u_ft.host_send(data[8*n +: 8]);
    steps(20);
    check(u_ft.rx_count() == 0, "write frame consumed");
    ref_r[addr[4:0]] = data;
    n_write++;
    if (addr[7:5] != 3'b000) n_alias++;
  endtask

  task automatic host_read(input logic [7:0] addr, output reg_word_t data);
    int waited = 0;
    u_ft.host_send(addr);
    while (u_ft.tx_count() < 4 && waited < 40) begin
      steps(1);
      waited++;
    end
    check(u_ft.tx_count() == 4, $sformatf("read of %h: %0d octets returned", addr, u_ft.tx_count()));
    data = '0;
    for (int n = 0; n < 4; n++) data[8*n +: 8] = (u_ft.tx_count() > 0) ? u_ft.host_recv() : 8'h00;
    steps(2);
    n_read++;
  endtask

  // Write, then read back and compare, as the control program does.
  task automatic set_reg(input logic [7:0] addr, input reg_word_t data);
    reg_word_t back;
    host_write(addr, data);
    host_read(addr, back);
    check(back == data, $sformatf("register %0d read back %h, wrote %h", addr[4:0], back, data));
  endtask

  function automatic int unsigned to_ticks(input real ns);
    return int'(ns / TICK_NS);   // rounds to the nearest tick
  endfunction

  // ---------------- reference model of the trigger outputs ----------------
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int unsigned m_slot = 0, skipped = 0;
  longint m_fire [2] = '{-1, -1};
  int unsigned m_fires [2] = '{0, 0};
  int unsigned seen_fires [2] = '{0, 0};
  int unsigned pulses [NUM_CH];
  int unsigned mismatches [NUM_CH];
  logic [NUM_CH-1:0] trig_q = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        automatic int g = (c < GROUP1_CH) ? 0 : 1;
        automatic longint t = cyc - m_fire[g] - LATENCY;
        automatic bit exp_v = (m_fire[g] >= 0) && (t >= 0) &&
                              (t >= longint'(ref_r[REG_CH_START + c])) &&
                              (t < longint'(ref_r[REG_CH_STOP + c]));
        if (trig[c] != exp_v) begin
          if (mismatches[c] < 5)
            $display("FAIL: clock %0d channel %0d: %b exp %b", cyc, c + 1, trig[c], exp_v);
          mismatches[c]++;
        end
        if (trig[c] && !trig_q[c]) pulses[c]++;
      end
      trig_q = trig;
      for (int g = 0; g < 2; g++) if (group_fire[g]) seen_fires[g]++;
    end
  end

  task automatic fiducial_period();
    longint k;
    int unsigned n = ref_r[REG_REP_DIV][15:0];
    @(negedge clk);
    fiducial = 1'b1;
    k = cyc + 1;
    if (n != 0) begin
      bit any = 1'b0;
      m_slot = (m_slot >= n) ? 1 : m_slot + 1;
      if (m_slot == ref_r[REG_SLOT_G1][15:0]) begin m_fire[0] = k; m_fires[0]++; any = 1'b1; end
      if (m_slot == ref_r[REG_SLOT_G2][15:0]) begin m_fire[1] = k; m_fires[1]++; any = 1'b1; end
      if (!any) skipped++;
    end
    repeat (100) @(negedge clk);
    fiducial = 1'b0;
    repeat (FID_PERIOD - 101) @(negedge clk);
    for (int c = 0; c < NUM_CH; c++)
      check(mismatches[c] == 0, $sformatf("channel %0d: %0d wrong clocks", c + 1, mismatches[c]));
  endtask

  // ---------------- rate of the configuration logic ----------------
  longint rd_fall = 0;
  int unsigned rd_pulses = 0, rd_bad = 0;
  logic rd_n_q = 1'b1;
  always @(posedge clk) begin
    rd_n_q <= rd_n;
    if (!rd_n && rd_n_q) rd_fall <= cyc;
    if (rd_n && !rd_n_q) begin
      rd_pulses++;
      if (cyc - rd_fall != DIV) rd_bad++;
    end
  end

  // ---------------- test sequence ----------------
  // Reset from the start of time: rst_n falls at 1 ns, so the asynchronous
  // reset acts before the first clock edge.
  initial #1 rst_n = 1'b0;

  initial begin
    reg_word_t v;
    int unsigned p0, p6;
    foreach (ref_r[i]) ref_r[i] = '0;
    foreach (pulses[i]) begin pulses[i] = 0; mismatches[i] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    steps(3);

    // 1. start-up read of every register
    for (int r = 0; r < NUM_REGS; r++) begin
      host_read(8'(r), v);
      check(v == '0, $sformatf("start-up: register %0d = %h", r, v));
    end

    // 2. settings: 120 Hz, slots 1 and 3, channel times
    set_reg(8'(REG_REP_DIV), 32'd3);
    set_reg(8'(REG_SLOT_G1), 32'd1);
    set_reg(8'(REG_SLOT_G2) | 8'hA0, 32'd3);       // aliased address
    set_reg(8'(REG_CH_START), to_ticks(899.0));
    set_reg(8'(REG_CH_STOP), to_ticks(899.0 + 25.0));
    check(ref_r[REG_CH_START] == 107 && ref_r[REG_CH_STOP] == 110, "channel 1 ticks 107..110");
    for (int c = 1; c < NUM_CH; c++) begin
      real delay = real'($urandom % 20000);          // ns
      real width = 10.0 + real'($urandom % 3000);    // ns
      set_reg(8'(REG_CH_START + c) | (8'($urandom) & 8'hE0), to_ticks(delay));
      set_reg(8'(REG_CH_STOP + c), to_ticks(delay + width));
    end
    // spare registers
    for (int r = 24; r < NUM_REGS; r++) set_reg(8'(r), $urandom);

    // 3. broken frame: address and one octet only
    v = ref_r[30];
    u_ft.host_send(8'd30);
    u_ft.host_send(8'h5A);
    steps(20);
    n_short++;
    check(u_ft.tx_count() == 0, "short frame: nothing sent back");
    host_read(8'd30, v);
    check(v == ref_r[30], "short frame: register unchanged");

    // 4. six fiducials at 120 Hz
    repeat (6) fiducial_period();
    check(m_fires[0] == 2 && m_fires[1] == 2, "120 Hz: two firings per group in six fiducials");

    // 5. switch to 360 Hz between fiducials, both groups in slot 1
    set_reg(8'(REG_REP_DIV), 32'd1);
    set_reg(8'(REG_SLOT_G2), 32'd1);
    n_switch++;
    p0 = pulses[0];
    p6 = pulses[6];
    repeat (3) fiducial_period();
    check(pulses[0] - p0 == 3 && pulses[6] - p6 == 3, "360 Hz: channels 1 and 7 fire on every fiducial");

    // totals
    check(seen_fires[0] == m_fires[0] && seen_fires[1] == m_fires[1], "group firings match the model");
    check(rd_pulses > 0 && rd_bad == 0, $sformatf("rd_n low for %0d clocks in %0d of %0d strobes",
          DIV, rd_pulses - rd_bad, rd_pulses));
    check(u_ft.errors == 0, $sformatf("FIFO protocol errors: %0d", u_ft.errors));

    $display("mechanisms: writes=%0d reads=%0d short_frames=%0d aliased=%0d group1=%0d group2=%0d skipped=%0d rate_switches=%0d",
             n_write, n_read, n_short, n_alias, seen_fires[0], seen_fires[1], skipped, n_switch);
    check(n_write > 0,       "mechanism: register write");
    check(n_read > 0,        "mechanism: read-back");
    check(n_short > 0,       "mechanism: short frame dropped");
    check(n_alias > 0,       "mechanism: aliased address");
    check(seen_fires[0] > 0, "mechanism: group 1 fired");
    check(seen_fires[1] > 0, "mechanism: group 2 fired");
    check(skipped > 0,       "mechanism: fiducial with no group");
    check(n_switch > 0,      "mechanism: rate switch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * FID_PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
