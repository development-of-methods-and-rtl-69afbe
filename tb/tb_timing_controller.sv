// tb_timing_controller: self-checking test of the timing controller with a
// behavioural USB FIFO. The step enable comes from a counter in the testbench
// (one step every DIV clocks). The register block is replaced by a simple
// function: the read-back octet n of address a is a + n.
// Checks: a five-octet frame loads octets 0..4 in order and stores once; a
// lone address octet is answered with four octets; a frame of three octets
// is dropped; rd_n stays low for exactly one step; the number of steps from
// rd_n first falling to the store (15) and to the first read-back wr (5);
// data octets that arrive after the wait window (an under-run) turn the
// address octet into a read request.
module tb_timing_controller;
  import trigger_pkg::*;

  localparam int unsigned DIV = 4;

  logic clk = 1'b0, rst_n = 1'b1, ce;
  logic [7:0] bus, d_o;
  logic rxf_n, txe_n, rd_n, wr, pad_t;
  frame_ctrl_t frame_ctrl;
  logic reg_wr_en;
  logic [1:0] reg_byte_sel;
  logic [7:0] cap_addr;
  int unsigned div_cnt = 0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
  assign ce = (div_cnt == DIV - 1);

  timing_controller dut (
    .clk, .rst_n, .ce,
    .usb_rxf_n (rxf_n), .usb_txe_n (txe_n), .usb_rd_n (rd_n), .usb_wr (wr),
    .pad_t, .frame_ctrl, .reg_wr_en, .reg_byte_sel
  );

  ft245_model u_ft (
    .clk, .d_from_logic (d_o), .pad_t, .d_to_logic (bus),
    .rxf_n, .txe_n, .rd_n, .wr
  );

  // Stand-in for the five-octet register's address octet and the register block.
  always_ff @(posedge clk) if (ce && frame_ctrl.load && frame_ctrl.idx == OCT_ADDR) cap_addr <= bus;
  assign d_o = cap_addr + 8'(reg_byte_sel);

  // Monitor: loads, stores, step counts.
  logic [7:0]  loads_val [$];
  octet_idx_e  loads_idx [$];
  int unsigned stores = 0;
  longint unsigned cyc = 0, t_rd_fall = 0, t_store = 0, t_wr_rise = 0;
  longint unsigned rd_low_len = 0, rd_low_start = 0;
  logic rd_n_q = 1'b1, wr_q = 1'b0, first_wr_seen = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_n_q <= rd_n;
    wr_q <= wr;
    if (ce && frame_ctrl.load) begin
      loads_val.push_back(bus);
      loads_idx.push_back(frame_ctrl.idx);
    end
    if (ce && reg_wr_en) begin
      stores++;
      t_store <= cyc + 1;   // the store takes effect at this edge; rd_n is seen one edge late

    end
    if (!rd_n && rd_n_q) begin
      rd_low_start <= cyc;
      if (loads_val.size() == 0) t_rd_fall <= cyc;
    end
    if (rd_n && !rd_n_q) rd_low_len <= cyc - rd_low_start;
    if (wr && !wr_q && !first_wr_seen) begin
      t_wr_rise <= cyc;
      first_wr_seen <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_monitor();
    loads_val.delete();
    loads_idx.delete();
    stores = 0;
    first_wr_seen = 1'b0;
  endtask

  task automatic idle_steps(input int n);
    repeat (n * DIV) @(posedge clk);
  endtask

  logic [7:0] frame [5];

  // Reset from the start of time: rst_n falls at 1 ns, so the asynchronous
  // reset acts before the first clock edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    idle_steps(3);

    // --- write frames ---
    for (int f = 0; f < 6; f++) begin
      clear_monitor();
      for (int i = 0; i < 5; i++) begin
        frame[i] = 8'($urandom);
        u_ft.host_send(frame[i]);
      end
      idle_steps(25);
      check(loads_val.size() == 5, $sformatf("write %0d: %0d loads", f, loads_val.size()));
      for (int i = 0; i < 5 && i < loads_val.size(); i++) begin
        check(loads_idx[i] == octet_idx_e'(i), $sformatf("write %0d: load %0d index %0d", f, i, loads_idx[i]));
        check(loads_val[i] == frame[i], $sformatf("write %0d: octet %0d %h exp %h", f, i, loads_val[i], frame[i]));
      end
      check(stores == 1, $sformatf("write %0d: %0d stores", f, stores));
      check(u_ft.tx_count() == 0, "write: nothing sent back");
      check(t_store - t_rd_fall == 15 * DIV, $sformatf("write: %0d clocks rd_n fall to store, exp %0d",
            t_store - t_rd_fall, 15 * DIV));
      check(rd_low_len == DIV, $sformatf("rd_n low for %0d clocks", rd_low_len));
    end

    // --- read requests ---
    for (int f = 0; f < 6; f++) begin
      clear_monitor();
      frame[0] = 8'($urandom);
      u_ft.host_send(frame[0]);
      idle_steps(25);
      check(loads_val.size() == 1 && loads_idx[0] == OCT_ADDR && loads_val[0] == frame[0],
            $sformatf("read %0d: address load", f));
      check(stores == 0, "read: no store");
      check(u_ft.tx_count() == 4, $sformatf("read %0d: %0d octets back", f, u_ft.tx_count()));
      for (int n = 0; n < 4; n++) begin
        logic [7:0] got;
        got = (u_ft.tx_count() > 0) ? u_ft.host_recv() : 8'h00;
        check(got == frame[0] + 8'(n), $sformatf("read %0d: octet %0d %h exp %h", f, n, got, frame[0] + 8'(n)));
      end
      check(t_wr_rise - t_rd_fall == 5 * DIV, $sformatf("read: %0d clocks rd_n fall to wr, exp %0d",
            t_wr_rise - t_rd_fall, 5 * DIV));
    end

    // --- short frame: three octets, dropped ---
    clear_monitor();
    for (int i = 0; i < 3; i++) u_ft.host_send(8'($urandom));
    idle_steps(30);
    check(loads_val.size() == 3, "short frame: three loads");
    check(stores == 0, "short frame: no store");
    check(u_ft.tx_count() == 0, "short frame: nothing sent back");

    // --- a write after the short frame still works ---
    clear_monitor();
    for (int i = 0; i < 5; i++) u_ft.host_send(8'(i + 1));
    idle_steps(25);
    check(stores == 1 && loads_val.size() == 5, "write after short frame");

    // --- under-run: the data octets arrive after the wait window ---
    // The address is taken as a read request; the four late octets then form
    // a four-octet frame, which is dropped.
    clear_monitor();
    u_ft.host_send(8'h07);
    idle_steps(8);
    for (int i = 0; i < 4; i++) u_ft.host_send(8'($urandom));
    idle_steps(40);
    check(u_ft.tx_count() == 4, $sformatf("under-run: %0d octets sent back, exp 4", u_ft.tx_count()));
    while (u_ft.tx_count() > 0) void'(u_ft.host_recv());
    check(stores == 0, "under-run: no store");
    check(loads_val.size() == 5 && loads_idx[1] == OCT_ADDR && loads_idx[4] == OCT_TWO,
          "under-run: late octets start a new frame");

    check(u_ft.errors == 0, $sformatf("FIFO protocol errors: %0d", u_ft.errors));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
