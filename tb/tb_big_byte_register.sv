// tb_big_byte_register: self-checking test of the 32 x 32-bit register block.
// Random frames are written, some with address octets whose upper three bits
// are set (they must alias onto the low 32 addresses), some without ce or
// wr_en (they must not store). Every octet of every register is read back
// through OBus, and the SYNC-clocked outputs are compared with a reference
// array. SYNC runs on its own clock, so the test also shows that the outputs
// follow the store only on SYNC edges.
module tb_big_byte_register;
  import trigger_pkg::*;

  logic clk = 1'b0, sync = 1'b0, rst_n = 1'b0, ce = 1'b0, wr_en = 1'b0;
  octet_t a = '0, b0 = '0, b1 = '0, b2 = '0, b3 = '0, obus;
  logic [1:0] sel = '0;
  reg_word_t regs [NUM_REGS];
  reg_word_t ref_r [NUM_REGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always #3 sync = ~sync;

  big_byte_register dut (
    .clk, .rst_n, .ce, .wr_en, .Bus_address(a), .Bus_zero(b0), .Bus_one(b1),
    .Bus_two(b2), .Bus_three(b3), .byte_sel(sel), .SYNC(sync),
    .reg_out(regs), .OBus(obus)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all(input string when);
    for (int r = 0; r < NUM_REGS; r++) begin
      for (int n = 0; n < 4; n++) begin
        a = 8'(r) | (8'($urandom) & 8'hE0);
        sel = 2'(n);
        #1;
        check(obus == ref_r[r][8*n +: 8], $sformatf("%s: reg %0d octet %0d %h exp %h",
              when, r, n, obus, ref_r[r][8*n +: 8]));
      end
    end
    repeat (2) @(posedge sync);
    #1;
    for (int r = 0; r < NUM_REGS; r++)
      check(regs[r] == ref_r[r], $sformatf("%s: reg_out %0d %h exp %h", when, r, regs[r], ref_r[r]));
  endtask

  initial begin
    foreach (ref_r[i]) ref_r[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    read_all("after reset");
    for (int round = 0; round < 4; round++) begin
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        ce = ($urandom % 4) != 0;
        wr_en = ($urandom % 4) != 0;
        a = 8'($urandom);
        {b3, b2, b1, b0} = $urandom;
        if (ce && wr_en) ref_r[a[4:0]] = {b3, b2, b1, b0};
        @(posedge clk);
      end
      @(negedge clk);
      ce = 1'b0;
      wr_en = 1'b0;
      read_all($sformatf("round %0d", round));
    end
    // A store is not visible on reg_out before a SYNC edge.
    @(posedge sync);
    @(negedge clk);
    ce = 1'b1; wr_en = 1'b1; a = 8'd5; {b3, b2, b1, b0} = ~ref_r[5];
    @(posedge clk);
    #0.5;
    ce = 1'b0; wr_en = 1'b0;
    check(regs[5] == ref_r[5], "reg_out waits for SYNC");
    ref_r[5] = ~ref_r[5];
    @(posedge sync);
    #0.5;
    check(regs[5] == ref_r[5], "reg_out follows at SYNC");
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
