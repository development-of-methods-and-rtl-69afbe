// tb_five_byte_register: self-checking test of the five-octet register.
// Random loads, with and without the step enable and the load strobe, are
// applied. After each clock all five outputs are compared with a reference
// model held in the testbench.
module tb_five_byte_register;
  import trigger_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  octet_t bus = '0;
  frame_ctrl_t ctrl = '0;
  octet_t q [5];
  octet_t ref_q [5];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  five_byte_register dut (
    .clk, .rst_n, .ce, .Bus(bus), .Control_Input(ctrl),
    .byte_address(q[0]), .byte_zero(q[1]), .byte_one(q[2]),
    .byte_two(q[3]), .byte_three(q[4])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    foreach (ref_q[i]) ref_q[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 5; i++) check(q[i] == 8'h00, "reset value");
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      ctrl.load = ($urandom % 3) != 0;
      ctrl.idx = octet_idx_e'($urandom % 5);
      bus = 8'($urandom);
      if (ce && ctrl.load) ref_q[ctrl.idx] = bus;
      @(posedge clk);
      #1;
      for (int i = 0; i < 5; i++)
        check(q[i] == ref_q[i], $sformatf("step %0d octet %0d: %h exp %h", t, i, q[i], ref_q[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
