// tb_main_ctrl: self-checking testbench for main_ctrl (INIT_FSM + CMD_FSM).
//
// Checks the hand-over between the two state machines: no command cycle may
// start before initialization ends, even with a request and a refresh
// request already waiting; sys_init_done must rise a fixed number of cycles
// after sys_dly_200us (worked out from the timing parameters); the waiting
// refresh must then be served first (it has priority), followed by the
// request.  Then a write and a read to the same bank check the cState
// sequence and its lengths, including the write-recovery wait, and that
// iState stays in I_READY throughout.
module tb_main_ctrl;
  import ddr_pkg::*;

  localparam int CL = 2, BL = 4, TRP = 3, TRCD = 3, TMRD = 2, TRFC = 10, TWR = 2;

  logic              clk = 1'b0;
  logic              reset = 1'b1;
  logic              sys_dly_200us = 1'b0;
  logic              sys_adsn = 1'b1;
  logic              sys_r_wn = 1'b1;
  logic [SYS_AW-1:0] sys_add = '0;
  logic              sys_ref_req = 1'b0;
  istate_e           istate;
  cstate_e           cstate;
  logic              mrs_dll_rst;
  logic [SYS_AW-1:0] req_add;
  logic              sys_init_done, sys_ack, sys_ref_ack, sys_cyc_end, pipe_issue;

  int checks = 0;
  int failures = 0;

  main_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Count the cycles cState spends in state s from now on (wait until it is
  // entered, then until it is left).
  task automatic expect_state(input cstate_e s, input int n);
    int k = 0, w = 0;
    while (cstate != s && w < 100) begin
      @(negedge clk);
      w++;
    end
    while (cstate == s && k < 100) begin
      check(istate == I_READY, "iState left I_READY");
      @(negedge clk);
      k++;
    end
    check(k == n, $sformatf("%s lasted %0d cycles, expected %0d", s.name(), k, n));
  endtask

  initial begin
    int t;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    sys_ref_req = 1'b1;
    sys_adsn = 1'b0;
    sys_r_wn = 1'b0;
    sys_add = {2'd1, 12'd5, 8'd4};
    repeat (10) @(negedge clk);
    sys_dly_200us = 1'b1;
    t = 0;
    while (!sys_init_done && t < 1000) begin
      check(cstate == C_IDLE && !sys_ack && !sys_ref_ack, "command cycle before init done");
      @(negedge clk);
      t++;
    end
    check(t == 2 + 2 * TRP + 3 * TMRD + 2 * TRFC,
          $sformatf("init done after %0d cycles", t));
    // refresh first
    @(negedge clk);
    check(cstate == C_AR && sys_ref_ack, "refresh has priority after init");
    sys_ref_req = 1'b0;
    expect_state(C_TRFC, TRFC - 1);
    // then the waiting write, to bank 1
    expect_state(C_ACTIVE, 1);
    check(req_add == {2'd1, 12'd5, 8'd4}, "request address latched");
    sys_adsn = 1'b1;
    sys_add = '0;
    expect_state(C_TRCD, TRCD - 1);
    expect_state(C_WRITEA, 1);
    expect_state(C_WDATA, BL / 2);
    // read to the same bank while the write recovers
    sys_adsn = 1'b0;
    sys_r_wn = 1'b1;
    sys_add = {2'd1, 12'd6, 8'd0};
    check(cstate == C_TDAL, "same-bank request must wait in C_TDAL");
    expect_state(C_TDAL, TWR + TRP);
    expect_state(C_ACTIVE, 1);
    sys_adsn = 1'b1;
    expect_state(C_TRCD, TRCD - 1);
    expect_state(C_READA, 1);
    expect_state(C_CL, CL);
    expect_state(C_RDATA, BL / 2);
    check(cstate == C_IDLE, "back to C_IDLE");
    check(mrs_dll_rst == 1'b0, "DLL reset flag cleared after initialization");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
