// tb_init_fsm: self-checking testbench for init_fsm.
//
// Holds sys_dly_200us low for a while (the FSM must stay in I_IDLE), then
// raises it and records the state of every cycle as a list of (state, run
// length).  That list is compared with the DDR power-up sequence written out
// here from the timing parameters: NOP, PRE, tRP, EMRS, tMRD, MRS with DLL
// reset, tMRD, PRE, tRP, AR, tRFC, AR, tRFC, MRS, tMRD, READY.  Also checks
// the DLL-reset flag at each MODE REGISTER load, sys_init_done, and the total
// number of cycles from sys_dly_200us to sys_init_done.  Non-default timing
// parameters are used so that a constant mistaken for a parameter shows.
module tb_init_fsm;
  import ddr_pkg::*;

  localparam int TRP = 4, TMRD = 3, TRFC = 7;

  logic    clk = 1'b0;
  logic    reset = 1'b1;
  logic    sys_dly_200us = 1'b0;
  istate_e istate;
  logic    mrs_dll_rst;
  logic    sys_init_done;

  int checks = 0;
  int failures = 0;

  init_fsm #(.TRP(TRP), .TMRD(TMRD), .TRFC(TRFC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  istate_e exp_s[$];
  int      exp_n[$];
  istate_e got_s[$];
  int      got_n[$];
  int      mrs_seen;
  int      total;

  task automatic expect_run(input istate_e s, input int n);
    exp_s.push_back(s);
    exp_n.push_back(n);
  endtask

  initial begin
    expect_run(I_NOP, 1);
    expect_run(I_PRE, 1);   expect_run(I_TRP, TRP - 1);
    expect_run(I_EMRS, 1);  expect_run(I_TMRD, TMRD - 1);
    expect_run(I_MRS, 1);   expect_run(I_TMRD, TMRD - 1);
    expect_run(I_PRE, 1);   expect_run(I_TRP, TRP - 1);
    expect_run(I_AR1, 1);   expect_run(I_TRFC1, TRFC - 1);
    expect_run(I_AR2, 1);   expect_run(I_TRFC2, TRFC - 1);
    expect_run(I_MRS, 1);   expect_run(I_TMRD, TMRD - 1);

    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (20) begin
      @(negedge clk);
      check(istate == I_IDLE && !sys_init_done, "leaves I_IDLE before the 200 us delay");
    end
    sys_dly_200us = 1'b1;
    @(negedge clk);
    total = 1;
    mrs_seen = 0;
    while (istate != I_READY && total < 500) begin
      if (got_s.size() != 0 && got_s[$] == istate) got_n[$] = got_n[$] + 1;
      else begin
        got_s.push_back(istate);
        got_n.push_back(1);
      end
      if (istate == I_MRS) begin
        check(mrs_dll_rst == (mrs_seen == 0), "DLL reset flag at MODE REGISTER load");
        mrs_seen++;
      end
      check(!sys_init_done, "sys_init_done before I_READY");
      @(negedge clk);
      total++;
    end
    check(got_s.size() == exp_s.size(),
          $sformatf("%0d state runs, expected %0d", got_s.size(), exp_s.size()));
    for (int i = 0; i < exp_s.size() && i < got_s.size(); i++) begin
      check(got_s[i] == exp_s[i] && got_n[i] == exp_n[i],
            $sformatf("run %0d: %s x%0d, expected %s x%0d", i, got_s[i].name(), got_n[i],
                      exp_s[i].name(), exp_n[i]));
    end
    // Cycles from the first cycle with sys_dly_200us seen to I_READY.
    check(total == 1 + 1 + 2 * TRP + 3 * TMRD + 2 * TRFC,
          $sformatf("initialization took %0d cycles", total));
    check(sys_init_done, "sys_init_done in I_READY");
    sys_dly_200us = 1'b0;
    repeat (10) @(negedge clk);
    check(istate == I_READY && sys_init_done, "stays ready");
    reset = 1'b1;
    @(negedge clk);
    check(istate == I_IDLE && !sys_init_done, "reset returns to I_IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
