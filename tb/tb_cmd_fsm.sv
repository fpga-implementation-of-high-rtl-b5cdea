// tb_cmd_fsm: self-checking testbench for cmd_fsm.
//
// A bus-master process serves a queue of requests (hold sys_adsn low with
// address and direction until sys_ack) while a recorder logs cState as a
// list of (state, run length).  The list is compared with the sequence worked
// out here from the timing parameters for each scenario:
//   A  read bank 0, write bank 1, write bank 1, read bank 2, read bank 2,
//      all queued at once: bank changes are issued in the pipeline slot
//      (no C_IDLE, no C_TDAL), a repeated bank waits in C_TDAL;
//   B  refresh: C_AR then C_TRFC, sys_ref_ack high throughout;
//   C  a refresh requested during a write burst with another request queued:
//      the refresh wins, so the slot is not used.
// Also checks that nothing starts before sys_init_done, the latched
// address, the sys_ack pulse, and the counts of sys_cyc_end and pipe_issue.
// CL = 3 and tRP = 5 make a read need extra precharge time (one C_TDAL cycle),
// so a same-bank read is not pipelined here.
module tb_cmd_fsm;
  import ddr_pkg::*;

  localparam int CL = 3, BL = 4, TRP = 5, TRCD = 2, TRFC = 6, TWR = 2;
  localparam int RD_WAIT = TRP - CL - 1;

  logic              clk = 1'b0;
  logic              reset = 1'b1;
  logic              sys_init_done = 1'b0;
  logic              sys_adsn = 1'b1;
  logic              sys_r_wn = 1'b1;
  logic [SYS_AW-1:0] sys_add = '0;
  logic              sys_ref_req = 1'b0;
  cstate_e           cstate;
  logic [SYS_AW-1:0] req_add;
  logic              sys_ack;
  logic              sys_ref_ack;
  logic              sys_cyc_end;
  logic              pipe_issue;

  int checks = 0;
  int failures = 0;

  cmd_fsm #(.CL(CL), .BL(BL), .TRP(TRP), .TRCD(TRCD), .TRFC(TRFC), .TWR(TWR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus master ----------------
  logic [SYS_AW-1:0] q_add[$];
  logic              q_rd[$];
  logic [SYS_AW-1:0] acked_add[$];

  function automatic logic [SYS_AW-1:0] mk(input int bank, input int row, input int col);
    return {BA_W'(bank), ROW_W'(row), COL_W'(col)};
  endfunction

  always @(posedge clk) begin
    if (sys_ack) begin
      acked_add.push_back(q_add[0]);
      void'(q_add.pop_front());
      void'(q_rd.pop_front());
    end
    if (sys_ref_ack) sys_ref_req <= 1'b0;
  end
  always_comb begin
    sys_adsn = 1'b1;
    sys_r_wn = 1'b1;
    sys_add  = '0;
    if (q_add.size() != 0 && !sys_ack) begin
      sys_adsn = 1'b0;
      sys_add  = q_add[0];
      sys_r_wn = q_rd[0];
    end
  end

  // ---------------- recorder ----------------
  cstate_e got_s[$];
  int      got_n[$];
  int      n_cyc_end = 0, n_pipe = 0, n_ack = 0;
  logic    ack_d = 1'b0;

  always @(negedge clk) begin
    if (!reset) begin
      if (got_s.size() != 0 && got_s[$] == cstate) got_n[$] = got_n[$] + 1;
      else begin
        got_s.push_back(cstate);
        got_n.push_back(1);
      end
      if (sys_cyc_end) n_cyc_end++;
      if (pipe_issue)  n_pipe++;
      if (sys_ack) begin
        n_ack++;
        check(!ack_d, "sys_ack longer than one cycle");
        check(q_add.size() != 0 && req_add == q_add[0], "req_add does not hold the accepted address");
      end
      ack_d = sys_ack;
      check(sys_ref_ack == (cstate == C_AR || cstate == C_TRFC), "sys_ref_ack");
      if (!sys_init_done) check(cstate == C_IDLE, "activity before sys_init_done");
    end
  end

  // ---------------- expected sequence ----------------
  cstate_e exp_s[$];
  int      exp_n[$];

  task automatic ex(input cstate_e s, input int n);
    if (n > 0) begin
      exp_s.push_back(s);
      exp_n.push_back(n);
    end
  endtask
  task automatic ex_access(input bit rd);
    ex(C_ACTIVE, 1);
    ex(C_TRCD, TRCD - 1);
    if (rd) begin
      ex(C_READA, 1); ex(C_CL, CL); ex(C_RDATA, BL / 2);
    end else begin
      ex(C_WRITEA, 1); ex(C_WDATA, BL / 2);
    end
  endtask

  task automatic wait_idle(input int cycles);
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!(cstate == C_IDLE && q_add.size() == 0 && !sys_ref_req) && n < 500);
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // Nothing happens before initialization is done.
    q_add.push_back(mk(0, 1, 0)); q_rd.push_back(1'b1);
    q_add.push_back(mk(1, 7, 8)); q_rd.push_back(1'b0);
    q_add.push_back(mk(1, 9, 4)); q_rd.push_back(1'b0);
    q_add.push_back(mk(2, 3, 12)); q_rd.push_back(1'b1);
    q_add.push_back(mk(2, 5, 16)); q_rd.push_back(1'b1);
    repeat (8) @(negedge clk);
    // Scenario A
    ex(C_IDLE, 9);
    ex_access(1'b1);               // read bank 0; next is bank 1: pipelined
    ex_access(1'b0);               // write bank 1; next same bank
    ex(C_TDAL, TWR + TRP); ex(C_IDLE, 1);
    ex_access(1'b0);               // write bank 1; next bank 2: pipelined
    ex_access(1'b1);               // read bank 2; next same bank, RD_WAIT > 0
    ex(C_TDAL, RD_WAIT); ex(C_IDLE, 1);
    ex_access(1'b1);               // read bank 2; queue empty
    ex(C_TDAL, RD_WAIT);
    sys_init_done = 1'b1;
    wait_idle(3);
    // Scenario B
    ex(C_IDLE, 4);
    ex(C_AR, 1); ex(C_TRFC, TRFC - 1);
    sys_ref_req = 1'b1;
    wait_idle(2);
    // Scenario C
    ex(C_IDLE, 3);
    q_add.push_back(mk(3, 2, 0)); q_rd.push_back(1'b0);
    q_add.push_back(mk(0, 4, 0)); q_rd.push_back(1'b1);
    ex(C_IDLE, 1);
    ex_access(1'b0);               // write bank 3; refresh pending at the slot
    ex(C_TDAL, TWR + TRP); ex(C_IDLE, 1);
    ex(C_AR, 1); ex(C_TRFC, TRFC - 1); ex(C_IDLE, 1);
    ex_access(1'b1);               // read bank 0
    ex(C_TDAL, RD_WAIT);
    @(negedge clk);
    wait (cstate == C_WRITEA);
    sys_ref_req = 1'b1;
    wait_idle(0);

    // Merge neighbouring expected runs of the same state.
    for (int i = exp_s.size() - 1; i > 0; i--) begin
      if (exp_s[i] == exp_s[i-1]) begin
        exp_n[i-1] += exp_n[i];
        exp_s.delete(i);
        exp_n.delete(i);
      end
    end
    check(got_s.size() >= exp_s.size(),
          $sformatf("%0d state runs, expected at least %0d", got_s.size(), exp_s.size()));
    for (int i = 0; i < exp_s.size() && i < got_s.size(); i++) begin
      // Idle runs between scenarios depend on testbench pacing: only their
      // presence is compared.
      check(got_s[i] == exp_s[i] && (got_s[i] == C_IDLE || got_n[i] == exp_n[i]),
            $sformatf("run %0d: %s x%0d, expected %s x%0d", i, got_s[i].name(), got_n[i],
                      exp_s[i].name(), exp_n[i]));
    end
    check(n_ack == 7, $sformatf("%0d requests accepted", n_ack));
    check(n_pipe == 2, $sformatf("%0d pipelined issues", n_pipe));
    check(n_cyc_end == 9, $sformatf("%0d cycle ends", n_cyc_end));
    check(acked_add.size() == 7 && acked_add[3] == mk(2, 3, 12), "accepted addresses");
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
