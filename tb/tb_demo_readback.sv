// tb_demo_readback: write-then-read-back demonstration on the full controller.
//
// Mirrors the board-level bring-up test of this controller: while reset is
// held with a write requested, nothing happens and the read data output
// stays 0; after reset is released and the device is initialized, the byte
// pattern 8'b10011001 is written to one location and read back, and the read
// data must equal the written data.  Runs the top level at its default
// parameters against the behavioural DDR SDRAM model (with a shortened
// 200 us delay: sys_dly_200us is raised after 2 us).
module tb_demo_readback;
  import ddr_pkg::*;

  localparam logic [15:0] PATTERN = 16'b0000_0000_1001_1001;

  logic              clk = 1'b0, clk2x = 1'b0;
  logic              reset = 1'b1;
  logic              sys_dly_200us = 1'b0;
  logic [SYS_AW-1:0] sys_add = '0;
  logic              sys_adsn = 1'b1;
  logic              sys_r_wn = 1'b1;
  logic [DQ_W-1:0]   sys_d_i = '0;
  logic [DQ_W-1:0]   sys_d_o;
  logic [DM_W-1:0]   sys_dmsel = '0;
  logic              sys_rdyn, sys_data_valid, sys_init_done, sys_ack;
  logic              sys_ref_req = 1'b0;
  logic              sys_ref_ack, sys_cyc_end, sys_pipe_issue;
  logic              ddr_clk, ddr_clkn, ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen;
  logic [BA_W-1:0]   ddr_ba;
  logic [ROW_W-1:0]  ddr_add;
  logic [DQ_W-1:0]   ddr_dq_o, ddr_dq_i;
  logic              ddr_dq_oe;
  logic [DM_W-1:0]   ddr_dqm;
  logic              ddr_dqs_o, ddr_dqs_oe;

  int checks = 0;
  int failures = 0;

  ddr_ctrl dut (
    .sys_clk (clk), .sys_clk2x (clk2x), .sys_reset (reset),
    .sys_dly_200us (sys_dly_200us), .sys_add (sys_add), .sys_adsn (sys_adsn),
    .sys_r_wn (sys_r_wn), .sys_d_i (sys_d_i), .sys_d_o (sys_d_o),
    .sys_dmsel (sys_dmsel), .sys_rdyn (sys_rdyn), .sys_data_valid (sys_data_valid),
    .sys_init_done (sys_init_done), .sys_ack (sys_ack), .sys_ref_req (sys_ref_req),
    .sys_ref_ack (sys_ref_ack), .sys_cyc_end (sys_cyc_end),
    .sys_pipe_issue (sys_pipe_issue),
    .ddr_clk (ddr_clk), .ddr_clkn (ddr_clkn), .ddr_cke (ddr_cke), .ddr_csn (ddr_csn),
    .ddr_rasn (ddr_rasn), .ddr_casn (ddr_casn), .ddr_wen (ddr_wen), .ddr_ba (ddr_ba),
    .ddr_add (ddr_add), .ddr_dq_o (ddr_dq_o), .ddr_dq_i (ddr_dq_i),
    .ddr_dq_oe (ddr_dq_oe), .ddr_dqm (ddr_dqm), .ddr_dqs_o (ddr_dqs_o),
    .ddr_dqs_oe (ddr_dqs_oe)
  );

  int   m_errors, m_act, m_read, m_write, m_ref;
  logic m_init_ok;

  ddr_sdram_model #(
    .TRP (DEF_TRP), .TRCD (DEF_TRCD), .TRFC (DEF_TRFC), .TMRD (DEF_TMRD), .TWR (DEF_TWR)
  ) u_mem (
    .ck (ddr_clk), .clk2x (clk2x), .cke (ddr_cke), .csn (ddr_csn), .rasn (ddr_rasn),
    .casn (ddr_casn), .wen (ddr_wen), .ba (ddr_ba), .addr (ddr_add),
    .dq_in (ddr_dq_o), .dq_oe (ddr_dq_oe), .dm (ddr_dqm), .dq_out (ddr_dq_i),
    .errors (m_errors), .init_ok (m_init_ok), .n_act (m_act), .n_read (m_read),
    .n_write (m_write), .n_ref (m_ref)
  );

  initial forever begin
    #1.875;
    if (!clk2x) begin
      clk2x = 1'b1;
      clk = ~clk;
    end else clk2x = 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Write data: the pattern in every word of the burst.
  always @(posedge clk2x) begin
    if (!sys_rdyn && !sys_data_valid) sys_d_i <= PATTERN;
  end

  int n_words = 0;
  always @(negedge clk2x) begin
    if (sys_data_valid) begin
      check(sys_d_o == PATTERN, $sformatf("read back %b", sys_d_o));
      n_words++;
    end
  end

  task automatic request(input logic rd);
    @(negedge clk);
    sys_adsn = 1'b0;
    sys_r_wn = rd;
    sys_add  = {2'd2, 12'd100, 8'd8};
    while (!sys_ack) @(negedge clk);
    sys_adsn = 1'b1;
    while (!sys_cyc_end) @(negedge clk);
  endtask

  initial begin
    // reset held, write requested: no command, read data 0
    sys_adsn = 1'b0;
    sys_r_wn = 1'b0;
    repeat (20) begin
      @(negedge clk);
      check(sys_d_o == '0 && !sys_ack && !ddr_cke, "activity during reset");
    end
    sys_adsn = 1'b1;
    reset = 1'b0;
    #2us;
    sys_dly_200us = 1'b1;
    while (!sys_init_done) @(negedge clk);
    request(1'b0);
    repeat (10) @(negedge clk);
    request(1'b1);
    repeat (20) @(negedge clk);
    check(n_words == DEF_BL, $sformatf("%0d words read back", n_words));
    check(m_errors == 0, "device model reported protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
