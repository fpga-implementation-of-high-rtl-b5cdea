// tb_ddr_ctrl: end-to-end testbench of the DDR SDRAM controller with every
// parameter at its default.
//
// The controller drives a behavioural DDR SDRAM (ddr_sdram_model), which
// checks the command protocol and timing and stores the data.  The clock is
// 133 MHz (7.5 ns), clk2x 266 MHz, generated from one process so that their
// rising edges coincide.  The testbench acts as the bus master:
//   - raises sys_dly_200us after 200 us, waits for sys_init_done and checks
//     that the device saw the complete power-up sequence;
//   - runs a random stream of burst reads and writes (random byte masks,
//     addresses from a small pool so that reads hit written data, banks
//     chosen so that same-bank and bank-changing neighbours both occur, and
//     idle gaps or back-to-back requests), with a refresh request every
//     7.8 us; every read burst is compared with a shadow memory;
//   - checks the read latency from sys_ack to the first data word.
// It counts each mechanism of the design and fails if one never occurs:
// pipelined issue, write recovery wait (C_TDAL), refresh, masked write,
// refresh taking priority over a waiting request, read, write.
module tb_ddr_ctrl;
  import ddr_pkg::*;

  localparam int N_REQ      = 1000;
  localparam int REF_PERIOD = 1040;   // 7.8 us at 7.5 ns
  // Clock cycles from the ACTIVE state to the first read word on sys_d_o,
  // in clk2x cycles from the sys_ack rising edge (see data_path).
  localparam int RD_LAT2X   = 2 * DEF_TRCD + 3 + 2 * DEF_CL;

  logic              clk = 1'b0, clk2x = 1'b0;
  logic              reset = 1'b1;
  logic              sys_dly_200us = 1'b0;
  logic [SYS_AW-1:0] sys_add;
  logic              sys_adsn;
  logic              sys_r_wn;
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
  int hc = 0;

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

  // 7.5 ns clock, 3.75 ns clk2x, rising edges aligned.
  initial forever begin
    #1.875;
    if (!clk2x) begin
      hc++;
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

  // ---------------- request stream ----------------
  typedef struct {
    logic [SYS_AW-1:0] add;
    logic              rd;
    logic [15:0]       data [DEF_BL];
    logic [1:0]        mask [DEF_BL];
  } req_t;

  req_t              pend[$];         // not yet accepted
  logic [15:0]       shadow [int];
  logic [15:0]       exp_rd[$];       // expected read words, in order
  logic [15:0]       wr_words[$];     // write words still to hand over
  logic [1:0]        wr_masks[$];
  int                ack_hc[$];       // clk2x edge of each read's sys_ack

  always_comb begin
    sys_adsn = 1'b1;
    sys_r_wn = 1'b1;
    sys_add  = '0;
    if (pend.size() != 0 && !sys_ack) begin
      sys_adsn = 1'b0;
      sys_add  = pend[0].add;
      sys_r_wn = pend[0].rd;
    end
  end

  function automatic int word_key(input logic [SYS_AW-1:0] a, input int i);
    int col;
    col = int'(a[COL_W-1:0]);
    col = (col & ~(DEF_BL - 1)) | ((col + i) & (DEF_BL - 1));
    return (int'(a[SYS_AW-1 -: BA_W]) << 20) | (int'(a[COL_W +: ROW_W]) << 8) | col;
  endfunction

  // Acceptance: update the shadow memory in order of acceptance.
  int n_rd_acc = 0, n_wr_acc = 0, n_masked = 0;
  always @(posedge clk) begin
    if (sys_ack && pend.size() != 0) begin
      req_t r;
      r = pend.pop_front();
      for (int i = 0; i < DEF_BL; i++) begin
        int k;
        logic [15:0] v;
        k = word_key(r.add, i);
        v = shadow.exists(k) ? shadow[k] : 16'h0000;
        if (r.rd) exp_rd.push_back(v);
        else begin
          if (!r.mask[i][0]) v[7:0]  = r.data[i][7:0];
          if (!r.mask[i][1]) v[15:8] = r.data[i][15:8];
          shadow[k] = v;
          wr_words.push_back(r.data[i]);
          wr_masks.push_back(r.mask[i]);
          if (r.mask[i] != 2'b00) n_masked++;
        end
      end
      if (r.rd) begin
        n_rd_acc++;
        ack_hc.push_back(hc);
      end else n_wr_acc++;
    end
  end

  // Data: hand over write words, compare read words.
  int n_rd_words = 0, rd_word_idx = 0;
  always @(posedge clk2x) begin
    if (!reset && !sys_rdyn && !sys_data_valid) begin
      if (wr_words.size() == 0) check(0, "write word requested with none pending");
      else begin
        sys_d_i   <= wr_words.pop_front();
        sys_dmsel <= wr_masks.pop_front();
      end
    end
  end
  always @(negedge clk2x) begin
    if (!reset && sys_data_valid) begin
      if (exp_rd.size() == 0) check(0, "unexpected read word");
      else begin
        logic [15:0] e;
        e = exp_rd.pop_front();
        check(sys_d_o == e, $sformatf("read word %h expected %h", sys_d_o, e));
        check(!sys_rdyn, "sys_rdyn high with read data");
      end
      if (rd_word_idx == 0) begin
        int a;
        a = ack_hc.pop_front();
        check(hc - a == RD_LAT2X,
              $sformatf("read latency %0d clk2x cycles, expected %0d", hc - a, RD_LAT2X));
      end
      rd_word_idx = (rd_word_idx + 1) % DEF_BL;
      n_rd_words++;
    end
  end

  // Refresh requests.
  int n_ref_ack = 0, n_ref_over_req = 0;
  logic ref_ack_d = 1'b0;
  int   ref_timer = 0;
  always @(posedge clk) begin
    ref_ack_d <= sys_ref_ack;
    ref_timer <= (ref_timer == REF_PERIOD - 1) ? 0 : ref_timer + 1;
    if (sys_ref_ack) sys_ref_req <= 1'b0;
    if (sys_ref_ack && !ref_ack_d) begin
      n_ref_ack++;
      if (!sys_adsn) n_ref_over_req++;
    end
    if (sys_init_done && ref_timer == 0) sys_ref_req <= 1'b1;
  end

  // Mechanism counters, from the pins.  A WRITE followed by an ACTIVE to the
  // same bank is the case where the controller must wait out write recovery
  // and precharge (C_TDAL); the device model checks that it did.
  int n_pipe = 0, n_tdal = 0;
  int last_wr_bank = -1;
  always @(posedge clk) begin
    if (sys_pipe_issue) n_pipe++;
    if (!ddr_csn && ddr_cke) begin
      if ({ddr_rasn, ddr_casn, ddr_wen} == 3'b100) last_wr_bank = int'(ddr_ba);
      if ({ddr_rasn, ddr_casn, ddr_wen} == 3'b101) last_wr_bank = -1;
      if ({ddr_rasn, ddr_casn, ddr_wen} == 3'b011) begin
        if (int'(ddr_ba) == last_wr_bank) n_tdal++;
        last_wr_bank = -1;
      end
    end
  end

  // Address pool: 4 banks x 3 rows x 4 bursts.
  function automatic logic [SYS_AW-1:0] pick(input int last_bank);
    int b;
    b = ($urandom_range(0, 2) == 0) ? last_bank : int'($urandom_range(0, 3));
    return {BA_W'(b), ROW_W'($urandom_range(0, 2) * 37), COL_W'($urandom_range(0, 3) * DEF_BL)};
  endfunction

  initial begin
    int last_bank = 0;
    int t0;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    #200us;
    @(posedge clk);
    sys_dly_200us = 1'b1;
    t0 = hc;
    while (!sys_init_done && hc - t0 < 2000) @(posedge clk);
    check(sys_init_done, "initialization did not complete");
    check(m_init_ok, "device did not see a complete power-up sequence");
    for (int n = 0; n < N_REQ; n++) begin
      req_t r;
      r.add = pick(last_bank);
      last_bank = int'(r.add[SYS_AW-1 -: BA_W]);
      r.rd  = ($urandom_range(0, 1) == 1);
      for (int i = 0; i < DEF_BL; i++) begin
        r.data[i] = 16'($urandom);
        r.mask[i] = ($urandom_range(0, 7) == 0) ? 2'($urandom) : 2'b00;
      end
      // Mostly queue requests back to back; sometimes let the bus go idle.
      while (pend.size() >= 2) @(posedge clk);
      if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 30)) @(posedge clk);
      pend.push_back(r);
    end
    while (pend.size() != 0) @(posedge clk);
    repeat (60) @(posedge clk);
    check(exp_rd.size() == 0, $sformatf("%0d read words never arrived", exp_rd.size()));
    check(wr_words.size() == 0, $sformatf("%0d write words never taken", wr_words.size()));
    check(n_rd_words == DEF_BL * n_rd_acc, "read word count");
    check(m_errors == 0, $sformatf("%0d protocol errors in the device model", m_errors));
    check(m_read == n_rd_acc && m_write == n_wr_acc, "device READ/WRITE command counts");
    check(m_act == n_rd_acc + n_wr_acc, "device ACTIVE count");
    check(m_ref == n_ref_ack, "device AUTO REFRESH count");
    // Every mechanism must have happened.
    check(n_rd_acc > 0, "no read");
    check(n_wr_acc > 0, "no write");
    check(n_pipe > 0, "no pipelined issue");
    check(n_tdal > 0, "no write-recovery wait");
    check(n_ref_ack > 0, "no refresh");
    check(n_ref_over_req > 0, "no refresh taken ahead of a waiting request");
    check(n_masked > 0, "no masked write");
    $display("reads %0d writes %0d pipelined %0d tDAL waits %0d refreshes %0d (%0d ahead of a request) masked words %0d",
             n_rd_acc, n_wr_acc, n_pipe, n_tdal, n_ref_ack, n_ref_over_req, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
