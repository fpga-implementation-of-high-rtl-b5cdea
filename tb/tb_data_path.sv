// tb_data_path: self-checking testbench for data_path.
//
// Generates clk and clk2x from one process so that their rising edges
// coincide, and counts clk2x rising edges (hc).  A sequencer plays cState as
// the command FSM would (reads, writes, back to back, and a READA while
// iState is not yet I_READY, which must be ignored).  Expected timing, worked
// out from the DDR protocol with the command pins one clock behind cState:
// for a READA entered at clk2x edge e, the device drives word i during
// clk2x cycle e+4+2CL+i and the word must appear on sys_d_o with data_valid
// one cycle later; for a WRITEA entered at edge e, sys_rdyn is low during
// cycles e+3..e+2+BL and word j must be on ddr_dq_o with ddr_dq_oe, its byte
// mask on ddr_dm, during cycle e+5+j.  Every clk2x cycle is checked.
module tb_data_path;
  import ddr_pkg::*;

  localparam int CL = 3, BL = 4;

  logic            clk = 1'b0, clk2x = 1'b0;
  logic            reset = 1'b1;
  istate_e         istate = I_TRFC2;
  cstate_e         cstate = C_IDLE;
  logic [DQ_W-1:0] sys_d_i = '0;
  logic [DM_W-1:0] sys_dmsel = '0;
  logic [DQ_W-1:0] sys_d_o;
  logic            sys_rdyn;
  logic            data_valid;
  logic [DQ_W-1:0] ddr_dq_i = '0;
  logic [DQ_W-1:0] ddr_dq_o;
  logic            ddr_dq_oe;
  logic [DM_W-1:0] ddr_dm;
  logic            ddr_dqs_o;
  logic            ddr_dqs_oe;

  int checks = 0;
  int failures = 0;
  int hc = 0;

  data_path #(.CL(CL), .BL(BL)) dut (
    .clk2x (clk2x), .reset (reset), .istate (istate), .cstate (cstate),
    .sys_d_i (sys_d_i), .sys_dmsel (sys_dmsel), .sys_d_o (sys_d_o),
    .sys_rdyn (sys_rdyn), .data_valid (data_valid), .ddr_dq_i (ddr_dq_i),
    .ddr_dq_o (ddr_dq_o), .ddr_dq_oe (ddr_dq_oe), .ddr_dm (ddr_dm),
    .ddr_dqs_o (ddr_dqs_o), .ddr_dqs_oe (ddr_dqs_oe)
  );

  initial forever begin
    #2;
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
      $display("FAIL @hc=%0d: %s", hc, what);
    end
  endtask

  int rd_e[$];   // clk2x edge at which each READA began
  int wr_e[$];   // same for WRITEA
  int wr_ptr = 0;

  function automatic logic [15:0] rword(input int n, input int i);
    return 16'h1000 * 16'(n % 15) + 16'h0100 + 16'(i * 17);
  endfunction
  function automatic logic [15:0] wword(input int k);
    return 16'hA000 ^ 16'(k * 16'h0137);
  endfunction

  // DDR device: drives read words.
  always @(posedge clk2x) begin
    ddr_dq_i <= 16'hDEAD;
    foreach (rd_e[n]) begin
      for (int i = 0; i < BL; i++)
        if (hc == rd_e[n] + 4 + 2 * CL + i) ddr_dq_i <= rword(n, i);
    end
  end

  // Bus master: supplies the next write word after seeing sys_rdyn low.
  always @(posedge clk2x) begin
    if (!sys_rdyn && !data_valid) begin
      sys_d_i   <= wword(wr_ptr);
      sys_dmsel <= 2'(wr_ptr);
      wr_ptr++;
    end
  end

  // Checker, in the middle of every clk2x cycle.
  int n_rd_words = 0, n_wr_words = 0;
  always @(negedge clk2x) begin
    bit ev, eo, erdy;
    logic [15:0] ed, ew;
    int ej;
    ev = 0; eo = 0; erdy = 0; ed = '0; ew = '0; ej = 0;
    foreach (rd_e[n]) for (int i = 0; i < BL; i++)
      if (hc == rd_e[n] + 5 + 2 * CL + i) begin ev = 1; ed = rword(n, i); end
    foreach (wr_e[n]) for (int j = 0; j < BL; j++) begin
      if (hc == wr_e[n] + 3 + j) erdy = 1;
      if (hc == wr_e[n] + 5 + j) begin eo = 1; ej = n * BL + j; ew = wword(ej); end
    end
    if (!reset) begin
      check(data_valid == ev, $sformatf("data_valid %b expected %b", data_valid, ev));
      if (ev) begin
        check(sys_d_o == ed, $sformatf("read word %h expected %h", sys_d_o, ed));
        n_rd_words++;
      end
      check(sys_rdyn == !(ev || erdy), $sformatf("sys_rdyn %b", sys_rdyn));
      check(ddr_dq_oe == eo, $sformatf("ddr_dq_oe %b expected %b", ddr_dq_oe, eo));
      if (eo) begin
        check(ddr_dq_o == ew, $sformatf("write word %h expected %h", ddr_dq_o, ew));
        check(ddr_dm == 2'(ej), "write byte mask");
        check(ddr_dqs_oe && ddr_dqs_o == !ej[0], "dqs toggles with the words");
        n_wr_words++;
      end
    end
  end

  // Command FSM stand-in.
  task automatic put(input cstate_e s, input int n);
    repeat (n) begin
      @(posedge clk);
      cstate <= s;
      if (s == C_READA && istate == I_READY) rd_e.push_back(hc);
      if (s == C_WRITEA && istate == I_READY) wr_e.push_back(hc);
    end
  endtask
  task automatic do_read();
    put(C_ACTIVE, 1); put(C_TRCD, 2); put(C_READA, 1); put(C_CL, CL); put(C_RDATA, BL / 2);
  endtask
  task automatic do_write();
    put(C_ACTIVE, 1); put(C_TRCD, 2); put(C_WRITEA, 1); put(C_WDATA, BL / 2);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    // READA before initialization completes: ignored
    put(C_READA, 1); put(C_IDLE, 3);
    istate <= I_READY;
    put(C_IDLE, 2);
    do_read();  put(C_IDLE, 2);
    do_write(); put(C_TDAL, 4); put(C_IDLE, 1);
    do_read();  do_read();  do_write();  do_write(); do_read();
    put(C_IDLE, 20);
    check(n_rd_words == 4 * BL, $sformatf("%0d read words delivered", n_rd_words));
    check(n_wr_words == 3 * BL, $sformatf("%0d write words sent", n_wr_words));
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
