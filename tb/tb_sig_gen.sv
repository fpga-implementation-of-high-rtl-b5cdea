// tb_sig_gen: self-checking testbench for sig_gen.
//
// Drives every iState during initialization and then every cState with
// random request addresses, and checks one clock later the DDR pins against
// the expected command, bank and address written out independently here
// (JEDEC command truth table, {bank,row,column} split of the address, mode
// register word for CL = 3, BL = 8 so that the defaults are not simply
// echoed).  Also checks CKE low before the 200 us point and after reset.
module tb_sig_gen;
  import ddr_pkg::*;

  localparam int CL = 3, BL = 8;

  logic              clk = 1'b0;
  logic              reset = 1'b1;
  logic [SYS_AW-1:0] sys_addr = '0;
  istate_e           istate = I_IDLE;
  cstate_e           cstate = C_IDLE;
  logic              mrs_dll_rst = 1'b0;
  logic              ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen;
  logic [BA_W-1:0]   ddr_ba;
  logic [ROW_W-1:0]  ddr_addr;

  int checks = 0;
  int failures = 0;

  sig_gen #(.CL(CL), .BL(BL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one state, wait one clock, and compare the pins.
  task automatic step(input istate_e is, input cstate_e cs, input logic dll,
                      input logic [SYS_AW-1:0] a,
                      input logic cke, input logic [3:0] cmd,
                      input logic [1:0] ba, input logic [11:0] addr, input string what);
    @(negedge clk);
    istate = is; cstate = cs; mrs_dll_rst = dll; sys_addr = a;
    @(negedge clk);
    check(ddr_cke == cke, {what, ": cke"});
    check({ddr_csn, ddr_rasn, ddr_casn, ddr_wen} == cmd,
          $sformatf("%s: command %b", what, {ddr_csn, ddr_rasn, ddr_casn, ddr_wen}));
    check(ddr_ba == ba, {what, ": bank"});
    check(ddr_addr == addr, $sformatf("%s: address %h", what, ddr_addr));
  endtask

  initial begin
    logic [SYS_AW-1:0] a;
    #1;
    check(ddr_cke == 1'b0, "cke low in reset");
    repeat (2) @(negedge clk);
    reset = 1'b0;
    //       iState    cState  dll  addr  cke  CS RAS CAS WE  ba     A
    step(I_IDLE,  C_IDLE, 0, '1, 0, 4'b0111, 2'd0, 12'h000, "I_IDLE");
    step(I_NOP,   C_IDLE, 0, '1, 1, 4'b0111, 2'd0, 12'h000, "I_NOP");
    step(I_PRE,   C_IDLE, 0, '1, 1, 4'b0010, 2'd0, 12'h400, "I_PRE");
    step(I_TRP,   C_IDLE, 0, '1, 1, 4'b0111, 2'd0, 12'h000, "I_TRP");
    step(I_EMRS,  C_IDLE, 1, '1, 1, 4'b0000, 2'd1, 12'h000, "I_EMRS");
    step(I_TMRD,  C_IDLE, 1, '1, 1, 4'b0111, 2'd0, 12'h000, "I_TMRD");
    // mode word: A8 DLL reset, A6..A4 CL=011, A3 sequential, A2..A0 BL8=011
    step(I_MRS,   C_IDLE, 1, '1, 1, 4'b0000, 2'd0, 12'h133, "I_MRS dll reset");
    step(I_AR1,   C_IDLE, 0, '1, 1, 4'b0001, 2'd0, 12'h000, "I_AR1");
    step(I_TRFC1, C_IDLE, 0, '1, 1, 4'b0111, 2'd0, 12'h000, "I_TRFC1");
    step(I_AR2,   C_IDLE, 0, '1, 1, 4'b0001, 2'd0, 12'h000, "I_AR2");
    step(I_TRFC2, C_IDLE, 0, '1, 1, 4'b0111, 2'd0, 12'h000, "I_TRFC2");
    step(I_MRS,   C_IDLE, 0, '1, 1, 4'b0000, 2'd0, 12'h033, "I_MRS");
    // once ready, cState decides, whatever cState held before
    step(I_READY, C_AR,    0, '0, 1, 4'b0001, 2'd0, 12'h000, "C_AR");
    step(I_READY, C_TRFC,  0, '0, 1, 4'b0111, 2'd0, 12'h000, "C_TRFC");
    step(I_READY, C_IDLE,  0, '0, 1, 4'b0111, 2'd0, 12'h000, "C_IDLE");
    for (int k = 0; k < 40; k++) begin
      a = SYS_AW'($urandom);
      step(I_READY, C_ACTIVE, 0, a, 1, 4'b0011, a[21:20], a[19:8], "C_ACTIVE");
      step(I_READY, C_TRCD,   0, a, 1, 4'b0111, 2'd0, 12'h000, "C_TRCD");
      step(I_READY, C_READA,  0, a, 1, 4'b0101, a[21:20], {4'b0100, a[7:0]}, "C_READA");
      step(I_READY, C_CL,     0, a, 1, 4'b0111, 2'd0, 12'h000, "C_CL");
      step(I_READY, C_RDATA,  0, a, 1, 4'b0111, 2'd0, 12'h000, "C_RDATA");
      step(I_READY, C_WRITEA, 0, a, 1, 4'b0100, a[21:20], {4'b0100, a[7:0]}, "C_WRITEA");
      step(I_READY, C_WDATA,  0, a, 1, 4'b0111, 2'd0, 12'h000, "C_WDATA");
      step(I_READY, C_TDAL,   0, a, 1, 4'b0111, 2'd0, 12'h000, "C_TDAL");
    end
    // cState is ignored while initializing
    step(I_TRP, C_ACTIVE, 0, '1, 1, 4'b0111, 2'd0, 12'h000, "cState ignored in init");
    reset = 1'b1;
    #1;
    check(ddr_cke == 1'b0, "cke low after reset");
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
