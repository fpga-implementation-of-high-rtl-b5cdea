// ddr_ctrl: pipelined DDR SDRAM controller, top level.
//
// Sits between a bus master and a DDR SDRAM device and hides the DRAM
// protocol: the master asks for a burst read or write at a 22-bit address,
// or for a refresh, and the controller initializes the device, opens the
// row, issues the READ/WRITE with auto precharge and moves the burst at
// double data rate.  Three modules make it up:
//   main_ctrl  - INIT_FSM, CMD_FSM and their counters; produces iState/cState
//   sig_gen    - DDR command, bank and address pins from iState/cState
//   data_path  - data between the 16-bit system bus and the 16-bit DDR bus
// Requests to a different bank are issued back to back (pipelined) while the
// previous bank is still precharging.
//
// Clocks: sys_clk runs the control logic and is forwarded as ddr_clk /
// ddr_clkn; sys_clk2x, at twice the frequency with aligned rising edges, runs
// the data path.  Reset is asynchronous and active high.  Bidirectional
// buses (system data, DQ, DQS) appear as separate input, output and
// output-enable ports.  Bus handshake: hold sys_adsn low with sys_add and
// sys_r_wn (1 = read) until sys_ack; refresh with sys_ref_req until
// sys_ref_ack; write data moves on sys_d_i when sys_rdyn is low, read data
// on sys_d_o with sys_data_valid (see data_path).  The three-module split and
// the system and DDR signal names follow the document; the handshakes are
// this design's own.
module ddr_ctrl
  import ddr_pkg::*;
#(
  parameter int unsigned CL   = DEF_CL,
  parameter int unsigned BL   = DEF_BL,
  parameter int unsigned TRP  = DEF_TRP,
  parameter int unsigned TRCD = DEF_TRCD,
  parameter int unsigned TMRD = DEF_TMRD,
  parameter int unsigned TRFC = DEF_TRFC,
  parameter int unsigned TWR  = DEF_TWR
) (
  // system interface
  input  logic              sys_clk,
  input  logic              sys_clk2x,
  input  logic              sys_reset,
  input  logic              sys_dly_200us,
  input  logic [SYS_AW-1:0] sys_add,
  input  logic              sys_adsn,
  input  logic              sys_r_wn,
  input  logic [DQ_W-1:0]   sys_d_i,
  output logic [DQ_W-1:0]   sys_d_o,
  input  logic [DM_W-1:0]   sys_dmsel,
  output logic              sys_rdyn,
  output logic              sys_data_valid,
  output logic              sys_init_done,
  output logic              sys_ack,
  input  logic              sys_ref_req,
  output logic              sys_ref_ack,
  output logic              sys_cyc_end,
  output logic              sys_pipe_issue,
  // DDR interface
  output logic              ddr_clk,
  output logic              ddr_clkn,
  output logic              ddr_cke,
  output logic              ddr_csn,
  output logic              ddr_rasn,
  output logic              ddr_casn,
  output logic              ddr_wen,
  output logic [BA_W-1:0]   ddr_ba,
  output logic [ROW_W-1:0]  ddr_add,
  output logic [DQ_W-1:0]   ddr_dq_o,
  input  logic [DQ_W-1:0]   ddr_dq_i,
  output logic              ddr_dq_oe,
  output logic [DM_W-1:0]   ddr_dqm,
  output logic              ddr_dqs_o,
  output logic              ddr_dqs_oe
);

  istate_e           istate;
  cstate_e           cstate;
  logic              mrs_dll_rst;
  logic [SYS_AW-1:0] req_add;

  main_ctrl #(
    .CL   (CL),
    .BL   (BL),
    .TRP  (TRP),
    .TRCD (TRCD),
    .TMRD (TMRD),
    .TRFC (TRFC),
    .TWR  (TWR)
  ) u_main (
    .clk           (sys_clk),
    .reset         (sys_reset),
    .sys_dly_200us (sys_dly_200us),
    .sys_adsn      (sys_adsn),
    .sys_r_wn      (sys_r_wn),
    .sys_add       (sys_add),
    .sys_ref_req   (sys_ref_req),
    .istate        (istate),
    .cstate        (cstate),
    .mrs_dll_rst   (mrs_dll_rst),
    .req_add       (req_add),
    .sys_init_done (sys_init_done),
    .sys_ack       (sys_ack),
    .sys_ref_ack   (sys_ref_ack),
    .sys_cyc_end   (sys_cyc_end),
    .pipe_issue    (sys_pipe_issue)
  );

  sig_gen #(
    .CL (CL),
    .BL (BL)
  ) u_sig (
    .clk         (sys_clk),
    .reset       (sys_reset),
    .sys_addr    (req_add),
    .istate      (istate),
    .cstate      (cstate),
    .mrs_dll_rst (mrs_dll_rst),
    .ddr_cke     (ddr_cke),
    .ddr_csn     (ddr_csn),
    .ddr_rasn    (ddr_rasn),
    .ddr_casn    (ddr_casn),
    .ddr_wen     (ddr_wen),
    .ddr_ba      (ddr_ba),
    .ddr_addr    (ddr_add)
  );

  data_path #(
    .CL (CL),
    .BL (BL)
  ) u_dp (
    .clk2x      (sys_clk2x),
    .reset      (sys_reset),
    .istate     (istate),
    .cstate     (cstate),
    .sys_d_i    (sys_d_i),
    .sys_dmsel  (sys_dmsel),
    .sys_d_o    (sys_d_o),
    .sys_rdyn   (sys_rdyn),
    .data_valid (sys_data_valid),
    .ddr_dq_i   (ddr_dq_i),
    .ddr_dq_o   (ddr_dq_o),
    .ddr_dq_oe  (ddr_dq_oe),
    .ddr_dm     (ddr_dqm),
    .ddr_dqs_o  (ddr_dqs_o),
    .ddr_dqs_oe (ddr_dqs_oe)
  );

  // Differential clock to the device.
  assign ddr_clk  = sys_clk;
  assign ddr_clkn = !sys_clk;

endmodule
