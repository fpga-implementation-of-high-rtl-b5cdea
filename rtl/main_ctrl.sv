// main_ctrl: main control module of the DDR SDRAM controller.
//
// Groups the two state machines and their cycle counters: init_fsm runs the
// power-up sequence and raises sys_init_done, after which cmd_fsm serves
// read, write and refresh cycles.  Its outputs are the two 4-bit state
// vectors iState and cState (plus the latched request address and the DLL
// reset flag of the mode register load) that drive the signal generation
// and data path modules, and the system-side handshake signals.  All outputs
// are registered or decoded straight from registered state; there is no
// combinational path from the system inputs to iState/cState.  The split
// into two FSMs with one counter each follows the document; the ports
// beyond those of its block diagram are this design's own.
module main_ctrl
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
  input  logic              clk,
  input  logic              reset,
  input  logic              sys_dly_200us,
  input  logic              sys_adsn,
  input  logic              sys_r_wn,
  input  logic [SYS_AW-1:0] sys_add,
  input  logic              sys_ref_req,
  output istate_e           istate,
  output cstate_e           cstate,
  output logic              mrs_dll_rst,
  output logic [SYS_AW-1:0] req_add,
  output logic              sys_init_done,
  output logic              sys_ack,
  output logic              sys_ref_ack,
  output logic              sys_cyc_end,
  output logic              pipe_issue
);

  init_fsm #(
    .TRP  (TRP),
    .TMRD (TMRD),
    .TRFC (TRFC)
  ) u_init (
    .clk           (clk),
    .reset         (reset),
    .sys_dly_200us (sys_dly_200us),
    .istate        (istate),
    .mrs_dll_rst   (mrs_dll_rst),
    .sys_init_done (sys_init_done)
  );

  cmd_fsm #(
    .CL   (CL),
    .BL   (BL),
    .TRP  (TRP),
    .TRCD (TRCD),
    .TRFC (TRFC),
    .TWR  (TWR)
  ) u_cmd (
    .clk           (clk),
    .reset         (reset),
    .sys_init_done (sys_init_done),
    .sys_adsn      (sys_adsn),
    .sys_r_wn      (sys_r_wn),
    .sys_add       (sys_add),
    .sys_ref_req   (sys_ref_req),
    .cstate        (cstate),
    .req_add       (req_add),
    .sys_ack       (sys_ack),
    .sys_ref_ack   (sys_ref_ack),
    .sys_cyc_end   (sys_cyc_end),
    .pipe_issue    (pipe_issue)
  );

endmodule
