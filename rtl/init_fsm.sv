// init_fsm: DDR SDRAM power-up initialization state machine (INIT_FSM).
//
// After reset the FSM waits in I_IDLE, with CKE low, until the bus master
// reports through sys_dly_200us that the 200 us power-up delay has passed.
// It then walks the DDR SDRAM initialization sequence, one command state
// followed by a timed wait state each:
//   NOP, PRECHARGE all, tRP, EXTENDED MODE REGISTER (DLL enable), tMRD,
//   MODE REGISTER with DLL reset, tMRD, PRECHARGE all, tRP,
//   AUTO REFRESH, tRFC, AUTO REFRESH, tRFC, MODE REGISTER, tMRD, READY.
// The two passes through I_PRE/I_TRP and I_MRS are told apart by two flags:
// dll_rst_done (first MODE REGISTER load issued) and load_mrs_done (second
// one issued); mrs_dll_rst tells the signal generation module to set the DLL
// reset bit on the first load.  In I_READY sys_init_done is high and the
// command FSM takes over.  Each wait state lasts exactly the parameter's
// number of cycles between the two commands around it, measured with a
// clk_counter.  The state names and the load_mrs_done flag follow the
// document's initialization state diagram; the order of commands follows the
// JEDEC DDR power-up procedure and is this design's reading of it.
module init_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned TRP  = DEF_TRP,
  parameter int unsigned TMRD = DEF_TMRD,
  parameter int unsigned TRFC = DEF_TRFC
) (
  input  logic    clk,
  input  logic    reset,
  input  logic    sys_dly_200us,
  output istate_e istate,
  output logic    mrs_dll_rst,
  output logic    sys_init_done
);

  istate_e          state_q, state_d;
  logic             dll_rst_done;
  logic             load_mrs_done;
  logic             cnt_load;
  logic [CNT_W-1:0] cnt_val;
  logic             cnt_done;

  clk_counter #(.W(CNT_W)) u_cnt (
    .clk      (clk),
    .reset    (reset),
    .load     (cnt_load),
    .load_val (cnt_val),
    .done     (cnt_done)
  );

  always_comb begin
    state_d  = state_q;
    cnt_load = 1'b0;
    cnt_val  = '0;
    unique case (state_q)
      I_IDLE:  if (sys_dly_200us) state_d = I_NOP;
      I_NOP:   state_d = I_PRE;
      I_PRE:   begin state_d = I_TRP;   cnt_load = 1'b1; cnt_val = CNT_W'(TRP - 2);  end
      I_TRP:   if (cnt_done) state_d = dll_rst_done ? I_AR1 : I_EMRS;
      I_EMRS:  begin state_d = I_TMRD;  cnt_load = 1'b1; cnt_val = CNT_W'(TMRD - 2); end
      I_TMRD:  if (cnt_done) begin
                 if (load_mrs_done)     state_d = I_READY;
                 else if (dll_rst_done) state_d = I_PRE;
                 else                   state_d = I_MRS;
               end
      I_MRS:   begin state_d = I_TMRD;  cnt_load = 1'b1; cnt_val = CNT_W'(TMRD - 2); end
      I_AR1:   begin state_d = I_TRFC1; cnt_load = 1'b1; cnt_val = CNT_W'(TRFC - 2); end
      I_TRFC1: if (cnt_done) state_d = I_AR2;
      I_AR2:   begin state_d = I_TRFC2; cnt_load = 1'b1; cnt_val = CNT_W'(TRFC - 2); end
      I_TRFC2: if (cnt_done) state_d = I_MRS;
      I_READY: state_d = I_READY;
      default: state_d = I_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_q       <= I_IDLE;
      dll_rst_done  <= 1'b0;
      load_mrs_done <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == I_MRS) begin
        if (dll_rst_done) load_mrs_done <= 1'b1;
        else              dll_rst_done  <= 1'b1;
      end
    end
  end

  assign istate        = state_q;
  assign mrs_dll_rst   = !dll_rst_done;
  assign sys_init_done = (state_q == I_READY);

  // The wait states need at least one cycle of their own.
  initial begin
    assert (TRP >= 2 && TMRD >= 2 && TRFC >= 2)
      else $error("init_fsm: timing parameters must be at least 2 cycles");
  end

endmodule
