// cmd_fsm: command state machine (CMD_FSM) with pipelined request issue.
//
// Sequences the DDR commands of a system read, write or refresh cycle once
// initialization is complete (sys_init_done high); until then it stays in
// C_IDLE.  In C_IDLE it samples, on each rising clock edge, sys_ref_req
// (priority) and sys_adsn:
//   refresh: C_AR (AUTO REFRESH) then C_TRFC until tRFC has passed; sys_ref_ack
//            is high through both states, and the master must drop
//            sys_ref_req on seeing it or a second refresh follows.
//   read:    C_ACTIVE, C_TRCD, C_READA (READ with auto precharge), C_CL for
//            the CAS latency, C_RDATA for the BL/2 cycles of the burst.
//   write:   C_ACTIVE, C_TRCD, C_WRITEA (WRITE with auto precharge), C_WDATA
//            for BL/2 cycles, then C_TDAL (write recovery + precharge) before
//            the bank may be used again.
// Because every access ends with auto precharge, all banks are idle between
// cycles, which is what AUTO REFRESH requires.
//
// Pipelining: in the last cycle of a burst (C_RDATA or C_WDATA) the FSM samples
// the next request.  If one is waiting, no refresh is requested and the
// bank being precharged does not need more time (a different bank, or a read
// whose auto precharge is already over), the next ACTIVE follows at once,
// skipping C_IDLE and C_TDAL; pipe_issue pulses for that cycle.
//
// Bus handshake: the master drives sys_add and sys_r_wn (1 = read) and holds
// sys_adsn low until sys_ack pulses; sys_ack is high the cycle after the
// request was taken, and the address is held in req_add from then on.
// sys_cyc_end pulses in the last cycle of each read, write or refresh cycle.
// The states c_idle and c_AR, the refresh handshake and auto precharge come
// from the document; the other state names, the request handshake and the
// rule for the pipelined issue are this design's own.
module cmd_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned CL   = DEF_CL,
  parameter int unsigned BL   = DEF_BL,
  parameter int unsigned TRP  = DEF_TRP,
  parameter int unsigned TRCD = DEF_TRCD,
  parameter int unsigned TRFC = DEF_TRFC,
  parameter int unsigned TWR  = DEF_TWR
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              sys_init_done,
  input  logic              sys_adsn,
  input  logic              sys_r_wn,
  input  logic [SYS_AW-1:0] sys_add,
  input  logic              sys_ref_req,
  output cstate_e           cstate,
  output logic [SYS_AW-1:0] req_add,
  output logic              sys_ack,
  output logic              sys_ref_ack,
  output logic              sys_cyc_end,
  output logic              pipe_issue
);

  // Cycles the bank needs after the last cycle of a burst before it may be
  // activated again (or all banks refreshed).
  localparam int unsigned WR_WAIT = TWR + TRP;
  localparam int unsigned RD_WAIT = (TRP > CL + 1) ? TRP - CL - 1 : 0;

  cstate_e          state_q, state_d;
  logic             req_rd;            // latched sys_r_wn
  logic             accept;
  logic             cnt_load;
  logic [CNT_W-1:0] cnt_val;
  logic             cnt_done;
  logic             new_bank;          // waiting request targets another bank

  clk_counter #(.W(CNT_W)) u_cnt (
    .clk      (clk),
    .reset    (reset),
    .load     (cnt_load),
    .load_val (cnt_val),
    .done     (cnt_done)
  );

  assign new_bank = sys_add[SYS_AW-1 -: BA_W] != req_add[SYS_AW-1 -: BA_W];

  always_comb begin
    state_d    = state_q;
    accept     = 1'b0;
    pipe_issue = 1'b0;
    cnt_load   = 1'b0;
    cnt_val    = '0;
    unique case (state_q)
      C_IDLE: begin
        if (sys_init_done) begin
          if (sys_ref_req) state_d = C_AR;
          else if (!sys_adsn) begin
            state_d = C_ACTIVE;
            accept  = 1'b1;
          end
        end
      end
      C_ACTIVE: begin
        state_d  = C_TRCD;
        cnt_load = 1'b1;
        cnt_val  = CNT_W'(TRCD - 2);
      end
      C_TRCD: if (cnt_done) state_d = req_rd ? C_READA : C_WRITEA;
      C_READA: begin
        state_d  = C_CL;
        cnt_load = 1'b1;
        cnt_val  = CNT_W'(CL - 1);
      end
      C_CL: if (cnt_done) begin
        state_d  = C_RDATA;
        cnt_load = 1'b1;
        cnt_val  = CNT_W'(BL / 2 - 1);
      end
      C_WRITEA: begin
        state_d  = C_WDATA;
        cnt_load = 1'b1;
        cnt_val  = CNT_W'(BL / 2 - 1);
      end
      C_RDATA, C_WDATA: if (cnt_done) begin
        // Pipeline slot: last cycle of the burst.
        if (!sys_ref_req && !sys_adsn &&
            (new_bank || (state_q == C_RDATA && RD_WAIT == 0))) begin
          state_d    = C_ACTIVE;
          accept     = 1'b1;
          pipe_issue = 1'b1;
        end else if (state_q == C_WDATA) begin
          state_d  = C_TDAL;
          cnt_load = 1'b1;
          cnt_val  = CNT_W'(WR_WAIT - 1);
        end else if (RD_WAIT != 0) begin
          state_d  = C_TDAL;
          cnt_load = 1'b1;
          cnt_val  = CNT_W'(RD_WAIT - 1);
        end else begin
          state_d = C_IDLE;
        end
      end
      C_TDAL: if (cnt_done) state_d = C_IDLE;
      C_AR: begin
        state_d  = C_TRFC;
        cnt_load = 1'b1;
        cnt_val  = CNT_W'(TRFC - 2);
      end
      C_TRFC: if (cnt_done) state_d = C_IDLE;
      default: state_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_q <= C_IDLE;
      req_add <= '0;
      req_rd  <= 1'b1;
      sys_ack <= 1'b0;
    end else begin
      state_q <= state_d;
      sys_ack <= accept;
      if (accept) begin
        req_add <= sys_add;
        req_rd  <= sys_r_wn;
      end
    end
  end

  assign cstate      = state_q;
  assign sys_ref_ack = (state_q == C_AR) || (state_q == C_TRFC);
  assign sys_cyc_end = cnt_done &&
                       (state_q == C_RDATA || state_q == C_WDATA || state_q == C_TRFC);

  initial begin
    assert (TRCD >= 2 && TRFC >= 2 && CL >= 1 && BL >= 2)
      else $error("cmd_fsm: unsupported timing parameters");
  end

endmodule
