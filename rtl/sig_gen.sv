// sig_gen: signal generation module.
//
// Turns the state vectors of the main control module into the DDR command
// and address pins.  While initialization runs (iState not I_READY) the pins
// follow iState; afterwards they follow cState.  Command per state:
//   I_IDLE          CKE low, NOP                 (power-up, before 200 us)
//   I_PRE           PRECHARGE all banks (A10 = 1)
//   I_EMRS          LOAD MODE REGISTER, BA = 01, A = 0 (DLL enable)
//   I_MRS           LOAD MODE REGISTER, BA = 00, A = {DLL reset, CL, BT=0, BL}
//   I_AR1, I_AR2,
//   C_AR            AUTO REFRESH
//   C_ACTIVE        ACTIVE, BA = bank, A = row
//   C_READA         READ with auto precharge, A10 = 1, A[COL_W-1:0] = column
//   C_WRITEA        WRITE with auto precharge, likewise
//   all others      NOP (CKE high)
// The request address sys_addr is split {bank, row, column} from the top bit
// down.  All pins are registered on the rising edge of clk, so a command
// reaches the DDR device one cycle after its state is entered.  The set of
// signals and their dependence on iState/cState follow the document; the
// address split, the mode register contents and the output register are
// this design's choices.
module sig_gen
  import ddr_pkg::*;
#(
  parameter int unsigned CL = DEF_CL,
  parameter int unsigned BL = DEF_BL
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [SYS_AW-1:0] sys_addr,
  input  istate_e           istate,
  input  cstate_e           cstate,
  input  logic              mrs_dll_rst,
  output logic              ddr_cke,
  output logic              ddr_csn,
  output logic              ddr_rasn,
  output logic              ddr_casn,
  output logic              ddr_wen,
  output logic [BA_W-1:0]   ddr_ba,
  output logic [ROW_W-1:0]  ddr_addr
);

  logic [BA_W-1:0]  bank;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;

  ddr_cmd_e         cmd_d;
  logic             cke_d;
  logic [BA_W-1:0]  ba_d;
  logic [ROW_W-1:0] addr_d;
  logic [ROW_W-1:0] mode_word;

  assign bank = sys_addr[SYS_AW-1 -: BA_W];
  assign row  = sys_addr[COL_W +: ROW_W];
  assign col  = sys_addr[COL_W-1:0];

  always_comb begin
    mode_word          = '0;
    mode_word[2:0]     = bl_code(BL);
    mode_word[6:4]     = 3'(CL);
    mode_word[8]       = mrs_dll_rst;
  end

  always_comb begin
    cmd_d  = CMD_NOP;
    cke_d  = 1'b1;
    ba_d   = '0;
    addr_d = '0;
    if (istate != I_READY) begin
      unique case (istate)
        I_IDLE: cke_d = 1'b0;
        I_PRE: begin
          cmd_d      = CMD_PRE;
          addr_d[10] = 1'b1;
        end
        I_EMRS: begin
          cmd_d = CMD_LMR;
          ba_d  = BA_W'(1);
        end
        I_MRS: begin
          cmd_d  = CMD_LMR;
          addr_d = mode_word;
        end
        I_AR1, I_AR2: cmd_d = CMD_AR;
        default: ;
      endcase
    end else begin
      unique case (cstate)
        C_ACTIVE: begin
          cmd_d  = CMD_ACT;
          ba_d   = bank;
          addr_d = row;
        end
        C_READA, C_WRITEA: begin
          cmd_d              = (cstate == C_READA) ? CMD_READ : CMD_WRITE;
          ba_d               = bank;
          addr_d[COL_W-1:0]  = col;
          addr_d[10]         = 1'b1;
        end
        C_AR: cmd_d = CMD_AR;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ddr_cke  <= 1'b0;
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= CMD_NOP;
      ddr_ba   <= '0;
      ddr_addr <= '0;
    end else begin
      ddr_cke  <= cke_d;
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= cmd_d;
      ddr_ba   <= ba_d;
      ddr_addr <= addr_d;
    end
  end

  initial begin
    assert (COL_W <= 10 && ROW_W >= 11 && (CL == 2 || CL == 3))
      else $error("sig_gen: unsupported geometry or CAS latency");
  end

endmodule
