// data_path: data path module between the 16-bit system bus and the 16-bit
// DDR data bus.
//
// Runs on clk2x, a clock at twice the controller clock with its rising edges
// aligned to those of clk, so that one clk2x cycle carries one DDR word: the
// DDR bus moves a word on each edge of clk, the system bus one per clk2x
// cycle, and both buses have the same 16-bit width.  The module follows
// cState: the first clk2x edge that sees C_READA or C_WRITEA starts a shift
// register, and fixed taps of it (set by CAS latency and burst length) time
// each data word.
//   Write: sys_rdyn goes low, with data_valid low, for BL clk2x cycles
//   starting two cycles after the start; a master that sees this at a rising
//   clk2x edge drives the next word (and its byte mask on sys_dmsel) from that edge on.  Each
//   word is latched and driven on ddr_dq_o (ddr_dq_oe high), with ddr_dm and
//   a toggling ddr_dqs_o (one low preamble cycle), so that the DDR device
//   sees word j at clk edge WRITE + 1 + j/2.
//   Read: the word the device drives CL clocks after the READ is latched from
//   ddr_dq_i at the next clk2x edge and presented on sys_d_o for one clk2x
//   cycle with data_valid high and sys_rdyn low.
// The bidirectional buses of the block diagram are split into separate input,
// output and output-enable ports; the tri-state buffers and the DQS phase
// shift belong to the FPGA I/O cells.  Read data is captured with clk2x, not
// with the DQS strobe.  That the module depends on cState and latches and
// dispatches data follows the document; the clk2x timing scheme and the
// write-data handshake are this design's own.
module data_path
  import ddr_pkg::*;
#(
  parameter int unsigned CL = DEF_CL,
  parameter int unsigned BL = DEF_BL
) (
  input  logic            clk2x,
  input  logic            reset,
  input  istate_e         istate,
  input  cstate_e         cstate,
  input  logic [DQ_W-1:0] sys_d_i,
  input  logic [DM_W-1:0] sys_dmsel,
  output logic [DQ_W-1:0] sys_d_o,
  output logic            sys_rdyn,
  output logic            data_valid,
  input  logic [DQ_W-1:0] ddr_dq_i,
  output logic [DQ_W-1:0] ddr_dq_o,
  output logic            ddr_dq_oe,
  output logic [DM_W-1:0] ddr_dm,
  output logic            ddr_dqs_o,
  output logic            ddr_dqs_oe
);

  // Shift-register taps, counted in clk2x cycles after the start cycle.
  localparam int unsigned RD_TAP = 3 + 2 * CL;  // first read word on the bus
  localparam int unsigned WQ_TAP = 1;           // first write-word request
  localparam int unsigned WD_TAP = 3;           // first write word latched
  localparam int unsigned SR_LEN = RD_TAP + BL;

  cstate_e           cs_q;
  logic              rd_start, wr_start;
  logic [SR_LEN-1:0] rd_sr, wr_sr;
  logic              rd_cap, wr_req, wr_cap, wr_pre, wr_odd;
  logic              wr_req_q;

  assign rd_start = (istate == I_READY) && (cstate == C_READA)  && (cs_q != C_READA);
  assign wr_start = (istate == I_READY) && (cstate == C_WRITEA) && (cs_q != C_WRITEA);

  always_comb begin
    rd_cap = 1'b0;
    wr_req = 1'b0;
    wr_cap = 1'b0;
    wr_odd = 1'b0;
    for (int j = 0; j < BL; j++) begin
      if (rd_sr[RD_TAP + j]) rd_cap = 1'b1;
      if (wr_sr[WQ_TAP + j]) wr_req = 1'b1;
      if (wr_sr[WD_TAP + j]) begin
        wr_cap = 1'b1;
        wr_odd = j[0];
      end
    end
    wr_pre = wr_sr[WD_TAP - 1];
  end

  always_ff @(posedge clk2x or posedge reset) begin
    if (reset) begin
      cs_q       <= C_IDLE;
      rd_sr      <= '0;
      wr_sr      <= '0;
      sys_d_o    <= '0;
      data_valid <= 1'b0;
      wr_req_q   <= 1'b0;
      ddr_dq_o   <= '0;
      ddr_dq_oe  <= 1'b0;
      ddr_dm     <= '0;
      ddr_dqs_o  <= 1'b0;
      ddr_dqs_oe <= 1'b0;
    end else begin
      cs_q       <= cstate;
      rd_sr      <= {rd_sr[SR_LEN-2:0], rd_start};
      wr_sr      <= {wr_sr[SR_LEN-2:0], wr_start};
      // read: latch the DDR word and hand it to the system bus
      data_valid <= rd_cap;
      if (rd_cap) sys_d_o <= ddr_dq_i;
      // write: ask the master for words, latch them and drive the DDR bus
      wr_req_q   <= wr_req;
      ddr_dq_oe  <= wr_cap;
      ddr_dqs_oe <= wr_cap || wr_pre;
      ddr_dqs_o  <= wr_cap && !wr_odd;
      if (wr_cap) begin
        ddr_dq_o <= sys_d_i;
        ddr_dm   <= sys_dmsel;
      end
    end
  end

  assign sys_rdyn = !(wr_req_q || data_valid);

  // A read and a write burst never share the data path.
  a_no_overlap: assert property (@(posedge clk2x) disable iff (reset) !(rd_cap && wr_cap))
    else $error("data_path: read and write data windows overlap");

endmodule
