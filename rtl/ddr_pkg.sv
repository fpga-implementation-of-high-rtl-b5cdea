// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// Holds the two state encodings that the main control module hands to the
// signal generation and data path modules (iState from the initialization
// FSM, cState from the command FSM, both 4 bits wide as drawn in the block
// diagram), the DDR command encoding on CS#/RAS#/CAS#/WE#, and the default
// timing numbers in clock cycles.  The state names follow the controller's
// state diagrams; the numeric encodings and the timing numbers are this
// design's own choice (a DDR-266 class part at 133 MHz, CAS latency 2,
// burst length 4).
package ddr_pkg;

  // Initialization FSM states (iState, 4 bits).
  typedef enum logic [3:0] {
    I_IDLE  = 4'd0,
    I_NOP   = 4'd1,
    I_PRE   = 4'd2,
    I_TRP   = 4'd3,
    I_EMRS  = 4'd4,
    I_TMRD  = 4'd5,
    I_MRS   = 4'd6,
    I_AR1   = 4'd7,
    I_TRFC1 = 4'd8,
    I_AR2   = 4'd9,
    I_TRFC2 = 4'd10,
    I_READY = 4'd11
  } istate_e;

  // Command FSM states (cState, 4 bits).
  typedef enum logic [3:0] {
    C_IDLE   = 4'd0,
    C_ACTIVE = 4'd1,
    C_TRCD   = 4'd2,
    C_READA  = 4'd3,
    C_CL     = 4'd4,
    C_RDATA  = 4'd5,
    C_WRITEA = 4'd6,
    C_WDATA  = 4'd7,
    C_TDAL   = 4'd8,
    C_AR     = 4'd9,
    C_TRFC   = 4'd10
  } cstate_e;

  // DDR command on {CS#, RAS#, CAS#, WE#}.
  typedef enum logic [3:0] {
    CMD_DESEL = 4'b1111,
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_AR    = 4'b0001,
    CMD_LMR   = 4'b0000
  } ddr_cmd_e;

  // Geometry: 22-bit system address = {bank, row, column}.
  localparam int unsigned SYS_AW = 22;
  localparam int unsigned BA_W   = 2;
  localparam int unsigned ROW_W  = 12;
  localparam int unsigned COL_W  = 8;
  localparam int unsigned DQ_W   = 16;
  localparam int unsigned DM_W   = DQ_W / 8;

  // Default timing in controller clock cycles.
  localparam int unsigned DEF_CL    = 2;   // CAS latency
  localparam int unsigned DEF_BL    = 4;   // burst length (words)
  localparam int unsigned DEF_TRP   = 3;   // PRECHARGE period
  localparam int unsigned DEF_TRCD  = 3;   // ACTIVE to READ/WRITE
  localparam int unsigned DEF_TMRD  = 2;   // LOAD MODE REGISTER cycle
  localparam int unsigned DEF_TRFC  = 10;  // AUTO REFRESH period
  localparam int unsigned DEF_TWR   = 2;   // write recovery

  localparam int unsigned CNT_W = 8;       // wait-state counter width

  // Burst length code for mode register bits A[2:0].
  function automatic logic [2:0] bl_code(input int unsigned bl);
    case (bl)
      2:       return 3'b001;
      4:       return 3'b010;
      default: return 3'b011;
    endcase
  endfunction

endpackage
