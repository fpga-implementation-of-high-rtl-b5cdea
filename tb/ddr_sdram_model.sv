// ddr_sdram_model: behavioural model of a x16 DDR SDRAM device, for simulation
// only (not synthesizable).
//
// Samples the command pins at each rising edge of ck and keeps the state a
// real device keeps: the mode register (CAS latency, burst length), one open
// row per bank, and the sparse contents of the array.  READ bursts are driven
// on dq_out starting CL clocks after the command, one word per half clock;
// WRITE bursts are taken from dq_in starting one clock after the command
// (tDQSS = 1), one word per half clock, with dm high masking a byte.  Both
// run in the clk2x domain, whose rising edges are the two edges of ck.
// Auto precharge (A10) closes the bank after the burst.
// The model also checks the protocol and counts each violation in `errors`:
// the JEDEC power-up order (PRE, EMRS, MRS with DLL reset, PRE, AR, AR, MRS),
// tRP, tRCD, tRFC, tMRD, tWR, ACTIVE to an open bank, READ/WRITE to a closed
// bank, AUTO REFRESH with a bank not idle, and a write burst without the
// data enable.  Timing limits are parameters in clock cycles.
module ddr_sdram_model #(
  parameter int TRP  = 3,
  parameter int TRCD = 3,
  parameter int TRFC = 10,
  parameter int TMRD = 2,
  parameter int TWR  = 2
) (
  input  logic        ck,
  input  logic        clk2x,
  input  logic        cke,
  input  logic        csn,
  input  logic        rasn,
  input  logic        casn,
  input  logic        wen,
  input  logic [1:0]  ba,
  input  logic [11:0] addr,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  input  logic [1:0]  dm,
  output logic [15:0] dq_out,
  output int          errors,
  output logic        init_ok,
  output int          n_act,
  output int          n_read,
  output int          n_write,
  output int          n_ref
);

  logic [15:0] mem [int];
  int          hc = 0;          // clk2x rising edges
  int          cyc = 0;         // ck rising edges
  int          cl = 0, bl = 0;
  bit          open_b [4];
  int          row_b [4];
  int          act_at [4];
  int          ready_at [4];
  int          busy_until = 0;  // tRFC / tMRD: no command before this cycle
  int          init_step = 0;
  bit          seen_cke = 0;

  // Pending data beats: clk2x edge at which a word is due, and its address.
  int          rd_hc[$], rd_key[$];
  int          wr_hc[$], wr_key[$];

  initial begin
    errors = 0; init_ok = 0; n_act = 0; n_read = 0; n_write = 0; n_ref = 0;
    dq_out = '0;
    for (int b = 0; b < 4; b++) begin
      open_b[b] = 0; row_b[b] = 0; act_at[b] = -100; ready_at[b] = 0;
    end
  end

  function automatic int key(input int b, input int r, input int c);
    return (b << 20) | (r << 8) | c;
  endfunction

  task automatic err(input string s);
    errors++;
    $display("DDR MODEL ERROR @cycle %0d: %s", cyc, s);
  endtask

  // Expected power-up commands: {cmd, ba, A8}
  function automatic bit init_match(input int step, input logic [3:0] c, input logic [1:0] b,
                                    input logic a8);
    case (step)
      0, 3:    return c == 4'b0010 && addr[10];
      1:       return c == 4'b0000 && b == 2'd1;
      2:       return c == 4'b0000 && b == 2'd0 && a8;
      4, 5:    return c == 4'b0001;
      6:       return c == 4'b0000 && b == 2'd0 && !a8;
      default: return 0;
    endcase
  endfunction

  always @(posedge clk2x) begin
    logic [3:0] cmd;
    int b, col, base;
    hc++;
    // ------------- command decode on the rising edge of ck -------------
    if (ck) begin
      cyc++;
      cmd = {csn, rasn, casn, wen};
      b = int'(ba);
      if (cke && cmd != 4'b0111 && !csn) begin
        seen_cke = 1;
        if (cyc < busy_until) err("command during tRFC/tMRD");
        if (!init_ok) begin
          if (!init_match(init_step, cmd, ba, addr[8]))
            err($sformatf("power-up step %0d: unexpected command %b", init_step, cmd));
          init_step++;
        end
        unique case (cmd)
          4'b0000: begin  // LOAD MODE REGISTER
            for (int k = 0; k < 4; k++)
              if (open_b[k] || cyc < ready_at[k]) err("LMR with a bank not idle");
            if (ba == 2'd0) begin
              cl = int'(addr[6:4]);
              bl = 1 << int'(addr[2:0]);
            end
            busy_until = cyc + TMRD;
            if (init_step == 7) init_ok = 1;
          end
          4'b0010: begin  // PRECHARGE
            for (int k = 0; k < 4; k++)
              if (addr[10] || k == b) begin
                open_b[k] = 0;
                ready_at[k] = cyc + TRP;
              end
          end
          4'b0001: begin  // AUTO REFRESH
            for (int k = 0; k < 4; k++)
              if (open_b[k] || cyc < ready_at[k]) err("AUTO REFRESH with a bank not idle");
            busy_until = cyc + TRFC;
            if (init_ok) n_ref++;
          end
          4'b0011: begin  // ACTIVE
            if (!init_ok) err("ACTIVE before initialization");
            if (open_b[b]) err("ACTIVE to an open bank");
            if (cyc < ready_at[b]) err($sformatf("tRP violated on bank %0d", b));
            open_b[b] = 1;
            row_b[b] = int'(addr);
            act_at[b] = cyc;
            n_act++;
          end
          4'b0101, 4'b0100: begin  // READ / WRITE
            if (!open_b[b]) err("READ/WRITE to a closed bank");
            if (cyc - act_at[b] < TRCD) err("tRCD violated");
            col = int'(addr[7:0]);
            base = col & ~(bl - 1);
            for (int i = 0; i < bl; i++) begin
              int c2;
              c2 = base | ((col + i) & (bl - 1));
              if (cmd == 4'b0101) begin
                rd_hc.push_back(hc + 2 * cl + i);
                rd_key.push_back(key(b, row_b[b], c2));
              end else begin
                wr_hc.push_back(hc + 2 + i);
                wr_key.push_back(key(b, row_b[b], c2));
              end
            end
            if (cmd == 4'b0101) n_read++; else n_write++;
            if (addr[10]) begin
              open_b[b] = 0;
              ready_at[b] = (cmd == 4'b0101) ? cyc + bl / 2 + TRP
                                             : cyc + 1 + bl / 2 + TWR + TRP;
            end
          end
          default: err($sformatf("unsupported command %b", cmd));
        endcase
      end else if (!cke && seen_cke) begin
        err("CKE dropped");
      end
    end
    // ------------- data beats -------------
    if (wr_hc.size() != 0 && wr_hc[0] == hc) begin
      logic [15:0] old;
      old = mem.exists(wr_key[0]) ? mem[wr_key[0]] : 16'h0000;
      if (!dq_oe) err("write data without data enable");
      if (!dm[0]) old[7:0]  = dq_in[7:0];
      if (!dm[1]) old[15:8] = dq_in[15:8];
      mem[wr_key[0]] = old;
      void'(wr_hc.pop_front());
      void'(wr_key.pop_front());
    end
    if (rd_hc.size() != 0 && rd_hc[0] == hc) begin
      if (dq_oe) err("bus conflict: controller drives DQ during a read burst");
      dq_out <= mem.exists(rd_key[0]) ? mem[rd_key[0]] : 16'h0000;
      void'(rd_hc.pop_front());
      void'(rd_key.pop_front());
    end else begin
      dq_out <= 16'hFFFF;
    end
  end

endmodule
