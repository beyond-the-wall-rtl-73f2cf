// dram_array_model: behavioural model of one DDR3 rank's arrays, row buffers
// and sense amplifiers, for testbenches only (not synthesizable).
//
// Accepts the command bus of the memory access arbiter. ACT opens a row in a
// bank, PRE closes it, RD returns the aligned 8-word (512-bit) burst holding
// the addressed column CL clocks later on rvalid/rdata (word 0 in bits 63:0),
// WR stores one 64-bit word, changing only the bits set in wmask.
// Storage is sparse: a word never written reads as a pseudo-random integer
// in 0 .. 999999 derived from its address (the uniform test column), so large
// columns need no memory. The model checks the DDR3 timing rules it is given
// (tRCD, tRP, tRAS, CAS-to-CAS spacing) and that every RD/WR hits the open
// row; each breach increments `violations`. It also counts commands.
// Word address of a command = {row, bank, col}; byte address = word * 8.
module dram_array_model
  import jafar_pkg::*;
#(
  parameter int CL    = 26,
  parameter int T_RCD = 26,
  parameter int T_RP  = 26,
  parameter int T_RAS = 70,
  parameter int T_CCD = 26
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dram_cmd_e             cmd,
  input  logic [BANK_W-1:0]     bank,
  input  logic [ROW_W-1:0]      row,
  input  logic [COL_W-1:0]      col,
  input  logic [DATA_W-1:0]     wdata,
  input  logic [DATA_W-1:0]     wmask,
  output logic                  rvalid,
  output logic [BURST_BITS-1:0] rdata
);

  longint unsigned mem [longint unsigned];
  bit              open_q [2**BANK_W];
  int unsigned     open_row [2**BANK_W];
  longint          t_act [2**BANK_W];
  longint          t_pre [2**BANK_W];
  longint          t_cas = -1000;
  longint          cyc = 0;
  int              violations = 0, n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0;
  longint          due_q[$];
  logic [BURST_BITS-1:0] data_q[$];

  function automatic longint unsigned default_val(longint unsigned waddr);
    longint unsigned h;
    h = (waddr + 64'h1234_5678) * 64'h9E37_79B9_7F4A_7C15;
    h = h ^ (h >> 29);
    h = h * 64'hBF58_476D_1CE4_E5B9;
    h = h ^ (h >> 32);
    return h % 1000000;
  endfunction

  function automatic longint unsigned peek(longint unsigned waddr);
    if (mem.exists(waddr)) return mem[waddr];
    return default_val(waddr);
  endfunction

  function automatic void poke(longint unsigned waddr, longint unsigned v);
    mem[waddr] = v;
  endfunction

  function automatic longint unsigned waddr_of(logic [ROW_W-1:0] r, logic [BANK_W-1:0] b, logic [COL_W-1:0] c);
    return {r, b, c};
  endfunction

  initial begin
    for (int b = 0; b < 2**BANK_W; b++) begin
      open_q[b] = 0; open_row[b] = 0; t_act[b] = -1000; t_pre[b] = -1000;
    end
  end

  task automatic viol(string what);
    violations++;
    $display("DRAM model: %s violated at cycle %0d (bank %0d)", what, cyc, bank);
  endtask

  always @(posedge clk) begin
    cyc++;
    rvalid <= 1'b0;
    if (due_q.size() != 0 && due_q[0] == cyc) begin
      void'(due_q.pop_front());
      rvalid <= 1'b1;
      rdata  <= data_q.pop_front();
    end
    if (rst_n) begin
      case (cmd)
        CMD_ACT: begin
          n_act++;
          if (open_q[bank]) viol("ACT to open bank");
          if (cyc - t_pre[bank] < T_RP) viol("tRP");
          open_q[bank] = 1; open_row[bank] = row; t_act[bank] = cyc;
        end
        CMD_PRE: begin
          n_pre++;
          if (cyc - t_act[bank] < T_RAS) viol("tRAS");
          open_q[bank] = 0; t_pre[bank] = cyc;
        end
        CMD_RD, CMD_WR: begin
          if (!open_q[bank] || open_row[bank] != row) viol("CAS to closed row");
          if (cyc - t_act[bank] < T_RCD) viol("tRCD");
          if (cyc - t_cas < T_CCD) viol("CAS spacing");
          t_cas = cyc;
          if (cmd == CMD_RD) begin
            logic [BURST_BITS-1:0] d;
            n_rd++;
            for (int w = 0; w < BURST_WORDS; w++)
              d[w*DATA_W +: DATA_W] = peek(waddr_of(row, bank, {col[COL_W-1:3], 3'(w)}));
            due_q.push_back(cyc + CL);
            data_q.push_back(d);
          end else begin
            longint unsigned a;
            n_wr++;
            a = waddr_of(row, bank, col);
            mem[a] = (peek(a) & ~wmask) | (wdata & wmask);
          end
        end
        default: ;
      endcase
    end
  end

  initial rvalid = 1'b0;
  initial rdata  = '0;

endmodule
