// tb_jafar_top: end-to-end test of the DIMM with the select accelerator, at
// the design's default parameters (1 GHz bus clock, 2 GHz accelerator clock).
//
// A DRAM model stands in for the arrays; the testbench plays the host CPU.
// Sequence: the host writes a marker value into the column through its own
// memory path and reads it back (host data path, row activation); it hands
// the rank to the accelerator, programs a range select over one 4 KB page,
// waits for busy to fall, takes the rank back, reads the completion word and
// the bitset words through its memory path and compares them with a software
// filter of the DRAM contents. Further calls cover an equality filter that
// finds the marker, a partial last bitset word (bits of other rows must be
// kept), a page in another bank, and selectivities of 0 % and 100 % (run time
// must not change). Counted mechanisms, each of which must occur at least
// once: CPU held off while the accelerator owns the rank, accelerator request
// held off while it does not, row hit, row miss (PRE + ACT), ACT on a closed
// bank, full bitset write-back, partial bitset write-back, completion write,
// an accelerator read issued while its previous read is still in flight, and
// back-to-back reads spaced by exactly the CAS-to-CAS delay (26 clocks, the
// streaming rate of one burst per 13 ns). The call whose column and bitset
// lie in different banks (38 bursts) must take at least 38 x 26 clocks and at
// most 25 % more; the range select, whose bitset shares the column's bank,
// pays two row misses per bitset write on top. Interleaving: two calls play
// the accelerators of two modules over which a 512-row column is interleaved
// word by word (256 local rows each, stride 2, phases 0 and 1). Both write
// the same bitset with masked writes; after the first call only the even
// bits may have changed, after the second the bitset must equal the filter
// of the whole interleaved column (mechanism: merged bitset words).
// The DRAM model must report no timing or open-row breach.
module tb_jafar_top;
  import jafar_pkg::*;

  logic bus_clk = 0, rst_n = 0, jafar_clk;
  logic owns;
  logic reg_we;
  logic [3:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;
  logic jafar_busy;
  logic cpu_req_valid, cpu_req_ready, host_rsp_valid;
  mem_req_t cpu_req;
  logic [63:0] host_rsp_data;
  dram_cmd_e dram_cmd;
  logic [BANK_W-1:0] dram_bank;
  logic [ROW_W-1:0] dram_row;
  logic [COL_W-1:0] dram_col;
  logic [63:0] dram_wdata, dram_wmask;
  logic dram_rvalid;
  logic [511:0] dram_rdata;

  int checks = 0, failures = 0;
  longint cyc = 0;
  // mechanism counters
  int n_cpu_blocked = 0, n_jf_blocked = 0, n_full_wb = 0, n_part_wb = 0, n_done_wr = 0;
  int n_row_hit = 0, n_rd_overlap = 0, n_rd_cl = 0, n_ilv_merged = 0;
  longint last_rd = -1000;

  jafar_top dut (.bus_clk, .rst_n, .jafar_clk, .jafar_owns_rank(owns),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .jafar_busy,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .host_rsp_valid, .host_rsp_data,
    .dram_cmd, .dram_bank, .dram_row, .dram_col, .dram_wdata, .dram_wmask,
    .dram_rvalid, .dram_rdata);

  dram_array_model u_dram (.clk(jafar_clk), .rst_n, .cmd(dram_cmd), .bank(dram_bank), .row(dram_row),
    .col(dram_col), .wdata(dram_wdata), .wmask(dram_wmask), .rvalid(dram_rvalid), .rdata(dram_rdata));

  always #500 bus_clk = ~bus_clk;   // 1 GHz data-bus clock at 1 ps units
  always @(posedge jafar_clk) cyc++;

  initial begin
    repeat (400000) @(posedge jafar_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic [BANK_W-1:0] last_act_bank_q;
  always @(posedge jafar_clk) if (rst_n) begin
    if (cpu_req_valid && !cpu_req_ready && owns) n_cpu_blocked++;
    if (dut.jf_req_valid && !dut.jf_req_ready && !owns) n_jf_blocked++;
    if (dut.jf_req_valid && dut.jf_req_ready && dut.jf_req.we) begin
      if (dut.jf_req.wdata == DONE_FLAG && dut.jf_req.addr == dut.u_jafar.u_regs.cfg.done_addr) n_done_wr++;
      else if (dut.jf_req.wmask == '1) n_full_wb++;
      else n_part_wb++;
    end
    if (dut.u_arb.state == dut.u_arb.S_IDLE && dut.u_arb.take &&
        dut.u_arb.open_q[dut.u_arb.f_bank(dut.u_arb.sel.addr)] &&
        dut.u_arb.open_row[dut.u_arb.f_bank(dut.u_arb.sel.addr)] == dut.u_arb.f_row(dut.u_arb.sel.addr))
      n_row_hit++;
    if (dut.jf_req_valid && dut.jf_req_ready && !dut.jf_req.we && dut.u_jafar.u_ctrl.rd_out != 0) n_rd_overlap++;
    if (dram_cmd == CMD_RD) begin
      if (cyc - last_rd == 26) n_rd_cl++;
      last_rd = cyc;
    end
  end

  task automatic reg_write(logic [3:0] a, logic [63:0] d);
    @(negedge jafar_clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge jafar_clk); reg_we = 0;
  endtask

  // host memory access through the arbiter
  task automatic cpu_access(bit we, logic [ADDR_W-1:0] a, logic [63:0] d, logic [63:0] m);
    @(negedge jafar_clk);
    cpu_req_valid = 1; cpu_req = '{we: we, addr: a, wdata: d, wmask: m};
    while (!cpu_req_ready) @(negedge jafar_clk);
    @(posedge jafar_clk); #1;
    cpu_req_valid = 0;
  endtask

  task automatic cpu_read_burst(logic [ADDR_W-1:0] a, output logic [63:0] w[8]);
    int n;
    cpu_access(0, a, 0, 0);
    n = 0;
    while (n < 8) begin
      @(posedge jafar_clk);
      if (host_rsp_valid) begin w[n] = host_rsp_data; n++; end
    end
  endtask

  function automatic bit pred(longint v, longint o, cmp_op_e p);
    case (p)
      OP_EQ: return v == o;  OP_LT: return v < o;  OP_GT: return v > o;
      OP_LE: return v <= o;  OP_GE: return v >= o; default: return 1;
    endcase
  endfunction

  // one select call, the host side of the API: returns the accelerator's run time
  task automatic select(logic [ADDR_W-1:0] col, int rows, longint lo, longint hi, cmp_op_e lop, cmp_op_e rop,
                        logic [ADDR_W-1:0] outa, logic [ADDR_W-1:0] donea, bit late_grant, output longint dur);
    longint t0;
    logic [63:0] w[8];
    longint unsigned keep;
    int nwords;
    nwords = (rows + 63) / 64;
    // host clears the completion word and pre-fills the last bitset word
    keep = 64'h5A5A_5A5A_5A5A_5A5A;
    cpu_access(1, donea, 0, '1);
    cpu_access(1, outa + 8 * (nwords - 1), keep, '1);
    owns = !late_grant;                          // rank handed to the accelerator
    reg_write(REG_COL_ADDR, col); reg_write(REG_NUM_ROWS, rows);
    reg_write(REG_LEFT_VAL, lo); reg_write(REG_RIGHT_VAL, hi);
    reg_write(REG_OPCODES, {53'd0, 3'(rop), 5'd0, 3'(lop)});
    reg_write(REG_OUT_ADDR, outa); reg_write(REG_DONE_ADDR, donea);
    reg_write(REG_INTERLEAVE, 0);
    reg_write(REG_CTRL, 1);
    t0 = cyc;
    if (late_grant) begin                        // accelerator waits for the rank
      repeat (20) @(posedge jafar_clk);
      #1 owns = 1;
    end
    while (jafar_busy) @(posedge jafar_clk);
    dur = cyc - t0;
    // host tries to read while still not owner -> held off until ownership returns
    fork
      cpu_read_burst(donea & ~31'h3f, w);
      begin repeat (10) @(posedge jafar_clk); #1 owns = 0; end
    join
    checks++;
    if (w[(donea >> 3) & 7] != DONE_FLAG) begin failures++; $display("FAIL completion word %h", w[(donea >> 3) & 7]); end
    for (int k = 0; k < nwords; k += 8) begin
      cpu_read_burst(outa + 8 * k, w);
      for (int j = 0; j < 8 && k + j < nwords; j++) begin
        longint unsigned e;
        e = (k + j == nwords - 1 && rows % 64 != 0) ? keep : 0;
        for (int r = 64 * (k + j); r < 64 * (k + j) + 64 && r < rows; r++)
          e[r % 64] = pred(u_dram.peek((col >> 3) + r), lo, lop) && pred(u_dram.peek((col >> 3) + r), hi, rop);
        checks++;
        if (w[j] != e) begin failures++; $display("FAIL bitset word %0d: %h exp %h", k + j, w[j], e); end
      end
    end
  endtask

  // one module's share of an interleaved column: its local rows are rows
  // 2k + phase of the column; returns after the call with the rank back at the host
  task automatic ilv_call(logic [ADDR_W-1:0] col, int phase, logic [ADDR_W-1:0] outa, logic [ADDR_W-1:0] donea);
    owns = 1;
    reg_write(REG_COL_ADDR, col); reg_write(REG_NUM_ROWS, 256);
    reg_write(REG_LEFT_VAL, 250000); reg_write(REG_RIGHT_VAL, 749999);
    reg_write(REG_OPCODES, {53'd0, 3'(OP_LE), 5'd0, 3'(OP_GE)});
    reg_write(REG_OUT_ADDR, outa); reg_write(REG_DONE_ADDR, donea);
    reg_write(REG_INTERLEAVE, 64'(phase) << 4 | 64'd1);
    reg_write(REG_CTRL, 1);
    @(posedge jafar_clk);
    while (jafar_busy) @(posedge jafar_clk);
    #1 owns = 0;
  endtask

  // bit of column row g of the interleaved column held in regions a (even) and b (odd)
  function automatic bit ilv_bit(logic [ADDR_W-1:0] a, logic [ADDR_W-1:0] b, int g);
    longint v;
    v = u_dram.peek(((g % 2 == 0 ? a : b) >> 3) + g / 2);
    return v >= 250000 && v <= 749999;
  endfunction

  task automatic interleaved_pair();
    localparam logic [ADDR_W-1:0] CA = 31'h0010_4000, CB = 31'h0010_6000;
    localparam logic [ADDR_W-1:0] OB = 31'h0060_2000, DN = 31'h0060_2800;
    localparam longint unsigned KEEP = 64'h5A5A_5A5A_5A5A_5A5A;
    logic [63:0] w[8];
    longint unsigned e;
    for (int k = 0; k < 8; k++) cpu_access(1, OB + 8 * k, KEEP, '1);
    ilv_call(CA, 0, OB, DN);
    cpu_read_burst(OB, w);
    for (int k = 0; k < 8; k++) begin
      e = KEEP;
      for (int j = 0; j < 64; j += 2) e[j] = ilv_bit(CA, CB, 64 * k + j);
      checks++;
      if (w[k] != e) begin failures++; $display("FAIL interleaved phase 0 word %0d: %h exp %h", k, w[k], e); end
    end
    ilv_call(CB, 1, OB, DN);
    cpu_read_burst(OB, w);
    for (int k = 0; k < 8; k++) begin
      for (int j = 0; j < 64; j++) e[j] = ilv_bit(CA, CB, 64 * k + j);
      checks++;
      if (w[k] != e) begin failures++; $display("FAIL interleaved word %0d: %h exp %h", k, w[k], e); end
      else if ((w[k] & 64'h5555_5555_5555_5555) != 0 && (w[k] & 64'hAAAA_AAAA_AAAA_AAAA) != 0) n_ilv_merged++;
    end
  endtask

  longint d_rng, d0, d100, dn;
  logic [63:0] w8[8];

  initial begin
    owns = 0; reg_we = 0; reg_addr = '0; reg_wdata = '0; cpu_req_valid = 0; cpu_req = '0;
    repeat (4) @(posedge jafar_clk); #1 rst_n = 1;
    // host writes a marker into row 37 of the column and reads it back
    cpu_access(1, 31'h0010_0000 + 8 * 37, 64'd424242, '1);
    cpu_read_burst(31'h0010_0000 + 8 * 32, w8);
    checks++;
    if (w8[5] != 64'd424242 || w8[0] != u_dram.peek((31'h0010_0000 >> 3) + 32)) begin
      failures++; $display("FAIL host read");
    end
    // range select over one 4 KB page, output in another row of the same bank
    select(31'h0010_0000, 512, 250000, 750000, OP_GE, OP_LE, 31'h0030_0000, 31'h0030_0800, 0, dn);
    // equality filter that finds the marker
    select(31'h0010_0000, 64, 424242, 0, OP_EQ, OP_ANY, 31'h0030_1000, 31'h0030_1800, 1, dn);
    cpu_read_burst(31'h0030_1000, w8);
    checks++;
    if (w8[0] != (64'd1 << 37)) begin failures++; $display("FAIL marker bit %h", w8[0]); end
    // partial last word, page in another bank
    select(31'h0010_2000, 300, 900000, 0, OP_GT, OP_ANY, 31'h0050_0000, 31'h0050_0808, 0, dn);
    $display("top: 300-row select, bitset in another bank, took %0d accelerator clocks", dn);
    checks++;
    if (dn < 38 * 26 || dn > 38 * 26 * 5 / 4) begin failures++; $display("FAIL streaming rate: %0d clocks", dn); end
    // selectivity 0 % and 100 %: same run time as the range select
    // (each run follows an identical call, so the DRAM rows start in the same state)
    select(31'h0010_0000, 512, 0, 0, OP_LT, OP_ANY, 31'h0030_0000, 31'h0030_0800, 0, d0);
    select(31'h0010_0000, 512, 0, 0, OP_LT, OP_ANY, 31'h0030_0000, 31'h0030_0800, 0, d0);
    select(31'h0010_0000, 512, 250000, 750000, OP_GE, OP_LE, 31'h0030_0000, 31'h0030_0800, 0, d_rng);
    select(31'h0010_0000, 512, 0, 0, OP_GE, OP_ANY, 31'h0030_0000, 31'h0030_0800, 0, d100);
    $display("top: 512-row select took %0d accelerator clocks", d_rng);
    checks++;
    if (d0 != d_rng || d100 != d_rng) begin failures++; $display("FAIL run time %0d %0d %0d", d0, d_rng, d100); end
    checks++;
    if (d_rng < 64 * 26) begin failures++; $display("FAIL page time %0d", d_rng); end
    // two modules' shares of an interleaved column merged into one bitset
    interleaved_pair();
    // status and rule checks
    @(negedge jafar_clk); reg_addr = REG_STATUS; #1;
    checks++;
    if (reg_rdata[2:0] != 3'b010) begin failures++; $display("FAIL status %h", reg_rdata); end
    checks++;
    if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM rule breaches %0d", u_dram.violations); end
    $display("mechanisms: cpu_blocked=%0d jf_blocked=%0d row_hit=%0d pre=%0d act=%0d full_wb=%0d part_wb=%0d done_wr=%0d rd_overlap=%0d rd_at_cl=%0d ilv_merged=%0d",
             n_cpu_blocked, n_jf_blocked, n_row_hit, u_dram.n_pre, u_dram.n_act, n_full_wb, n_part_wb, n_done_wr,
             n_rd_overlap, n_rd_cl, n_ilv_merged);
    checks++; if (n_rd_overlap == 0)  begin failures++; $display("FAIL never: two reads in flight"); end
    checks++; if (n_ilv_merged == 0)  begin failures++; $display("FAIL never: merged interleaved bitset"); end
    checks++; if (n_rd_cl == 0)       begin failures++; $display("FAIL never: reads at CAS-to-CAS spacing"); end
    checks++; if (n_cpu_blocked == 0) begin failures++; $display("FAIL never: cpu blocked"); end
    checks++; if (n_jf_blocked == 0)  begin failures++; $display("FAIL never: accelerator blocked"); end
    checks++; if (n_row_hit == 0)     begin failures++; $display("FAIL never: row hit"); end
    checks++; if (u_dram.n_pre == 0)  begin failures++; $display("FAIL never: row miss"); end
    checks++; if (u_dram.n_act == 0)  begin failures++; $display("FAIL never: activate"); end
    checks++; if (n_full_wb == 0)     begin failures++; $display("FAIL never: full write-back"); end
    checks++; if (n_part_wb == 0)     begin failures++; $display("FAIL never: partial write-back"); end
    checks++; if (n_done_wr != 9)     begin failures++; $display("FAIL completion writes %0d", n_done_wr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
