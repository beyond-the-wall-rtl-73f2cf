// tb_jafar_workload_select: the evaluation workload of the design, run on the
// full system at default parameters.
//
// A column of 4,194,304 64-bit integers, uniformly distributed in
// 0 .. 999,999 (the DRAM model's default contents), is filtered one 4 KB page
// (512 rows) per call, as the host API prescribes, with the rank owned by the
// accelerator throughout. Part 1 runs the whole column with a 50 % range
// predicate and checks every bitset word against a software filter. Part 2
// sweeps the selectivity from 0 % to 100 % in 10 % steps over the first 16
// pages and checks that the run time of each page does not depend on the
// selectivity. Reported: clocks per page and rows per clock. A page is 64
// bursts; the DRAM allows one CAS per 26 clocks (13 ns), so no page may take
// less than 64 x 26 clocks, and the mean, with the bitset writes and the row
// misses they cause, must stay within 25 % of that.
module tb_jafar_workload_select;
  import jafar_pkg::*;

  localparam int ROWS      = 4194304;
  localparam int PAGE_ROWS = 512;
  localparam int PAGES     = ROWS / PAGE_ROWS;
  localparam int SWEEP_PAGES = 16;
  localparam logic [ADDR_W-1:0] COL  = 31'h0100_0000;
  localparam logic [ADDR_W-1:0] OUTB = 31'h0400_2000;   // bank 1
  localparam logic [ADDR_W-1:0] DONE = 31'h0500_4000;   // bank 2

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

  jafar_top dut (.bus_clk, .rst_n, .jafar_clk, .jafar_owns_rank(owns),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .jafar_busy,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .host_rsp_valid, .host_rsp_data,
    .dram_cmd, .dram_bank, .dram_row, .dram_col, .dram_wdata, .dram_wmask,
    .dram_rvalid, .dram_rdata);

  dram_array_model u_dram (.clk(jafar_clk), .rst_n, .cmd(dram_cmd), .bank(dram_bank), .row(dram_row),
    .col(dram_col), .wdata(dram_wdata), .wmask(dram_wmask), .rvalid(dram_rvalid), .rdata(dram_rdata));

  always #500 bus_clk = ~bus_clk;
  always @(posedge jafar_clk) cyc++;

  initial begin
    repeat (60000000) @(posedge jafar_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_write(logic [3:0] a, logic [63:0] d);
    @(negedge jafar_clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge jafar_clk); reg_we = 0;
  endtask

  task automatic set_pred(longint lo, longint hi);
    reg_write(REG_LEFT_VAL, lo); reg_write(REG_RIGHT_VAL, hi);
    reg_write(REG_OPCODES, {53'd0, 3'(OP_LE), 5'd0, 3'(OP_GE)});
  endtask

  task automatic page_call(int p, output longint dur);
    longint t0;
    reg_write(REG_COL_ADDR, COL + PAGE_ROWS * 8 * p);
    reg_write(REG_OUT_ADDR, OUTB + (PAGE_ROWS / 8) * p);
    reg_write(REG_CTRL, 1);
    t0 = cyc;
    @(posedge jafar_clk);
    while (jafar_busy) @(posedge jafar_clk);
    dur = cyc - t0;
  endtask

  function automatic int check_page(int p, longint lo, longint hi, output int passed);
    int bad = 0;
    passed = 0;
    for (int k = 0; k < PAGE_ROWS / 64; k++) begin
      longint unsigned e = 0, got;
      for (int b = 0; b < 64; b++) begin
        longint v = u_dram.peek((COL >> 3) + PAGE_ROWS * p + 64 * k + b);
        e[b] = (v >= lo) && (v <= hi);
        passed += e[b];
      end
      got = u_dram.peek((OUTB >> 3) + (PAGE_ROWS / 64) * p + k);
      if (got != e) bad++;
    end
    return bad;
  endfunction

  longint dur, dmin, dmax, dsum, t_all;
  longint sweep_dur[SWEEP_PAGES];
  int bad, passed, total_passed;

  initial begin
    owns = 0; reg_we = 0; reg_addr = '0; reg_wdata = '0; cpu_req_valid = 0; cpu_req = '0;
    repeat (4) @(posedge jafar_clk); #1 rst_n = 1;
    owns = 1;
    reg_write(REG_NUM_ROWS, PAGE_ROWS);
    reg_write(REG_DONE_ADDR, DONE);
    // part 2 first: selectivity sweep over the first pages
    // (pass s = -1 repeats 0 % only to bring the DRAM rows into the state every
    // later pass starts from; pass 0 gives the reference run times)
    for (int s = -1; s <= 10; s++) begin
      longint hi;
      hi = (s < 0) ? -1 : s * 100000 - 1;   // rows 0 .. hi pass: about s*10 %
      set_pred(0, hi);
      total_passed = 0;
      for (int p = 0; p < SWEEP_PAGES; p++) begin
        page_call(p, dur);
        checks++;
        if (check_page(p, 0, hi, passed) != 0) begin failures++; $display("FAIL sweep s=%0d page %0d", s, p); end
        total_passed += passed;
        if (s == 0) sweep_dur[p] = dur;
        else if (s > 0) begin
          checks++;
          if (dur != sweep_dur[p]) begin failures++; $display("FAIL page %0d: %0d clocks at %0d0 %%, %0d at 0 %%", p, dur, s, sweep_dur[p]); end
        end
      end
      if (s >= 0) $display("selectivity %0d %%: %0d of %0d rows passed", s * 10, total_passed, SWEEP_PAGES * PAGE_ROWS);
    end
    // part 1: whole column, range predicate of about 50 %
    set_pred(250000, 749999);
    dmin = 1 << 40; dmax = 0; dsum = 0; total_passed = 0;
    t_all = cyc;
    for (int p = 0; p < PAGES; p++) begin
      page_call(p, dur);
      if (dur < dmin) dmin = dur;
      if (dur > dmax) dmax = dur;
      dsum += dur;
    end
    t_all = cyc - t_all;
    bad = 0;
    for (int p = 0; p < PAGES; p++) begin
      bad += check_page(p, 250000, 749999, passed);
      total_passed += passed;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d bitset words wrong", bad); end
    checks++;
    if (total_passed < ROWS * 45 / 100 || total_passed > ROWS * 55 / 100) begin
      failures++; $display("FAIL selectivity %0d", total_passed);
    end
    checks++;
    if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM rule breaches"); end
    checks++;
    if (dmin < 64 * 26 || dsum / PAGES > 64 * 26 * 5 / 4) begin
      failures++; $display("FAIL page time: min %0d mean %0d", dmin, dsum / PAGES);
    end
    $display("4M rows: %0d passed; per page %0d..%0d clocks (mean %0d); %0d clocks in all incl. host calls; %0.3f rows per clock",
             total_passed, dmin, dmax, dsum / PAGES, t_all, real'(ROWS) / real'(dsum));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
