// tb_jafar_mem_arbiter: drives CPU and accelerator requests into the arbiter
// with a DRAM model attached. Checks: the model reports no timing or row
// breach; reads return the stored burst tagged with the right requester;
// masked writes change only the masked bits; a requester without rank
// ownership is held off; row hit, row miss (PRE+ACT) and closed-bank (ACT)
// cases all occur; a row-hit read is issued within 2 clocks of the request.
module tb_jafar_mem_arbiter;
  import jafar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic owns;
  logic cpu_v, cpu_r, jf_v, jf_r;
  mem_req_t cpu_q, jf_q;
  dram_cmd_e cmd;
  logic [BANK_W-1:0] bank;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [63:0] wdata, wmask;
  logic rvalid, rsp_tag;
  logic [511:0] rdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  // expected read returns
  logic [511:0] exp_d[$];
  bit exp_tag[$];
  int blocked_cpu = 0, blocked_jf = 0;

  jafar_mem_arbiter dut (.clk, .rst_n, .jafar_owns_rank(owns),
    .cpu_req_valid(cpu_v), .cpu_req_ready(cpu_r), .cpu_req(cpu_q),
    .jf_req_valid(jf_v), .jf_req_ready(jf_r), .jf_req(jf_q),
    .cmd, .cmd_bank(bank), .cmd_row(row), .cmd_col(col), .cmd_wdata(wdata), .cmd_wmask(wmask),
    .rsp_arrive(rvalid), .rsp_tag);

  dram_array_model u_dram (.clk, .rst_n, .cmd, .bank, .row, .col, .wdata, .wmask, .rvalid, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cpu_v && !cpu_r && owns) blocked_cpu++;
    if (jf_v && !jf_r && !owns) blocked_jf++;
  end

  always @(posedge clk) if (rst_n && rvalid) begin
    checks++;
    if (exp_d.size() == 0 || rdata !== exp_d[0] || rsp_tag !== exp_tag[0]) begin
      failures++; $display("FAIL read return at %0d tag=%0d exp=%0d n=%0d d=%h e=%h", cyc, rsp_tag, exp_tag[0], exp_d.size(), rdata[63:0], exp_d[0][63:0]);
    end
    if (exp_d.size() != 0) begin void'(exp_d.pop_front()); void'(exp_tag.pop_front()); end
  end

  function automatic logic [511:0] burst_of(logic [ADDR_W-1:0] a);
    logic [511:0] d;
    longint unsigned w0 = a >> 3;
    w0 = w0 & ~longint'(7);
    for (int w = 0; w < 8; w++) d[w*64 +: 64] = u_dram.peek(w0 + w);
    return d;
  endfunction

  // issue one request from the given side and return the cycles until its CAS
  task automatic issue(bit from_jf, bit we, logic [ADDR_W-1:0] a, logic [63:0] d, logic [63:0] m, output int lat);
    mem_req_t q;
    longint t0;
    q = '{we: we, addr: a, wdata: d, wmask: m};
    @(negedge clk);
    if (from_jf) begin jf_v = 1; jf_q = q; end else begin cpu_v = 1; cpu_q = q; end
    while (!(from_jf ? jf_r : cpu_r)) @(negedge clk);
    @(posedge clk);
    t0 = cyc;
    if (!we) begin exp_d.push_back(burst_of(a)); exp_tag.push_back(from_jf); end
    #1;
    if (from_jf) jf_v = 0; else cpu_v = 0;
    while (!(cmd == CMD_RD || cmd == CMD_WR)) @(posedge clk) #1;
    lat = int'(cyc - t0);
  endtask

  int lat, n_hit = 0;
  longint unsigned wa;
  logic [63:0] old_word;

  initial begin
    owns = 0; cpu_v = 0; jf_v = 0; cpu_q = '0; jf_q = '0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    // CPU reads: closed bank, same row (hit), other row in same bank (miss)
    issue(0, 0, 31'h0000_0040, 0, 0, lat);
    issue(0, 0, 31'h0000_0080, 0, 0, lat);
    // a hit waits at most for the CAS-to-CAS spacing (26) after the previous CAS
    checks++; if (lat > 2 + 26) begin failures++; $display("FAIL row hit latency %0d", lat); end
    issue(0, 0, 31'h0004_0000, 0, 0, lat);      // row 1, bank 0
    // JAFAR request while not owner is held off, then served once owner
    fork
      begin issue(1, 0, 31'h0004_0100, 0, 0, lat); end
      begin repeat (20) @(posedge clk); #1 owns = 1; end
    join
    // CPU held off while JAFAR owns the rank
    fork
      begin issue(0, 0, 31'h0000_2000, 0, 0, lat); end
      begin repeat (20) @(posedge clk); #1 owns = 0; end
    join
    // masked write then read back
    wa = 31'h0010_0008 >> 3;
    old_word = u_dram.peek(wa);
    issue(0, 1, 31'h0010_0008, 64'hFFFF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_FF00, lat);
    repeat (2) @(posedge clk);
    checks++;
    if (u_dram.peek(wa) !== ((old_word & ~64'hFF00) | 64'hFF00)) begin failures++; $display("FAIL masked write"); end
    // stream of random requests from alternating owners
    for (int i = 0; i < 60; i++) begin
      bit j;
      logic [ADDR_W-1:0] a;
      j = 1'($urandom_range(0, 1));
      a = {2'($urandom_range(0, 3)), 13'h0, 3'($urandom_range(0, 7)), 7'($urandom_range(0, 127)), 6'h0};
      owns = j;
      issue(j, 0, a, 0, 0, lat);
    end
    repeat (60) @(posedge clk);
    checks++;
    if (u_dram.violations != 0) begin failures++; $display("FAIL %0d DRAM rule breaches", u_dram.violations); end
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("FAIL %0d reads not returned", exp_d.size()); end
    checks++;
    if (blocked_cpu == 0 || blocked_jf == 0 || u_dram.n_pre == 0 || u_dram.n_act == 0 || u_dram.n_wr != 1) begin
      failures++; $display("FAIL coverage cpu_blk=%0d jf_blk=%0d pre=%0d act=%0d", blocked_cpu, blocked_jf, u_dram.n_pre, u_dram.n_act);
    end
    $display("arbiter: act=%0d pre=%0d rd=%0d wr=%0d", u_dram.n_act, u_dram.n_pre, u_dram.n_rd, u_dram.n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
