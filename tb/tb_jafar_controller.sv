// tb_jafar_controller: the request sequencer against a memory that accepts
// requests at random, with the testbench standing in for the datapath (it
// offers a bitset write-back after every 64th row and after the final row).
// Checks: reads are the aligned bursts of the column in order, two are in
// flight whenever the column spans more than one burst and never more, exactly num_rows rows reach the datapath with the last one
// marked, each bitset is written to out_addr + 8 * index with its data and
// mask, the completion flag is the last write, and busy/done behave.
module tb_jafar_controller;
  import jafar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  jafar_cfg_t cfg;
  logic req_valid, req_ready, rsp_valid;
  mem_req_t req;
  logic [63:0] rsp_data;
  logic dp_clear, dp_valid, dp_last;
  logic [63:0] dp_data;
  logic wb_valid, wb_ready, wb_last;
  logic [63:0] wb_bits, wb_mask;
  logic [31:0] wb_index;
  int checks = 0, failures = 0;
  int rows_seen, lasts_seen, wb_made;

  jafar_controller dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_data,
    .dp_clear, .dp_valid, .dp_last, .dp_data,
    .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last);

  mem_responder_model #(.LAT(20), .RANDOM_READY(1'b1)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath stand-in
  always @(posedge clk) begin
    if (!rst_n || dp_clear) begin
      rows_seen <= 0; lasts_seen <= 0; wb_valid <= 0; wb_made <= 0;
    end else begin
      if (wb_valid && wb_ready) wb_valid <= 0;
      if (dp_valid) begin
        if (dp_data != u_mem.peek((longint'(cfg.col_addr) >> 3) + rows_seen)) begin
          failures++; $display("FAIL row %0d data", rows_seen);
        end
        rows_seen <= rows_seen + 1;
        if (dp_last) lasts_seen <= lasts_seen + 1;
        if (dp_last != (rows_seen == cfg.num_rows - 1)) begin failures++; $display("FAIL last flag"); end
        if (rows_seen % 64 == 63 || dp_last) begin
          wb_valid <= 1; wb_index <= rows_seen / 64; wb_last <= dp_last;
          wb_bits  <= 64'hC0DE_0000_0000_0000 | 64'(rows_seen / 64);
          wb_mask  <= dp_last ? (64'h1 << (rows_seen % 64 + 1)) - 1 | (rows_seen % 64 == 63 ? '1 : 0) : '1;
          wb_made  <= wb_made + 1;
        end
      end
    end
  end

  task automatic call(longint unsigned col, int rows, longint unsigned outa, longint unsigned donea);
    int nw0, nr0;
    nw0 = u_mem.wlog_addr.size(); nr0 = u_mem.rlog_addr.size();
    u_mem.max_outstanding = 0;
    @(negedge clk);
    cfg.col_addr = col; cfg.num_rows = rows; cfg.out_addr = outa; cfg.done_addr = donea;
    start = 1; @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("FAIL busy"); end
    while (!done) @(posedge clk);
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL busy after done"); end
    checks++;
    if (rows_seen != rows || lasts_seen != (rows > 0)) begin failures++; $display("FAIL rows %0d", rows_seen); end
    checks++;
    if (u_mem.rlog_addr.size() - nr0 != (rows + 7) / 8) begin failures++; $display("FAIL read count"); end
    for (int k = 0; k < (rows + 7) / 8; k++) begin
      checks++;
      if (u_mem.rlog_addr[nr0 + k] != col + 64 * k) begin failures++; $display("FAIL read %0d addr", k); end
    end
    checks++;
    // two reads in flight once the column spans more than one burst, never more
    if (u_mem.max_outstanding != ((rows + 7) / 8 >= 2 ? 2 : (rows + 7) / 8)) begin
      failures++; $display("FAIL outstanding %0d", u_mem.max_outstanding);
    end
    checks++;
    if (u_mem.wlog_addr.size() - nw0 != (rows + 63) / 64 + 1) begin failures++; $display("FAIL write count"); end
    for (int k = 0; k < (rows + 63) / 64; k++) begin
      checks++;
      if (u_mem.wlog_addr[nw0 + k] != outa + 8 * k || u_mem.wlog_data[nw0 + k] != (64'hC0DE_0000_0000_0000 | k)) begin
        failures++; $display("FAIL write %0d", k);
      end
    end
    checks++;
    if (u_mem.wlog_addr[$] != donea || u_mem.wlog_data[$] != DONE_FLAG || u_mem.wlog_mask[$] != '1) begin
      failures++; $display("FAIL completion write");
    end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    call(64'h4000, 512, 64'h8000, 64'h9000);
    call(64'h4040, 130, 64'h8100, 64'h9008);
    call(64'h5000, 5, 64'h8200, 64'h9010);
    call(64'h6000, 0, 64'h8300, 64'h9018);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
