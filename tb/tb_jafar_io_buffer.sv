// tb_jafar_io_buffer: loads 512-bit bursts (some back to back, some with
// gaps) and checks that each comes out as eight 64-bit words, lowest first,
// on eight consecutive clocks starting one clock after the load, with its tag.
module tb_jafar_io_buffer;
  logic clk = 0, rst_n = 0;
  logic load, out_valid, out_last;
  logic [511:0] load_data;
  logic [0:0] load_tag, out_tag;
  logic [63:0] out_data;
  logic [63:0] exp_w[$];
  bit exp_t[$];
  int checks = 0, failures = 0, words = 0, cyc = 0, first_cyc = -1, last_cyc = -1;

  jafar_io_buffer dut (.clk, .rst_n, .load, .load_data, .load_tag, .out_valid, .out_data, .out_tag, .out_last);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    words++;
    if (first_cyc < 0) first_cyc = cyc;
    last_cyc = cyc;
    if (exp_w.size() == 0 || out_data !== exp_w[0] || out_tag[0] !== exp_t[0] ||
        out_last !== (exp_w.size() % 8 == 1)) begin
      failures++; $display("FAIL word at cycle %0d", cyc);
    end
    if (exp_w.size() != 0) begin void'(exp_w.pop_front()); void'(exp_t.pop_front()); end
  end

  task automatic burst(bit tag);
    for (int w = 0; w < 8; w++) load_data[w*64 +: 64] = {$urandom, $urandom};
    load_tag = tag; load = 1;
    @(posedge clk);
    for (int w = 0; w < 8; w++) begin exp_w.push_back(load_data[w*64 +: 64]); exp_t.push_back(tag); end
    #1 load = 0;
  endtask

  initial begin
    load = 0; load_data = '0; load_tag = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // four bursts back to back: 32 words on 32 consecutive clocks
    for (int b = 0; b < 4; b++) begin burst(b[0]); repeat (7) @(posedge clk); #1; end
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (words != 32 || last_cyc - first_cyc != 31) begin
      failures++; $display("FAIL rate: %0d words in %0d cycles", words, last_cyc - first_cyc + 1);
    end
    // isolated bursts with gaps
    for (int b = 0; b < 6; b++) begin burst(1'(b % 2)); repeat ($urandom_range(8, 15)) @(posedge clk); #1; end
    repeat (12) @(posedge clk);
    checks++;
    if (exp_w.size() != 0 || words != 80) begin failures++; $display("FAIL words=%0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
