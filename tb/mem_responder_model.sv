// mem_responder_model: simple memory for testing the accelerator on its own,
// for testbenches only. Takes one request per handshake (ready is random when
// RANDOM_READY is set). A read returns the aligned 8-word burst, one word per
// clock, starting LAT clocks after it was taken; a write changes the bits of
// one word selected by wmask. Unwritten words read as a pseudo-random integer
// in 0 .. 999999 derived from the word address. Every write is also logged
// (address, data, mask) in order for the testbench to inspect.
module mem_responder_model
  import jafar_pkg::*;
#(
  parameter int LAT          = 26,
  parameter bit RANDOM_READY = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  mem_req_t          req,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_data
);

  longint unsigned mem [longint unsigned];
  longint          cyc = 0;
  longint          due_q[$];
  longint unsigned word_q[$];
  int              n_rd = 0, n_wr = 0, outstanding = 0, max_outstanding = 0;
  longint unsigned wlog_addr[$], wlog_data[$], wlog_mask[$];
  longint unsigned rlog_addr[$];

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

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    cyc++;
    rsp_valid <= 1'b0;
    if (due_q.size() != 0 && due_q[0] <= cyc) begin
      void'(due_q.pop_front());
      rsp_valid <= 1'b1;
      rsp_data  <= word_q.pop_front();
      if (due_q.size() % 8 == 0) outstanding--;
    end
    if (rst_n && req_valid && req_ready) begin
      longint unsigned wa;
      wa = longint'(req.addr) >> 3;
      if (req.we) begin
        n_wr++;
        mem[wa] = (peek(wa) & ~req.wmask) | (req.wdata & req.wmask);
        wlog_addr.push_back(req.addr); wlog_data.push_back(req.wdata); wlog_mask.push_back(req.wmask);
      end else begin
        n_rd++;
        rlog_addr.push_back(req.addr);
        outstanding++;
        if (outstanding > max_outstanding) max_outstanding = outstanding;
        for (int w = 0; w < BURST_WORDS; w++) begin
          due_q.push_back(cyc + LAT + w);
          word_q.push_back(peek((wa & ~longint'(7)) + w));
        end
      end
    end
    req_ready <= RANDOM_READY ? 1'($urandom_range(0, 1)) : 1'b1;
  end

endmodule
