// jafar_controller: request sequencer of the select accelerator.
//
// After start it reads the column as aligned 64-byte bursts (eight 64-bit
// rows each), starting at cfg.col_addr, and forwards the first cfg.num_rows
// received words to the filter datapath, marking the final one. Up to MAX_RD
// reads are outstanding at a time: with two, the next read goes out while the
// previous burst is still on its way, so the column streams at the rate the
// DRAM allows for CAS commands (one burst per CL) rather than at one burst per
// full round trip. Whenever the datapath offers a full output
// bitset, a masked 64-bit write to cfg.out_addr + 8 * index goes out ahead of
// the next read; rows keep flowing into the datapath meanwhile. After the
// write of the bitset holding the final row, the completion flag DONE_FLAG
// is written to cfg.done_addr (the word the host polls), done pulses and busy
// falls.
// Issuing reads like a CPU, writing the bitset back at a pre-programmed
// location and signalling completion through a polled memory word follow the
// design description. The number of reads in flight, write-before-read priority and
// the valid/ready request handshake (an offered read is not replaced by a
// write that becomes ready later) are this implementation's choices.
// Interface timing: req is held stable while req_valid is high and req_ready
// low; rsp_valid carries one word per clock for this requester's reads only.
module jafar_controller
  import jafar_pkg::*;
#(
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned MAX_RD = 2     // reads in flight, at least 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  jafar_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  // memory requests towards the arbiter
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  // read data words from the IO buffer
  input  logic              rsp_valid,
  input  logic [DATA_W-1:0] rsp_data,
  // rows into the datapath
  output logic              dp_clear,
  output logic              dp_valid,
  output logic              dp_last,
  output logic [DATA_W-1:0] dp_data,
  // write-back register of the datapath
  input  logic              wb_valid,
  output logic              wb_ready,
  input  logic [DATA_W-1:0] wb_bits,
  input  logic [DATA_W-1:0] wb_mask,
  input  logic [CNT_W-1:0]  wb_index,
  input  logic              wb_last
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLAG} state_e;

  state_e          state;
  logic [CNT_W-1:0] bursts_total, bursts_issued, words_rcvd;
  logic [3:0]       rd_out;       // reads issued whose last word has not arrived
  logic             rd_take, rd_end;
  logic             rd_offered;   // a read was offered and not yet taken
  logic             do_write, do_read, hs;

  assign busy     = (state != S_IDLE);
  assign dp_clear = (state == S_IDLE) && start;

  // request selection: a pending bitset write goes before the next read
  always_comb begin
    do_write  = 1'b0;
    do_read   = 1'b0;
    req_valid = 1'b0;
    req       = '0;
    if (state == S_RUN) begin
      if (wb_valid && !rd_offered) begin
        do_write  = 1'b1;
        req_valid = 1'b1;
        req.we    = 1'b1;
        req.addr  = cfg.out_addr + ADDR_W'(wb_index << 3);
        req.wdata = wb_bits;
        req.wmask = wb_mask;
      end else if (rd_out < 4'(MAX_RD) && bursts_issued < bursts_total) begin
        do_read   = 1'b1;
        req_valid = 1'b1;
        req.addr  = cfg.col_addr + ADDR_W'(bursts_issued << 6);
      end
    end else if (state == S_FLAG) begin
      req_valid = 1'b1;
      req.we    = 1'b1;
      req.addr  = cfg.done_addr;
      req.wdata = DONE_FLAG;
      req.wmask = '1;
    end
  end

  assign hs       = req_valid && req_ready;
  assign wb_ready = do_write && req_ready;
  assign rd_take  = hs && do_read;
  assign rd_end   = (state == S_RUN) && rsp_valid && (words_rcvd[2:0] == 3'd7);

  // rows into the datapath: the tail of the last burst beyond num_rows is dropped
  assign dp_valid = rsp_valid && (words_rcvd < cfg.num_rows);
  assign dp_last  = (words_rcvd == cfg.num_rows - 1'b1);
  assign dp_data  = rsp_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      bursts_total  <= '0;
      bursts_issued <= '0;
      words_rcvd    <= '0;
      rd_out        <= '0;
      done          <= 1'b0;
      rd_offered    <= 1'b0;
    end else begin
      done       <= 1'b0;
      rd_offered <= do_read && !req_ready;
      unique case (state)
        S_IDLE: if (start) begin
          bursts_total  <= (cfg.num_rows + CNT_W'(BURST_WORDS - 1)) >> 3;
          bursts_issued <= '0;
          words_rcvd    <= '0;
          rd_out        <= '0;
          state         <= (cfg.num_rows == '0) ? S_FLAG : S_RUN;
        end
        S_RUN: begin
          if (rd_take) bursts_issued <= bursts_issued + 1'b1;
          if (rd_take != rd_end) rd_out <= rd_take ? rd_out + 1'b1 : rd_out - 1'b1;
          if (rsp_valid) words_rcvd <= words_rcvd + 1'b1;
          if (hs && do_write && wb_last) state <= S_FLAG;
        end
        S_FLAG: if (hs) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a request, once offered, stays unchanged until it is taken
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req));

  a_rd_limit: assert property (@(posedge clk) disable iff (!rst_n) rd_out <= 4'(MAX_RD));

endmodule
