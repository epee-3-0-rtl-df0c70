// dma_b2h_engine: FPGA-to-Host (B2H/F2H) DMA engine.
//
// The host submits empty buffers per channel through a register;
// f2h_indication shows the channels that have a free buffer. To send a
// frame the accelerator picks a channel, raises f2h_req with f2h_qnum and
// gets f2h_ack (held until f2h_req falls) with f2h_err set if that channel
// has no free buffer. After an accepted request it writes the frame into the
// data FIFO, marking its last DW, and then its 32 DW status descriptor into
// the status FIFO. The engine forwards the frame as PKT_DATA packets of at
// most MAX_PKT_DW DW each, then the status descriptor as a PKT_F2H_STAT
// packet. Up to four accepted requests may be outstanding: their channels
// wait in a small FIFO, so the accelerator can write the next frame while
// the engine is still sending the previous one; frames and status
// descriptors leave in the order the requests were accepted.
//
// A packet header must carry its length, so the engine sends a packet only
// when all its DWs are in the FIFO. The write side counts the DWs of each
// frame and queues the count when the last DW is written; the read side then
// knows how much of the frame is left. While no frame end is queued every DW
// in the FIFO belongs to the current frame and full packets of MAX_PKT_DW go
// out, so a frame may be longer than the FIFO.
//
// The handshake signals mirror the H2F side, as the document says; packet
// size, FIFO depths and buffer counting are this design's choices.
module dma_b2h_engine
  import epee_pkg::*;
#(
  parameter int unsigned DATA_DEPTH = 1024,
  parameter int unsigned DESC_DEPTH = 64,
  parameter int unsigned MAX_PKT_DW = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // buffer submission from the register file
  input  logic        sub_valid,
  input  logic [3:0]  sub_chan,
  input  logic [15:0] sub_count,
  // accelerator handshake
  output logic [15:0] f2h_indication,
  input  logic [3:0]  f2h_qnum,
  input  logic        f2h_req,
  output logic        f2h_ack,
  output logic        f2h_ready,
  output logic        f2h_err,
  // data frame FIFO, write side
  input  logic        f2h_df_wr,
  input  logic [31:0] f2h_df_data,
  input  logic        f2h_df_last,
  output logic        f2h_df_full,
  // status descriptor FIFO, write side
  input  logic        f2h_sd_wr,
  input  logic [31:0] f2h_sd_data,
  output logic        f2h_sd_full,
  // uplink packets
  output logic        us_valid,
  input  logic        us_ready,
  output logic [31:0] us_data,
  output logic        us_last
);
  localparam int unsigned FLW = 24;  // frame length counter width, in DW
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_HDR, S_BODY, S_SD_WAIT, S_SD_HDR, S_SD_BODY} state_e;

  state_e      state;
  logic [15:0] bufs [NUM_CH];
  logic [3:0]  cur_chan;
  logic        ack_q, err_q, accept;
  logic        grant_push, grant_full, grant_empty, grant_pop;
  logic [2:0]  grant_count;

  always_comb
    for (int c = 0; c < NUM_CH; c++) f2h_indication[c] = (bufs[c] != 16'd0);

  assign accept     = !grant_full && f2h_req && !ack_q;
  assign grant_push = accept && f2h_indication[f2h_qnum];
  assign f2h_ack    = ack_q;
  assign f2h_err    = err_q;
  assign f2h_ready  = !grant_full && !ack_q;

  // channels of accepted requests, in order; popped when the frame's status
  // descriptor has been sent
  epee_fifo #(.WIDTH(4), .DEPTH(4)) u_grant_fifo (
    .clk, .rst_n,
    .wr_en(grant_push), .wr_data(f2h_qnum), .full(grant_full),
    .rd_en(grant_pop), .rd_data(cur_chan), .empty(grant_empty), .count(grant_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CH; c++) bufs[c] <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        logic [16:0] nxt;
        nxt = {1'b0, bufs[c]};
        if (sub_valid && sub_chan == 4'(c)) nxt = nxt + {1'b0, sub_count};
        if (accept && f2h_qnum == 4'(c) && bufs[c] != 16'd0) nxt = nxt - 17'd1;
        bufs[c] <= nxt[16] ? 16'hFFFF : nxt[15:0];
      end
    end
  end

  // ---- FIFOs ----
  logic [31:0] df_q, sd_q;
  logic        df_empty, df_pop, sd_empty, sd_pop;
  logic [$clog2(DATA_DEPTH):0] df_count;
  logic [$clog2(DESC_DEPTH):0] sd_count;

  epee_fifo #(.WIDTH(32), .DEPTH(DATA_DEPTH)) u_df_fifo (
    .clk, .rst_n,
    .wr_en(f2h_df_wr), .wr_data(f2h_df_data), .full(f2h_df_full),
    .rd_en(df_pop), .rd_data(df_q), .empty(df_empty), .count(df_count));

  epee_fifo #(.WIDTH(32), .DEPTH(DESC_DEPTH)) u_sd_fifo (
    .clk, .rst_n,
    .wr_en(f2h_sd_wr), .wr_data(f2h_sd_data), .full(f2h_sd_full),
    .rd_en(sd_pop), .rd_data(sd_q), .empty(sd_empty), .count(sd_count));

  // frame lengths, queued when the last DW is written
  logic [FLW-1:0] wr_words, len_q;
  logic           len_empty, len_full, len_pop, len_push;
  logic [2:0]     len_count;

  assign len_push = f2h_df_wr && !f2h_df_full && f2h_df_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_words <= '0;
    else if (f2h_df_wr && !f2h_df_full) wr_words <= f2h_df_last ? '0 : wr_words + 1'b1;
  end

  epee_fifo #(.WIDTH(FLW), .DEPTH(4)) u_len_fifo (
    .clk, .rst_n,
    .wr_en(len_push), .wr_data(wr_words + 1'b1), .full(len_full),
    .rd_en(len_pop), .rd_data(len_q), .empty(len_empty), .count(len_count));

  // ---- sender ----
  logic [FLW-1:0] sent;      // DWs of the current frame already sent
  logic [FLW-1:0] left;      // DWs of the current frame left, when known
  logic [15:0]    chunk, pkt_cnt;
  logic           chunk_ok;

  assign left = len_q - sent;
  always_comb begin
    chunk    = 16'(MAX_PKT_DW);
    chunk_ok = 1'b0;
    if (!len_empty) begin
      chunk    = (left < FLW'(MAX_PKT_DW)) ? 16'(left) : 16'(MAX_PKT_DW);
      chunk_ok = (df_count >= ($clog2(DATA_DEPTH)+1)'(chunk));
    end else begin
      chunk_ok = (df_count >= ($clog2(DATA_DEPTH)+1)'(MAX_PKT_DW));
    end
  end

  logic [15:0] pkt_len;
  logic        frame_end;

  always_comb begin
    us_valid = 1'b0;
    us_data  = '0;
    us_last  = 1'b0;
    df_pop   = 1'b0;
    sd_pop   = 1'b0;
    len_pop  = 1'b0;
    grant_pop = 1'b0;
    case (state)
      S_HDR: begin
        us_valid = 1'b1;
        us_data  = mk_hdr(DIR_F2H, PKT_DATA, cur_chan, pkt_len);
      end
      S_BODY: begin
        us_valid = 1'b1;
        us_data  = df_q;
        us_last  = (pkt_cnt == pkt_len - 16'd1);
        df_pop   = us_ready;
        len_pop  = us_ready && us_last && frame_end;
      end
      S_SD_HDR: begin
        us_valid = 1'b1;
        us_data  = mk_hdr(DIR_F2H, PKT_F2H_STAT, cur_chan, 16'(DESC_DW));
      end
      S_SD_BODY: begin
        us_valid = 1'b1;
        us_data  = sd_q;
        us_last  = (pkt_cnt == 16'(DESC_DW - 1));
        sd_pop   = us_ready;
        grant_pop = us_ready && us_last;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ack_q     <= 1'b0;
      err_q     <= 1'b0;
      sent      <= '0;
      pkt_len   <= '0;
      pkt_cnt   <= '0;
      frame_end <= 1'b0;
    end else begin
      if (accept) begin
        ack_q <= 1'b1;
        err_q <= !f2h_indication[f2h_qnum];
      end else if (ack_q && !f2h_req) begin
        ack_q <= 1'b0;
      end
      case (state)
        S_IDLE: if (!grant_empty) begin
          sent  <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (chunk_ok) begin
          pkt_len   <= chunk;
          frame_end <= !len_empty && (FLW'(chunk) == left);
          pkt_cnt   <= '0;
          state     <= S_HDR;
        end
        S_HDR: if (us_ready) state <= S_BODY;
        S_BODY: if (us_ready) begin
          pkt_cnt <= pkt_cnt + 1'b1;
          if (us_last) begin
            sent  <= frame_end ? '0 : sent + FLW'(pkt_len);
            state <= frame_end ? S_SD_WAIT : S_WAIT;
          end
        end
        S_SD_WAIT: if (sd_count >= ($clog2(DESC_DEPTH)+1)'(DESC_DW)) begin
          pkt_cnt <= '0;
          state   <= S_SD_HDR;
        end
        S_SD_HDR: if (us_ready) state <= S_SD_BODY;
        S_SD_BODY: if (us_ready) begin
          pkt_cnt <= pkt_cnt + 1'b1;
          if (us_last) state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  a_us_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (us_valid && !us_ready) |=> us_valid);
  // lengths are only queued for accepted frames, at most four
  a_len_room: assert property (@(posedge clk) disable iff (!rst_n)
    !(len_push && len_full));
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    df_pop |-> !df_empty);
endmodule
