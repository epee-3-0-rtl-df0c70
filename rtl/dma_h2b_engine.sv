// dma_h2b_engine: Host-to-FPGA (H2B/H2F) DMA engine.
//
// The host announces frames per channel (16 priority channels) through a
// doorbell register; h2f_indication shows which channels have frames
// waiting. The accelerator picks a channel, puts it on h2f_qnum and raises
// h2f_req. The engine answers with h2f_ack, held until h2f_req falls; with
// the ack, h2f_err says whether the request was refused (no frame waiting on
// that channel). As in the document, no frame is buffered ahead: only on an
// accepted request does the engine ask the host for the frame, with a
// PKT_H2F_REQ packet. The host then sends the 32 DW control descriptor, which
// goes to the control descriptor FIFO, and the data frame, which goes to the
// data FIFO. The data length is the descriptor's LEN field (bytes, DW3 of the
// descriptor); the data FIFO marks the frame's last DW. h2f_ready is high
// when the engine can take a new request.
//
// The accelerator writes its 32 DW status descriptor into the status FIFO;
// as soon as 32 DW are there the engine sends them to the host as a
// PKT_H2F_STAT packet. The packet's channel is the QN field of the status
// descriptor (DW1 bits 19:16, the same place as in the control descriptor),
// so the accelerator may already be working on another channel.
//
// Handshakes, FIFOs, the 16 channels and the descriptor length follow the
// document; the counts per channel, the packet protocol, the byte unit of
// LEN and the FIFO depths are this design's choices. Words offered on the
// descriptor or data port when the engine is not waiting for them are
// consumed and discarded. Everything runs on one clock.
module dma_h2b_engine
  import epee_pkg::*;
#(
  parameter int unsigned DATA_DEPTH = 1024,
  parameter int unsigned DESC_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // doorbell from the register file: cnt frames added on channel ch
  input  logic        db_valid,
  input  logic [3:0]  db_chan,
  input  logic [15:0] db_count,
  // accelerator handshake
  output logic [15:0] h2f_indication,
  input  logic [3:0]  h2f_qnum,
  input  logic        h2f_req,
  output logic        h2f_ack,
  output logic        h2f_ready,
  output logic        h2f_err,
  // control descriptor FIFO, read side
  input  logic        h2f_cd_rd,
  output logic [31:0] h2f_cd_data,
  output logic        h2f_cd_empty,
  // data frame FIFO, read side
  input  logic        h2f_df_rd,
  output logic [31:0] h2f_df_data,
  output logic        h2f_df_last,
  output logic        h2f_df_empty,
  // status descriptor FIFO, write side
  input  logic        h2f_sd_wr,
  input  logic [31:0] h2f_sd_data,
  output logic        h2f_sd_full,
  // from the downstream selector
  output logic        want_desc,
  output logic        want_data,
  output logic [3:0]  want_chan,
  input  logic        desc_valid,
  output logic        desc_ready,
  input  logic [31:0] desc_data,
  input  logic        data_valid,
  output logic        data_ready,
  input  logic [31:0] data_data,
  // uplink packets (frame requests, status descriptors)
  output logic        us_valid,
  input  logic        us_ready,
  output logic [31:0] us_data,
  output logic        us_last
);
  typedef enum logic [1:0] {S_IDLE, S_SEND_REQ, S_DESC, S_DATA} state_e;
  typedef enum logic [1:0] {D_IDLE, D_HDR, D_BODY} sd_state_e;

  state_e      state;
  sd_state_e   sd_state;
  logic [15:0] pend [NUM_CH];
  logic [3:0]  cur_chan;
  logic        ack_q, err_q;
  logic [5:0]  desc_cnt;
  logic [31:0] desc_len;
  logic [29:0] data_rem;
  logic [5:0]  sd_cnt;
  logic        accept;

  // ---- channel bookkeeping ----
  always_comb
    for (int c = 0; c < NUM_CH; c++) h2f_indication[c] = (pend[c] != 16'd0);

  assign accept    = (state == S_IDLE) && h2f_req && !ack_q;
  assign h2f_ack   = ack_q;
  assign h2f_err   = err_q;
  assign h2f_ready = (state == S_IDLE) && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CH; c++) pend[c] <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        logic [16:0] nxt;
        nxt = {1'b0, pend[c]};
        if (db_valid && db_chan == 4'(c)) nxt = nxt + {1'b0, db_count};
        if (accept && h2f_qnum == 4'(c) && pend[c] != 16'd0) nxt = nxt - 17'd1;
        pend[c] <= nxt[16] ? 16'hFFFF : nxt[15:0];
      end
    end
  end

  // ---- frame fetch ----
  logic cd_full, df_full, cd_push, df_push;
  logic [$clog2(DESC_DEPTH):0] cd_count;
  logic [$clog2(DATA_DEPTH):0] df_count;

  assign want_desc  = (state == S_DESC);
  assign want_data  = (state == S_DATA);
  assign want_chan  = cur_chan;
  assign desc_ready = (state == S_DESC) ? !cd_full : 1'b1;
  assign data_ready = (state == S_DATA) ? !df_full : 1'b1;
  assign cd_push    = (state == S_DESC) && desc_valid && !cd_full;
  assign df_push    = (state == S_DATA) && data_valid && !df_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ack_q    <= 1'b0;
      err_q    <= 1'b0;
      cur_chan <= '0;
      desc_cnt <= '0;
      desc_len <= '0;
      data_rem <= '0;
    end else begin
      if (accept) begin
        ack_q <= 1'b1;
        err_q <= !h2f_indication[h2f_qnum];
        if (h2f_indication[h2f_qnum]) begin
          cur_chan <= h2f_qnum;
          state    <= S_SEND_REQ;
        end
      end else if (ack_q && !h2f_req) begin
        ack_q <= 1'b0;
      end
      case (state)
        S_SEND_REQ: if (us_ready && sd_state == D_IDLE) begin
          state    <= S_DESC;
          desc_cnt <= '0;
        end
        S_DESC: if (cd_push) begin
          desc_cnt <= desc_cnt + 1'b1;
          if (desc_cnt == 6'd3) desc_len <= desc_data;
          if (desc_cnt == 6'(DESC_DW - 1)) begin
            // LEN of DW3, in bytes, rounded up to whole DWs
            logic [29:0] words;
            words = (desc_cnt == 6'd3) ? 30'((desc_data + 32'd3) >> 2) : 30'((desc_len + 32'd3) >> 2);
            data_rem <= words;
            state    <= (words == 0) ? S_IDLE : S_DATA;
          end
        end
        S_DATA: if (df_push) begin
          data_rem <= data_rem - 1'b1;
          if (data_rem == 30'd1) state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  epee_fifo #(.WIDTH(32), .DEPTH(DESC_DEPTH)) u_cd_fifo (
    .clk, .rst_n,
    .wr_en(cd_push), .wr_data(desc_data), .full(cd_full),
    .rd_en(h2f_cd_rd), .rd_data(h2f_cd_data), .empty(h2f_cd_empty), .count(cd_count));

  epee_fifo #(.WIDTH(33), .DEPTH(DATA_DEPTH)) u_df_fifo (
    .clk, .rst_n,
    .wr_en(df_push), .wr_data({data_rem == 30'd1, data_data}), .full(df_full),
    .rd_en(h2f_df_rd), .rd_data({h2f_df_last, h2f_df_data}), .empty(h2f_df_empty), .count(df_count));

  // ---- status descriptors back to the host ----
  // The packet header needs the channel before the body, so the QN field
  // (DW1 bits 19:16) of each status descriptor is queued as it is written.
  logic [31:0] sd_q;
  logic        sd_empty, sd_pop, sd_push;
  logic [$clog2(DESC_DEPTH):0] sd_count;
  logic [4:0]  sd_wr_idx;
  logic        qn_push, qn_pop, qn_empty, qn_full;
  logic [3:0]  sd_chan;
  logic [2:0]  qn_count;

  assign sd_push = h2f_sd_wr && !h2f_sd_full;
  assign qn_push = sd_push && (sd_wr_idx == 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sd_wr_idx <= '0;
    else if (sd_push) sd_wr_idx <= sd_wr_idx + 1'b1;
  end

  epee_fifo #(.WIDTH(32), .DEPTH(DESC_DEPTH)) u_sd_fifo (
    .clk, .rst_n,
    .wr_en(h2f_sd_wr), .wr_data(h2f_sd_data), .full(h2f_sd_full),
    .rd_en(sd_pop), .rd_data(sd_q), .empty(sd_empty), .count(sd_count));

  epee_fifo #(.WIDTH(4), .DEPTH(4)) u_qn_fifo (
    .clk, .rst_n,
    .wr_en(qn_push), .wr_data(h2f_sd_data[19:16]), .full(qn_full),
    .rd_en(qn_pop), .rd_data(sd_chan), .empty(qn_empty), .count(qn_count));

  always_comb begin
    us_valid = 1'b0;
    us_data  = '0;
    us_last  = 1'b0;
    sd_pop   = 1'b0;
    qn_pop   = 1'b0;
    case (sd_state)
      D_HDR: begin
        us_valid = 1'b1;
        us_data  = mk_hdr(DIR_F2H, PKT_H2F_STAT, sd_chan, 16'(DESC_DW));
      end
      D_BODY: begin
        us_valid = 1'b1;
        us_data  = sd_q;
        us_last  = (sd_cnt == 6'(DESC_DW - 1));
        sd_pop   = us_ready;
        qn_pop   = us_ready && us_last;
      end
      default: if (state == S_SEND_REQ) begin
        us_valid = 1'b1;
        us_data  = mk_hdr(DIR_F2H, PKT_H2F_REQ, cur_chan, 16'd0);
        us_last  = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_state <= D_IDLE;
      sd_cnt   <= '0;
    end else begin
      case (sd_state)
        D_IDLE: if (state != S_SEND_REQ && !qn_empty && sd_count >= ($clog2(DESC_DEPTH)+1)'(DESC_DW)) begin
          sd_state <= D_HDR;
          sd_cnt   <= '0;
        end
        D_HDR:  if (us_ready) sd_state <= D_BODY;
        D_BODY: if (us_ready) begin
          sd_cnt <= sd_cnt + 1'b1;
          if (sd_cnt == 6'(DESC_DW - 1)) sd_state <= D_IDLE;
        end
        default: sd_state <= D_IDLE;
      endcase
    end
  end

  a_ack_until_req_low: assert property (@(posedge clk) disable iff (!rst_n)
    (h2f_ack && h2f_req) |=> h2f_ack);
  a_us_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (us_valid && !us_ready) |=> us_valid);
endmodule
