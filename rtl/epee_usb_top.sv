// epee_usb_top: FPGA side of the EPEE host-FPGA communication core, USB
// version. It turns one shared USB board bus into three services for the
// accelerator - PIO register access, frame-oriented DMA in both directions
// on 16 priority channels, and interrupts - behind the same signals a PCIe
// version would present.
//
// Structure (after the document's USB hardware figure):
//   board bus <-> usb_trans_control  (shares the bus between directions)
//   downlink  ->  usb_rx_engine -> dma_ds_selector -> dma_h2b_engine
//                               -> pio_wr_logic -> epee_reg_file / user PIO
//                               -> pio_rd_logic -> epee_reg_file / user PIO
//   uplink    <-  usb_tx_engine <- intr_intf
//                               <- pio_rd_logic (read completions)
//                               <- dma_us_selector <- dma_h2b_engine, dma_b2h_engine
// The register file also carries the DMA doorbells and interrupt enables
// and clears. The user ports are those of the document's interface table
// (PIO, INTR, H2F DMA with its three FIFOs) plus the matching F2H DMA
// ports. Everything, the board bus included, runs on clk_usr; one clock
// for the whole core is this design's choice.
module epee_usb_top
  import epee_pkg::*;
#(
  parameter int unsigned RX_BURST    = 256,
  parameter int unsigned DATA_DEPTH  = 1024,
  parameter int unsigned DESC_DEPTH  = 64,
  parameter int unsigned MAX_PKT_DW  = 256
) (
  input  logic        clk_usr,
  input  logic        rst_n,
  // USB board bus
  input  logic [31:0] usb_dq_i,
  output logic [31:0] usb_dq_o,
  output logic        usb_dq_oe,
  output logic        usb_rd,
  output logic        usb_wr,
  input  logic        usb_rx_flag,
  input  logic        usb_tx_flag,
  // PIO read
  output logic [16:0] pio_rd_addr,
  input  logic [31:0] pio_rd_data,
  output logic        pio_rd_req,
  input  logic        pio_rd_ack,
  // PIO write
  output logic [16:0] pio_wr_addr,
  output logic [31:0] pio_wr_data,
  output logic        pio_wr_req,
  input  logic        pio_wr_ack,
  // INTR: [0] H2F, [1] F2H, [2] user defined
  output logic [2:0]  int_enable,
  input  logic [2:0]  int_req,
  output logic [2:0]  int_clr,
  // H2F DMA
  output logic [15:0] h2f_indication,
  input  logic [3:0]  h2f_qnum,
  input  logic        h2f_req,
  output logic        h2f_ack,
  output logic        h2f_ready,
  output logic        h2f_err,
  input  logic        h2f_cd_rd,
  output logic [31:0] h2f_cd_data,
  output logic        h2f_cd_empty,
  input  logic        h2f_df_rd,
  output logic [31:0] h2f_df_data,
  output logic        h2f_df_last,
  output logic        h2f_df_empty,
  input  logic        h2f_sd_wr,
  input  logic [31:0] h2f_sd_data,
  output logic        h2f_sd_full,
  // F2H DMA
  output logic [15:0] f2h_indication,
  input  logic [3:0]  f2h_qnum,
  input  logic        f2h_req,
  output logic        f2h_ack,
  output logic        f2h_ready,
  output logic        f2h_err,
  input  logic        f2h_df_wr,
  input  logic [31:0] f2h_df_data,
  input  logic        f2h_df_last,
  output logic        f2h_df_full,
  input  logic        f2h_sd_wr,
  input  logic [31:0] f2h_sd_data,
  output logic        f2h_sd_full,
  // observation
  output logic        bus_turn,
  output logic [31:0] up_pkts
);

  // ---- bus sharing ----
  logic        rx_valid, rx_ready;
  logic [31:0] rx_data;
  logic        tx_valid, tx_ready, tx_last;
  logic [31:0] tx_data;

  usb_trans_control #(.RX_BURST(RX_BURST)) u_trans_control (
    .clk(clk_usr), .rst_n,
    .usb_dq_i, .usb_dq_o, .usb_dq_oe, .usb_rd, .usb_wr, .usb_rx_flag, .usb_tx_flag,
    .rx_valid, .rx_ready, .rx_data,
    .tx_valid, .tx_ready, .tx_data, .tx_last,
    .turn(bus_turn));

  // ---- downlink ----
  logic        ds_valid, ds_ready, ds_last;
  logic [31:0] ds_data;
  pkt_hdr_t    ds_hdr;
  logic        pwr_valid, pwr_ready, prd_valid, prd_ready;
  logic [31:0] pwr_addr, pwr_data, prd_addr;
  logic [15:0] bad_cnt, drop_cnt;

  usb_rx_engine u_rx_engine (
    .clk(clk_usr), .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .ds_valid, .ds_ready, .ds_data, .ds_hdr, .ds_last,
    .pwr_valid, .pwr_ready, .pwr_addr, .pwr_data,
    .prd_valid, .prd_ready, .prd_addr,
    .bad_cnt);

  logic        want_desc, want_data;
  logic [3:0]  want_chan;
  logic        desc_valid, desc_ready, data_valid, data_ready;
  logic [31:0] desc_data, data_data;

  dma_ds_selector u_ds_selector (
    .clk(clk_usr), .rst_n,
    .in_valid(ds_valid), .in_ready(ds_ready), .in_data(ds_data), .in_hdr(ds_hdr), .in_last(ds_last),
    .want_desc, .want_data, .want_chan,
    .desc_valid, .desc_ready, .desc_data,
    .data_valid, .data_ready, .data_data,
    .drop_cnt);

  // ---- PIO and register file ----
  logic        rf_we;
  logic [7:0]  rf_waddr, rf_raddr;
  logic [31:0] rf_wdata, rf_rdata;
  logic [2:0]  int_en, int_clr_pulse, int_pend;
  logic        h2f_db_valid, f2h_sub_valid;
  logic [3:0]  db_chan;
  logic [15:0] db_count;

  pio_wr_logic u_pio_wr (
    .clk(clk_usr), .rst_n,
    .req_valid(pwr_valid), .req_ready(pwr_ready), .req_addr(pwr_addr), .req_data(pwr_data),
    .rf_we, .rf_addr(rf_waddr), .rf_wdata,
    .pio_wr_addr, .pio_wr_data, .pio_wr_req, .pio_wr_ack);

  logic        cpl_valid, cpl_ready, cpl_last;
  logic [31:0] cpl_data;

  pio_rd_logic u_pio_rd (
    .clk(clk_usr), .rst_n,
    .req_valid(prd_valid), .req_ready(prd_ready), .req_addr(prd_addr),
    .rf_addr(rf_raddr), .rf_rdata,
    .pio_rd_addr, .pio_rd_req, .pio_rd_ack, .pio_rd_data,
    .cpl_valid, .cpl_ready, .cpl_data, .cpl_last);

  epee_reg_file #(.TP(TP_USB)) u_reg_file (
    .clk(clk_usr), .rst_n,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata),
    .int_en, .int_clr(int_clr_pulse), .int_pend,
    .h2f_db_valid, .f2h_sub_valid, .db_chan, .db_count,
    .h2f_ind(h2f_indication), .f2h_ind(f2h_indication),
    .bad_cnt, .drop_cnt);

  // ---- interrupts ----
  logic        int_valid, int_ready, int_last;
  logic [31:0] int_data;

  intr_intf u_intr (
    .clk(clk_usr), .rst_n,
    .int_req, .int_enable, .int_clr,
    .en(int_en), .clr_pulse(int_clr_pulse), .pend(int_pend),
    .us_valid(int_valid), .us_ready(int_ready), .us_data(int_data), .us_last(int_last));

  // ---- DMA engines ----
  logic        h2b_us_valid, h2b_us_ready, h2b_us_last;
  logic [31:0] h2b_us_data;
  logic        b2h_us_valid, b2h_us_ready, b2h_us_last;
  logic [31:0] b2h_us_data;

  dma_h2b_engine #(.DATA_DEPTH(DATA_DEPTH), .DESC_DEPTH(DESC_DEPTH)) u_h2b (
    .clk(clk_usr), .rst_n,
    .db_valid(h2f_db_valid), .db_chan, .db_count,
    .h2f_indication, .h2f_qnum, .h2f_req, .h2f_ack, .h2f_ready, .h2f_err,
    .h2f_cd_rd, .h2f_cd_data, .h2f_cd_empty,
    .h2f_df_rd, .h2f_df_data, .h2f_df_last, .h2f_df_empty,
    .h2f_sd_wr, .h2f_sd_data, .h2f_sd_full,
    .want_desc, .want_data, .want_chan,
    .desc_valid, .desc_ready, .desc_data,
    .data_valid, .data_ready, .data_data,
    .us_valid(h2b_us_valid), .us_ready(h2b_us_ready), .us_data(h2b_us_data), .us_last(h2b_us_last));

  dma_b2h_engine #(.DATA_DEPTH(DATA_DEPTH), .DESC_DEPTH(DESC_DEPTH), .MAX_PKT_DW(MAX_PKT_DW)) u_b2h (
    .clk(clk_usr), .rst_n,
    .sub_valid(f2h_sub_valid), .sub_chan(db_chan), .sub_count(db_count),
    .f2h_indication, .f2h_qnum, .f2h_req, .f2h_ack, .f2h_ready, .f2h_err,
    .f2h_df_wr, .f2h_df_data, .f2h_df_last, .f2h_df_full,
    .f2h_sd_wr, .f2h_sd_data, .f2h_sd_full,
    .us_valid(b2h_us_valid), .us_ready(b2h_us_ready), .us_data(b2h_us_data), .us_last(b2h_us_last));

  logic        dma_valid, dma_ready, dma_last;
  logic [31:0] dma_data;

  dma_us_selector u_us_selector (
    .clk(clk_usr), .rst_n,
    .a_valid(h2b_us_valid), .a_ready(h2b_us_ready), .a_data(h2b_us_data), .a_last(h2b_us_last),
    .b_valid(b2h_us_valid), .b_ready(b2h_us_ready), .b_data(b2h_us_data), .b_last(b2h_us_last),
    .out_valid(dma_valid), .out_ready(dma_ready), .out_data(dma_data), .out_last(dma_last));

  // ---- uplink ----
  logic [2:0]  up_valid, up_ready, up_last;
  logic [31:0] up_data [3];

  assign up_valid   = {dma_valid, cpl_valid, int_valid};
  assign up_last    = {dma_last, cpl_last, int_last};
  assign up_data[0] = int_data;
  assign up_data[1] = cpl_data;
  assign up_data[2] = dma_data;
  assign int_ready  = up_ready[0];
  assign cpl_ready  = up_ready[1];
  assign dma_ready  = up_ready[2];

  usb_tx_engine u_tx_engine (
    .clk(clk_usr), .rst_n,
    .in_valid(up_valid), .in_ready(up_ready), .in_data(up_data), .in_last(up_last),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data), .out_last(tx_last),
    .pkt_cnt(up_pkts));

endmodule
