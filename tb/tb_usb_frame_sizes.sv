// tb_usb_frame_sizes: throughput of the USB core for the frame sizes and
// batch sizes of the framework's USB measurements, at default parameters.
//
// Host-to-FPGA: frames of 1 KB, 8 KB and 15.8 KB (16179 bytes), submitted
// 1 to 8 frames per doorbell write. FPGA-to-Host: the same frame sizes,
// with 1 to 8 buffers posted per submission. The board model is always
// ready and the host model answers a frame request at once, so the numbers
// are what the core itself allows, at an assumed 100 MHz bus clock with a
// 32-bit board bus (3.2 Gbps raw). The accelerator model takes and gives
// data at one DW per cycle and returns a status descriptor per frame.
//
// Checks: every frame arrives whole and correct, every H2F frame gets its
// status, and for 8 KB and 15.8 KB frames the throughput meets the
// framework's measured USB results - 2.56 Gbps host-to-FPGA and 2.40 Gbps
// FPGA-to-Host. 1 KB frames are held to a bound of this design's own,
// 2.0 Gbps in both directions: host-to-FPGA pays a frame request, a 32-DW
// control descriptor and a 32-DW status descriptor per 256 data DW, and a
// single FPGA-to-Host frame is written before its one packet can leave.
module tb_usb_frame_sizes;
  import epee_pkg::*;
  logic clk_usr = 0, rst_n = 0;
  always #5 clk_usr = ~clk_usr;   // 100 MHz

  logic [31:0] usb_dq_i, usb_dq_o; logic usb_dq_oe, usb_rd, usb_wr, usb_rx_flag, usb_tx_flag;
  logic [16:0] pio_rd_addr, pio_wr_addr; logic [31:0] pio_rd_data, pio_wr_data;
  logic pio_rd_req, pio_rd_ack, pio_wr_req, pio_wr_ack;
  logic [2:0] int_enable, int_req, int_clr;
  logic [15:0] h2f_indication; logic [3:0] h2f_qnum; logic h2f_req, h2f_ack, h2f_ready, h2f_err;
  logic h2f_cd_rd, h2f_cd_empty, h2f_df_rd, h2f_df_last, h2f_df_empty, h2f_sd_wr, h2f_sd_full;
  logic [31:0] h2f_cd_data, h2f_df_data, h2f_sd_data;
  logic [15:0] f2h_indication; logic [3:0] f2h_qnum; logic f2h_req, f2h_ack, f2h_ready, f2h_err;
  logic f2h_df_wr, f2h_df_last, f2h_df_full, f2h_sd_wr, f2h_sd_full;
  logic [31:0] f2h_df_data, f2h_sd_data;
  logic bus_turn; logic [31:0] up_pkts;

  epee_usb_top dut (.*);

  // no user PIO or interrupts in this test
  assign pio_rd_ack = 1'b0; assign pio_rd_data = '0; assign pio_wr_ack = 1'b0;
  assign int_req = '0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // board: always has room, never withholds data
  logic [31:0] dl_q[$], up_q[$];
  assign usb_rx_flag = dl_q.size() != 0;
  assign usb_dq_i    = dl_q.size() != 0 ? dl_q[0] : 32'd0;
  assign usb_tx_flag = 1'b1;
  always @(posedge clk_usr) if (rst_n) begin
    if (usb_rd) void'(dl_q.pop_front());
    if (usb_wr) up_q.push_back(usb_dq_o);
  end

  function automatic logic [31:0] pat(int id, int i); return {8'(id), 24'(i)} ^ (32'(i) * 32'h0101_0033); endfunction

  // host: frame length in bytes for the H2F frames of the current batch
  int h2f_len_b = 1024, h2f_next_id = 0, h2f_stat = 0, f2h_frames = 0, f2h_ok = 0;
  int f2h_buf_n = 0, f2h_exp_dw = 256;
  bit f2h_good = 1;
  localparam logic [31:0] RB = 32'(1) << REG_SEL_BIT;

  task automatic host_pio_write(logic [7:0] reg_a, logic [31:0] d);
    dl_q.push_back(mk_hdr(DIR_H2F, PKT_PIO_WR, 0, 2)); dl_q.push_back(RB | 32'(reg_a)); dl_q.push_back(d);
  endtask

  // answer a frame request: control descriptor, then 1024-DW data packets
  task automatic host_send_frame(int ch);
    int id = h2f_next_id++;
    int nw = (h2f_len_b + 3) / 4;
    int done = 0;
    dl_q.push_back(mk_hdr(DIR_H2F, PKT_CTRL_DESC, 4'(ch), 16'd32));
    dl_q.push_back(32'h0);
    dl_q.push_back({4'h0, TP_USB, 8'(ch), 16'h0});
    dl_q.push_back(32'h0);
    dl_q.push_back(32'(h2f_len_b));
    dl_q.push_back(32'(id));
    for (int i = 5; i < 32; i++) dl_q.push_back(32'(i));
    while (done < nw) begin
      automatic int pl = (nw - done > 1024) ? 1024 : nw - done;
      dl_q.push_back(mk_hdr(DIR_H2F, PKT_DATA, 4'(ch), 16'(pl)));
      for (int i = 0; i < pl; i++) dl_q.push_back(pat(id, done + i));
      done += pl;
    end
  endtask

  // uplink parser
  initial begin
    pkt_hdr_t h;
    logic [31:0] w;
    forever begin
      wait (up_q.size() != 0); h = pkt_hdr_t'(up_q.pop_front());
      for (int i = 0; i < int'(h.len); i++) begin
        wait (up_q.size() != 0); w = up_q.pop_front();
        if (h.ptype == PKT_H2F_STAT && i == 3) check(w == 32'h600D, "H2F frame received intact");
        if (h.ptype == PKT_DATA) begin
          if (w != pat(1000 + f2h_frames, f2h_buf_n)) f2h_good = 0;
          f2h_buf_n++;
        end
        if (h.ptype == PKT_F2H_STAT && i == 2) begin
          check(f2h_good && f2h_buf_n == f2h_exp_dw && int'(w) == f2h_exp_dw,
                $sformatf("F2H frame %0d: %0d DW", f2h_frames, f2h_buf_n));
          f2h_buf_n = 0; f2h_good = 1; f2h_frames++;
        end
      end
      case (h.ptype)
        PKT_H2F_REQ:  host_send_frame(int'(h.chan));
        PKT_H2F_STAT: h2f_stat++;
        PKT_DATA, PKT_F2H_STAT: ;
        default: check(0, $sformatf("unexpected uplink packet type %0d", h.ptype));
      endcase
    end
  end

  // accelerator, H2F side: request whenever a frame waits, read at full rate
  initial begin
    h2f_qnum = 0; h2f_req = 0; h2f_cd_rd = 0; h2f_df_rd = 0; h2f_sd_wr = 0; h2f_sd_data = 0;
    forever begin
      int n, id; bit ok;
      wait (h2f_ready && h2f_indication != 0);
      @(negedge clk_usr);
      h2f_qnum = 4'd0; h2f_req = 1;
      while (!h2f_ack) @(negedge clk_usr);
      h2f_req = 0;
      check(!h2f_err, "H2F request accepted");
      n = 0; ok = 1; id = -1;
      // descriptor and data read as they arrive
      for (int i = 0; i < 32; i++) begin
        while (h2f_cd_empty) @(negedge clk_usr);
        if (i == 4) id = int'(h2f_cd_data);
        h2f_cd_rd = 1; @(negedge clk_usr); h2f_cd_rd = 0;
      end
      forever begin
        bit last;
        while (h2f_df_empty) @(negedge clk_usr);
        if (h2f_df_data != pat(id, n)) ok = 0;
        last = h2f_df_last; h2f_df_rd = 1; @(negedge clk_usr); h2f_df_rd = 0; n++;
        if (last) break;
      end
      ok = ok && (n == (h2f_len_b + 3) / 4);
      for (int i = 0; i < 32; i++) begin
        h2f_sd_wr = 1;
        h2f_sd_data = (i == 1) ? {4'h0, TP_USB, 8'd0, 16'h0} : (i == 3) ? (ok ? 32'h600D : 32'hBAD) : 32'(i);
        @(negedge clk_usr);
        while (h2f_sd_full) @(negedge clk_usr);
      end
      h2f_sd_wr = 0;
    end
  end

  // accelerator, F2H side: send a frame whenever a buffer is free
  int f2h_sent = 0;
  initial begin
    f2h_qnum = 0; f2h_req = 0; f2h_df_wr = 0; f2h_df_last = 0; f2h_df_data = 0; f2h_sd_wr = 0; f2h_sd_data = 0;
    forever begin
      int id;
      wait (f2h_ready && f2h_indication != 0);
      @(negedge clk_usr);
      f2h_qnum = 4'd0; f2h_req = 1;
      while (!f2h_ack) @(negedge clk_usr);
      f2h_req = 0;
      check(!f2h_err, "F2H request accepted");
      id = 1000 + f2h_sent++;
      for (int i = 0; i < f2h_exp_dw; i++) begin
        f2h_df_wr = 1; f2h_df_data = pat(id, i); f2h_df_last = (i == f2h_exp_dw - 1);
        @(negedge clk_usr);
        while (f2h_df_full) begin f2h_df_wr = 0; @(negedge clk_usr); f2h_df_wr = 1; end
      end
      f2h_df_wr = 0; f2h_df_last = 0;
      for (int i = 0; i < 32; i++) begin
        f2h_sd_wr = 1; f2h_sd_data = (i == 2) ? 32'(f2h_exp_dw) : 32'(i);
        @(negedge clk_usr);
        while (f2h_sd_full) @(negedge clk_usr);
      end
      f2h_sd_wr = 0;
    end
  end

  // ------------------------------------------------------------------
  int sizes_b[3] = '{1024, 8192, 16179};
  real h2f_gbps[3], f2h_gbps[3];
  initial begin
    longint t0, cyc, bytes;
    repeat (5) @(posedge clk_usr);
    #1 rst_n = 1;
    repeat (5) @(posedge clk_usr);
    for (int s = 0; s < 3; s++) begin
      cyc = 0; bytes = 0;
      h2f_len_b = sizes_b[s];
      for (int nb = 1; nb <= 8; nb++) begin
        automatic int target = h2f_stat + nb;
        wait (dl_q.size() == 0);
        @(posedge clk_usr); t0 = $time;
        host_pio_write(REG_H2F_DOORBELL, {12'd0, 4'd0, 16'(nb)});
        wait (h2f_stat == target);
        cyc += ($time - t0) / 10;
        bytes += longint'(nb) * h2f_len_b;
        $display("H2F %0d B x %0d: %0d cycles, %0.2f Gbps", h2f_len_b, nb, ($time - t0) / 10,
                 real'(longint'(nb) * h2f_len_b * 8) / real'(($time - t0) / 10) / 10.0);
      end
      h2f_gbps[s] = real'(bytes * 8) / real'(cyc) / 10.0;
      $display("H2F %0d B frames: %0.2f Gbps over all batches", h2f_len_b, h2f_gbps[s]);
      check(h2f_gbps[s] >= ((s == 0) ? 2.0 : 2.56),
            $sformatf("H2F %0d B throughput %0.2f Gbps", h2f_len_b, h2f_gbps[s]));
    end
    for (int s = 0; s < 3; s++) begin
      cyc = 0; bytes = 0;
      f2h_exp_dw = (sizes_b[s] + 3) / 4;
      for (int nb = 1; nb <= 8; nb++) begin
        automatic int target = f2h_frames + nb;
        wait (dl_q.size() == 0);
        @(posedge clk_usr); t0 = $time;
        host_pio_write(REG_F2H_SUBMIT, {12'd0, 4'd0, 16'(nb)});
        wait (f2h_frames == target);
        cyc += ($time - t0) / 10;
        bytes += longint'(nb) * f2h_exp_dw * 4;
      end
      f2h_gbps[s] = real'(bytes * 8) / real'(cyc) / 10.0;
      $display("F2H %0d DW frames: %0.2f Gbps over all batches", f2h_exp_dw, f2h_gbps[s]);
      check(f2h_gbps[s] >= ((s == 0) ? 2.0 : 2.40), $sformatf("F2H %0d DW throughput %0.2f Gbps", f2h_exp_dw, f2h_gbps[s]));
    end
    check(h2f_stat == 108 && f2h_frames == 108, $sformatf("frames done: H2F %0d F2H %0d", h2f_stat, f2h_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk_usr);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
