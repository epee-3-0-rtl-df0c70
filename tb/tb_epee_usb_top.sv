// tb_epee_usb_top: end-to-end test of the USB version of the core at its
// default parameters.
//
// A host model stands for the host software and the USB board: it drives
// the shared board bus (withholding downlink data and refusing uplink words
// at random), builds downlink packets and parses uplink packets. An
// accelerator model uses the user ports exactly as the interface
// description says. Together they run:
//   - PIO writes and reads of the library registers and of accelerator
//     registers (four-phase req/ack on both sides);
//   - Host-to-FPGA frames of random length between 1 KB and 16 KB on
//     several channels: doorbell, h2f_indication, request, frame request
//     packet, control descriptor, data in several packets, status
//     descriptor back to the host, and an H2F interrupt for each frame;
//   - FPGA-to-Host frames of random length between 1 KB and 16 KB: buffer
//     submission, request, data in packets of up to 256 DW, status
//     descriptor, and an F2H interrupt for each frame;
//   - a user-defined interrupt; refused requests on both DMA sides; a stray
//     DMA packet and a malformed packet, both counted by the core.
// Every frame's length and contents are checked at the receiving end. The
// test counts how often each mechanism happened and fails if one never did.
// A last phase streams 16 KB H2F frames with the board always ready and
// checks the bus efficiency against the document's 2.56 Gbps USB result,
// assuming the board's 32-bit bus at 100 MHz (3.2 Gbps).
module tb_epee_usb_top;
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

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------------
  // mechanism counters
  int m_turn = 0, m_tx_stall = 0, m_rx_gap = 0, m_h2f_err = 0, m_f2h_err = 0;
  int m_pio_wr_usr = 0, m_pio_rd_usr = 0, m_pio_reg_rd = 0, m_int[3] = '{0, 0, 0};
  int m_h2f_multi = 0, m_f2h_multi = 0, m_rx_burst = 0;
  int h2f_done = 0, f2h_done = 0;

  // ------------------------------------------------------------------
  // board bus model
  logic [31:0] dl_q[$], up_q[$];
  bit hold_rx = 0, tx_ok = 1, board_fast = 0;
  always @(negedge clk_usr) begin
    hold_rx <= !board_fast && ($urandom_range(0, 15) == 0);
    tx_ok   <= board_fast || ($urandom_range(0, 7) != 0);
  end
  assign usb_rx_flag = (dl_q.size() != 0) && !hold_rx;
  assign usb_dq_i    = (dl_q.size() != 0) ? dl_q[0] : 32'd0;
  assign usb_tx_flag = tx_ok;
  int rd_run = 0;
  always @(posedge clk_usr) if (rst_n) begin
    check(!(usb_rd && usb_wr), "bus never reads and writes at once");
    if (usb_wr && !usb_dq_oe) check(0, "write without driving the bus");
    if (usb_rd && usb_dq_oe) check(0, "read while driving the bus");
    if (usb_rd) void'(dl_q.pop_front());
    if (usb_wr) up_q.push_back(usb_dq_o);
    if (bus_turn) m_turn++;
    if (usb_dq_oe && !usb_tx_flag) m_tx_stall++;
    if (hold_rx && dl_q.size() != 0) m_rx_gap++;
    // reads since the bus last turned to the downlink; a turn away from the
    // downlink while the board still has data must come after 256 reads
    if (usb_dq_oe) rd_run = 0;
    else if (usb_rd) rd_run++;
    if (bus_turn && !usb_dq_oe && usb_rx_flag) begin
      check(rd_run >= 256, $sformatf("downlink left with data after %0d reads", rd_run));
      m_rx_burst++;
    end
  end

  // ------------------------------------------------------------------
  // data patterns
  function automatic logic [31:0] h2f_word(int id, int i); return {8'hA5 ^ 8'(id), 8'(id), 16'(i)} ^ (32'(i) << 13); endfunction
  function automatic logic [31:0] f2h_word(int id, int i); return {8'h3C ^ 8'(id), 8'(id), 16'(i)} ^ (32'(i) * 32'h9E37); endfunction

  // ------------------------------------------------------------------
  // host model
  int  h2f_q[16][$];           // frame ids waiting per channel
  int  h2f_len_b[int];         // frame length in bytes, by id
  int  h2f_sent[16][$];        // frames sent to the FPGA, awaiting status
  int  h2f_next_id = 1;
  logic [31:0] rd_results[$];
  int  int_seen[$];

  task automatic host_push(logic [31:0] w[$]);
    foreach (w[i]) dl_q.push_back(w[i]);
  endtask
  task automatic host_pio_write(logic [31:0] a, logic [31:0] d);
    dl_q.push_back(mk_hdr(DIR_H2F, PKT_PIO_WR, 0, 2)); dl_q.push_back(a); dl_q.push_back(d);
  endtask
  task automatic host_pio_read(logic [31:0] a, output logic [31:0] d);
    int n = rd_results.size();
    dl_q.push_back(mk_hdr(DIR_H2F, PKT_PIO_RD, 0, 1)); dl_q.push_back(a);
    wait (rd_results.size() > n);
    d = rd_results.pop_front();
  endtask
  localparam logic [31:0] RB = 32'(1) << REG_SEL_BIT;
  function automatic logic [31:0] R(logic [7:0] a); return RB | 32'(a); endfunction   // library register space

  // host queues a frame on a channel and rings the doorbell
  task automatic host_submit_h2f(int ch, int len_b);
    int id = h2f_next_id++;
    h2f_len_b[id] = len_b;
    h2f_q[ch].push_back(id);
    host_pio_write(R(REG_H2F_DOORBELL), {12'd0, 4'(ch), 16'd1});
  endtask

  // sends the next frame of a channel: descriptor, then data in packets
  task automatic host_send_frame(int ch);
    int id, nw, done, pl;
    logic [31:0] w[$];
    check(h2f_q[ch].size() != 0, "frame requested on a channel with a frame queued");
    if (h2f_q[ch].size() == 0) return;
    id = h2f_q[ch].pop_front();
    nw = (h2f_len_b[id] + 3) / 4;
    w.push_back(mk_hdr(DIR_H2F, PKT_CTRL_DESC, 4'(ch), 16'd32));
    w.push_back(32'h0);                                  // FRAME_ADDR, unused on USB
    w.push_back({4'h0, TP_USB, 8'(ch), 16'h0});          // TP, QN
    w.push_back(32'h0);                                  // NEXT_DESC_ADDR, unused on USB
    w.push_back(32'(h2f_len_b[id]));                     // LEN in bytes
    w.push_back(32'(id));                                // user field: frame id
    for (int i = 5; i < 32; i++) w.push_back(32'(id) ^ 32'(i << 24));
    done = 0;
    while (done < nw) begin
      pl = $urandom_range(64, 1024);
      if (pl > nw - done) pl = nw - done;
      w.push_back(mk_hdr(DIR_H2F, PKT_DATA, 4'(ch), 16'(pl)));
      for (int i = 0; i < pl; i++) w.push_back(h2f_word(id, done + i));
      done += pl;
    end
    h2f_sent[ch].push_back(id);
    host_push(w);
  endtask

  // uplink parser
  logic [31:0] f2h_buf[16][$];
  int f2h_pkts[16] = '{default: 0};
  task automatic up_get(output logic [31:0] w);
    wait (up_q.size() != 0);
    w = up_q.pop_front();
  endtask
  initial begin
    pkt_hdr_t h;
    logic [31:0] w, sd[32];
    forever begin
      up_get(w);
      h = pkt_hdr_t'(w);
      check(h.dir == DIR_F2H, "uplink packet direction");
      case (h.ptype)
        PKT_H2F_REQ: begin
          check(h.len == 0, "frame request has no payload");
          host_send_frame(int'(h.chan));
        end
        PKT_H2F_STAT: begin
          int id;
          check(h.len == 32, "H2F status length");
          for (int i = 0; i < 32; i++) up_get(sd[i]);
          check(h2f_sent[h.chan].size() != 0, "status for a frame that was sent");
          if (h2f_sent[h.chan].size() != 0) begin
            id = h2f_sent[h.chan].pop_front();
            check(sd[0] == 32'(id), $sformatf("H2F status names frame %0d (got %0d)", id, sd[0]));
            check(sd[2] == 32'((h2f_len_b[id] + 3) / 4), "H2F status word count");
            check(sd[3] == 32'h600D, "accelerator saw correct data");
            h2f_done++;
          end
        end
        PKT_DATA: begin
          for (int i = 0; i < h.len; i++) begin up_get(w); f2h_buf[h.chan].push_back(w); end
          f2h_pkts[h.chan]++;
        end
        PKT_F2H_STAT: begin
          int id, n; bit ok;
          for (int i = 0; i < 32; i++) up_get(sd[i]);
          id = int'(sd[0]); n = int'(sd[2]);
          check(f2h_buf[h.chan].size() == n, $sformatf("F2H frame %0d length %0d exp %0d", id, f2h_buf[h.chan].size(), n));
          ok = 1;
          foreach (f2h_buf[h.chan][i]) if (f2h_buf[h.chan][i] != f2h_word(id, i)) ok = 0;
          check(ok, $sformatf("F2H frame %0d contents", id));
          check(f2h_pkts[h.chan] == (n + 255) / 256, "F2H frame split into packets of at most 256 DW");
          if (f2h_pkts[h.chan] > 1) m_f2h_multi++;
          f2h_buf[h.chan].delete();
          f2h_pkts[h.chan] = 0;
          f2h_done++;
        end
        PKT_PIO_RD: begin
          check(h.len == 1, "read completion length");
          up_get(w);
          rd_results.push_back(w);
        end
        PKT_INTR: begin
          check(h.len == 0 && h.chan < 3, "interrupt packet");
          m_int[h.chan[1:0]]++;
          // the host's interrupt handler clears it
          host_pio_write(R(REG_INT_CLR), 32'(1) << h.chan);
        end
        default: check(0, $sformatf("unexpected uplink packet %h", w));
      endcase
    end
  end

  // ------------------------------------------------------------------
  // accelerator model: PIO registers
  logic [31:0] usr_regs[int];
  initial begin
    pio_wr_ack = 0;
    forever begin
      @(posedge clk_usr);
      if (pio_wr_req && !pio_wr_ack) begin
        repeat ($urandom_range(0, 5)) @(posedge clk_usr);
        usr_regs[int'(pio_wr_addr)] = pio_wr_data;
        m_pio_wr_usr++;
        #1 pio_wr_ack = 1;
        while (pio_wr_req) @(posedge clk_usr);
        #1 pio_wr_ack = 0;
      end
    end
  end
  initial begin
    pio_rd_ack = 0; pio_rd_data = 0;
    forever begin
      @(posedge clk_usr);
      if (pio_rd_req && !pio_rd_ack) begin
        repeat ($urandom_range(0, 5)) @(posedge clk_usr);
        pio_rd_data = usr_regs.exists(int'(pio_rd_addr)) ? usr_regs[int'(pio_rd_addr)] : 32'hDEAD_0000;
        m_pio_rd_usr++;
        #1 pio_rd_ack = 1;
        while (pio_rd_req) @(posedge clk_usr);
        #1 pio_rd_ack = 0;
      end
    end
  end

  // accelerator interrupt requests, one req/ack cycle at a time per source
  task automatic acc_interrupt(int t);
    wait (int_clr[t] == 0);
    @(negedge clk_usr); int_req[t] = 1;
    wait (int_clr[t] == 1);
    @(negedge clk_usr); int_req[t] = 0;
  endtask

  // ------------------------------------------------------------------
  // accelerator model: H2F side, following steps (2)-(9)
  bit h2f_run = 0, acc_h2f_try_empty = 0;
  task automatic acc_h2f_frame(int ch);
    logic [31:0] d[32];
    int n; bit ok;
    // (6) control descriptor
    for (int i = 0; i < 32; i++) begin
      while (h2f_cd_empty) @(negedge clk_usr);
      d[i] = h2f_cd_data; h2f_cd_rd = 1; @(negedge clk_usr); h2f_cd_rd = 0;
    end
    check(d[1][23:16] == 8'(ch) && d[1][27:24] == TP_USB, "descriptor TP and QN");
    // (7) data frame
    n = 0; ok = 1;
    forever begin
      bit last;
      while (h2f_df_empty) @(negedge clk_usr);
      if (h2f_df_data != h2f_word(int'(d[4]), n)) ok = 0;
      last = h2f_df_last;
      h2f_df_rd = ($urandom_range(0, 7) != 0);
      @(negedge clk_usr);
      if (h2f_df_rd) begin n++; h2f_df_rd = 0; if (last) break; end
    end
    check(n == (int'(d[3]) + 3) / 4, $sformatf("H2F frame length %0d DW for %0d bytes", n, d[3]));
    if (n > 1024) m_h2f_multi++;
    // (8) status descriptor
    for (int i = 0; i < 32; i++) begin
      while (h2f_sd_full) @(negedge clk_usr);
      h2f_sd_wr = 1;
      h2f_sd_data = (i == 0) ? d[4] : (i == 1) ? d[1] : (i == 2) ? 32'(n) : (i == 3) ? (ok ? 32'h600D : 32'hBAD) : 32'(i);
      @(negedge clk_usr);
    end
    h2f_sd_wr = 0;
  endtask

  initial begin
    h2f_qnum = 0; h2f_req = 0; h2f_cd_rd = 0; h2f_df_rd = 0; h2f_sd_wr = 0; h2f_sd_data = 0;
    wait (h2f_run);
    forever begin
      int ch;
      // (2) wait for ready, (3) pick the highest-priority channel (lowest number)
      wait (h2f_ready && (h2f_indication != 0 || acc_h2f_try_empty));
      @(negedge clk_usr);
      ch = -1;
      for (int c = 15; c >= 0; c--) if (h2f_indication[c]) ch = c;
      if (acc_h2f_try_empty) begin
        // ask for a channel that has nothing: must be refused
        for (int c = 0; c < 16; c++) if (!h2f_indication[c]) begin ch = c; break; end
      end
      if (ch < 0) continue;
      // (4) request
      h2f_qnum = 4'(ch); h2f_req = 1;
      // (5) ack, error check
      while (!h2f_ack) @(negedge clk_usr);
      h2f_req = 0;
      if (h2f_err) begin
        check(acc_h2f_try_empty, "refused only when asking for an empty channel");
        m_h2f_err++; acc_h2f_try_empty = 0;
        while (h2f_ack) @(negedge clk_usr);
        continue;
      end
      check(!acc_h2f_try_empty, "request on an empty channel refused");
      while (h2f_ack) @(negedge clk_usr);
      acc_h2f_frame(ch);
      // (9) interrupt the host
      acc_interrupt(int'(INT_H2F));
    end
  end

  // accelerator model: F2H side
  int f2h_to_send = 0, f2h_next_id = 100, f2h_min_dw = 256, f2h_max_dw = 4096;
  bit acc_f2h_try_empty = 0;
  initial begin
    f2h_qnum = 0; f2h_req = 0; f2h_df_wr = 0; f2h_df_last = 0; f2h_df_data = 0; f2h_sd_wr = 0; f2h_sd_data = 0;
    forever begin
      int ch, id, n;
      wait (f2h_ready && ((f2h_to_send > 0 && f2h_indication != 0) || acc_f2h_try_empty));
      @(negedge clk_usr);
      ch = -1;
      for (int c = 15; c >= 0; c--) if (f2h_indication[c]) ch = c;
      if (acc_f2h_try_empty)
        for (int c = 0; c < 16; c++) if (!f2h_indication[c]) begin ch = c; break; end
      f2h_qnum = 4'(ch); f2h_req = 1;
      while (!f2h_ack) @(negedge clk_usr);
      f2h_req = 0;
      if (f2h_err) begin
        check(acc_f2h_try_empty, "F2H refused only for a channel with no buffer");
        m_f2h_err++; acc_f2h_try_empty = 0;
        while (f2h_ack) @(negedge clk_usr);
        continue;
      end
      while (f2h_ack) @(negedge clk_usr);
      id = f2h_next_id++;
      n = $urandom_range(f2h_min_dw, f2h_max_dw);
      for (int i = 0; i < n; i++) begin
        f2h_df_wr = 1; f2h_df_data = f2h_word(id, i); f2h_df_last = (i == n - 1);
        @(negedge clk_usr);
        while (f2h_df_full) begin f2h_df_wr = 0; @(negedge clk_usr); f2h_df_wr = 1; end
      end
      f2h_df_wr = 0; f2h_df_last = 0;
      for (int i = 0; i < 32; i++) begin
        f2h_sd_wr = 1; f2h_sd_data = (i == 0) ? 32'(id) : (i == 1) ? {4'h0, TP_USB, 8'(ch), 16'h0} : (i == 2) ? 32'(n) : 32'(i);
        @(negedge clk_usr);
      end
      f2h_sd_wr = 0;
      f2h_to_send--;
      acc_interrupt(int'(INT_F2H));
    end
  end

  // ------------------------------------------------------------------
  // test sequence
  logic [31:0] rv;
  longint t0, t1, rd0, rd1;
  initial begin
    int_req = 0;
    repeat (5) @(posedge clk_usr);
    #1 rst_n = 1;
    repeat (5) @(posedge clk_usr);

    // library registers and interrupt enables
    host_pio_read(R(REG_ID), rv);      m_pio_reg_rd++;
    check(rv == {TP_USB, VERSION}, "identification register");
    host_pio_write(R(REG_SCRATCH), 32'h1357_9BDF);
    host_pio_read(R(REG_SCRATCH), rv); m_pio_reg_rd++;
    check(rv == 32'h1357_9BDF, "scratch register");
    host_pio_write(R(REG_INT_EN), 32'd7);
    host_pio_read(R(REG_INT_EN), rv);  m_pio_reg_rd++;
    check(rv == 32'd7 && int_enable == 3'b111, "interrupts enabled");

    // (1) initial configuration through PIO: accelerator registers
    for (int i = 0; i < 8; i++) host_pio_write(32'h100 + i, 32'hC0DE_0000 + i);
    for (int i = 0; i < 8; i++) begin
      host_pio_read(32'h100 + i, rv);
      check(rv == 32'hC0DE_0000 + i, $sformatf("accelerator register %0d", i));
    end

    // refused requests
    acc_f2h_try_empty = 1;
    wait (!acc_f2h_try_empty);
    h2f_run = 1; acc_h2f_try_empty = 1;
    wait (!acc_h2f_try_empty);

    // stray DMA data packet (no H2F frame in flight) and a malformed packet
    host_push('{mk_hdr(DIR_H2F, PKT_DATA, 4'd15, 16'd3), 32'd1, 32'd2, 32'd3});
    host_push('{mk_hdr(DIR_F2H, PKT_INTR, 4'd0, 16'd2), 32'd1, 32'd2});
    host_pio_read(R(REG_ERR_CNT), rv); m_pio_reg_rd++;
    check(rv == {16'd1, 16'd1}, $sformatf("error counters %h", rv));

    // H2F frames, 1 KB to 16 KB, on several channels; F2H frames meanwhile
    host_pio_write(R(REG_F2H_SUBMIT), {12'd0, 4'd2, 16'd3});
    host_pio_write(R(REG_F2H_SUBMIT), {12'd0, 4'd9, 16'd3});
    f2h_to_send = 6;
    for (int k = 0; k < 12; k++) begin
      host_submit_h2f($urandom_range(0, 3) * 4 + 1, $urandom_range(1024, 16384));
      if (k % 4 == 3) begin
        host_pio_read(32'h200 + k, rv);
        check(rv == 32'hDEAD_0000, "read of an unwritten accelerator register during DMA");
      end
    end
    fork
      acc_interrupt(int'(INT_UDF));
    join_none
    wait (h2f_done == 12 && f2h_done == 6);
    repeat (200) @(posedge clk_usr);
    check(m_int[INT_UDF] == 1, "user-defined interrupt delivered once");
    check(m_int[INT_H2F] == 12 && m_int[INT_F2H] == 6, $sformatf("interrupt counts %0d %0d", m_int[INT_H2F], m_int[INT_F2H]));
    host_pio_read(R(REG_INT_PEND), rv); m_pio_reg_rd++;
    check(rv == 0, "no interrupt left pending");
    host_pio_read(R(REG_H2F_IND), rv); m_pio_reg_rd++;
    check(rv == 0, "no H2F frame left");
    host_pio_read(R(REG_F2H_IND), rv); m_pio_reg_rd++;
    check(rv == 0, "all F2H buffers used");

    // throughput: H2F 16 KB frames, board always ready
    board_fast = 1;
    repeat (20) @(posedge clk_usr);
    for (int k = 0; k < 4; k++) host_submit_h2f(0, 16384);
    t0 = $time; rd0 = 0;
    fork
      begin : count_rd
        forever begin @(posedge clk_usr); if (usb_rd) rd0++; end
      end
    join_none
    wait (h2f_done == 16);
    t1 = $time;
    disable fork;
    begin
      real cycles, gbps;
      cycles = real'(t1 - t0) / 10.0;
      gbps = real'(4 * 16384 * 8) / (cycles * 10.0);
      $display("H2F 16 KB frames: %0d cycles, %0d bus reads, %.2f Gbps at 100 MHz", longint'(cycles), rd0, gbps);
      check(gbps >= 2.56, $sformatf("H2F throughput %.2f Gbps below the document's 2.56 Gbps", gbps));
    end

    // both directions at once with the board always ready: the downlink
    // must yield to the uplink after a long burst
    host_pio_write(R(REG_F2H_SUBMIT), {12'd0, 4'd4, 16'd2});
    f2h_to_send = 2; f2h_min_dw = 4096; f2h_max_dw = 4096;
    for (int k = 0; k < 2; k++) host_submit_h2f(1, 16384);
    wait (h2f_done == 18 && f2h_done == 8);
    repeat (200) @(posedge clk_usr);

    // mechanisms
    $display("mechanisms: turns=%0d tx_stall=%0d rx_gap=%0d rx_burst_yield=%0d h2f_err=%0d f2h_err=%0d",
             m_turn, m_tx_stall, m_rx_gap, m_rx_burst, m_h2f_err, m_f2h_err);
    $display("            pio_wr_usr=%0d pio_rd_usr=%0d pio_reg_rd=%0d int=%0d/%0d/%0d h2f_multi=%0d f2h_multi=%0d h2f=%0d f2h=%0d",
             m_pio_wr_usr, m_pio_rd_usr, m_pio_reg_rd, m_int[0], m_int[1], m_int[2], m_h2f_multi, m_f2h_multi, h2f_done, f2h_done);
    check(m_turn > 0, "bus turnaround happened");
    check(m_tx_stall > 0, "board refused uplink words");
    check(m_rx_gap > 0, "board withheld downlink words");
    check(m_rx_burst > 0, "long downlink burst yielded to the uplink");
    check(m_h2f_err > 0 && m_f2h_err > 0, "refused requests on both sides");
    check(m_pio_wr_usr > 0 && m_pio_rd_usr > 0 && m_pio_reg_rd > 0, "PIO to both spaces");
    check(m_h2f_multi > 0 && m_f2h_multi > 0, "frames spanning several packets both ways");
    check(up_pkts > 0, "uplink packet counter runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk_usr);
    failures++;
    $display("watchdog timeout: h2f_done=%0d f2h_done=%0d", h2f_done, f2h_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
