// tb_dma_b2h_engine: self-checking test of the FPGA-to-Host DMA engine.
// The host submits buffers; the accelerator requests a channel, writes a
// frame and a 32 DW status descriptor. The test checks a refused request,
// the buffer counts per channel, the split of a frame into packets of at
// most MAX_PKT_DW (including a frame longer than the data FIFO, written
// while the engine drains it), every header and word, and the status
// descriptor packet that closes each frame. A last phase holds the uplink
// and issues requests back to back: four are accepted while nothing can
// leave, the fifth must wait (f2h_ready low), and all frames then come out
// in request order on their own channels.
module tb_dma_b2h_engine;
  import epee_pkg::*;
  localparam int MAXP = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sub_valid; logic [3:0] sub_chan; logic [15:0] sub_count;
  logic [15:0] f2h_indication; logic [3:0] f2h_qnum;
  logic f2h_req, f2h_ack, f2h_ready, f2h_err;
  logic f2h_df_wr, f2h_df_last, f2h_df_full; logic [31:0] f2h_df_data;
  logic f2h_sd_wr, f2h_sd_full; logic [31:0] f2h_sd_data;
  logic us_valid, us_ready, us_last; logic [31:0] us_data;

  dma_b2h_engine #(.DATA_DEPTH(32), .DESC_DEPTH(64), .MAX_PKT_DW(MAXP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] up[$]; bit up_last[$];
  bit hold_up = 0;
  always @(negedge clk) us_ready <= !hold_up && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && us_valid && us_ready) begin up.push_back(us_data); up_last.push_back(us_last); end

  task automatic submit(int ch, int n);
    @(negedge clk); sub_valid = 1; sub_chan = 4'(ch); sub_count = 16'(n);
    @(negedge clk); sub_valid = 0;
  endtask
  task automatic request(int ch, output bit err);
    wait (f2h_ready); @(negedge clk);
    f2h_qnum = 4'(ch); f2h_req = 1;
    while (!f2h_ack) @(negedge clk);
    err = f2h_err; f2h_req = 0;
    while (f2h_ack) @(negedge clk);
  endtask
  task automatic write_frame(int n, int base);
    for (int i = 0; i < n; i++) begin
      f2h_df_wr = 1; f2h_df_data = base + i; f2h_df_last = (i == n - 1);
      @(posedge clk); while (f2h_df_full) @(posedge clk);
      #1 f2h_df_wr = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    f2h_df_last = 0;
  endtask
  task automatic write_status(int base);
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      f2h_sd_wr = 1; f2h_sd_data = base + i;
      @(posedge clk); while (f2h_sd_full) @(posedge clk);
      @(negedge clk);
    end
    f2h_sd_wr = 0;
  endtask
  // checks the packets of one frame and its status, starting at up[pos]
  task automatic check_frame(int ch, int n, int base, int sbase, inout int pos);
    int done = 0;
    while (done < n) begin
      int len = (n - done < MAXP) ? n - done : MAXP;
      check(up[pos] == mk_hdr(DIR_F2H, PKT_DATA, 4'(ch), 16'(len)), $sformatf("data header at %0d: %h", pos, up[pos]));
      pos++;
      for (int i = 0; i < len; i++) begin
        check(up[pos] == base + done + i && up_last[pos] == (i == len - 1), $sformatf("data word %0d", done + i));
        pos++;
      end
      done += len;
    end
    check(up[pos] == mk_hdr(DIR_F2H, PKT_F2H_STAT, 4'(ch), 16'd32), "status header");
    pos++;
    for (int i = 0; i < 32; i++) begin
      check(up[pos] == sbase + i && up_last[pos] == (i == 31), "status word");
      pos++;
    end
  endtask

  function automatic int pkt_words(int n);
    return n + (n + MAXP - 1) / MAXP + 33;
  endfunction

  bit err;
  int pos = 0, total = 0;
  initial begin
    sub_valid = 0; sub_chan = 0; sub_count = 0; f2h_qnum = 0; f2h_req = 0;
    f2h_df_wr = 0; f2h_df_data = 0; f2h_df_last = 0; f2h_sd_wr = 0; f2h_sd_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    request(2, err);
    check(err, "request with no buffer is refused");
    submit(2, 1); submit(9, 2);
    @(negedge clk);
    check(f2h_indication == 16'h0204, $sformatf("indication %h", f2h_indication));
    // short frame
    request(9, err);
    check(!err && f2h_indication == 16'h0204, "request on channel 9");
    write_frame(5, 32'hA00);
    write_status(32'h5A00);
    total += pkt_words(5);
    wait (up.size() == total);
    check_frame(9, 5, 32'hA00, 32'h5A00, pos);
    // frame longer than the data FIFO
    request(2, err);
    check(!err && f2h_indication == 16'h0200, "request on channel 2");
    write_frame(70, 32'hB000);
    write_status(32'h5B00);
    total += pkt_words(70);
    wait (up.size() == total);
    check_frame(2, 70, 32'hB000, 32'h5B00, pos);
    // frame of exactly one packet
    request(9, err);
    check(!err && f2h_indication == 16'h0000, "request on channel 9 again");
    write_frame(MAXP, 32'hC000);
    write_status(32'h5C00);
    total += pkt_words(MAXP);
    wait (up.size() == total);
    check_frame(9, MAXP, 32'hC000, 32'h5C00, pos);
    // back-to-back requests while the uplink is held
    hold_up = 1;
    submit(3, 3); submit(4, 3);
    for (int k = 0; k < 4; k++) begin
      request((k % 2 != 0) ? 4 : 3, err);
      check(!err, $sformatf("queued request %0d accepted", k));
    end
    write_frame(6, 32'hD000);
    repeat (5) @(negedge clk);
    check(!f2h_ready && up.size() == total, "fifth request waits while four are outstanding");
    hold_up = 0;
    write_status(32'h6000);
    for (int k = 1; k < 4; k++) begin
      write_frame(6 + k, 32'hD000 + (k << 8));
      write_status(32'h6000 + (k << 8));
    end
    hold_up = 0;
    request(3, err);
    check(!err, "fifth request accepted once the uplink moves");
    write_frame(3, 32'hE000);
    write_status(32'h7000);
    for (int k = 0; k < 4; k++) total += pkt_words(6 + k);
    total += pkt_words(3);
    wait (up.size() == total);
    for (int k = 0; k < 4; k++) check_frame((k % 2 != 0) ? 4 : 3, 6 + k, 32'hD000 + (k << 8), 32'h6000 + (k << 8), pos);
    check_frame(3, 3, 32'hE000, 32'h7000, pos);
    repeat (5) @(negedge clk);
    check(up.size() == total && f2h_ready, "nothing extra sent, engine ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
