// tb_dma_h2b_engine: self-checking test of the Host-to-FPGA DMA engine.
// It follows the accelerator sequence of the interface description: wait for
// h2f_ready, check h2f_indication, request a channel, check h2f_err with
// h2f_ack, read the control descriptor, read the data frame and write back a
// status descriptor. It checks a refused request (no frame waiting), the
// per-channel frame counts, the frame request packet sent to the host, the
// frame length taken from the descriptor's LEN field (in bytes, rounded up
// to DWs), the last flag, that surplus data words are discarded, and the
// status descriptor packet.
module tb_dma_h2b_engine;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic db_valid; logic [3:0] db_chan; logic [15:0] db_count;
  logic [15:0] h2f_indication; logic [3:0] h2f_qnum;
  logic h2f_req, h2f_ack, h2f_ready, h2f_err;
  logic h2f_cd_rd, h2f_cd_empty; logic [31:0] h2f_cd_data;
  logic h2f_df_rd, h2f_df_last, h2f_df_empty; logic [31:0] h2f_df_data;
  logic h2f_sd_wr, h2f_sd_full; logic [31:0] h2f_sd_data;
  logic want_desc, want_data; logic [3:0] want_chan;
  logic desc_valid, desc_ready, data_valid, data_ready;
  logic [31:0] desc_data, data_data;
  logic us_valid, us_ready, us_last; logic [31:0] us_data;

  dma_h2b_engine #(.DATA_DEPTH(64), .DESC_DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // uplink collector
  logic [31:0] up[$]; bit up_last[$];
  always @(negedge clk) us_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && us_valid && us_ready) begin up.push_back(us_data); up_last.push_back(us_last); end

  task automatic doorbell(int ch, int n);
    @(negedge clk); db_valid = 1; db_chan = 4'(ch); db_count = 16'(n);
    @(negedge clk); db_valid = 0;
  endtask

  task automatic request(int ch, output bit err);
    wait (h2f_ready); @(negedge clk);
    h2f_qnum = 4'(ch); h2f_req = 1;
    while (!h2f_ack) @(negedge clk);
    err = h2f_err;
    h2f_req = 0;
    while (h2f_ack) @(negedge clk);
  endtask

  logic [31:0] desc[32];
  task automatic push_desc();
    foreach (desc[i]) begin
      desc_valid = 1; desc_data = desc[i];
      @(posedge clk); while (!desc_ready) @(posedge clk);
      #1 desc_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask
  task automatic push_data(int n, int base);
    for (int i = 0; i < n; i++) begin
      data_valid = 1; data_data = base + i;
      @(posedge clk); while (!data_ready) @(posedge clk);
      #1 data_valid = 0;
    end
  endtask

  bit err;
  int nwords;
  initial begin
    db_valid = 0; db_chan = 0; db_count = 0; h2f_qnum = 0; h2f_req = 0;
    h2f_cd_rd = 0; h2f_df_rd = 0; h2f_sd_wr = 0; h2f_sd_data = 0;
    desc_valid = 0; desc_data = 0; data_valid = 0; data_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(negedge clk);
    check(h2f_indication == 0 && h2f_ready, "idle after reset");
    request(3, err);
    check(err == 1, "request on an empty channel is refused");
    check(up.size() == 0, "no frame request sent for a refused request");
    doorbell(3, 2); doorbell(7, 1);
    @(negedge clk);
    check(h2f_indication == 16'h0088, $sformatf("indication %h", h2f_indication));
    request(7, err);
    check(err == 0, "request on channel 7 accepted");
    check(h2f_indication == 16'h0008, "channel 7 count used up");
    check(!h2f_ready, "busy while the frame is fetched");
    wait (up.size() == 1);
    check(up[0] == mk_hdr(DIR_F2H, PKT_H2F_REQ, 4'd7, 16'd0) && up_last[0], "frame request packet");
    check(want_desc && want_chan == 7, "engine waits for a descriptor on channel 7");
    foreach (desc[i]) desc[i] = $urandom;
    desc[1] = {4'h0, TP_USB, 8'd7, 16'd0};
    desc[3] = 32'd37;                       // 37 bytes -> 10 DW
    nwords = 10;
    push_desc();
    @(negedge clk);
    check(want_data && !want_desc, "engine waits for data after the descriptor");
    push_data(nwords + 2, 32'hD000);        // two surplus words
    repeat (2) @(negedge clk);
    check(h2f_ready, "ready again after the frame");
    // accelerator reads the FIFOs
    for (int i = 0; i < 32; i++) begin
      check(!h2f_cd_empty && h2f_cd_data == desc[i], $sformatf("descriptor DW %0d", i));
      h2f_cd_rd = 1; @(negedge clk); h2f_cd_rd = 0;
    end
    check(h2f_cd_empty, "descriptor FIFO empty after 32 DW");
    for (int i = 0; i < nwords; i++) begin
      check(!h2f_df_empty && h2f_df_data == 32'hD000 + i && h2f_df_last == (i == nwords - 1), $sformatf("data DW %0d", i));
      h2f_df_rd = 1; @(negedge clk); h2f_df_rd = 0;
    end
    check(h2f_df_empty, "surplus data words discarded");
    // status descriptor
    for (int i = 0; i < 32; i++) begin
      h2f_sd_wr = 1; h2f_sd_data = (i == 1) ? {8'h05, 8'd7, 16'h5001} : 32'h5000 + i; @(negedge clk);
    end
    h2f_sd_wr = 0;
    wait (up.size() == 34);
    repeat (2) @(negedge clk);
    check(up.size() == 34, "status packet length");
    check(up[1] == mk_hdr(DIR_F2H, PKT_H2F_STAT, 4'd7, 16'd32) && !up_last[1], "status header");
    for (int i = 0; i < 32; i++) check(up[2 + i] == ((i == 1) ? {8'h05, 8'd7, 16'h5001} : 32'h5000 + i) && up_last[2 + i] == (i == 31), $sformatf("status DW %0d", i));
    // second frame on channel 3 with a length that is a whole number of DW
    request(3, err);
    check(err == 0 && h2f_indication == 16'h0008, "second request");
    desc[3] = 32'd8;
    wait (want_desc);
    push_desc();
    push_data(2, 32'hE000);
    repeat (2) @(negedge clk);
    repeat (32) begin h2f_cd_rd = 1; @(negedge clk); end
    h2f_cd_rd = 0;
    check(h2f_df_data == 32'hE000 && !h2f_df_last, "frame 2 DW 0");
    h2f_df_rd = 1; @(negedge clk); h2f_df_rd = 0;
    check(h2f_df_data == 32'hE001 && h2f_df_last, "frame 2 DW 1 last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
