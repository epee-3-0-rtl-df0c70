// tb_dma_us_selector: self-checking test of the DMA upstream selector. Two
// sources send numbered packets of random length with random gaps; the test
// rebuilds the packets from the output, checks that no two packets are
// interleaved, that each source's packets arrive complete and in order, and
// that when both wait they take turns.
module tb_dma_us_selector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_valid, a_ready, a_last, b_valid, b_ready, b_last, out_valid, out_ready, out_last;
  logic [31:0] a_data, b_data, out_data;

  dma_us_selector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // word = {src, pkt[14:0], idx[7:0], len[7:0]}
  localparam int NPK = 40;
  int a_pk = 0, a_idx = 0, a_len = 3, b_pk = 0, b_idx = 0, b_len = 5;
  bit a_gap, b_gap;
  always @(negedge clk) begin
    a_gap <= ($urandom_range(0, 5) == 0);
    b_gap <= ($urandom_range(0, 5) == 0);
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  assign a_valid = rst_n && a_pk < NPK && !a_gap;
  assign b_valid = rst_n && b_pk < NPK && !b_gap;
  assign a_data  = {1'b0, 15'(a_pk), 8'(a_idx), 8'(a_len)};
  assign b_data  = {1'b1, 15'(b_pk), 8'(b_idx), 8'(b_len)};
  assign a_last  = (a_idx == a_len - 1);
  assign b_last  = (b_idx == b_len - 1);
  always @(posedge clk) begin
    if (a_valid && a_ready) begin
      if (a_last) begin a_pk <= a_pk + 1; a_idx <= 0; a_len <= $urandom_range(1, 8); end else a_idx <= a_idx + 1;
    end
    if (b_valid && b_ready) begin
      if (b_last) begin b_pk <= b_pk + 1; b_idx <= 0; b_len <= $urandom_range(1, 8); end else b_idx <= b_idx + 1;
    end
  end

  // output checker
  int exp_pk[2] = '{0, 0};
  bit in_pkt = 0; bit cur_src; int cur_idx = 0;
  int alternations = 0, both_waiting_switch = 0; bit last_src = 0; int npk_out = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic bit s = out_data[31];
    automatic int pk = int'(out_data[30:16]);
    automatic int idx = int'(out_data[15:8]);
    automatic int len = int'(out_data[7:0]);
    if (in_pkt) check(s == cur_src, "packets not interleaved");
    else begin
      cur_src = s;
      if (npk_out > 0 && s != last_src) alternations++;
    end
    check(pk == exp_pk[s] && idx == cur_idx, $sformatf("src %0d pkt %0d idx %0d exp pkt %0d idx %0d", s, pk, idx, exp_pk[s], cur_idx));
    check(out_last == (idx == len - 1), "last flag");
    if (out_last) begin
      in_pkt = 0; cur_idx = 0; exp_pk[s]++; last_src = s; npk_out++;
    end else begin
      in_pkt = 1; cur_idx++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (a_pk == NPK && b_pk == NPK);
    repeat (5) @(posedge clk);
    check(exp_pk[0] == NPK && exp_pk[1] == NPK, "all packets through");
    check(alternations > NPK / 2, $sformatf("sources take turns (%0d switches)", alternations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
