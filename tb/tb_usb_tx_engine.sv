// tb_usb_tx_engine: self-checking test of the uplink TX engine. Three
// sources (interrupt, PIO completion, DMA) send numbered packets; the test
// checks that packets are never interleaved, arrive complete and in order
// per source, that the packet counter counts them, and that at a packet
// boundary a waiting PIO completion goes first, then DMA, then interrupts.
module tb_usb_tx_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] in_valid, in_ready, in_last;
  logic [31:0] in_data [3];
  logic out_valid, out_ready, out_last;
  logic [31:0] out_data, pkt_cnt;

  usb_tx_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int NPK = 30;
  int pk[3] = '{0, 0, 0}, idx[3] = '{0, 0, 0}, len[3] = '{1, 2, 9};
  bit gap[3];
  always @(negedge clk) begin
    for (int s = 0; s < 3; s++) gap[s] <= ($urandom_range(0, 6) == 0);
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  always_comb
    for (int s = 0; s < 3; s++) begin
      in_valid[s] = rst_n && pk[s] < NPK && !gap[s];
      in_data[s]  = {2'(s), 14'(pk[s]), 8'(idx[s]), 8'(len[s])};
      in_last[s]  = (idx[s] == len[s] - 1);
    end
  always @(posedge clk)
    for (int s = 0; s < 3; s++)
      if (in_valid[s] && in_ready[s]) begin
        if (in_last[s]) begin pk[s] <= pk[s] + 1; idx[s] <= 0; len[s] <= (s == 0) ? 1 : (s == 1) ? 2 : $urandom_range(4, 12); end
        else idx[s] <= idx[s] + 1;
      end

  int exp_pk[3] = '{0, 0, 0};
  bit in_pkt = 0; int cur_src = 0, cur_idx = 0, npk_out = 0, prio_ok = 0, prio_bad = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int s = int'(out_data[31:30]);
    automatic int p = int'(out_data[29:16]);
    automatic int i = int'(out_data[15:8]);
    automatic int l = int'(out_data[7:0]);
    if (in_pkt) check(s == cur_src, "packets not interleaved");
    else begin
      cur_src = s;
      // at a packet start: PIO before DMA before interrupts
      if ((in_valid[1] && s != 1) || (in_valid[2] && s == 0)) prio_bad++;
      if (in_valid[0] && in_valid[2] && s == 2) prio_ok++;
    end
    check(p == exp_pk[s] && i == cur_idx, $sformatf("src %0d pkt %0d idx %0d", s, p, i));
    check(out_last == (i == l - 1), "last flag");
    if (out_last) begin in_pkt = 0; cur_idx = 0; exp_pk[s]++; npk_out++; end
    else begin in_pkt = 1; cur_idx++; end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (pk[0] == NPK && pk[1] == NPK && pk[2] == NPK);
    repeat (5) @(posedge clk);
    check(exp_pk[0] == NPK && exp_pk[1] == NPK && exp_pk[2] == NPK, "all packets through");
    check(pkt_cnt == 32'(3 * NPK), $sformatf("packet counter %0d", pkt_cnt));
    check(prio_bad == 0, $sformatf("lower priority packet started first %0d times", prio_bad));
    check(prio_ok > 0, "priority case exercised");
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
