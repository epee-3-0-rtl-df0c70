// tb_usb_trans_control: self-checking test of the bus-sharing block.
// A model of the board holds a queue of downlink words and takes uplink
// words; the test sends uplink packets while downlink data keeps arriving
// and checks that every word arrives once and in order in each direction,
// that the bus never reads and writes in the same cycle, that a turn costs
// one idle cycle, that an uplink packet is never cut, and that a long
// downlink burst yields to the uplink after RX_BURST words.
module tb_usb_trans_control;
  localparam int RX_BURST = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] usb_dq_i, usb_dq_o;
  logic usb_dq_oe, usb_rd, usb_wr, usb_rx_flag, usb_tx_flag;
  logic rx_valid, rx_ready, tx_valid, tx_ready, tx_last, turn;
  logic [31:0] rx_data, tx_data;

  usb_trans_control #(.RX_BURST(RX_BURST)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // board model
  logic [31:0] dl_q[$];
  logic [31:0] ul_got[$];
  bit tx_flag_en = 1;
  assign usb_rx_flag = dl_q.size() != 0;
  assign usb_dq_i    = dl_q.size() != 0 ? dl_q[0] : 32'd0;
  assign usb_tx_flag = tx_flag_en;
  always @(posedge clk) begin
    if (usb_rd && usb_rx_flag) void'(dl_q.pop_front());
    if (usb_wr) ul_got.push_back(usb_dq_o);
  end

  // downlink sink
  logic [31:0] dl_got[$];
  always @(negedge clk) rx_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rx_valid && rx_ready) dl_got.push_back(rx_data);

  // uplink source: packets of 1..6 words, word = {pkt, idx}
  logic [31:0] ul_exp[$];
  int pk = 0, idx = 0, plen = 3, npk = 0;
  assign tx_data = {16'(pk), 16'(idx)};
  assign tx_last = (idx == plen - 1);
  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      ul_exp.push_back(tx_data);
      if (tx_last) begin pk <= pk + 1; idx <= 0; plen <= $urandom_range(1, 6); end
      else idx <= idx + 1;
    end
  end
  assign tx_valid = rst_n && (pk < npk);

  // monitors
  int turns = 0, collide = 0, cut = 0, burst_yield = 0, run = 0;
  bit in_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    if (usb_rd && usb_wr) collide++;
    if (turn) turns++;
    if (usb_wr) in_pkt <= !tx_last;
    if (in_pkt && usb_rd) cut++;
    if (usb_rd) run <= run + 1; else if (!usb_dq_oe && !usb_rd && run != 0 && usb_rx_flag) begin
      if (run == RX_BURST) burst_yield++;
      run <= 0;
    end else if (!usb_rd) run <= 0;
  end

  logic [31:0] dl_exp[$];
  int prev_oe_cycle;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: downlink only
    for (int i = 0; i < 20; i++) begin dl_q.push_back(32'hA000_0000 + i); dl_exp.push_back(32'hA000_0000 + i); end
    repeat (60) @(posedge clk);
    // phase 2: both directions, with a long downlink queue
    for (int i = 0; i < 200; i++) begin dl_q.push_back(32'hB000_0000 + i); dl_exp.push_back(32'hB000_0000 + i); end
    npk = 30;
    repeat (400) @(posedge clk);
    // phase 3: board stalls the uplink for a while
    tx_flag_en = 0; npk = 40;
    repeat (30) @(posedge clk);
    check(ul_got.size() == ul_exp.size(), "no uplink word written while tx flag low");
    tx_flag_en = 1;
    repeat (400) @(posedge clk);
    check(dl_got.size() == dl_exp.size(), $sformatf("downlink count %0d/%0d", dl_got.size(), dl_exp.size()));
    for (int i = 0; i < dl_exp.size() && i < dl_got.size(); i++) check(dl_got[i] == dl_exp[i], $sformatf("downlink word %0d", i));
    check(ul_got.size() == ul_exp.size() && pk == 40, $sformatf("uplink count %0d/%0d pk %0d", ul_got.size(), ul_exp.size(), pk));
    for (int i = 0; i < ul_exp.size() && i < ul_got.size(); i++) check(ul_got[i] == ul_exp[i], $sformatf("uplink word %0d", i));
    check(collide == 0, "read and write in one cycle");
    check(cut == 0, "uplink packet cut by downlink");
    check(turns >= 4, $sformatf("bus turned %0d times", turns));
    check(burst_yield >= 1, $sformatf("downlink yielded after RX_BURST %0d times", burst_yield));
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
