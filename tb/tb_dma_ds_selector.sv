// tb_dma_ds_selector: self-checking test of the DMA downstream selector.
// It offers descriptor and data packets on matching and non-matching
// channels while the H2F engine side is waiting for a descriptor, for data
// or for nothing, and checks which words are passed to which port, that
// mismatched packets are dropped whole and counted, and that a packet keeps
// its route when the wanted state changes in the middle of it.
module tb_dma_ds_selector;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_last;
  logic [31:0] in_data;
  pkt_hdr_t in_hdr;
  logic want_desc, want_data;
  logic [3:0] want_chan;
  logic desc_valid, desc_ready, data_valid, data_ready;
  logic [31:0] desc_data, data_data;
  logic [15:0] drop_cnt;

  dma_ds_selector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] got_desc[$], got_data[$];
  always @(posedge clk) if (rst_n) begin
    if (desc_valid && desc_ready) got_desc.push_back(desc_data);
    if (data_valid && data_ready) got_data.push_back(data_data);
  end
  always @(negedge clk) begin
    desc_ready <= ($urandom_range(0, 2) != 0);
    data_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic send(pkt_type_e t, int ch, int n, int base, int flip_at = -1);
    in_hdr = pkt_hdr_t'(mk_hdr(DIR_H2F, t, 4'(ch), 16'(n)));
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = base + i; in_last = (i == n - 1);
      if (i == flip_at) begin want_desc = !want_desc; want_data = !want_data; end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_last = 0; in_hdr = '0;
    want_desc = 0; want_data = 0; want_chan = 4'd5;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // waiting for a descriptor on channel 5
    want_desc = 1;
    send(PKT_CTRL_DESC, 5, 32, 32'h100);          // passed
    send(PKT_CTRL_DESC, 6, 32, 32'h200);          // wrong channel: dropped
    send(PKT_CTRL_DESC, 5, 16, 32'h300);          // wrong length: dropped
    send(PKT_DATA, 5, 8, 32'h400);                // data not wanted yet: dropped
    check(got_desc.size() == 32, $sformatf("desc words %0d", got_desc.size()));
    foreach (got_desc[i]) check(got_desc[i] == 32'h100 + i, "desc word value");
    check(got_data.size() == 0, "no data passed while descriptor wanted");
    check(drop_cnt == 3, $sformatf("drop_cnt %0d", drop_cnt));
    // waiting for data
    want_desc = 0; want_data = 1;
    send(PKT_DATA, 5, 10, 32'h500);               // passed
    send(PKT_DATA, 5, 6, 32'h600, 3);             // wanted state changes mid-packet: still passed
    send(PKT_DATA, 2, 4, 32'h700);                // wrong channel
    check(got_data.size() == 16, $sformatf("data words %0d", got_data.size()));
    for (int i = 0; i < 10 && i < got_data.size(); i++) check(got_data[i] == 32'h500 + i, "data word value");
    for (int i = 0; i < 6 && i + 10 < got_data.size(); i++) check(got_data[10 + i] == 32'h600 + i, "data word value mid-packet");
    check(drop_cnt == 4, $sformatf("drop_cnt %0d", drop_cnt));
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
