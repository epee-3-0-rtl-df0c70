// tb_usb_rx_engine: self-checking test of the downlink packet parser.
// It feeds a mix of DMA, PIO write, PIO read and malformed packets with
// random gaps and random back-pressure, and checks that each payload word
// reaches the right port with the right header and last flag, that PIO
// requests carry the right address and data, and that each malformed packet
// is dropped and counted.
module tb_usb_rx_engine;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, ds_valid, ds_ready, ds_last;
  logic [31:0] in_data, ds_data, pwr_addr, pwr_data, prd_addr;
  pkt_hdr_t ds_hdr;
  logic pwr_valid, pwr_ready, prd_valid, prd_ready;
  logic [15:0] bad_cnt;

  usb_rx_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] stream[$];
  logic [31:0] exp_ds[$];    // {last, hdr type/chan} packed separately below
  logic [31:0] exp_ds_hdr[$];
  bit          exp_ds_last[$];
  logic [63:0] exp_wr[$];
  logic [31:0] exp_rd[$];
  int exp_bad = 0;

  task automatic add_dma(pkt_type_e t, int ch, int n);
    logic [31:0] h = mk_hdr(DIR_H2F, t, 4'(ch), 16'(n));
    stream.push_back(h);
    for (int i = 0; i < n; i++) begin
      logic [31:0] w = $urandom;
      stream.push_back(w);
      exp_ds.push_back(w); exp_ds_hdr.push_back(h); exp_ds_last.push_back(i == n - 1);
    end
  endtask

  // source
  always @(posedge clk) begin
    if (in_valid && in_ready) void'(stream.pop_front());
  end
  logic gap;
  always @(negedge clk) begin
    gap       <= ($urandom_range(0, 4) == 0);
    ds_ready  <= ($urandom_range(0, 3) != 0);
    pwr_ready <= ($urandom_range(0, 2) == 0);
    prd_ready <= ($urandom_range(0, 2) == 0);
  end
  assign in_valid = rst_n && stream.size() != 0 && !gap;
  assign in_data  = stream.size() != 0 ? stream[0] : 32'd0;

  // sinks
  int n_ds = 0, n_wr = 0, n_rd = 0;
  always @(posedge clk) if (rst_n) begin
    if (ds_valid && ds_ready) begin
      check(exp_ds.size() != 0 && ds_data == exp_ds[0] && ds_hdr == exp_ds_hdr[0] && ds_last == exp_ds_last[0],
            $sformatf("ds word %0d", n_ds));
      if (exp_ds.size() != 0) begin void'(exp_ds.pop_front()); void'(exp_ds_hdr.pop_front()); void'(exp_ds_last.pop_front()); end
      n_ds++;
    end
    if (pwr_valid && pwr_ready) begin
      check(exp_wr.size() != 0 && {pwr_addr, pwr_data} == exp_wr[0], $sformatf("pio wr %0d", n_wr));
      if (exp_wr.size() != 0) void'(exp_wr.pop_front());
      n_wr++;
    end
    if (prd_valid && prd_ready) begin
      check(exp_rd.size() != 0 && prd_addr == exp_rd[0], $sformatf("pio rd %0d", n_rd));
      if (exp_rd.size() != 0) void'(exp_rd.pop_front());
      n_rd++;
    end
  end

  initial begin
    for (int k = 0; k < 60; k++) begin
      case ($urandom_range(0, 5))
        0: add_dma(PKT_DATA, $urandom_range(0, 15), $urandom_range(1, 20));
        1: add_dma(PKT_CTRL_DESC, $urandom_range(0, 15), 32);
        2: begin
          automatic logic [31:0] a = $urandom, d = $urandom;
          stream.push_back(mk_hdr(DIR_H2F, PKT_PIO_WR, 0, 2)); stream.push_back(a); stream.push_back(d);
          exp_wr.push_back({a, d});
        end
        3: begin
          automatic logic [31:0] a = $urandom;
          stream.push_back(mk_hdr(DIR_H2F, PKT_PIO_RD, 0, 1)); stream.push_back(a);
          exp_rd.push_back(a);
        end
        4: begin // wrong direction, with payload
          stream.push_back(mk_hdr(DIR_F2H, PKT_DATA, 1, 3));
          repeat (3) stream.push_back($urandom);
          exp_bad++;
        end
        default: begin // PIO write of wrong length / reserved type
          stream.push_back(mk_hdr(DIR_H2F, (($urandom_range(0,1) != 0) ? PKT_PIO_WR : PKT_F2H_STAT), 0, 4));
          repeat (4) stream.push_back($urandom);
          exp_bad++;
        end
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (stream.size() == 0);
    repeat (10) @(posedge clk);
    check(exp_ds.size() == 0, "all DMA words delivered");
    check(exp_wr.size() == 0, "all PIO writes delivered");
    check(exp_rd.size() == 0, "all PIO reads delivered");
    check(bad_cnt == 16'(exp_bad), $sformatf("bad_cnt %0d exp %0d", bad_cnt, exp_bad));
    check(exp_bad > 0 && n_wr > 0 && n_rd > 0, "every packet kind seen");
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
