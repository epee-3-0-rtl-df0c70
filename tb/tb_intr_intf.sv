// tb_intr_intf: self-checking test of the interrupt interface. It runs the
// full req/ack cycle of each interrupt source (request, packet to the host,
// clear by the host, int_clr, request dropped), checks that a disabled
// source sends nothing, that a request held high does not send a second
// packet, that simultaneous requests go out one by one in priority order,
// and that a clear for a source that is not pending has no effect.
module tb_intr_intf;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] int_req, int_enable, int_clr, en, clr_pulse, pend;
  logic us_valid, us_ready, us_last; logic [31:0] us_data;

  intr_intf dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] up[$];
  always @(negedge clk) us_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && us_valid && us_ready) begin
    up.push_back(us_data);
    check(us_last, "interrupt packet is one DW");
  end

  task automatic host_clear(logic [2:0] m);
    @(negedge clk); clr_pulse = m; @(negedge clk); clr_pulse = 0;
  endtask

  initial begin
    int_req = 0; en = 0; clr_pulse = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // disabled: nothing happens
    @(negedge clk); int_req = 3'b001;
    repeat (10) @(negedge clk);
    check(up.size() == 0 && pend == 0, "disabled source sends nothing");
    int_req = 0;
    en = 3'b111;
    @(negedge clk);
    check(int_enable == 3'b111, "enable reaches the accelerator");
    // one full cycle for the F2H source
    int_req = 3'b010;
    repeat (20) @(negedge clk);
    check(up.size() == 1 && up[0] == mk_hdr(DIR_F2H, PKT_INTR, 4'd1, 16'd0), "F2H interrupt packet");
    check(pend == 3'b010 && int_clr == 0, "pending until the host clears");
    host_clear(3'b100);
    check(pend == 3'b010 && int_clr == 0, "clear of another source ignored");
    host_clear(3'b010);
    @(negedge clk);
    check(int_clr == 3'b010 && pend == 0, "int_clr raised after host clear");
    repeat (5) @(negedge clk);
    check(int_clr == 3'b010 && up.size() == 1, "int_clr held while req high, no second packet");
    int_req = 0;
    repeat (2) @(negedge clk);
    check(int_clr == 0, "int_clr falls after req falls");
    // all three at once: H2F, F2H, UDF order
    int_req = 3'b111;
    repeat (30) @(negedge clk);
    check(up.size() == 4, $sformatf("three more packets, got %0d", up.size() - 1));
    if (up.size() == 4) begin
      check(up[1] == mk_hdr(DIR_F2H, PKT_INTR, 4'd0, 16'd0), "H2F first");
      check(up[2] == mk_hdr(DIR_F2H, PKT_INTR, 4'd1, 16'd0), "F2H second");
      check(up[3] == mk_hdr(DIR_F2H, PKT_INTR, 4'd2, 16'd0), "UDF third");
    end
    host_clear(3'b111);
    @(negedge clk);
    check(int_clr == 3'b111, "all cleared");
    int_req = 0;
    repeat (2) @(negedge clk);
    // a new request after the cycle ends sends again
    int_req = 3'b100;
    repeat (20) @(negedge clk);
    check(up.size() == 5 && up[4] == mk_hdr(DIR_F2H, PKT_INTR, 4'd2, 16'd0), "next cycle sends again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
