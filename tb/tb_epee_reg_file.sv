// tb_epee_reg_file: self-checking test of the library register file: the
// identification word, the interrupt enables and their read-back, the
// one-cycle interrupt-clear and doorbell pulses with their channel and
// count fields, the read-back of status inputs and the scratch register.
module tb_epee_reg_file;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we; logic [7:0] waddr, raddr; logic [31:0] wdata, rdata;
  logic [2:0] int_en, int_clr, int_pend;
  logic h2f_db_valid, f2h_sub_valid; logic [3:0] db_chan; logic [15:0] db_count;
  logic [15:0] h2f_ind, f2h_ind, bad_cnt, drop_cnt;

  epee_reg_file dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int n_clr = 0, n_db = 0, n_sub = 0;
  logic [2:0] clr_seen;
  logic [19:0] db_seen, sub_seen;
  always @(posedge clk) begin
    if (int_clr != 0) begin n_clr++; clr_seen = int_clr; end
    if (h2f_db_valid) begin n_db++; db_seen = {db_chan, db_count}; end
    if (f2h_sub_valid) begin n_sub++; sub_seen = {db_chan, db_count}; end
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); we = 1; waddr = a; wdata = d;
    @(negedge clk); we = 0; #1;
  endtask
  task automatic expect_rd(logic [7:0] a, logic [31:0] exp, string msg);
    raddr = a; #1;
    check(rdata == exp, $sformatf("%s: read %h expected %h", msg, rdata, exp));
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    int_pend = 3'b101; h2f_ind = 16'hBEEF; f2h_ind = 16'h1234; bad_cnt = 16'd7; drop_cnt = 16'd9;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(negedge clk);
    expect_rd(REG_ID, {TP_USB, VERSION}, "identification word carries the USB TP code");
    check(int_en == 0, "interrupts disabled after reset");
    expect_rd(REG_INT_EN, 0, "enables read back zero");
    wr(REG_INT_EN, 32'hFFFF_FFF5);
    check(int_en == 3'b101, "interrupt enables");
    expect_rd(REG_INT_EN, 32'd5, "enable read-back");
    expect_rd(REG_INT_PEND, 32'd5, "pending read-back");
    wr(REG_INT_CLR, 32'd2);
    check(n_clr == 1 && clr_seen == 3'b010 && int_clr == 0, $sformatf("clear is a one-cycle pulse %0d %b %b", n_clr, clr_seen, int_clr));
    wr(REG_H2F_DOORBELL, 32'h000B_0003);
    check(n_db == 1 && n_sub == 0 && db_seen == {4'hB, 16'd3}, "H2F doorbell");
    wr(REG_F2H_SUBMIT, 32'h0004_0010);
    check(n_sub == 1 && n_db == 1 && sub_seen == {4'h4, 16'd16}, "F2H buffer submit");
    expect_rd(REG_H2F_IND, 32'h0000_BEEF, "H2F indication");
    expect_rd(REG_F2H_IND, 32'h0000_1234, "F2H indication");
    expect_rd(REG_ERR_CNT, {16'd7, 16'd9}, "error counters");
    wr(REG_SCRATCH, 32'hCAFE_F00D);
    expect_rd(REG_SCRATCH, 32'hCAFE_F00D, "scratch");
    expect_rd(8'hF0, 0, "unmapped address reads zero");
    check(int_en == 3'b101, "other writes leave the enables alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
