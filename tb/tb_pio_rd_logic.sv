// tb_pio_rd_logic: self-checking test of the PIO read logic. Reads of the
// library's register space are answered from a register-file model; reads
// of the user space go over the four-phase req/ack bus to a model that
// answers after a random delay with a value derived from the address. Each
// read must come back as a completion packet (header, one data DW, last
// flag) with the right value, in order, under random back-pressure.
module tb_pio_rd_logic;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready; logic [31:0] req_addr;
  logic [7:0] rf_addr; logic [31:0] rf_rdata;
  logic [16:0] pio_rd_addr; logic pio_rd_req, pio_rd_ack; logic [31:0] pio_rd_data;
  logic cpl_valid, cpl_ready, cpl_last; logic [31:0] cpl_data;

  pio_rd_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] usr_val(logic [16:0] a); return {a[15:0], ~a[15:0]} ^ 32'h1234_5678; endfunction
  function automatic logic [31:0] rf_val(logic [7:0] a);   return {4{a}} + 32'h0101_0101;             endfunction
  assign rf_rdata = rf_val(rf_addr);

  initial begin
    pio_rd_ack = 0; pio_rd_data = 0;
    forever begin
      @(posedge clk);
      if (pio_rd_req && !pio_rd_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        #1 pio_rd_ack = 1; pio_rd_data = usr_val(pio_rd_addr);
        @(posedge clk);
        #1 pio_rd_data = $urandom;   // data only valid with the first ack cycle
        while (pio_rd_req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 pio_rd_ack = 0;
      end
    end
  end

  logic [31:0] got[$]; bit got_last[$];
  always @(negedge clk) cpl_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && cpl_valid && cpl_ready) begin got.push_back(cpl_data); got_last.push_back(cpl_last); end

  logic [31:0] exp[$];
  initial begin
    req_valid = 0; req_addr = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      automatic bit internal = ($urandom_range(0, 2) == 0);
      automatic logic [31:0] a = {14'd0, internal, 17'($urandom)};
      @(negedge clk);
      req_valid = 1; req_addr = a;
      @(posedge clk); while (!req_ready) @(posedge clk);
      exp.push_back(internal ? rf_val(a[7:0]) : usr_val(a[16:0]));
      #1 req_valid = 0; req_addr = $urandom;
    end
    repeat (30) @(posedge clk);
    check(got.size() == 2 * exp.size(), $sformatf("completion words %0d", got.size()));
    foreach (exp[i]) if (2 * i + 1 < got.size()) begin
      check(got[2*i] == mk_hdr(DIR_F2H, PKT_PIO_RD, 4'd0, 16'd1) && !got_last[2*i], $sformatf("header %0d", i));
      check(got[2*i+1] == exp[i] && got_last[2*i+1], $sformatf("read %0d: %h exp %h", i, got[2*i+1], exp[i]));
    end
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
