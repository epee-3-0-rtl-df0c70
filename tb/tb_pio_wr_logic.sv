// tb_pio_wr_logic: self-checking test of the PIO write logic. Writes to the
// library's register space must reach the register file in one cycle and
// never the user bus; writes to the user space must appear on the user bus
// with a four-phase req/ack handshake answered by a model with random
// delays, each with the right address and data and in order.
module tb_pio_wr_logic;
  import epee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready; logic [31:0] req_addr, req_data;
  logic rf_we; logic [7:0] rf_addr; logic [31:0] rf_wdata;
  logic [16:0] pio_wr_addr; logic [31:0] pio_wr_data; logic pio_wr_req, pio_wr_ack;

  pio_wr_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // user side: ack after a random delay, drop it after req falls
  logic [48:0] usr_got[$];
  logic [39:0] rf_got[$];
  initial begin
    pio_wr_ack = 0;
    forever begin
      @(posedge clk);
      if (pio_wr_req && !pio_wr_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        usr_got.push_back({pio_wr_addr, pio_wr_data});
        #1 pio_wr_ack = 1;
        while (pio_wr_req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 pio_wr_ack = 0;
      end
    end
  end
  always @(posedge clk) if (rf_we) rf_got.push_back({rf_addr, rf_wdata});
  int usr_during_rf = 0;
  always @(posedge clk) if (rf_we && pio_wr_req && !pio_wr_ack) usr_during_rf++;

  logic [48:0] usr_exp[$];
  logic [39:0] rf_exp[$];
  initial begin
    req_valid = 0; req_addr = 0; req_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      automatic bit internal = ($urandom_range(0, 2) == 0);
      automatic logic [31:0] a = {14'd0, internal, 17'($urandom)};
      automatic logic [31:0] d = $urandom;
      @(negedge clk);
      req_valid = 1; req_addr = a; req_data = d;
      @(posedge clk); while (!req_ready) @(posedge clk);
      if (internal) rf_exp.push_back({a[7:0], d}); else usr_exp.push_back({a[16:0], d});
      #1 req_valid = 0;
    end
    repeat (20) @(posedge clk);
    check(usr_got.size() == usr_exp.size(), $sformatf("user writes %0d/%0d", usr_got.size(), usr_exp.size()));
    foreach (usr_exp[i]) check(i < usr_got.size() && usr_got[i] == usr_exp[i], $sformatf("user write %0d", i));
    check(rf_got.size() == rf_exp.size(), $sformatf("register writes %0d/%0d", rf_got.size(), rf_exp.size()));
    foreach (rf_exp[i]) check(i < rf_got.size() && rf_got[i] == rf_exp[i], $sformatf("register write %0d", i));
    check(rf_exp.size() > 0 && usr_exp.size() > 0, "both spaces used");
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
