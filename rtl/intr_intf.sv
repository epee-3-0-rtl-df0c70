// intr_intf: INTR interface. USB has no interrupt of its own, so an
// interrupt travels to the host as a header-only PKT_INTR packet whose
// channel field names the source (0 H2F, 1 F2H, 2 user defined).
//
// Each of the three sources follows a req/ack cycle, as the document asks,
// so that back-to-back interrupts are not lost: while its enable (set by
// the host) is high, a rising int_req makes the block send one packet and
// mark the interrupt pending. The host clears it by writing the interrupt
// clear register; int_clr then rises and stays high until the accelerator
// drops int_req, which ends the cycle. While a cycle runs, further requests
// from that source wait. When several packets wait, H2F goes first, then
// F2H, then the user-defined one (this design's choice).
module intr_intf
  import epee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // accelerator side
  input  logic [2:0]  int_req,
  output logic [2:0]  int_enable,
  output logic [2:0]  int_clr,
  // register file side
  input  logic [2:0]  en,
  input  logic [2:0]  clr_pulse,
  output logic [2:0]  pend,
  // uplink packets
  output logic        us_valid,
  input  logic        us_ready,
  output logic [31:0] us_data,
  output logic        us_last
);
  typedef enum logic [1:0] {I_IDLE, I_SEND, I_WAIT_CLR, I_CLR} istate_e;
  istate_e st [NUM_INT];
  logic [1:0] sel;
  logic       any;

  assign int_enable = en;

  always_comb begin
    any = 1'b0;
    sel = 2'd0;
    for (int i = NUM_INT - 1; i >= 0; i--)
      if (st[i] == I_SEND) begin
        any = 1'b1;
        sel = 2'(i);
      end
  end

  assign us_valid = any;
  assign us_last  = 1'b1;
  assign us_data  = mk_hdr(DIR_F2H, PKT_INTR, {2'b00, sel}, 16'd0);

  always_comb
    for (int i = 0; i < NUM_INT; i++) begin
      pend[i]    = (st[i] == I_SEND) || (st[i] == I_WAIT_CLR);
      int_clr[i] = (st[i] == I_CLR);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_INT; i++) st[i] <= I_IDLE;
    end else begin
      for (int i = 0; i < NUM_INT; i++)
        case (st[i])
          I_IDLE:     if (int_req[i] && en[i]) st[i] <= I_SEND;
          I_SEND:     if (us_ready && sel == 2'(i)) st[i] <= I_WAIT_CLR;
          I_WAIT_CLR: if (clr_pulse[i]) st[i] <= I_CLR;
          I_CLR:      if (!int_req[i]) st[i] <= I_IDLE;
          default:    st[i] <= I_IDLE;
        endcase
    end
  end
endmodule
