// usb_trans_control: TRANS_CONTROL of the transmission control module,
// USB version. The USB board offers one 32-bit data bus that carries both
// directions, so this block decides, cycle by cycle, whether the bus reads
// downlink words from the board or writes uplink words to it.
//
// Bus model (this design's choice; the document only says the board shares
// its uplink with its downlink): usb_rx_flag high means the board holds a
// downlink word on usb_dq_i, taken in a cycle with usb_rd high; usb_tx_flag
// high means the board accepts the word on usb_dq_o in a cycle with usb_wr
// high. usb_dq_oe says when the FPGA drives the bus.
//
// Policy: uplink packets are never cut; after each uplink packet the bus
// turns to the downlink if the board has data. The downlink is a plain word
// stream and may be cut anywhere; it yields to a waiting uplink packet when
// the board runs dry or after RX_BURST words. Every change of direction
// spends one idle turnaround cycle with no strobe.
module usb_trans_control #(
  parameter int unsigned RX_BURST = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // shared board bus
  input  logic [31:0] usb_dq_i,
  output logic [31:0] usb_dq_o,
  output logic        usb_dq_oe,
  output logic        usb_rd,
  output logic        usb_wr,
  input  logic        usb_rx_flag,
  input  logic        usb_tx_flag,
  // downlink word stream to the RX engine
  output logic        rx_valid,
  input  logic        rx_ready,
  output logic [31:0] rx_data,
  // uplink packet stream from the TX engine
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic [31:0] tx_data,
  input  logic        tx_last,
  // one-cycle pulse on each change of direction
  output logic        turn
);
  typedef enum logic [1:0] {S_RX, S_TURN_TX, S_TX, S_TURN_RX} state_e;
  state_e state, state_n;

  logic [$clog2(RX_BURST+1)-1:0] burst;
  logic in_pkt;
  logic leave_tx;

  assign leave_tx = (state == S_TX) && !in_pkt && usb_rx_flag;

  always_comb begin
    state_n = state;
    case (state)
      S_RX:      if (tx_valid && (!usb_rx_flag || burst >= RX_BURST[$bits(burst)-1:0]))
                   state_n = S_TURN_TX;
      S_TURN_TX: state_n = S_TX;
      S_TX:      if (leave_tx) state_n = S_TURN_RX;
      S_TURN_RX: state_n = S_RX;
      default:   state_n = S_RX;
    endcase
  end

  assign usb_dq_oe = (state == S_TX) || (state == S_TURN_TX);
  assign usb_dq_o  = tx_data;
  assign usb_rd    = (state == S_RX) && (state_n == S_RX) && usb_rx_flag && rx_ready;
  assign rx_valid  = usb_rd;
  assign rx_data   = usb_dq_i;
  assign tx_ready  = (state == S_TX) && !leave_tx && usb_tx_flag;
  assign usb_wr    = tx_ready && tx_valid;
  assign turn      = (state_n != state) && (state_n == S_TURN_TX || state_n == S_TURN_RX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RX;
      burst  <= '0;
      in_pkt <= 1'b0;
    end else begin
      state <= state_n;
      if (state != S_RX)    burst <= '0;
      else if (usb_rd)      burst <= burst + 1'b1;
      if (usb_wr)           in_pkt <= !tx_last;
    end
  end

  // an uplink packet is never cut by a turn of the bus
  a_no_cut: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_TX && in_pkt) |-> (state_n == S_TX));
  a_no_collide: assert property (@(posedge clk) disable iff (!rst_n) !(usb_rd && usb_wr));
endmodule
