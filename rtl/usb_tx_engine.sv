// usb_tx_engine: TX_ENGINE of the transmission control module, USB version.
// It forwards the uplink: interrupt packets, PIO read completions and DMA
// packets are merged into the single stream the TRANS_CONTROL block writes
// to the board.
//
// Packets are never interleaved. Between packets the waiting source with
// the highest priority wins: PIO completions first, DMA next, interrupts
// last (this design's choice). Putting interrupts last keeps an interrupt
// from overtaking the status descriptor it announces: the accelerator
// raises an interrupt only after writing that descriptor, so the DMA packet
// is already waiting when the interrupt packet arrives. The engine also
// counts the packets it has sent.
module usb_tx_engine (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  in_valid,     // 0 INTR, 1 PIO, 2 DMA
  output logic [2:0]  in_ready,
  input  logic [31:0] in_data [3],
  input  logic [2:0]  in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last,
  output logic [31:0] pkt_cnt
);
  logic       locked;
  logic [1:0] owner_q, owner;

  always_comb begin
    if (locked)           owner = owner_q;
    else if (in_valid[1]) owner = 2'd1;
    else if (in_valid[2]) owner = 2'd2;
    else                  owner = 2'd0;
  end

  assign out_valid = in_valid[owner];
  assign out_data  = in_data[owner];
  assign out_last  = in_last[owner];
  always_comb
    for (int i = 0; i < 3; i++) in_ready[i] = (owner == 2'(i)) && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked  <= 1'b0;
      owner_q <= 2'd0;
      pkt_cnt <= '0;
    end else if (out_valid && out_ready) begin
      locked  <= !out_last;
      owner_q <= owner;
      if (out_last) pkt_cnt <= pkt_cnt + 1'b1;
    end
  end
endmodule
