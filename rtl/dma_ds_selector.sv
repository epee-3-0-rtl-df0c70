// dma_ds_selector: DMA downstream selector, the downlink half of the DMA
// packets processing module. It takes DMA packets from the RX engine and
// hands each word to the Host-to-FPGA DMA engine on its descriptor port or
// its data port, according to the packet type.
//
// Integrity check (this design's reading of the document's "frame integrity
// check"): a packet is passed on only if the H2F engine is waiting for that
// kind of packet (a control descriptor first, then data) on that channel,
// and a control descriptor must be exactly 32 DW long. Any other DMA packet
// is consumed and dropped whole, and drop_cnt counts it. The decision is
// taken on the first word of a packet and held to its last word.
// Timing: combinational pass-through of valid/ready, one register of state.
module dma_ds_selector
  import epee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DMA packets from the RX engine
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  pkt_hdr_t    in_hdr,
  input  logic        in_last,
  // what the H2F engine is waiting for
  input  logic        want_desc,
  input  logic        want_data,
  input  logic [3:0]  want_chan,
  // H2F engine ports
  output logic        desc_valid,
  input  logic        desc_ready,
  output logic [31:0] desc_data,
  output logic        data_valid,
  input  logic        data_ready,
  output logic [31:0] data_data,
  // dropped packets (saturating)
  output logic [15:0] drop_cnt
);
  typedef enum logic [1:0] {R_NONE, R_DESC, R_DATA, R_DROP} route_e;
  route_e route_q, route_first, route;
  logic   mid;   // inside a packet: route_q holds its decision

  always_comb begin
    if (in_hdr.chan != want_chan)                                            route_first = R_DROP;
    else if (in_hdr.ptype == PKT_CTRL_DESC && want_desc && in_hdr.len == 16'(DESC_DW)) route_first = R_DESC;
    else if (in_hdr.ptype == PKT_DATA && want_data)                          route_first = R_DATA;
    else                                                                     route_first = R_DROP;
  end
  assign route = mid ? route_q : route_first;

  always_comb begin
    desc_valid = in_valid && (route == R_DESC);
    data_valid = in_valid && (route == R_DATA);
    case (route)
      R_DESC:  in_ready = desc_ready;
      R_DATA:  in_ready = data_ready;
      default: in_ready = 1'b1;
    endcase
  end
  assign desc_data = in_data;
  assign data_data = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid      <= 1'b0;
      route_q  <= R_NONE;
      drop_cnt <= '0;
    end else if (in_valid && in_ready) begin
      mid     <= !in_last;
      route_q <= route;
      if (!mid && route == R_DROP && drop_cnt != '1) drop_cnt <= drop_cnt + 1'b1;
    end
  end
endmodule
