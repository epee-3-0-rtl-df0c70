// dma_us_selector: DMA upstream selector, the uplink half of the DMA
// packets processing module. It merges the packet streams of the H2F engine
// (frame requests, status descriptors) and the F2H engine (data frames,
// status descriptors) into one stream for the TX engine.
//
// Packets are never interleaved: once a packet has started, its source
// keeps the output until its last DW. Between packets the two sources take
// turns (round robin) when both wait. Arbitration is this design's choice;
// the document only names the block.
module dma_us_selector (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_valid,
  output logic        a_ready,
  input  logic [31:0] a_data,
  input  logic        a_last,
  input  logic        b_valid,
  output logic        b_ready,
  input  logic [31:0] b_data,
  input  logic        b_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);
  logic locked, owner_q, owner, prefer_b;

  always_comb begin
    if (locked)                  owner = owner_q;
    else if (a_valid && b_valid) owner = prefer_b;
    else                         owner = b_valid;
  end

  assign out_valid = owner ? b_valid : a_valid;
  assign out_data  = owner ? b_data  : a_data;
  assign out_last  = owner ? b_last  : a_last;
  assign a_ready   = !owner && out_ready;
  assign b_ready   =  owner && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      owner_q  <= 1'b0;
      prefer_b <= 1'b0;
    end else if (out_valid && out_ready) begin
      locked  <= !out_last;
      owner_q <= owner;
      if (out_last) prefer_b <= !owner;
    end
  end
endmodule
