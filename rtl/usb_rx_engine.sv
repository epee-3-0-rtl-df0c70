// usb_rx_engine: RX_ENGINE of the transmission control module, USB version.
// It parses the downlink word stream into packets and forwards each one to
// the block that serves its type, as the document describes for the USB
// packet format (packets are separated by type and routed to the right
// interface).
//
// A packet is one header DW (see epee_pkg::pkt_hdr_t) and hdr.len payload
// DWs. DMA packets (data, control descriptor) are streamed to the DMA
// downstream selector word by word with their header alongside and a last
// flag on the final word. A PIO write (2 payload DW: address, data) and a PIO
// read (1 payload DW: address) are collected and handed over as one request.
// Anything else - uplink direction, unknown type, a PIO packet of the wrong
// length, a DMA packet with no payload - is read and discarded, and counted
// in bad_cnt. in_ready is low only while a downstream block stalls.
module usb_rx_engine
  import epee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // downlink words
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  // DMA packets to the downstream selector
  output logic        ds_valid,
  input  logic        ds_ready,
  output logic [31:0] ds_data,
  output pkt_hdr_t    ds_hdr,
  output logic        ds_last,
  // PIO write request
  output logic        pwr_valid,
  input  logic        pwr_ready,
  output logic [31:0] pwr_addr,
  output logic [31:0] pwr_data,
  // PIO read request
  output logic        prd_valid,
  input  logic        prd_ready,
  output logic [31:0] prd_addr,
  // packets discarded (saturating)
  output logic [15:0] bad_cnt
);
  typedef enum logic [2:0] {S_HDR, S_DMA, S_ADDR, S_WDATA, S_ISSUE_WR, S_ISSUE_RD, S_DROP} state_e;
  state_e   state;
  pkt_hdr_t hdr, in_hdr;
  logic [15:0] rem;
  logic        take;

  assign in_hdr = pkt_hdr_t'(in_data);

  always_comb begin
    case (state)
      S_DMA:                  in_ready = ds_ready;
      S_ISSUE_WR, S_ISSUE_RD: in_ready = 1'b0;
      default:                in_ready = 1'b1;
    endcase
  end
  assign take = in_valid && in_ready;

  assign ds_valid  = (state == S_DMA) && in_valid;
  assign ds_data   = in_data;
  assign ds_hdr    = hdr;
  assign ds_last   = (rem == 16'd1);
  assign pwr_valid = (state == S_ISSUE_WR);
  assign prd_valid = (state == S_ISSUE_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_HDR;
      hdr      <= '0;
      rem      <= '0;
      pwr_addr <= '0;
      pwr_data <= '0;
      prd_addr <= '0;
      bad_cnt  <= '0;
    end else begin
      case (state)
        S_HDR: if (take) begin
          hdr <= in_hdr;
          rem <= in_hdr.len;
          if (in_hdr.dir != DIR_H2F) begin
            state <= (in_hdr.len == 0) ? S_HDR : S_DROP;
            if (bad_cnt != '1) bad_cnt <= bad_cnt + 1'b1;
          end else begin
            case (in_hdr.ptype)
              PKT_DATA, PKT_CTRL_DESC: if (in_hdr.len != 0) state <= S_DMA;
                                       else if (bad_cnt != '1) bad_cnt <= bad_cnt + 1'b1;
              PKT_PIO_WR: if (in_hdr.len == 16'd2) state <= S_ADDR;
                          else begin
                            state <= (in_hdr.len == 0) ? S_HDR : S_DROP;
                            if (bad_cnt != '1) bad_cnt <= bad_cnt + 1'b1;
                          end
              PKT_PIO_RD: if (in_hdr.len == 16'd1) state <= S_ADDR;
                          else begin
                            state <= (in_hdr.len == 0) ? S_HDR : S_DROP;
                            if (bad_cnt != '1) bad_cnt <= bad_cnt + 1'b1;
                          end
              default: begin
                state <= (in_hdr.len == 0) ? S_HDR : S_DROP;
                if (bad_cnt != '1) bad_cnt <= bad_cnt + 1'b1;
              end
            endcase
          end
        end
        S_DMA: if (take) begin
          rem <= rem - 1'b1;
          if (rem == 16'd1) state <= S_HDR;
        end
        S_ADDR: if (take) begin
          pwr_addr <= in_data;
          prd_addr <= in_data;
          state    <= (hdr.ptype == PKT_PIO_WR) ? S_WDATA : S_ISSUE_RD;
        end
        S_WDATA: if (take) begin
          pwr_data <= in_data;
          state    <= S_ISSUE_WR;
        end
        S_ISSUE_WR: if (pwr_ready) state <= S_HDR;
        S_ISSUE_RD: if (prd_ready) state <= S_HDR;
        S_DROP: if (take) begin
          rem <= rem - 1'b1;
          if (rem == 16'd1) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
