// epee_pkg: types and constants shared by the FPGA side of the EPEE host-FPGA
// communication core (USB version).
//
// Everything travels over the link as 32-bit double words (DW). Each packet
// starts with one header DW that names its direction, its type, its channel
// and the number of payload DWs that follow. The fields follow the document
// (direction, type, channel number, data length); their positions and the
// type codes are this design's choice. Descriptor frames are a fixed 32 DW,
// of which the first 4 DW belong to the library; the TP codes 4'b0100 (PCIe)
// and 4'b0101 (USB) and the 16 channels come from the document.
package epee_pkg;

  localparam int unsigned NUM_CH      = 16;  // DMA priority channels
  localparam int unsigned DESC_DW     = 32;  // descriptor frame length in DW
  localparam int unsigned LIB_DESC_DW = 4;   // DWs of a descriptor used by the library

  localparam logic [3:0] TP_PCIE = 4'b0100;
  localparam logic [3:0] TP_USB  = 4'b0101;

  typedef enum logic {
    DIR_H2F = 1'b0,   // host to FPGA (downlink)
    DIR_F2H = 1'b1    // FPGA to host (uplink)
  } pkt_dir_e;

  typedef enum logic [2:0] {
    PKT_DATA      = 3'd0,  // DMA data frame (part of one)
    PKT_CTRL_DESC = 3'd1,  // H2F control descriptor frame, 32 DW
    PKT_H2F_STAT  = 3'd2,  // uplink: status descriptor of an H2F frame, 32 DW
    PKT_H2F_REQ   = 3'd3,  // uplink: accelerator asks for the next frame of a channel
    PKT_PIO_WR    = 3'd4,  // downlink: payload = address, data
    PKT_PIO_RD    = 3'd5,  // downlink: payload = address; uplink completion: payload = data
    PKT_INTR      = 3'd6,  // uplink: interrupt, channel field = interrupt type
    PKT_F2H_STAT  = 3'd7   // uplink: status descriptor closing an F2H frame, 32 DW
  } pkt_type_e;

  typedef struct packed {
    pkt_dir_e    dir;    // [31]
    pkt_type_e   ptype;  // [30:28]
    logic [3:0]  chan;   // [27:24]
    logic [7:0]  rsvd;   // [23:16]
    logic [15:0] len;    // [15:0] payload length in DW
  } pkt_hdr_t;

  // Interrupt sources, also the channel field of a PKT_INTR packet.
  typedef enum logic [1:0] {
    INT_H2F = 2'd0,
    INT_F2H = 2'd1,
    INT_UDF = 2'd2
  } int_type_e;
  localparam int unsigned NUM_INT = 3;

  // Library register file, word addresses. A PIO address with bit
  // REG_SEL_BIT set goes to this file; any other goes to the user PIO bus.
  localparam int unsigned REG_SEL_BIT = 17;
  localparam logic [7:0] REG_ID           = 8'd0;  // RO {TP, version}
  localparam logic [7:0] REG_INT_EN       = 8'd1;  // RW [2:0] enables
  localparam logic [7:0] REG_INT_CLR      = 8'd2;  // WO write 1 to clear a raised interrupt
  localparam logic [7:0] REG_INT_PEND     = 8'd3;  // RO [2:0] raised, not yet cleared
  localparam logic [7:0] REG_H2F_DOORBELL = 8'd4;  // WO [19:16] channel, [15:0] frames added
  localparam logic [7:0] REG_F2H_SUBMIT   = 8'd5;  // WO [19:16] channel, [15:0] buffers added
  localparam logic [7:0] REG_H2F_IND      = 8'd6;  // RO channels with frames waiting
  localparam logic [7:0] REG_F2H_IND      = 8'd7;  // RO channels with free buffers
  localparam logic [7:0] REG_ERR_CNT      = 8'd8;  // RO [31:16] bad packets, [15:0] dropped DMA packets
  localparam logic [7:0] REG_SCRATCH      = 8'd9;  // RW

  localparam logic [27:0] VERSION = 28'h0003000;

  function automatic logic [31:0] mk_hdr(pkt_dir_e dir, pkt_type_e t, logic [3:0] ch, logic [15:0] len);
    pkt_hdr_t h;
    h.dir = dir; h.ptype = t; h.chan = ch; h.rsvd = '0; h.len = len;
    return h;
  endfunction

endpackage
