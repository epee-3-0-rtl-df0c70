// pio_rd_logic: PIO read half of the PIO packets processing module.
//
// It executes the register reads the host sends as PKT_PIO_RD packets and
// returns each result as an uplink PKT_PIO_RD completion (header, then one
// data DW). An address with bit REG_SEL_BIT set reads the library's register
// file (combinational read, taken the cycle the request is accepted). Any
// other address reads the accelerator over the four-phase req/ack bus:
// pio_rd_req is held until pio_rd_ack, pio_rd_data is taken in the cycle
// pio_rd_ack is first seen high, and the next read waits for pio_rd_ack to
// fall. One read is outstanding at a time. The user-side signals follow the
// document; the completion packet and the address split are this design's.
module pio_rd_logic
  import epee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // read requests from the RX engine
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  // library register file
  output logic [7:0]  rf_addr,
  input  logic [31:0] rf_rdata,
  // user PIO read bus
  output logic [16:0] pio_rd_addr,
  output logic        pio_rd_req,
  input  logic        pio_rd_ack,
  input  logic [31:0] pio_rd_data,
  // uplink completion
  output logic        cpl_valid,
  input  logic        cpl_ready,
  output logic [31:0] cpl_data,
  output logic        cpl_last
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_HDR, S_DATA} state_e;
  state_e      state;
  logic [31:0] rdata;
  logic        internal;

  assign internal   = req_addr[REG_SEL_BIT];
  assign req_ready  = (state == S_IDLE) && !pio_rd_ack;
  assign rf_addr    = req_addr[7:0];
  assign pio_rd_req = (state == S_REQ);

  always_comb begin
    cpl_valid = (state == S_HDR) || (state == S_DATA);
    cpl_last  = (state == S_DATA);
    cpl_data  = (state == S_HDR) ? mk_hdr(DIR_F2H, PKT_PIO_RD, 4'd0, 16'd1) : rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rdata       <= '0;
      pio_rd_addr <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_valid && req_ready) begin
          if (internal) begin
            rdata <= rf_rdata;
            state <= S_HDR;
          end else begin
            pio_rd_addr <= req_addr[16:0];
            state       <= S_REQ;
          end
        end
        S_REQ: if (pio_rd_ack) begin
          rdata <= pio_rd_data;
          state <= S_HDR;
        end
        S_HDR:  if (cpl_ready) state <= S_DATA;
        S_DATA: if (cpl_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (pio_rd_req && !pio_rd_ack) |=> pio_rd_req && $stable(pio_rd_addr));
endmodule
