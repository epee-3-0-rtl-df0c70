// pio_wr_logic: PIO write half of the PIO packets processing module.
//
// It executes the register writes the host sends as PKT_PIO_WR packets.
// An address with bit REG_SEL_BIT set is a register of the library itself
// and is written into the register file in one cycle. Any other address is
// for the accelerator: the low 17 bits go out on pio_wr_addr with the data,
// pio_wr_req rises and stays high until pio_wr_ack answers, then falls; a
// new write starts only after pio_wr_ack has fallen too (four-phase
// req/ack). The document gives the user-side signals and the req/ack idea;
// the address split is this design's choice.
module pio_wr_logic
  import epee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // write requests from the RX engine
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_data,
  // library register file
  output logic        rf_we,
  output logic [7:0]  rf_addr,
  output logic [31:0] rf_wdata,
  // user PIO write bus
  output logic [16:0] pio_wr_addr,
  output logic [31:0] pio_wr_data,
  output logic        pio_wr_req,
  input  logic        pio_wr_ack
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ACK_LOW} state_e;
  state_e state;
  logic   internal;

  assign internal  = req_addr[REG_SEL_BIT];
  assign req_ready = (state == S_IDLE) && (internal || !pio_wr_ack);
  assign rf_we     = req_valid && req_ready && internal;
  assign rf_addr   = req_addr[7:0];
  assign rf_wdata  = req_data;
  assign pio_wr_req = (state == S_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pio_wr_addr <= '0;
      pio_wr_data <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_valid && req_ready && !internal) begin
          pio_wr_addr <= req_addr[16:0];
          pio_wr_data <= req_data;
          state       <= S_REQ;
        end
        S_REQ:     if (pio_wr_ack)  state <= S_ACK_LOW;
        S_ACK_LOW: if (!pio_wr_ack) state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (pio_wr_req && !pio_wr_ack) |=> pio_wr_req && $stable(pio_wr_addr) && $stable(pio_wr_data));
endmodule
