// epee_reg_file: the library's own registers (REG_FILE), reached by PIO
// with address bit REG_SEL_BIT set. The register map is in epee_pkg.
//
// It holds the interrupt enables (driving the *_int_enable outputs), takes
// interrupt clears and the per-channel DMA doorbells as one-cycle pulses to
// the INTR interface and the DMA engines, and lets the host read the
// interrupt state, the channel indications, the error counters, an
// identification word with the TP code and a scratch register. Writes take
// effect at the clock edge; reads are combinational. The document shows a
// register file between the PIO logic and the DMA engines but not its
// contents: the map is this design's choice.
module epee_reg_file
  import epee_pkg::*;
#(
  parameter logic [3:0] TP = TP_USB
) (
  input  logic        clk,
  input  logic        rst_n,
  // write port
  input  logic        we,
  input  logic [7:0]  waddr,
  input  logic [31:0] wdata,
  // read port
  input  logic [7:0]  raddr,
  output logic [31:0] rdata,
  // interrupts
  output logic [2:0]  int_en,
  output logic [2:0]  int_clr,
  input  logic [2:0]  int_pend,
  // DMA doorbells
  output logic        h2f_db_valid,
  output logic        f2h_sub_valid,
  output logic [3:0]  db_chan,
  output logic [15:0] db_count,
  input  logic [15:0] h2f_ind,
  input  logic [15:0] f2h_ind,
  // error counters
  input  logic [15:0] bad_cnt,
  input  logic [15:0] drop_cnt
);
  logic [31:0] scratch;

  assign int_clr       = (we && waddr == REG_INT_CLR) ? wdata[2:0] : 3'b000;
  assign h2f_db_valid  = we && waddr == REG_H2F_DOORBELL;
  assign f2h_sub_valid = we && waddr == REG_F2H_SUBMIT;
  assign db_chan       = wdata[19:16];
  assign db_count      = wdata[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_en  <= '0;
      scratch <= '0;
    end else if (we) begin
      case (waddr)
        REG_INT_EN:  int_en  <= wdata[2:0];
        REG_SCRATCH: scratch <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (raddr)
      REG_ID:       rdata = {TP, VERSION};
      REG_INT_EN:   rdata = {29'd0, int_en};
      REG_INT_PEND: rdata = {29'd0, int_pend};
      REG_H2F_IND:  rdata = {16'd0, h2f_ind};
      REG_F2H_IND:  rdata = {16'd0, f2h_ind};
      REG_ERR_CNT:  rdata = {bad_cnt, drop_cnt};
      REG_SCRATCH:  rdata = scratch;
      default:      rdata = 32'd0;
    endcase
  end
endmodule
