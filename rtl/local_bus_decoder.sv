// local_bus_decoder: address decoding of the host board's local bus,
// which joins the VME interface (the only master) to the spy FPGAs and
// the merger FPGA.
//
// The top four bits of the 25-bit longword address select the target:
// 1, 2, 3 spy FPGA #1..#3 (21-bit address inside), 4 merger FPGA
// (4-bit register address). The request (`m_valid` with address, data,
// write flag) is passed to the selected target only, and that target's
// one-clock ack and read data are returned. A request to any other
// target is acknowledged by the decoder itself one clock later with read
// data 32'hBAD0_ADD0. The targets follow the document's board diagram;
// the address map is this design's.
module local_bus_decoder
  import esdcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              m_valid,
  input  logic [LB_AW-1:0]  m_addr,
  output logic              m_ack,
  output logic [31:0]       m_rdata,
  output logic [N_OPTORX-1:0] spy_valid,
  input  logic [N_OPTORX-1:0] spy_ack,
  input  logic [31:0]       spy_rdata [N_OPTORX],
  output logic              mrg_valid,
  input  logic              mrg_ack,
  input  logic [31:0]       mrg_rdata
);
  wire [3:0] tgt = m_addr[LB_AW-1 -: 4];
  logic      none_ack;

  always_comb begin
    for (int i = 0; i < int'(N_OPTORX); i++)
      spy_valid[i] = m_valid && (tgt == LB_T_SPY0 + 4'(i));
    mrg_valid = m_valid && (tgt == LB_T_MERGER);
  end
  wire none = m_valid && !(tgt >= LB_T_SPY0 && tgt <= LB_T_MERGER);

  always_ff @(posedge clk) begin
    if (rst) none_ack <= 1'b0;
    else     none_ack <= none && !none_ack;
  end

  always_comb begin
    m_ack   = none_ack || mrg_ack || (spy_ack != '0);
    m_rdata = none_ack ? 32'hBAD0_ADD0 : mrg_ack ? mrg_rdata : '0;
    for (int i = 0; i < int'(N_OPTORX); i++)
      if (spy_ack[i]) m_rdata = spy_rdata[i];
  end
endmodule
