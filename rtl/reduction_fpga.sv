// reduction_fpga: the FPGA of one OptoRx-12 module, which receives 12
// optical links and reduces their data volume.
//
// Each of the 12 links has its own link_channel (word alignment, CRC check,
// de-formatting, pedestal and gain correction, common-mode removal,
// bunch-crossing assignment and threshold). The event_collector then sends
// one fragment per event on the 64-bit zero-suppressed bus (valid/ready/
// last) to the merger FPGA. Every received character also
// goes, unprocessed, onto the 120-bit raw bus (12 lanes of {err, k, byte},
// lane i = bits 10*i+9 .. 10*i, each with its own valid) to the spy FPGA.
//
// Working parameters arrive over the private bus from the spy FPGA as
// 16-bit writes: `cfg_addr` = {link[3:0], 3'b0, table[1:0], channel[6:0]},
// link 15 writing all 12 links at once (tables: 0 pedestal, 1 gain,
// 2 threshold). `almost_full` and `overflow` report buffer state for the
// trigger throttling status.
//
// The 12 links, the processing steps, the 64-bit and 120-bit buses and the
// loading of parameters through the spy FPGA follow the document; the
// private bus format and broadcast address are this design's.
module reduction_fpga
  import esdcc_pkg::*;
#(
  parameter int unsigned HIT_DEPTH = 256,
  parameter int unsigned EOE_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [1:0]          optorx_id,
  // decoded characters of the 12 links
  input  logic [N_LINKS-1:0]  rx_valid,
  input  logic [7:0]          rx_byte [N_LINKS],
  input  logic [N_LINKS-1:0]  rx_k,
  input  logic [N_LINKS-1:0]  rx_err,
  // raw bus to the spy FPGA
  output logic [N_LINKS-1:0]  raw_valid,
  output logic [RAW_W-1:0]    raw_data,
  // private configuration bus from the spy FPGA
  input  logic                cfg_we,
  input  logic [15:0]         cfg_addr,
  input  logic [15:0]         cfg_data,
  // zero-suppressed bus to the merger FPGA
  output logic                zs_valid,
  output logic [ZS_W-1:0]     zs_data,
  output logic                zs_last,
  input  logic                zs_ready,
  // status
  output logic                almost_full,
  output logic [N_LINKS-1:0]  overflow
);
  hit_t               hit_dout [N_LINKS];
  link_eoe_t          eoe_dout [N_LINKS];
  logic [N_LINKS-1:0] hit_empty, hit_rd, eoe_empty, eoe_rd, afull;

  for (genvar i = 0; i < int'(N_LINKS); i++) begin : g_link
    wire sel = cfg_we && ((cfg_addr[15:12] == 4'(i)) || (cfg_addr[15:12] == 4'hF));
    link_channel #(.HIT_DEPTH(HIT_DEPTH), .EOE_DEPTH(EOE_DEPTH)) u_chan (
      .clk, .rst,
      .rx_valid(rx_valid[i]), .rx_byte(rx_byte[i]), .rx_k(rx_k[i]), .rx_err(rx_err[i]),
      .raw_valid(raw_valid[i]), .raw_lane(raw_data[LANE_W*i +: LANE_W]),
      .cfg_we(sel), .cfg_addr(cfg_addr[8:0]), .cfg_data,
      .hit_rd(hit_rd[i]), .hit_dout(hit_dout[i]), .hit_empty(hit_empty[i]),
      .eoe_rd(eoe_rd[i]), .eoe_dout(eoe_dout[i]), .eoe_empty(eoe_empty[i]),
      .almost_full(afull[i]), .overflow(overflow[i]));
  end

  event_collector u_collect (
    .clk, .rst, .optorx_id,
    .hit_dout, .hit_empty, .hit_rd, .eoe_dout, .eoe_empty, .eoe_rd,
    .zs_valid, .zs_data, .zs_last, .zs_ready);

  assign almost_full = |afull;
endmodule
