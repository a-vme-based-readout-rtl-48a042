// link_channel: the complete data-reduction path of one optical link.
//
//   decoded bytes -> link_word_aligner -> kchip_deformatter (CRC check,
//   de-formatting) -> pedestal_calib -> common_mode -> bx_threshold
//   -> hit FIFO + end-of-event FIFO -> event_collector
//
// The receiver delivers at most one byte per clock, so one 16-bit word
// every second clock; the pipeline never stalls the link. Kept strips are
// buffered in a HIT_DEPTH-entry FIFO, end-of-event records (with their hit
// count) in an EOE_DEPTH-entry FIFO; the collector drains both. If the hit
// FIFO is full a hit is dropped and `overflow` is set until reset;
// `almost_full` (a FIFO more than 3/4 full) feeds the throttling status.
// Configuration words address the three lookup tables with `cfg_addr`
// = {table[1:0], channel[6:0]}: 0 pedestal, 1 gain, 2 threshold.
// The order of the processing steps follows the document; the buffer
// sizes, overflow handling and table addressing are this design's.
module link_channel
  import esdcc_pkg::*;
#(
  parameter int unsigned HIT_DEPTH = 256,
  parameter int unsigned EOE_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst,
  // decoded link characters
  input  logic              rx_valid,
  input  logic [7:0]        rx_byte,
  input  logic              rx_k,
  input  logic              rx_err,
  // raw lane to the spy FPGA
  output logic              raw_valid,
  output logic [LANE_W-1:0] raw_lane,
  // configuration
  input  logic              cfg_we,
  input  logic [8:0]        cfg_addr,
  input  logic [15:0]       cfg_data,
  // buffered results
  input  logic              hit_rd,
  output hit_t              hit_dout,
  output logic              hit_empty,
  input  logic              eoe_rd,
  output link_eoe_t         eoe_dout,
  output logic              eoe_empty,
  output logic              almost_full,
  output logic              overflow
);
  logic              w_valid, w_err;
  logic [WORD_W-1:0] w;
  logic              d_valid, d_eoe_valid;
  sample_t           d_smp;
  link_eoe_t         d_eoe;
  logic              p_valid;
  sample_t           p_smp;
  logic              p_eoe_valid;
  link_eoe_t         p_eoe;
  logic              c_valid, c_eoe_valid;
  sample_t           c_smp;
  link_eoe_t         c_eoe;
  logic              h_valid, b_eoe_valid;
  hit_t              h;
  link_eoe_t         b_eoe;
  logic              hit_full, eoe_full;
  // diagnostic values kept inside the pipeline (not used further here)
  logic [WORD_W-1:0] mm_status [2*N_MM];
  logic signed [VAL_W-1:0] cm_value;
  logic [$clog2(HIT_DEPTH):0] hit_cnt;
  logic [$clog2(EOE_DEPTH):0] eoe_cnt;

  link_word_aligner u_align (
    .clk, .rst, .rx_valid, .rx_byte, .rx_k, .rx_err,
    .word_valid(w_valid), .word(w), .word_err(w_err), .raw_valid, .raw_lane);

  kchip_deformatter u_deformat (
    .clk, .rst, .word_valid(w_valid), .word(w), .word_err(w_err),
    .smp_valid(d_valid), .smp(d_smp), .eoe_valid(d_eoe_valid), .eoe(d_eoe),
    .mm_status(mm_status));

  pedestal_calib u_ped (
    .clk, .rst,
    .cfg_we(cfg_we && cfg_addr[8] == 1'b0), .cfg_sel(cfg_addr[7]),
    .cfg_chan(cfg_addr[6:0]), .cfg_data,
    .in_valid(d_valid), .in(d_smp), .out_valid(p_valid), .out(p_smp));

  // the end-of-event record travels alongside the pedestal stage
  always_ff @(posedge clk) begin
    if (rst) begin
      p_eoe_valid <= 1'b0; p_eoe <= '0;
    end else begin
      p_eoe_valid <= d_eoe_valid;
      if (d_eoe_valid) p_eoe <= d_eoe;
    end
  end

  common_mode u_cm (
    .clk, .rst, .in_valid(p_valid), .in(p_smp),
    .eoe_in_valid(p_eoe_valid), .eoe_in(p_eoe),
    .out_valid(c_valid), .out(c_smp),
    .eoe_out_valid(c_eoe_valid), .eoe_out(c_eoe), .cm_value(cm_value));

  bx_threshold u_bx (
    .clk, .rst, .cfg_we(cfg_we && cfg_addr[8:7] == 2'd2),
    .cfg_chan(cfg_addr[6:0]), .cfg_data,
    .in_valid(c_valid), .in(c_smp),
    .eoe_in_valid(c_eoe_valid), .eoe_in(c_eoe),
    .hit_valid(h_valid), .hit(h),
    .eoe_out_valid(b_eoe_valid), .eoe_out(b_eoe));

  // hits dropped on a full FIFO are still counted by bx_threshold; the
  // count is corrected here so the collector reads exactly what is stored
  logic [7:0] dropped;
  link_eoe_t  eoe_wdata;
  always_comb begin
    eoe_wdata       = b_eoe;
    eoe_wdata.nhits = b_eoe.nhits - dropped;
    if (dropped != 0) eoe_wdata.crc_err = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      overflow <= 1'b0; dropped <= '0;
    end else begin
      if (h_valid && hit_full) begin
        overflow <= 1'b1;
      end
      if (b_eoe_valid) dropped <= '0;
      else if (h_valid && hit_full) dropped <= dropped + 1'b1;
    end
  end

  sync_fifo #(.WIDTH($bits(hit_t)), .DEPTH(HIT_DEPTH)) u_hit_fifo (
    .clk, .rst, .wr(h_valid && !hit_full), .din(h), .rd(hit_rd),
    .dout(hit_dout), .full(hit_full), .empty(hit_empty), .count(hit_cnt));

  sync_fifo #(.WIDTH($bits(link_eoe_t)), .DEPTH(EOE_DEPTH)) u_eoe_fifo (
    .clk, .rst, .wr(b_eoe_valid && !eoe_full), .din(eoe_wdata), .rd(eoe_rd),
    .dout(eoe_dout), .full(eoe_full), .empty(eoe_empty), .count(eoe_cnt));

  assign almost_full = (hit_cnt > ($clog2(HIT_DEPTH)+1)'(HIT_DEPTH * 3 / 4)) ||
                       (eoe_cnt > ($clog2(EOE_DEPTH)+1)'(EOE_DEPTH * 3 / 4));

  // a lost end-of-event record would desynchronise the collector
  a_eoe_not_lost: assert property (@(posedge clk) disable iff (rst)
                                   !(b_eoe_valid && eoe_full))
    else $error("link_channel: end-of-event FIFO overflow");
endmodule
