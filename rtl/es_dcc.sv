// es_dcc: the Endcap Preshower Data Concentrator Card, a VME 9U host board
// carrying three OptoRx-12 receiver modules and an S-Link transmitter.
//
// Data path: 36 links (3 x 12) arrive, already de-serialised and 8b/10b
// decoded, at three reduction FPGAs, which zero-suppress them and send one
// fragment per event on a 64-bit bus to the merger FPGA. The merger pairs
// the fragments with the event and bunch numbers from the TTC distributor
// and sends the event, in the CMS DAQ format, to the S-Link port; it also
// drives the trigger throttling status `tts`.
// Monitoring and control: each reduction FPGA copies its raw characters on
// a 120-bit bus to its spy FPGA, which stores them (or, selectable, the
// words of the 64-bit zero-suppressed bus) in three external SRAMs on
// request. The VME interface turns VME64x cycles into local bus cycles
// for the spy FPGAs and the merger; pedestals, gains and thresholds reach
// the reduction FPGAs through the spy FPGAs' private buses.
// Local bus map (VME A[26:2]): target = A[26:23]: 1..3 spy FPGA #1..#3,
// 4 merger FPGA (see spy_fpga and merger_fpga for the registers).
//
// Everything runs on one clock `clk`, twice the bunch-crossing rate (one
// link character per clock). External parts the document takes from
// elsewhere appear as ports: link receivers (rx_*), TTC receiver outputs,
// VME backplane, the nine spy SRAMs and the S-Link transmitter. The board
// partitioning and buses follow the document; the single clock is this
// design's simplification. The distributor's free-running counters
// (`bc_strobe`, `bx_cnt`, `ev_cnt`) and its lost-trigger count are
// diagnostic outputs that nothing on this board consumes yet; they are
// left unconnected deliberately.
module es_dcc
  import esdcc_pkg::*;
#(
  parameter int unsigned HIT_DEPTH  = 256,
  parameter int unsigned EOE_DEPTH  = 8,
  parameter int unsigned TRIG_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst,
  // 3 x 12 decoded optical links
  input  logic [N_LINKS-1:0]  rx_valid [N_OPTORX],
  input  logic [7:0]          rx_byte  [N_OPTORX][N_LINKS],
  input  logic [N_LINKS-1:0]  rx_k     [N_OPTORX],
  input  logic [N_LINKS-1:0]  rx_err   [N_OPTORX],
  // TTC receiver outputs
  input  logic                ttc_l1a,
  input  logic                ttc_bcnt_res,
  input  logic                ttc_evcnt_res,
  // VME64x backplane
  input  logic                vme_as_n,
  input  logic [1:0]          vme_ds_n,
  input  logic                vme_write_n,
  input  logic                vme_lword_n,
  input  logic [5:0]          vme_am,
  input  logic [31:1]         vme_addr,
  input  logic [31:0]         vme_data_in,
  output logic [31:0]         vme_data_out,
  output logic                vme_data_oe,
  output logic                vme_dtack_n,
  input  logic [4:0]          vme_ga_n,
  // spy SRAMs, three per spy FPGA
  output logic [SRAM_AW-1:0]  sram_addr  [N_OPTORX],
  output logic                sram_we    [N_OPTORX],
  output logic [SRAM_W-1:0]   sram_wdata [N_OPTORX][3],
  input  logic [SRAM_W-1:0]   sram_rdata [N_OPTORX][3],
  // S-Link transmitter and throttling
  output logic                slink_we,
  output logic                slink_ctrl,
  output logic [63:0]         slink_data,
  input  logic                slink_lff,
  output tts_e                tts
);
  localparam int unsigned TCW = $clog2(TRIG_DEPTH) + 1;

  logic [N_LINKS-1:0]  raw_valid [N_OPTORX];
  logic [RAW_W-1:0]    raw_data  [N_OPTORX];
  logic                cfg_we    [N_OPTORX];
  logic [15:0]         cfg_addr  [N_OPTORX];
  logic [15:0]         cfg_data  [N_OPTORX];
  logic [N_OPTORX-1:0] zs_valid, zs_last, zs_ready, red_af, red_ovf;
  logic [ZS_W-1:0]     zs_data   [N_OPTORX];
  logic [N_LINKS-1:0]  ovf       [N_OPTORX];

  // local bus
  logic              lb_valid, lb_we, lb_ack;
  logic [LB_AW-1:0]  lb_addr;
  logic [31:0]       lb_wdata, lb_rdata;
  logic [N_OPTORX-1:0] spy_valid, spy_ack;
  logic [31:0]       spy_rdata [N_OPTORX];
  logic              mrg_valid, mrg_ack;
  logic [31:0]       mrg_rdata;

  // TTC
  logic              bc_strobe, trig_rd, trig_empty;
  logic [11:0]       bx_cnt, trig_bx_id;
  logic [23:0]       ev_cnt, trig_lv1_id;
  logic [TCW-1:0]    trig_count;
  logic [15:0]       trig_lost;

  for (genvar f = 0; f < int'(N_OPTORX); f++) begin : g_optorx
    reduction_fpga #(.HIT_DEPTH(HIT_DEPTH), .EOE_DEPTH(EOE_DEPTH)) u_red (
      .clk, .rst, .optorx_id(2'(f)),
      .rx_valid(rx_valid[f]), .rx_byte(rx_byte[f]), .rx_k(rx_k[f]), .rx_err(rx_err[f]),
      .raw_valid(raw_valid[f]), .raw_data(raw_data[f]),
      .cfg_we(cfg_we[f]), .cfg_addr(cfg_addr[f]), .cfg_data(cfg_data[f]),
      .zs_valid(zs_valid[f]), .zs_data(zs_data[f]), .zs_last(zs_last[f]),
      .zs_ready(zs_ready[f]), .almost_full(red_af[f]), .overflow(ovf[f]));

    spy_fpga #(.ID_VALUE(32'h5350_0001 + 32'(f))) u_spy (
      .clk, .rst, .raw_valid(raw_valid[f]), .raw_data(raw_data[f]),
      .zs_valid(zs_valid[f]), .zs_ready(zs_ready[f]), .zs_data(zs_data[f]),
      .zs_last(zs_last[f]),
      .lb_valid(spy_valid[f]), .lb_we, .lb_addr(lb_addr[20:0]), .lb_wdata,
      .lb_ack(spy_ack[f]), .lb_rdata(spy_rdata[f]),
      .cfg_we(cfg_we[f]), .cfg_addr(cfg_addr[f]), .cfg_data(cfg_data[f]),
      .sram_addr(sram_addr[f]), .sram_we(sram_we[f]),
      .sram_wdata(sram_wdata[f]), .sram_rdata(sram_rdata[f]));

    assign red_ovf[f] = |ovf[f];
  end

  ttc_distributor #(.TRIG_DEPTH(TRIG_DEPTH)) u_ttc (
    .clk, .rst, .l1a(ttc_l1a), .bcnt_res(ttc_bcnt_res), .evcnt_res(ttc_evcnt_res),
    .bc_strobe, .bx_cnt, .ev_cnt,
    .trig_rd, .trig_lv1_id, .trig_bx_id, .trig_empty, .trig_count, .trig_lost);

  merger_fpga #(.TRIG_CNT_W(TCW), .TRIG_WARN(TRIG_DEPTH / 2), .TRIG_BUSY(TRIG_DEPTH - 2)) u_merger (
    .clk, .rst, .zs_valid, .zs_data, .zs_last, .zs_ready,
    .trig_empty, .trig_lv1_id, .trig_bx_id, .trig_count, .trig_rd,
    .red_almost_full(red_af), .red_overflow(red_ovf),
    .slink_we, .slink_ctrl, .slink_data, .slink_lff, .tts,
    .lb_valid(mrg_valid), .lb_we, .lb_addr(lb_addr[3:0]), .lb_wdata,
    .lb_ack(mrg_ack), .lb_rdata(mrg_rdata));

  vme_interface u_vme (
    .clk, .rst, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am,
    .vme_addr, .vme_data_in, .vme_data_out, .vme_data_oe, .vme_dtack_n, .vme_ga_n,
    .lb_valid, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata);

  local_bus_decoder u_lbdec (
    .clk, .rst, .m_valid(lb_valid), .m_addr(lb_addr), .m_ack(lb_ack), .m_rdata(lb_rdata),
    .spy_valid, .spy_ack, .spy_rdata, .mrg_valid, .mrg_ack, .mrg_rdata);
endmodule
