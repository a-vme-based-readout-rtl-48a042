// merger_fpga: the host-board FPGA (#4) that builds the board's event in
// the common CMS DAQ format and sends it to the S-Link transmitter.
//
// For every level-1 accept popped from the TTC trigger FIFO it sends
//   header  (K word): BOE_1, Evt_ty, LV1_id, BX_id, Source_id, FOV=0, H=0
//   payload (D words): the fragments of reduction FPGA 0, 1 and 2 in turn,
//                      each copied word by word up to its `last` word
//   trailer (K word): EOE_1, Evt_lgth, CRC, Evt_stat, TTS, T=0
// Field positions are listed in esdcc_pkg. Evt_lgth counts 64-bit words
// including header and trailer. The CRC is CRC-16-CCITT over all words of
// the event, MSB first, with the trailer's CRC field taken as zero.
// Evt_stat bit 0: a fragment's event counter differs from LV1_id[15:0];
// bit 1: a fragment reports link errors; bit 2: a reduction FPGA lost hits.
// The S-Link side writes one word per clock with `slink_we`, `slink_ctrl`
// high for header and trailer, and waits while `slink_lff` (link full) is
// high. Fragment buses use valid/ready.
//
// The trigger throttling status `tts` is registered: OUT_OF_SYNC after an
// event-number mismatch (until cleared), BUSY when hits were lost or the
// trigger FIFO holds TRIG_BUSY or more events, WARNING when a reduction FPGA
// buffer is almost full or the trigger FIFO holds TRIG_WARN or more, READY
// otherwise.
//
// Local bus registers (4-bit longword address, valid held until ack):
//   0 Source_id (12 bits)  1 Evt_ty (4 bits)  2 events sent (read only)
//   3 status {tts[7:4], sync error[0]}; writing bit 0 clears the sync error.
//
// Merging the three 64-bit buses, building the event in the CMS DAQ format
// with the fields of its header and trailer, sending it through the S-Link,
// and the throttling flag follow the document. Bit positions, the TTS codes
// follow the published CMS DAQ conventions, which the document does not
// spell out; the CRC coverage and the status rules are this design's.
module merger_fpga
  import esdcc_pkg::*;
#(
  parameter logic [11:0] SOURCE_ID_RESET = 12'd520,
  parameter int unsigned TRIG_CNT_W      = 5,
  parameter int unsigned TRIG_WARN       = 8,
  parameter int unsigned TRIG_BUSY       = 14
) (
  input  logic                  clk,
  input  logic                  rst,
  // zero-suppressed buses from the three reduction FPGAs
  input  logic [N_OPTORX-1:0]   zs_valid,
  input  logic [ZS_W-1:0]       zs_data [N_OPTORX],
  input  logic [N_OPTORX-1:0]   zs_last,
  output logic [N_OPTORX-1:0]   zs_ready,
  // trigger FIFO of the TTC distributor
  input  logic                  trig_empty,
  input  logic [23:0]           trig_lv1_id,
  input  logic [11:0]           trig_bx_id,
  input  logic [TRIG_CNT_W-1:0] trig_count,
  output logic                  trig_rd,
  // buffer state of the reduction FPGAs
  input  logic [N_OPTORX-1:0]   red_almost_full,
  input  logic [N_OPTORX-1:0]   red_overflow,
  // S-Link transmitter
  output logic                  slink_we,
  output logic                  slink_ctrl,
  output logic [63:0]           slink_data,
  input  logic                  slink_lff,
  output tts_e                  tts,
  // local bus slave
  input  logic                  lb_valid,
  input  logic                  lb_we,
  input  logic [3:0]            lb_addr,
  input  logic [31:0]           lb_wdata,
  output logic                  lb_ack,
  output logic [31:0]           lb_rdata
);
  typedef enum logic [1:0] {M_IDLE, M_HDR, M_PAY, M_TRL} mstate_e;
  mstate_e     state;
  logic [1:0]  frag;
  logic        first_word;   // next payload word is a fragment header
  logic [23:0] len;
  logic [15:0] crc;
  logic [2:0]  evt_stat;
  logic [11:0] source_id;
  logic [3:0]  evt_ty;
  logic [31:0] events_sent;
  logic        sync_err;

  logic [63:0] header, trailer, trailer0;
  logic [15:0] crc_trl;
  logic [ZS_W-1:0] cur;
  assign cur = zs_data[frag];

  always_comb begin
    header   = {BOE_1, evt_ty, trig_lv1_id, trig_bx_id, source_id, 4'h0, 1'b0, 1'b0, 2'b00};
    trailer0 = {EOE_1, 4'h0, len + 24'd1, 16'h0000, 4'h0, 1'b0, evt_stat, tts, 1'b0, 1'b0, 2'b00};
    crc_trl  = crc16_next(crc, trailer0, 64);
    trailer  = trailer0;
    trailer[31:16] = crc_trl;
  end

  wire pay_go = (state == M_PAY) && zs_valid[frag] && !slink_lff;

  always_comb begin
    slink_we   = 1'b0;
    slink_ctrl = 1'b0;
    slink_data = '0;
    zs_ready   = '0;
    trig_rd    = 1'b0;
    unique case (state)
      M_HDR: begin
        slink_we = !slink_lff; slink_ctrl = 1'b1; slink_data = header;
      end
      M_PAY: begin
        slink_we = pay_go; slink_data = cur;
        zs_ready[frag] = !slink_lff;
      end
      M_TRL: begin
        slink_we = !slink_lff; slink_ctrl = 1'b1; slink_data = trailer;
        trig_rd  = !slink_lff;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M_IDLE; frag <= '0; first_word <= 1'b1; len <= '0;
      crc <= CRC16_INIT; evt_stat <= '0; events_sent <= '0; sync_err <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: if (!trig_empty) begin
          state <= M_HDR;
          crc <= CRC16_INIT; len <= '0; evt_stat <= '0;
          frag <= '0; first_word <= 1'b1;
        end
        M_HDR: if (!slink_lff) begin
          crc   <= crc16_next(crc, header, 64);
          len   <= 24'd1;
          state <= M_PAY;
        end
        M_PAY: if (pay_go) begin
          crc <= crc16_next(crc, cur, 64);
          len <= len + 1'b1;
          first_word <= zs_last[frag];
          if (first_word) begin
            if (cur[45:30] != trig_lv1_id[15:0]) begin
              evt_stat[0] <= 1'b1;
              sync_err    <= 1'b1;
            end
            if (cur[29:18] != '0) evt_stat[1] <= 1'b1;
          end
          if (zs_last[frag]) begin
            if (frag == 2'(N_OPTORX - 1)) state <= M_TRL;
            else frag <= frag + 1'b1;
          end
        end
        M_TRL: if (!slink_lff) begin
          events_sent <= events_sent + 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
      if (state != M_TRL && state != M_IDLE && red_overflow != '0) evt_stat[2] <= 1'b1;
      if (lb_valid && !lb_ack && lb_we && lb_addr == 4'd3 && lb_wdata[0]) sync_err <= 1'b0;
    end
  end

  // ------------------------------------------------ trigger throttling
  always_ff @(posedge clk) begin
    if (rst) tts <= TTS_READY;
    else if (sync_err) tts <= TTS_OOS;
    else if (red_overflow != '0 || trig_count >= TRIG_CNT_W'(TRIG_BUSY)) tts <= TTS_BUSY;
    else if (red_almost_full != '0 || trig_count >= TRIG_CNT_W'(TRIG_WARN)) tts <= TTS_WARN;
    else tts <= TTS_READY;
  end

  // ------------------------------------------------------- local bus
  always_ff @(posedge clk) begin
    if (rst) begin
      lb_ack <= 1'b0; lb_rdata <= '0; source_id <= SOURCE_ID_RESET; evt_ty <= 4'h1;
    end else begin
      lb_ack <= 1'b0;
      if (lb_valid && !lb_ack) begin
        lb_ack <= 1'b1;
        if (lb_we) begin
          if (lb_addr == 4'd0) source_id <= lb_wdata[11:0];
          if (lb_addr == 4'd1) evt_ty    <= lb_wdata[3:0];
        end else begin
          unique case (lb_addr)
            4'd0: lb_rdata <= 32'(source_id);
            4'd1: lb_rdata <= 32'(evt_ty);
            4'd2: lb_rdata <= events_sent;
            4'd3: lb_rdata <= {24'd0, tts, 3'd0, sync_err};
            default: lb_rdata <= '0;
          endcase
        end
      end
    end
  end

  a_slink_hold: assert property (@(posedge clk) disable iff (rst) slink_lff |-> !slink_we)
    else $error("merger_fpga: write while S-Link full");
endmodule
