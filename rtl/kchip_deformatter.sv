// kchip_deformatter: integrity check and de-formatting of one link's
// 600-byte event packet.
//
// A packet is 300 16-bit words (layout in esdcc_pkg): a marker/flags word,
// the bunch-crossing number, the event counter, eight micromodule status
// words, 288 words holding 384 packed 12-bit samples (4 micromodules x
// 3 samples x 32 strips, four samples in every three words) and a final
// CRC-16-CCITT word over all the others. A packet starts at a word whose
// top nibble is the marker while no packet is in progress.
//
// Samples leave on `smp_valid` one per clock, tagged with micromodule,
// sample index and strip, in packet order. After the last sample the end
// of event record (BX, event counter, error flag) leaves on `eoe_valid`;
// the error flag is set on a CRC mismatch, a link code error or non-zero
// K-chip flags. The running CRC is a crc16_ccitt instance. `eoe.nhits`
// is always 0 here (bx_threshold fills it in) and the top four bits of
// `smp.val` are 0 (12-bit ADC values in a 16-bit field), so those output
// bits are constant by design. Words may arrive at most every second clock (one byte per
// clock on the link), which lets four samples drain in the six clocks a
// group of three words takes.
//
// What follows the document: 600-byte packets, 4 micromodules of 32 strips,
// 3 samples, 12-bit ADC words, CRC-16-CCITT check, extraction of strip
// data, time stamps and error flags. The word layout is this design's own.
module kchip_deformatter
  import esdcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  input  logic              word_err,
  output logic              smp_valid,
  output sample_t           smp,
  output logic              eoe_valid,
  output link_eoe_t         eoe,
  output logic [WORD_W-1:0] mm_status [2*N_MM]
);
  logic        active;
  logic [8:0]  cnt;            // index of the next word in the packet
  logic [15:0] crc;
  logic [1:0]  grp;            // word position inside a 3-word group
  logic [31:0] acc;            // first two words of the current group
  logic [11:0] q [4];          // samples waiting to be sent
  logic [2:0]  q_n;            // how many are waiting
  logic [1:0]  q_rd;
  logic        err;
  logic        eoe_pend;
  logic [11:0] bx;
  logic [15:0] ec;
  logic [1:0]  o_mm, o_smp;
  logic [4:0]  o_strip;

  wire        start  = word_valid && !active && (word[15:12] == PKT_MARKER);
  wire        last_w = (cnt == 9'(PKT_WORDS - 1));

  // Running CRC: held at its preset between packets, folds in every packet
  // word except the final CRC word itself (words are at least two clocks
  // apart, so the preset is always back before the next marker).
  crc16_ccitt #(.DATA_W(WORD_W)) u_crc (
    .clk      (clk),
    .rst      (rst),
    .init     (!active && !start),
    .en       (start || (word_valid && active && !last_w)),
    .data     (word),
    .crc      (crc),
    .crc_next ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; cnt <= '0; grp <= '0; acc <= '0;
      q_n <= '0; q_rd <= '0; err <= 1'b0; eoe_pend <= 1'b0;
      bx <= '0; ec <= '0; o_mm <= '0; o_smp <= '0; o_strip <= '0;
      smp_valid <= 1'b0; smp <= '0; eoe_valid <= 1'b0; eoe <= '0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
      for (int i = 0; i < 2*N_MM; i++) mm_status[i] <= '0;
    end else begin
      smp_valid <= 1'b0;
      eoe_valid <= 1'b0;

      // ---------------------------------------------------- word intake
      if (start) begin
        active <= 1'b1;
        cnt    <= 9'd1;
        err    <= word_err || (word[7:0] != 8'h00);
        grp    <= '0;
        o_mm <= '0; o_smp <= '0; o_strip <= '0;
      end else if (word_valid && active) begin
        cnt <= cnt + 1'b1;
        if (word_err) err <= 1'b1;
        if (cnt == 9'd1) bx <= word[11:0];
        else if (cnt == 9'd2) ec <= word;
        else if (cnt < 9'(PKT_HDR_WORDS)) mm_status[3'(cnt - 9'd3)] <= word;
        else if (cnt < 9'(PKT_WORDS - 1)) begin
          if (grp == 2'd2) begin
            // {acc[31:0], word} holds s0 s1 s2 s3, 12 bits each, MSB first
            q[0] <= acc[31:20]; q[1] <= acc[19:8];
            q[2] <= {acc[7:0], word[15:12]}; q[3] <= word[11:0];
            q_n  <= 3'd4; q_rd <= '0;
            grp  <= '0;
          end else begin
            acc <= {acc[15:0], word};
            grp <= grp + 1'b1;
          end
        end else begin
          // CRC word closes the packet
          active   <= 1'b0;
          eoe_pend <= 1'b1;
          if (word != crc) err <= 1'b1;
        end
      end

      // -------------------------------------------------- sample output
      if (q_n != 0) begin
        smp_valid <= 1'b1;
        smp.mm    <= o_mm;
        smp.smp   <= o_smp;
        smp.strip <= o_strip;
        smp.val   <= VAL_W'(q[q_rd]);
        q_rd <= q_rd + 1'b1;
        q_n  <= q_n - 1'b1;
        o_strip <= o_strip + 1'b1;
        if (o_strip == 5'(N_STRIPS - 1)) begin
          if (o_smp == 2'(N_SAMPLES - 1)) begin
            o_smp <= '0;
            o_mm  <= o_mm + 1'b1;
          end else o_smp <= o_smp + 1'b1;
        end
      end else if (eoe_pend) begin
        eoe_pend      <= 1'b0;
        eoe_valid     <= 1'b1;
        eoe.bx        <= bx;
        eoe.ec        <= ec;
        eoe.crc_err   <= err;
        eoe.nhits     <= '0;
      end
    end
  end

  a_word_spacing: assert property (@(posedge clk) disable iff (rst)
                                   word_valid |=> !word_valid)
    else $error("kchip_deformatter: words closer than two clocks");
endmodule
