// bx_threshold: bunch-crossing assignment and threshold cut for one link.
//
// The three time samples of a strip are taken on the baseline (s0), near
// the peak (s1) and after the peak (s2) of the shaped pulse. Samples
// arrive micromodule by micromodule, all 32 strips of s0, then of s1, then
// of s2; s0 and s1 are kept per strip until s2 arrives. A strip is kept as
// a hit when
//     s1 > threshold[channel]  and  s1 > s0  and  s1 >= s2,
// i.e. its pulse is above the per-channel threshold and peaks at the
// triggered sample; pulses from the previous bunch (falling through s0,
// s1) and the next bunch (still rising at s2) are rejected. A hit leaves
// one clock after its s2 sample. The end-of-event record leaves one clock
// after it arrives, with `nhits` set to the number of hits of the event.
// The threshold table (signed 16 bit per channel, reset to 0) is written
// through the configuration port.
//
// The three sample times, the purpose of both cuts and a per-channel
// threshold downloaded from outside follow the document; the exact
// comparison rule is this design's.
module bx_threshold
  import esdcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cfg_we,
  input  logic [6:0]  cfg_chan,
  input  logic [15:0] cfg_data,
  input  logic        in_valid,
  input  sample_t     in,
  input  logic        eoe_in_valid,
  input  link_eoe_t   eoe_in,
  output logic        hit_valid,
  output hit_t        hit,
  output logic        eoe_out_valid,
  output link_eoe_t   eoe_out
);
  logic signed [VAL_W-1:0] thr   [N_CHAN];
  logic signed [VAL_W-1:0] s0_q  [N_STRIPS];
  logic signed [VAL_W-1:0] s1_q  [N_STRIPS];
  logic [7:0] nhits;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_CHAN); i++) thr[i] <= '0;
    end else if (cfg_we) begin
      thr[cfg_chan] <= $signed(cfg_data);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in.smp == 2'd0) s0_q[in.strip] <= $signed(in.val);
    if (in_valid && in.smp == 2'd1) s1_q[in.strip] <= $signed(in.val);
  end

  wire signed [VAL_W-1:0] a0 = s0_q[in.strip];
  wire signed [VAL_W-1:0] a1 = s1_q[in.strip];
  wire signed [VAL_W-1:0] a2 = $signed(in.val);
  wire keep = in_valid && (in.smp == 2'd2) &&
              (a1 > thr[{in.mm, in.strip}]) && (a1 > a0) && (a1 >= a2);

  always_ff @(posedge clk) begin
    if (rst) begin
      hit_valid <= 1'b0; hit <= '0; nhits <= '0;
      eoe_out_valid <= 1'b0; eoe_out <= '0;
    end else begin
      hit_valid     <= keep;
      eoe_out_valid <= eoe_in_valid;
      if (keep) begin
        hit.mm    <= in.mm;
        hit.strip <= in.strip;
        hit.s0 <= a0; hit.s1 <= a1; hit.s2 <= a2;
      end
      if (eoe_in_valid) begin
        eoe_out       <= eoe_in;
        eoe_out.nhits <= nhits + 8'(keep);
        nhits         <= '0;
      end else if (keep) begin
        nhits <= nhits + 1'b1;
      end
    end
  end
endmodule
