// common_mode: removes the baseline shift common to the 32 strips of one
// micromodule.
//
// Samples arrive in packet order, 32 strips of one (micromodule, time
// sample) after another. They are written into one half of a two-bank
// buffer while their sum is accumulated. After the 32nd strip the mean,
// sum >>> 5 (floor), is latched, the banks swap, and the finished bank is
// sent out one strip per clock as y = saturate16(x - mean) while the next
// 32 strips fill the other bank. Latency is 2 to 33 clocks from a strip's
// arrival. An end-of-event record arriving on `eoe_in_valid` is held until
// the bank holding the event's last strips has been sent, so it always
// follows them. Input must not exceed 32 strips per 32 clocks on average,
// which the link rate guarantees.
//
// The document says the mean baseline shift common to the channels of a
// micromodule is calculated and removed. Taking the plain mean of all 32
// strips (hits included) is this design's simplest reading.
module common_mode
  import esdcc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  sample_t   in,
  input  logic      eoe_in_valid,
  input  link_eoe_t eoe_in,
  output logic      out_valid,
  output sample_t   out,
  output logic      eoe_out_valid,
  output link_eoe_t eoe_out,
  output logic signed [VAL_W-1:0] cm_value   // last mean computed
);
  logic signed [VAL_W-1:0] buf_q [2][N_STRIPS];
  logic [1:0] bank_mm  [2];
  logic [1:0] bank_smp [2];
  logic       wbank;                 // bank being filled
  logic signed [VAL_W+5:0] sum;
  logic       draining;
  logic [4:0] rd_idx;
  logic signed [VAL_W-1:0] mean;
  logic       eoe_pend;
  link_eoe_t  eoe_hold;

  wire signed [VAL_W+5:0] sum_nx = sum + (VAL_W+6)'($signed(in.val));
  wire signed [VAL_W:0]   diff   = (VAL_W+1)'(buf_q[~wbank][rd_idx]) - (VAL_W+1)'(mean);

  always_ff @(posedge clk) begin
    if (in_valid) buf_q[wbank][in.strip] <= $signed(in.val);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank <= 1'b0; sum <= '0; draining <= 1'b0; rd_idx <= '0; mean <= '0;
      eoe_pend <= 1'b0; eoe_hold <= '0;
      bank_mm[0] <= '0; bank_mm[1] <= '0; bank_smp[0] <= '0; bank_smp[1] <= '0;
      out_valid <= 1'b0; out <= '0; eoe_out_valid <= 1'b0; eoe_out <= '0;
    end else begin
      out_valid     <= 1'b0;
      eoe_out_valid <= 1'b0;

      if (draining) begin
        out_valid <= 1'b1;
        out.mm    <= bank_mm[~wbank];
        out.smp   <= bank_smp[~wbank];
        out.strip <= rd_idx;
        if (diff > 17'sd32767)       out.val <= 16'h7FFF;
        else if (diff < -17'sd32768) out.val <= 16'h8000;
        else                         out.val <= diff[VAL_W-1:0];
        rd_idx <= rd_idx + 1'b1;
        if (rd_idx == 5'(N_STRIPS - 1)) draining <= 1'b0;
      end else if (eoe_pend && !(in_valid && in.strip == 5'(N_STRIPS - 1))) begin
        eoe_pend      <= 1'b0;
        eoe_out_valid <= 1'b1;
        eoe_out       <= eoe_hold;
      end

      if (in_valid) begin
        bank_mm[wbank]  <= in.mm;
        bank_smp[wbank] <= in.smp;
        if (in.strip == 5'(N_STRIPS - 1)) begin
          mean     <= VAL_W'(sum_nx >>> 5);
          sum      <= '0;
          wbank    <= ~wbank;
          draining <= 1'b1;
          rd_idx   <= '0;
        end else begin
          sum <= sum_nx;
        end
      end

      if (eoe_in_valid) begin
        eoe_pend <= 1'b1;
        eoe_hold <= eoe_in;
      end
    end
  end

  assign cm_value = mean;

  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
      (in_valid && in.strip == 5'(N_STRIPS - 1)) |-> (!draining || rd_idx == 5'(N_STRIPS - 1)))
    else $error("common_mode: next bank complete before the previous one was sent");
endmodule
