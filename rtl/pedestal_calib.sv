// pedestal_calib: per-channel pedestal subtraction and gain calibration
// of one link's samples.
//
// Each of the 128 channels (micromodule x strip) has a 12-bit pedestal and
// a 10-bit unsigned gain coefficient with 8 fraction bits (256 = gain 1),
// both held in lookup tables written through the configuration port
// (`cfg_sel` 0 = pedestal, 1 = gain). The result,
//     y = saturate16(((x - pedestal) * gain) >>> 8),
// leaves one clock after the sample with the same tags. Reset loads
// pedestal 0 and gain 1. The two corrections and their lookup tables
// follow the document; the widths, fixed-point format, rounding
// (truncation toward minus infinity) and reset values are this design's.
module pedestal_calib
  import esdcc_pkg::*;
#(
  parameter int unsigned GAIN_W    = 10,
  parameter int unsigned GAIN_FRAC = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cfg_we,
  input  logic        cfg_sel,        // 0 pedestal, 1 gain
  input  logic [6:0]  cfg_chan,
  input  logic [15:0] cfg_data,
  input  logic        in_valid,
  input  sample_t     in,
  output logic        out_valid,
  output sample_t     out
);
  logic [ADC_W-1:0]  ped  [N_CHAN];
  logic [GAIN_W-1:0] gain [N_CHAN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_CHAN); i++) begin
        ped[i]  <= '0;
        gain[i] <= GAIN_W'(1 << GAIN_FRAC);
      end
    end else if (cfg_we) begin
      if (!cfg_sel) ped[cfg_chan]  <= cfg_data[ADC_W-1:0];
      else          gain[cfg_chan] <= cfg_data[GAIN_W-1:0];
    end
  end

  wire [6:0] ch = {in.mm, in.strip};
  logic signed [ADC_W:0]          diff;
  logic signed [ADC_W+GAIN_W+1:0] prod;
  logic signed [ADC_W+GAIN_W+1:0] scaled;
  logic signed [VAL_W-1:0]        y;

  always_comb begin
    diff   = $signed({1'b0, in.val[ADC_W-1:0]}) - $signed({1'b0, ped[ch]});
    prod   = diff * $signed({1'b0, gain[ch]});
    scaled = prod >>> GAIN_FRAC;
    if (scaled > $signed((ADC_W+GAIN_W+2)'(32767)))       y = 16'sh7FFF;
    else if (scaled < -$signed((ADC_W+GAIN_W+2)'(32768))) y = -16'sh8000;
    else                                                  y = scaled[VAL_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out     <= in;
        out.val <= y;
      end
    end
  end
endmodule
