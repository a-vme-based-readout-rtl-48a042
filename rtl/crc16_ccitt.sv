// crc16_ccitt: running CRC-16-CCITT (x^16 + x^12 + x^5 + 1) over DATA_W-bit
// words, most significant bit first, one word per clock.
//
// The polynomial is the one the link packets are checked with. The preset
// value 16'hFFFF, the bit order and the width parameter are this design's
// choices. `init` loads the preset (it wins over `en`); `en` folds `data`
// into the register. `crc` is the registered value; `crc_next` is the value
// the register would take this cycle, for callers that need it without
// the one-cycle delay.
module crc16_ccitt
  import esdcc_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              init,
  input  logic              en,
  input  logic [DATA_W-1:0] data,
  output logic [15:0]       crc,
  output logic [15:0]       crc_next
);
  initial assert (DATA_W >= 1 && DATA_W <= 64) else $error("DATA_W out of range");

  always_comb crc_next = crc16_next(crc, 64'(data), DATA_W);

  always_ff @(posedge clk) begin
    if (rst || init) crc <= CRC16_INIT;
    else if (en)     crc <= crc_next;
  end
endmodule
