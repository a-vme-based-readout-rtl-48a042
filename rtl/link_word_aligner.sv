// link_word_aligner: turns the decoded byte stream of one gigabit link
// into 16-bit K-chip words.
//
// The link's front end serialises 16-bit words as two 8b/10b characters
// in Gigabit Ethernet mode; the receiver hard IP hands over one decoded
// character per `rx_valid` (byte, K flag, code error flag). Between
// packets the link sends idle pairs that start with the K28.5 comma.
// A comma re-aligns the byte phase: the character after it is the second
// half of the idle pair and is dropped. Any other pair is a data word,
// high byte first, and leaves on `word_valid` one clock after its second
// byte. `word_err` is set when either byte had a code error or was an
// unexpected K character. Every received character is also copied, one
// clock later, to the 10-bit raw lane {err, k, byte} for the spy memory.
// The idle convention and byte order are this design's choices; the
// document names only the Gigabit Ethernet mode.
module link_word_aligner
  import esdcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              rx_valid,
  input  logic [7:0]        rx_byte,
  input  logic              rx_k,
  input  logic              rx_err,
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  output logic              word_err,
  output logic              raw_valid,
  output logic [LANE_W-1:0] raw_lane
);
  logic       phase;      // 0: expecting first byte of a pair
  logic       in_idle;    // current pair is an idle pair
  logic [7:0] hi_byte;
  logic       hi_bad;

  wire comma = rx_k && (rx_byte == K28_5);
  wire bad   = rx_err || (rx_k && !comma);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0; in_idle <= 1'b0; hi_byte <= '0; hi_bad <= 1'b0;
      word_valid <= 1'b0; word <= '0; word_err <= 1'b0;
      raw_valid <= 1'b0; raw_lane <= '0;
    end else begin
      word_valid <= 1'b0;
      raw_valid  <= rx_valid;
      if (rx_valid) begin
        raw_lane <= {rx_err, rx_k, rx_byte};
        if (comma) begin
          phase   <= 1'b1;
          in_idle <= 1'b1;
        end else if (!phase) begin
          hi_byte <= rx_byte;
          hi_bad  <= bad;
          in_idle <= 1'b0;
          phase   <= 1'b1;
        end else begin
          phase <= 1'b0;
          if (!in_idle) begin
            word_valid <= 1'b1;
            word       <= {hi_byte, rx_byte};
            word_err   <= hi_bad || bad;
          end
          in_idle <= 1'b0;
        end
      end
    end
  end
endmodule
