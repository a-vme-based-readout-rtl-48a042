// esdcc_pkg: types and constants shared by the ES-DCC (Endcap Preshower Data
// Concentrator Card) readout logic.
//
// Numbers that follow the design description: 12 links per reduction FPGA,
// 3 reduction FPGAs per board, 4 micromodules per link, 32 strips per
// micromodule, 3 time samples per strip, 12-bit ADC samples, 16-bit K-chip
// words, 600-byte (300-word) link packets, 64-bit zero-suppressed buses,
// 120-bit raw buses and the CRC-16-CCITT polynomial x^16+x^12+x^5+1.
// Everything else here (packet layout, word layouts of the fragment and
// the CMS header/trailer field positions, TTS codes, local bus map) is this
// design's own choice, described next to each definition.
package esdcc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_LINKS      = 12;   // links per reduction FPGA
  localparam int unsigned N_OPTORX     = 3;    // reduction FPGAs per board
  localparam int unsigned N_MM         = 4;    // micromodules per link
  localparam int unsigned N_STRIPS     = 32;   // strips per micromodule
  localparam int unsigned N_SAMPLES    = 3;    // time samples per strip
  localparam int unsigned N_CHAN       = N_MM * N_STRIPS;  // 128 channels per link
  localparam int unsigned ADC_W        = 12;
  localparam int unsigned WORD_W       = 16;   // K-chip word
  localparam int unsigned VAL_W        = 16;   // processed (signed) sample
  localparam int unsigned ZS_W         = 64;   // zero-suppressed bus
  localparam int unsigned LANE_W       = 10;   // raw bus lane {err,k,byte}
  localparam int unsigned RAW_W        = N_LINKS * LANE_W;  // 120
  localparam int unsigned SRAM_W       = 36;
  localparam int unsigned SRAM_AW      = 19;   // 512K x 36

  // ---------------------------------------------------------- link packet
  // 300 words = 600 bytes:
  //   word 0      : {4'h5 marker, 4'h0, 8'K-chip flags}
  //   word 1      : {4'h0, BX id[11:0]}
  //   word 2      : event counter[15:0]
  //   words 3..10 : two status words per micromodule (time stamp / PACE cell)
  //   words 11..298 : 384 samples of 12 bits, four samples per three words,
  //                   order: micromodule, then sample, then strip
  //   word 299    : CRC-16-CCITT over words 0..298
  localparam int unsigned PKT_HDR_WORDS  = 11;
  localparam int unsigned PKT_DATA_WORDS = N_MM * N_SAMPLES * N_STRIPS * ADC_W / WORD_W; // 288
  localparam int unsigned PKT_WORDS      = PKT_HDR_WORDS + PKT_DATA_WORDS + 1;            // 300
  localparam logic [3:0]  PKT_MARKER     = 4'h5;
  localparam logic [7:0]  K28_5          = 8'hBC;  // comma, starts an idle pair

  localparam logic [15:0] CRC16_POLY = 16'h1021;
  localparam logic [15:0] CRC16_INIT = 16'hFFFF;

  // one processed sample travelling down a link pipeline
  typedef struct packed {
    logic [1:0]  mm;
    logic [1:0]  smp;     // 0,1,2
    logic [4:0]  strip;
    logic [VAL_W-1:0] val;  // raw ADC value (zero extended) or signed result
  } sample_t;

  // end-of-event record of one link
  typedef struct packed {
    logic [11:0] bx;
    logic [15:0] ec;
    logic        crc_err;   // CRC mismatch, bad marker or short packet
    logic [7:0]  nhits;     // kept strips (0..128)
  } link_eoe_t;

  // zero-suppressed hit of one strip
  typedef struct packed {
    logic [1:0]  mm;
    logic [4:0]  strip;
    logic signed [VAL_W-1:0] s0, s1, s2;
  } hit_t;

  // ------------------------------------------------------ fragment words
  // fragment header: [63:60]=4'hC [59:58]=OptoRx id [57:46]=BX [45:30]=EC
  //                  [29:18]=CRC error mask [17:6]=EC/BX mismatch mask
  // hit word       : [63:60]=link [59:58]=mm [57:53]=strip [52:48]=0
  //                  [47:32]=s0 [31:16]=s1 [15:0]=s2
  localparam logic [3:0] FRAG_MARKER = 4'hC;

  // ------------------------------------------------------- CMS DAQ format
  // header : [63:60]=BOE_1 (4'h5) [59:56]=Evt_ty [55:32]=LV1_id [31:20]=BX_id
  //          [19:8]=Source_id [7:4]=FOV [3]=H [2]=x [1:0]=$$
  // trailer: [63:60]=EOE_1 (4'hA) [55:32]=Evt_lgth [31:16]=CRC
  //          [11:8]=Evt_stat [7:4]=TTS [3]=T [2]=x [1:0]=$$
  localparam logic [3:0] BOE_1 = 4'h5;
  localparam logic [3:0] EOE_1 = 4'hA;

  typedef enum logic [3:0] {
    TTS_READY = 4'b1000,
    TTS_WARN  = 4'b0001,   // warning, overflow close
    TTS_OOS   = 4'b0010,   // out of synchronisation
    TTS_BUSY  = 4'b0100,
    TTS_ERROR = 4'b1100
  } tts_e;

  // ----------------------------------------------------------- local bus
  // 25-bit longword address = VME A[26:2]; [24:21] selects the target
  localparam int unsigned LB_AW = 25;
  localparam logic [3:0] LB_T_SPY0   = 4'd1;  // spy FPGA #1..#3 -> 1..3
  localparam logic [3:0] LB_T_MERGER = 4'd4;

  // pure CRC-16-CCITT update of crc with W data bits, MSB first
  function automatic logic [15:0] crc16_next(input logic [15:0] crc,
                                             input logic [63:0] data,
                                             input int unsigned w);
    logic [15:0] c;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      if (i < int'(w)) begin
        if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ CRC16_POLY;
        else                 c = {c[14:0], 1'b0};
      end
    end
    return c;
  endfunction

endpackage
