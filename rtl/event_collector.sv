// event_collector: gathers the zero-suppressed hits of the 12 links of a
// reduction FPGA into one fragment per event on the 64-bit bus towards the
// merger FPGA.
//
// When every link has an end-of-event record waiting, the collector sends
// a fragment header word (marker 4'hC, OptoRx id, BX and event counter of
// link 0, a mask of links with a packet error and a mask of links whose
// BX or event counter differs from link 0), then the hits of link 0, 1,
// ... 11, one 64-bit word each (layouts in esdcc_pkg), and finally pops
// the 12 end-of-event records. `zs_last` marks the fragment's last word
// (the header itself when no strip was kept). The bus uses a valid/ready
// handshake: a word is transferred on a clock with both high, and
// `zs_valid`/`zs_data` hold until then. One idle clock is spent per link
// switch. The 64-bit bus and the per-event collection of the 12 channels
// follow the document; the word layouts and handshake are this design's.
module event_collector
  import esdcc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [1:0]          optorx_id,
  input  hit_t                hit_dout  [N_LINKS],
  input  logic [N_LINKS-1:0]  hit_empty,
  output logic [N_LINKS-1:0]  hit_rd,
  input  link_eoe_t           eoe_dout  [N_LINKS],
  input  logic [N_LINKS-1:0]  eoe_empty,
  output logic [N_LINKS-1:0]  eoe_rd,
  output logic                zs_valid,
  output logic [ZS_W-1:0]     zs_data,
  output logic                zs_last,
  input  logic                zs_ready
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_HITS} state_e;
  state_e state;
  logic [3:0]  lnk;
  logic [7:0]  rem;            // hits left in the current link
  logic [10:0] tot;            // hits left in the fragment
  logic [ZS_W-1:0] hdr;

  // header fields worked out from the 12 waiting records
  logic [N_LINKS-1:0] err_mask, mis_mask;
  logic [10:0]        total;
  always_comb begin
    total = '0;
    for (int i = 0; i < int'(N_LINKS); i++) begin
      err_mask[i] = eoe_dout[i].crc_err;
      mis_mask[i] = (eoe_dout[i].ec != eoe_dout[0].ec) || (eoe_dout[i].bx != eoe_dout[0].bx);
      total       = total + 11'(eoe_dout[i].nhits);
    end
  end

  wire   hit_ok  = (state == S_HITS) && (rem != 0);
  hit_t  cur;
  assign cur = hit_dout[lnk];

  always_comb begin
    zs_valid = 1'b0;
    zs_data  = '0;
    zs_last  = 1'b0;
    hit_rd   = '0;
    eoe_rd   = '0;
    if (state == S_HDR) begin
      zs_valid = 1'b1;
      zs_data  = hdr;
      zs_last  = (tot == 0);
      if (zs_ready && tot == 0) eoe_rd = '1;
    end else if (hit_ok) begin
      zs_valid = 1'b1;
      zs_data  = {lnk, cur.mm, cur.strip, 5'd0, cur.s0, cur.s1, cur.s2};
      zs_last  = (tot == 11'd1);
      if (zs_ready) begin
        hit_rd[lnk] = 1'b1;
        if (tot == 11'd1) eoe_rd = '1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; lnk <= '0; rem <= '0; tot <= '0; hdr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (eoe_empty == '0) begin
          hdr   <= {FRAG_MARKER, optorx_id, eoe_dout[0].bx, eoe_dout[0].ec,
                    err_mask, mis_mask, 6'd0};
          tot   <= total;
          lnk   <= '0;
          rem   <= eoe_dout[0].nhits;
          state <= S_HDR;
        end
        S_HDR: if (zs_ready) state <= (tot == 0) ? S_IDLE : S_HITS;
        S_HITS: begin
          if (rem == 0) begin
            lnk <= lnk + 1'b1;
            rem <= eoe_dout[lnk + 1'b1].nhits;
          end else if (zs_ready) begin
            rem <= rem - 1'b1;
            tot <= tot - 1'b1;
            if (tot == 11'd1) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hit_present: assert property (@(posedge clk) disable iff (rst)
                                  hit_ok |-> !hit_empty[lnk])
    else $error("event_collector: hit count and hit FIFO disagree");
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           zs_valid && !zs_ready |=> zs_valid && $stable(zs_data))
    else $error("event_collector: word changed before it was accepted");
endmodule
