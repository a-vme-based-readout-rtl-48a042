// ttc_distributor: turns the decoded timing, trigger and control (TTC)
// signals of the TTC receiver into event identifiers for the event builder.
//
// The board clock runs at CLK_PER_BX times the bunch-crossing rate; an
// internal divider marks the first clock of every crossing (`bc_strobe`),
// and the TTC inputs (each high for one crossing) are sampled there.
//   bcnt_res : bunch counter restarts at 0 on this crossing
//   evcnt_res: event counter cleared
//   l1a      : level-1 accept; the event counter increments and the pair
//              (LV1_id = new count, BX_id = this crossing's number) is
//              written into a TRIG_DEPTH-entry trigger FIFO
// The bunch counter wraps after BX_PER_ORBIT crossings; `bx_cnt` is the
// number of the current crossing (the first crossing after reset is 0). The event builder
// pops the FIFO (`trig_rd`); `trig_count` feeds the throttling status and
// `trig_lost` counts accepts that found the FIFO full.
// Receiving the TTC signals and distributing decoded information follows
// the document; the counters, orbit length, clock ratio and FIFO are
// this design's.
module ttc_distributor
  import esdcc_pkg::*;
#(
  parameter int unsigned CLK_PER_BX   = 2,
  parameter int unsigned BX_PER_ORBIT = 3564,
  parameter int unsigned TRIG_DEPTH   = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,
  input  logic        bcnt_res,
  input  logic        evcnt_res,
  output logic        bc_strobe,
  output logic [11:0] bx_cnt,
  output logic [23:0] ev_cnt,
  input  logic        trig_rd,
  output logic [23:0] trig_lv1_id,
  output logic [11:0] trig_bx_id,
  output logic        trig_empty,
  output logic [$clog2(TRIG_DEPTH):0] trig_count,
  output logic [15:0] trig_lost
);
  localparam int unsigned PW = (CLK_PER_BX > 1) ? $clog2(CLK_PER_BX) : 1;
  logic [PW-1:0] phase;
  logic          full;
  logic [35:0]   dout;
  logic [11:0]   bx_new;

  assign bc_strobe = (phase == '0);
  // number of the crossing that starts with this strobe
  assign bx_new = bcnt_res ? 12'd0 :
                  (bx_cnt == 12'(BX_PER_ORBIT - 1)) ? 12'd0 : bx_cnt + 1'b1;
  wire   accept = bc_strobe && l1a && !evcnt_res;
  wire   push   = accept && !full;
  wire [35:0] din = {ev_cnt + 24'd1, bx_new};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0; bx_cnt <= 12'(BX_PER_ORBIT - 1); ev_cnt <= '0; trig_lost <= '0;
    end else begin
      phase <= (phase == PW'(CLK_PER_BX - 1)) ? '0 : phase + 1'b1;
      if (bc_strobe) begin
        bx_cnt <= bx_new;
        if (evcnt_res)   ev_cnt <= '0;
        else if (l1a)    ev_cnt <= ev_cnt + 1'b1;
        if (accept && full) trig_lost <= trig_lost + 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(36), .DEPTH(TRIG_DEPTH)) u_trig_fifo (
    .clk, .rst, .wr(push), .din, .rd(trig_rd), .dout,
    .full, .empty(trig_empty), .count(trig_count));

  assign trig_lv1_id = dout[35:12];
  assign trig_bx_id  = dout[11:0];
endmodule
