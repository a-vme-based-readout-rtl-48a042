// tb_link_channel: one link end to end. Loads random pedestals, gains and
// thresholds, sends event packets as decoded characters (idle pairs
// between packets, one character per clock), and compares the hit FIFO
// and end-of-event FIFO contents with the reference reduction model.
// One packet is corrupted and must be flagged. Also checks that the link
// is never stalled: a 300-word packet takes 600 clocks.
module tb_link_channel;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid, rx_k, rx_err, raw_valid, cfg_we, hit_rd, hit_empty, eoe_rd, eoe_empty;
  logic almost_full, overflow;
  logic [7:0] rx_byte;
  logic [9:0] raw_lane;
  logic [8:0] cfg_addr;
  logic [15:0] cfg_data;
  hit_t hit_dout;
  link_eoe_t eoe_dout;

  link_channel dut (.clk, .rst, .rx_valid, .rx_byte, .rx_k, .rx_err, .raw_valid, .raw_lane,
                    .cfg_we, .cfg_addr, .cfg_data, .hit_rd, .hit_dout, .hit_empty,
                    .eoe_rd, .eoe_dout, .eoe_empty, .almost_full, .overflow);

  int ped [128], gain [128], thr [128];
  samples_t ev;
  packet_t pk;
  ref_hit_t hits [$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic send_char(logic [7:0] b, logic k);
    rx_valid = 1; rx_byte = b; rx_k = k; tick(); rx_valid = 0;
  endtask

  task automatic cfg(int tbl, int ch, int val);
    cfg_we = 1; cfg_addr = 9'({2'(tbl), 7'(ch)}); cfg_data = 16'(val); tick(); cfg_we = 0;
  endtask

  initial begin
    int n_events, t0, t1;
    rx_valid = 0; rx_k = 0; rx_err = 0; rx_byte = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    hit_rd = 0; eoe_rd = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    tick();
    for (int c = 0; c < 128; c++) begin
      ped[c] = 180 + $urandom_range(0, 40); gain[c] = 200 + $urandom_range(0, 112);
      thr[c] = 20 + $urandom_range(0, 10);
      cfg(0, c, ped[c]); cfg(1, c, gain[c]); cfg(2, c, thr[c]);
    end
    n_events = 6;
    for (int e = 0; e < n_events; e++) begin
      make_event(ev, 200, 3 + 4 * e);
      make_packet(100 + e, e + 1, 8'h00, ev, pk);
      if (e == 4) pk[202] ^= 16'h0001;         // bit error in the sample data
      ref_reduce(ev, ped, gain, thr, hits);
      if (e == 4) begin
        // the flipped bit is bit 0 of word 202 = data word 191 = group 63,
        // third word: sample 255 bit 0
        ev[255] ^= 12'h001;
        ref_reduce(ev, ped, gain, thr, hits);
      end
      repeat (4) begin send_char(K28_5, 1); send_char(8'h50, 0); end
      t0 = $time;
      for (int w = 0; w < 300; w++) begin send_char(pk[w][15:8], 0); send_char(pk[w][7:0], 0); end
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 600) begin failures++; $display("FAIL packet took %0d clocks", (t1 - t0) / 10); end
      repeat (4) begin send_char(K28_5, 1); send_char(8'h50, 0); end
      repeat (60) tick();
      // read back
      checks++;
      if (eoe_empty) begin
        failures++; $display("FAIL no end-of-event record for event %0d", e);
      end else begin
        checks++;
        if (int'(eoe_dout.nhits) != hits.size() || eoe_dout.ec != 16'(e + 1) ||
            eoe_dout.bx != 12'(100 + e) || eoe_dout.crc_err != (e == 4)) begin
          failures++;
          $display("FAIL event %0d record nhits %0d (exp %0d) ec %0d bx %0d err %b", e,
                   eoe_dout.nhits, hits.size(), eoe_dout.ec, eoe_dout.bx, eoe_dout.crc_err);
        end
        foreach (hits[i]) begin
          checks++;
          if (hit_empty || hit_dout.mm != 2'(hits[i].mm) || hit_dout.strip != 5'(hits[i].strip) ||
              int'(hit_dout.s0) != hits[i].s0 || int'(hit_dout.s1) != hits[i].s1 ||
              int'(hit_dout.s2) != hits[i].s2) begin
            failures++;
            $display("FAIL event %0d hit %0d: mm %0d strip %0d s %0d %0d %0d exp %0d %0d %0d %0d %0d", e, i,
                     hit_dout.mm, hit_dout.strip, hit_dout.s0, hit_dout.s1, hit_dout.s2,
                     hits[i].mm, hits[i].strip, hits[i].s0, hits[i].s1, hits[i].s2);
          end
          if (!hit_empty) begin hit_rd = 1; tick(); hit_rd = 0; end
        end
        eoe_rd = 1; tick(); eoe_rd = 0;
        checks++;
        if (!hit_empty || hits.size() == 0) begin failures++; $display("FAIL hit FIFO count"); end
      end
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
