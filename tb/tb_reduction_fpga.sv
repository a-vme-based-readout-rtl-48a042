// tb_reduction_fpga: one OptoRx-12 FPGA with its 12 links. Parameters are
// loaded through the private bus (pedestals per link, gains and thresholds
// by the broadcast address). Each event sends a different packet on every
// link at the same time, one character per clock; the fragment on the
// 64-bit bus is compared with the reference reduction of all 12 links
// (header fields, hits in link order, last flag). The raw bus is checked
// to carry every character. Ready is toggled at random.
module tb_reduction_fpga;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] rx_valid, rx_k, rx_err, raw_valid, overflow;
  logic [7:0] rx_byte [12];
  logic [119:0] raw_data;
  logic cfg_we, zs_valid, zs_last, zs_ready, almost_full;
  logic [15:0] cfg_addr, cfg_data;
  logic [63:0] zs_data;

  reduction_fpga dut (.clk, .rst, .optorx_id(2'd1), .rx_valid, .rx_byte, .rx_k, .rx_err,
                      .raw_valid, .raw_data, .cfg_we, .cfg_addr, .cfg_data,
                      .zs_valid, .zs_data, .zs_last, .zs_ready, .almost_full, .overflow);

  int ped [12][128], gain [128], thr [128];
  logic [64:0] exp_q [$];
  int n_frag = 0, raw_bad = 0, raw_n = 0;
  logic [7:0] last_byte [12];

  always @(posedge clk) if (!rst) begin
    zs_ready <= ($urandom_range(0, 4) != 0);
    if (zs_valid && zs_ready) begin
      checks++;
      if (exp_q.size() == 0 || {zs_last, zs_data} != exp_q[0]) begin
        failures++;
        $display("FAIL fragment word %h last %b exp %h", zs_data, zs_last, exp_q.size() ? exp_q[0] : 65'd0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      if (zs_last) n_frag++;
    end
    for (int l = 0; l < 12; l++) if (raw_valid[l]) begin
      raw_n++;
      if (raw_data[10*l +: 8] != last_byte[l]) raw_bad++;
    end
    for (int l = 0; l < 12; l++) if (rx_valid[l]) last_byte[l] <= rx_byte[l];
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic cfg(int link, int tbl, int ch, int val);
    cfg_we = 1; cfg_addr = {4'(link), 3'd0, 2'(tbl), 7'(ch)}; cfg_data = 16'(val); tick(); cfg_we = 0;
  endtask

  initial begin
    samples_t ev;
    packet_t pk [12];
    ref_hit_t hits [$];
    rx_valid = 0; rx_k = 0; rx_err = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    for (int l = 0; l < 12; l++) rx_byte[l] = 0;
    repeat (2) @(posedge clk);
    rst = 0; tick();
    for (int c = 0; c < 128; c++) begin
      gain[c] = 256 + $urandom_range(0, 40) - 20; thr[c] = 25;
      cfg(15, 1, c, gain[c]); cfg(15, 2, c, thr[c]);
      for (int l = 0; l < 12; l++) begin ped[l][c] = 190 + $urandom_range(0, 20); cfg(l, 0, c, ped[l][c]); end
    end
    for (int e = 0; e < 4; e++) begin
      logic [64:0] words [$];
      logic [11:0] emask;
      emask = '0; words.delete();
      for (int l = 0; l < 12; l++) begin
        int pl [128], gl [128], tl [128];
        make_event(ev, 200, (e == 2) ? 0 : $urandom_range(1, 8));
        make_packet(300 + e, e + 1, 8'h00, ev, pk[l]);
        if (e == 3 && l == 6) begin pk[l][299] ^= 16'h8000; emask[l] = 1; end
        pl = ped[l]; gl = gain; tl = thr;
        ref_reduce(ev, pl, gl, tl, hits);
        foreach (hits[i])
          words.push_back({1'b0, 4'(l), 2'(hits[i].mm), 5'(hits[i].strip), 5'd0,
                           16'(hits[i].s0), 16'(hits[i].s1), 16'(hits[i].s2)});
      end
      exp_q.push_back({words.size() == 0, FRAG_MARKER, 2'd1, 12'(300 + e), 16'(e + 1), emask, 12'd0, 6'd0});
      foreach (words[i]) exp_q.push_back({i == words.size() - 1, words[i][63:0]});
      // idles, the 12 packets in parallel, idles
      for (int c = 0; c < 8 + 600 + 8; c++) begin
        for (int l = 0; l < 12; l++) begin
          if (c < 8 || c >= 608) begin
            rx_k[l] = (c % 2 == 0); rx_byte[l] = (c % 2 == 0) ? K28_5 : 8'h50;
          end else begin
            rx_k[l] = 0; rx_byte[l] = ((c - 8) % 2 == 0) ? pk[l][(c - 8) / 2][15:8] : pk[l][(c - 8) / 2][7:0];
          end
        end
        rx_valid = '1;
        tick();
      end
      rx_valid = '0;
    end
    repeat (3000) tick();
    checks++;
    if (n_frag != 4 || exp_q.size() != 0) begin failures++; $display("FAIL %0d fragments, %0d words missing", n_frag, exp_q.size()); end
    checks++;
    if (raw_bad != 0 || raw_n != 4 * 616 * 12) begin failures++; $display("FAIL raw bus: %0d of %0d wrong", raw_bad, raw_n); end
    checks++;
    if (overflow != 0) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
