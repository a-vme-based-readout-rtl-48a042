// tb_es_dcc: the whole board, with every parameter at its default.
// Around the design: a VME master, a TTC source, 36 link sources sending
// K-chip packets one character per clock, nine SRAM models on the spy
// FPGAs and an S-Link sink that raises link-full at random.
//
// Sequence: read the spy FPGA ID registers and the merger Source_id; load
// gains and thresholds (broadcast) and a pedestal per reduction FPGA
// through VME -> local bus -> spy FPGA -> private bus; run events one at a
// time; arm a spy capture and compare the SRAM contents read through VME
// with the characters sent; record a fragment from the zero-suppressed bus
// with another spy FPGA and compare it with the S-Link output; run one event with a packet CRC error and one
// whose event number disagrees with the TTC count (OUT_OF_SYNC, cleared
// through VME); send a burst of 14 level-1 accepts before their data
// (trigger FIFO fills: WARNING then BUSY). Every S-Link event is compared
// word by word with an event built from the reference reduction model.
// The mechanisms are counted and each must occur at least once.
module tb_es_dcc;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] rx_valid [3], rx_k [3], rx_err [3];
  logic [7:0]  rx_byte [3][12];
  logic ttc_l1a, ttc_bcnt_res, ttc_evcnt_res;
  logic as_n, write_n, lword_n, data_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] vaddr;
  logic [31:0] vdin, vdout;
  logic [4:0] ga_n;
  logic [18:0] sram_addr [3];
  logic sram_we [3];
  logic [35:0] sram_wdata [3][3], sram_rdata [3][3];
  logic slink_we, slink_ctrl, slink_lff;
  logic [63:0] slink_data;
  tts_e tts;

  es_dcc dut (.clk, .rst, .rx_valid, .rx_byte, .rx_k, .rx_err, .ttc_l1a, .ttc_bcnt_res, .ttc_evcnt_res,
              .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_lword_n(lword_n),
              .vme_am(am), .vme_addr(vaddr), .vme_data_in(vdin), .vme_data_out(vdout),
              .vme_data_oe(data_oe), .vme_dtack_n(dtack_n), .vme_ga_n(ga_n),
              .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
              .slink_we, .slink_ctrl, .slink_data, .slink_lff, .tts);

  for (genvar f = 0; f < 3; f++) begin : g_spy_mem
    for (genvar j = 0; j < 3; j++) begin : g_mem
      cy7c1371_model u_mem (.clk, .a(sram_addr[f]), .we(sram_we[f]), .d(sram_wdata[f][j]), .q(sram_rdata[f][j]));
    end
  end

  localparam int SLOT = 3;
  // mechanism counters
  int n_events_ok = 0, n_hits = 0, n_crc_err = 0, n_oos = 0, n_warn = 0, n_busy = 0;
  int n_lff_stall = 0, n_spy_words = 0, n_spy_zs = 0, n_cfg = 0, n_stat_link = 0, n_oos_cleared = 0;

  // ------------------------------------------------------------ S-Link
  logic [63:0] exp_w [$];        // expected words of all pending events
  int          exp_len [$];
  logic [2:0]  exp_stat [$];
  logic [63:0] got [$];
  logic [63:0] evt5 [$];         // S-Link words of event 5, for the zs spy check
  logic        l1a_seen;
  int          bx_q [$];

  always @(posedge clk) begin
    if (rst) begin
      slink_lff <= 0; l1a_seen <= 0;
    end else begin
      slink_lff <= ($urandom_range(0, 5) == 0);
      if (slink_lff && dut.u_merger.state != 0) n_lff_stall++;
      if (tts == TTS_WARN) n_warn++;
      if (tts == TTS_BUSY) n_busy++;
      if (tts == TTS_OOS)  n_oos++;
      // BX_id of each accept: the bunch counter just after it was taken
      l1a_seen <= ttc_l1a && dut.bc_strobe;
      if (l1a_seen) bx_q.push_back(int'(dut.bx_cnt));
      if (slink_we) begin
        got.push_back(slink_data);
        if (slink_ctrl && slink_data[63:60] == EOE_1) check_event();
      end
    end
  end

  function automatic void check_event();
    int n; logic [15:0] c; logic [63:0] trl;
    logic ok;
    ok = 1;
    n = exp_len.size() ? exp_len[0] : -1;
    checks++;
    if (n != got.size()) begin
      failures++; $display("FAIL event of %0d words, expected %0d", got.size(), n);
      got.delete(); return;
    end
    // header and payload; the BX_id of the header comes from bx_q
    for (int i = 0; i < n - 1; i++) begin
      logic [63:0] e;
      e = exp_w[i];
      if (i == 0) e[31:20] = 12'(bx_q[0]);
      if (got[i] != e) begin
        ok = 0; $display("FAIL word %0d: %h exp %h", i, got[i], e);
      end
    end
    // trailer: everything but TTS predicted; CRC recomputed independently
    trl = {EOE_1, 4'h0, 24'(n), 16'h0, 4'h0, 1'b0, exp_stat[0], got[n-1][7:4], 4'h0};
    c = 16'hFFFF;
    for (int i = 0; i < n - 1; i++) c = ref_crc(c, got[i], 64);
    c = ref_crc(c, trl, 64);
    trl[31:16] = c;
    if (got[n-1] != trl) begin ok = 0; $display("FAIL trailer %h exp %h", got[n-1], trl); end
    if (!ok) failures++;
    else n_events_ok++;
    if (got[0][55:32] == 24'd5) evt5 = got;
    if (exp_stat[0][1]) n_stat_link++;
    for (int i = 0; i < n; i++) void'(exp_w.pop_front());
    void'(exp_len.pop_front()); void'(exp_stat.pop_front()); void'(bx_q.pop_front());
    got.delete();
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  // ------------------------------------------------------------- VME
  task automatic vme(logic wr, logic [3:0] tgt, logic [20:0] a, logic [31:0] wd, output logic [31:0] rd);
    int n;
    vaddr = {5'(SLOT), tgt, a, 1'b0}; am = 6'h09; write_n = !wr; lword_n = 0; vdin = wd;
    #7 as_n = 0;
    #7 ds_n = 2'b00;
    n = 0;
    while (dtack_n && n < 500) begin #5; n++; end
    if (dtack_n) begin failures++; $display("FAIL no DTACK*"); end
    #3 rd = vdout;
    ds_n = 2'b11; as_n = 1;
    while (!dtack_n) #5;
    #10;
  endtask

  // --------------------------------------------------------- TTC
  task automatic l1a();
    ttc_l1a = 1; tick(); tick(); ttc_l1a = 0;
  endtask

  // ------------------------------------------------------- links
  int ped [3], gain [128], thr [128];
  logic [7:0] sent [$];          // characters of link (1, 5) in the last burst

  // builds, sends and predicts one event; ec_off adds to the event number
  // in FPGA 0's packets, crc_link (f*12+l) gets a CRC error
  task automatic event_data(int lv1, int ec_off, int crc_link, logic [2:0] stat);
    packet_t pk [3][12];
    samples_t ev;
    ref_hit_t hits [$];
    logic [63:0] ew [$];
    ew.push_back({BOE_1, 4'h1, 24'(lv1), 12'd0, 12'd520, 8'h00});
    for (int f = 0; f < 3; f++) begin
      logic [63:0] words [$];
      logic [11:0] emask;
      int ec;
      emask = '0;
      ec = lv1 + ((f == 0) ? ec_off : 0);
      for (int l = 0; l < 12; l++) begin
        int pl [128], gl [128], tl [128];
        make_event(ev, 200, $urandom_range(0, 6));
        make_packet(77, ec, 8'h00, ev, pk[f][l]);
        if (f * 12 + l == crc_link) begin pk[f][l][299] ^= 16'h0100; emask[l] = 1; end
        for (int c = 0; c < 128; c++) pl[c] = ped[f];
        gl = gain; tl = thr;
        ref_reduce(ev, pl, gl, tl, hits);
        n_hits += hits.size();
        foreach (hits[i])
          words.push_back({4'(l), 2'(hits[i].mm), 5'(hits[i].strip), 5'd0,
                           16'(hits[i].s0), 16'(hits[i].s1), 16'(hits[i].s2)});
      end
      ew.push_back({FRAG_MARKER, 2'(f), 12'd77, 16'(ec), emask, 12'd0, 6'd0});
      foreach (words[i]) ew.push_back(words[i]);
    end
    ew.push_back('0);  // trailer placeholder
    foreach (ew[i]) exp_w.push_back(ew[i]);
    exp_len.push_back(ew.size());
    exp_stat.push_back(stat);
    sent.delete();
    for (int c = 0; c < 4 + 600 + 4; c++) begin
      for (int f = 0; f < 3; f++)
        for (int l = 0; l < 12; l++) begin
          if (c < 4 || c >= 604) begin
            rx_k[f][l] = (c % 2 == 0); rx_byte[f][l] = (c % 2 == 0) ? K28_5 : 8'h50;
          end else begin
            rx_k[f][l] = 0;
            rx_byte[f][l] = ((c - 4) % 2 == 0) ? pk[f][l][(c - 4) / 2][15:8] : pk[f][l][(c - 4) / 2][7:0];
          end
          rx_valid[f][l] = 1;
        end
      sent.push_back(rx_byte[1][5]);
      tick();
    end
    for (int f = 0; f < 3; f++) rx_valid[f] = '0;
    tick();
  endtask

  task automatic wait_events();
    int n;
    n = 0;
    while (exp_len.size() != 0 && n < 100000) begin tick(); n++; end
  endtask

  initial begin
    logic [31:0] rd;
    as_n = 1; ds_n = 2'b11; write_n = 1; lword_n = 1; am = 0; vaddr = 0; vdin = 0; ga_n = ~5'(SLOT);
    ttc_l1a = 0; ttc_bcnt_res = 0; ttc_evcnt_res = 0;
    for (int f = 0; f < 3; f++) begin
      rx_valid[f] = '0; rx_k[f] = '0; rx_err[f] = '0;
      for (int l = 0; l < 12; l++) rx_byte[f][l] = '0;
    end
    repeat (3) @(posedge clk);
    rst = 0; tick();
    // bunch counter and event counter reset
    ttc_bcnt_res = 1; ttc_evcnt_res = 1; tick(); tick(); ttc_bcnt_res = 0; ttc_evcnt_res = 0;

    for (int f = 0; f < 3; f++) begin
      vme(0, 4'(1 + f), 21'h4, 0, rd);
      checks++;
      if (rd != 32'h5350_0001 + 32'(f)) begin failures++; $display("FAIL spy %0d ID %h", f, rd); end
    end
    vme(0, 4'd4, 21'h0, 0, rd);
    checks++; if (rd != 520) begin failures++; $display("FAIL Source_id %0d", rd); end

    // working parameters
    for (int c = 0; c < 128; c++) begin
      gain[c] = 240 + $urandom_range(0, 32); thr[c] = 24 + $urandom_range(0, 8);
    end
    for (int f = 0; f < 3; f++) begin
      ped[f] = 195 + 3 * f;
      for (int c = 0; c < 128; c++) begin
        vme(1, 4'(1 + f), {2'd1, 3'd0, 4'hF, 3'd0, 2'd0, 7'(c)}, 32'(ped[f]), rd);
        vme(1, 4'(1 + f), {2'd1, 3'd0, 4'hF, 3'd0, 2'd1, 7'(c)}, 32'(gain[c]), rd);
        vme(1, 4'(1 + f), {2'd1, 3'd0, 4'hF, 3'd0, 2'd2, 7'(c)}, 32'(thr[c]), rd);
        n_cfg += 3;
      end
    end

    // single events
    for (int e = 1; e <= 3; e++) begin l1a(); event_data(e, 0, -1, 3'b000); end
    wait_events();

    // spy capture of the next event on spy FPGA #2
    vme(1, 4'd2, 21'h1, 64, rd);
    vme(1, 4'd2, 21'h0, 1, rd);
    l1a(); event_data(4, 0, -1, 3'b000);
    for (int b = 0; b < 64; b += 9) begin
      vme(1, 4'd2, 21'h3, 32'd1, rd);                       // SRAM 1 holds lanes 4..7
      vme(0, 4'd2, {2'd2, 19'(b)}, 0, rd);
      checks++;
      if (rd[16:9] != sent[b]) begin failures++; $display("FAIL spy beat %0d lane 5: %h exp %h", b, rd[16:9], sent[b]); end
      else n_spy_words++;
    end

    // a packet CRC error on link 2 of FPGA #3, whose zero-suppressed
    // fragment spy FPGA #3 records (two words)
    vme(1, 4'd3, 21'h1, 2, rd);
    vme(1, 4'd3, 21'h0, 3, rd);
    l1a(); event_data(5, 0, 26, 3'b010);
    n_crc_err++;
    wait_events();

    // event-number mismatch in FPGA #1, then clear
    l1a(); event_data(6, 1, -1, 3'b001);
    wait_events();
    repeat (5) tick();
    checks++;
    if (tts != TTS_OOS) begin failures++; $display("FAIL TTS %b after mismatch", tts); end
    vme(1, 4'd4, 21'h3, 1, rd);
    repeat (5) tick();
    checks++;
    if (tts != TTS_READY) begin failures++; $display("FAIL TTS %b after clear", tts); end
    else n_oos_cleared++;

    // the zs capture of event 5: its FPGA #3 fragment as seen on the S-Link
    begin
      int k; logic [63:0] w; logic [31:0] lo, mid, hi;
      k = -1;
      for (int i = 1; i < evt5.size(); i++)
        if (k < 0 && evt5[i][63:58] == {4'hC, 2'd2}) k = i;
      checks++;
      if (k < 0) begin failures++; $display("FAIL no FPGA #3 fragment in event 5"); end
      else for (int b = 0; b < 2; b++) begin
        // the second beat belongs to event 6 if the fragment is one word long
        if (b == 1 && evt5[k][63:60] == 4'hC && k + 1 < evt5.size() && evt5[k+1][63:60] == 4'hC) break;
        w = evt5[k + b];
        vme(1, 4'd3, 21'h3, 0, rd);
        vme(0, 4'd3, {2'd2, 19'(b)}, 0, lo);
        vme(1, 4'd3, 21'h3, 4, rd);
        vme(0, 4'd3, {2'd2, 19'(b)}, 0, mid);
        vme(1, 4'd3, 21'h3, 1, rd);
        vme(0, 4'd3, {2'd2, 19'(b)}, 0, hi);
        checks++;
        if ({hi[27:0], mid[3:0], lo} != w) begin failures++; $display("FAIL zs spy beat %0d: %h exp %h", b, {hi[27:0], mid[3:0], lo}, w); end
        else n_spy_zs++;
      end
    end

    // burst of accepts ahead of the data
    for (int e = 7; e <= 20; e++) begin l1a(); tick(); end
    repeat (4) tick();
    for (int e = 7; e <= 20; e++) event_data(e, 0, -1, 3'b000);
    wait_events();
    repeat (20) tick();
    vme(0, 4'd4, 21'h2, 0, rd);
    checks++;
    if (rd != 20) begin failures++; $display("FAIL %0d events sent", rd); end

    $display("events %0d hits %0d params %0d spy %0d spy-zs %0d crc %0d link-stat %0d oos %0d cleared %0d warn %0d busy %0d lff %0d",
             n_events_ok, n_hits, n_cfg, n_spy_words, n_spy_zs, n_crc_err, n_stat_link, n_oos, n_oos_cleared,
             n_warn, n_busy, n_lff_stall);
    checks++; if (n_events_ok != 20) begin failures++; $display("FAIL only %0d good events", n_events_ok); end
    checks++; if (n_hits == 0)       begin failures++; $display("FAIL no hits kept"); end
    checks++; if (n_spy_words == 0)  begin failures++; $display("FAIL no spy data"); end
    checks++; if (n_spy_zs == 0)     begin failures++; $display("FAIL no zs spy data"); end
    checks++; if (n_stat_link == 0)  begin failures++; $display("FAIL no link error reported"); end
    checks++; if (n_oos == 0 || n_oos_cleared == 0) begin failures++; $display("FAIL no out-of-sync"); end
    checks++; if (n_warn == 0)       begin failures++; $display("FAIL no warning"); end
    checks++; if (n_busy == 0)       begin failures++; $display("FAIL no busy"); end
    checks++; if (n_lff_stall == 0)  begin failures++; $display("FAIL no S-Link stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
