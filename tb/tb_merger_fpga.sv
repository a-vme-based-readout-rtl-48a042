// tb_merger_fpga: three fragment sources and the trigger FIFO are modelled
// with queues. For each event the S-Link output is checked word by word
// against an independently built CMS event: header K word (BOE_1, Evt_ty,
// LV1_id, BX_id, Source_id), the three fragments in order as D words, and
// the trailer K word (EOE_1, Evt_lgth, CRC-16-CCITT over the event with
// the CRC field zero, Evt_stat, TTS). The link-full input is toggled at
// random. Also checks the event-number mismatch flag, the TTS codes
// (READY, WARNING, BUSY, OUT_OF_SYNC and its clearing) and the registers.
module tb_merger_fpga;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] zs_valid, zs_last, zs_ready, red_af, red_ovf;
  logic [63:0] zs_data [3];
  logic trig_empty, trig_rd, slink_we, slink_ctrl, slink_lff, lb_valid, lb_we, lb_ack;
  logic [23:0] trig_lv1_id;
  logic [11:0] trig_bx_id;
  logic [4:0] trig_count;
  logic [63:0] slink_data;
  tts_e tts;
  logic [3:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;

  merger_fpga dut (.clk, .rst, .zs_valid, .zs_data, .zs_last, .zs_ready,
                   .trig_empty, .trig_lv1_id, .trig_bx_id, .trig_count, .trig_rd,
                   .red_almost_full(red_af), .red_overflow(red_ovf),
                   .slink_we, .slink_ctrl, .slink_data, .slink_lff, .tts,
                   .lb_valid, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata);

  logic [64:0] fq [3][$];        // {last, word}
  logic [35:0] tq [$];
  logic [64:0] out_q [$];        // {ctrl, word} seen on the S-Link

  always_comb begin
    for (int f = 0; f < 3; f++) begin
      zs_valid[f] = fq[f].size() != 0;
      zs_data[f]  = fq[f].size() ? fq[f][0][63:0] : '0;
      zs_last[f]  = fq[f].size() ? fq[f][0][64] : 1'b0;
    end
    trig_empty  = tq.size() == 0;
    trig_lv1_id = tq.size() ? tq[0][35:12] : '0;
    trig_bx_id  = tq.size() ? tq[0][11:0] : '0;
    trig_count  = 5'(tq.size());
  end

  always @(posedge clk) if (!rst) begin
    for (int f = 0; f < 3; f++) if (zs_ready[f] && zs_valid[f]) void'(fq[f].pop_front());
    if (trig_rd) void'(tq.pop_front());
    if (slink_we) out_q.push_back({slink_ctrl, slink_data});
    slink_lff <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic lb(logic we, logic [3:0] a, logic [31:0] wd, output logic [31:0] rd);
    int n;
    lb_valid = 1; lb_we = we; lb_addr = a; lb_wdata = wd; n = 0;
    tick();
    while (!lb_ack && n < 20) begin tick(); n++; end
    rd = lb_rdata; lb_valid = 0; tick();
  endtask

  task automatic check_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // one event; returns the expected words
  task automatic run_event(int lv1, int bx, int bad_frag, logic [3:0] exp_tts, logic [2:0] stat);
    logic [64:0] exp [$];
    logic [15:0] c;
    logic [63:0] trl;
    tq.push_back({24'(lv1), 12'(bx)});
    exp.push_back({1'b1, BOE_1, 4'h1, 24'(lv1), 12'(bx), 12'd520, 8'h00});
    for (int f = 0; f < 3; f++) begin
      int n;
      logic [63:0] h;
      n = $urandom_range(0, 6);
      h = {FRAG_MARKER, 2'(f), 12'(bx), 16'((f == bad_frag) ? lv1 + 1 : lv1), 12'd0, 12'd0, 6'd0};
      if (stat[1] && f == 1) h[29:18] = 12'h010;
      fq[f].push_back({n == 0, h});
      exp.push_back({1'b0, h});
      for (int i = 0; i < n; i++) begin
        logic [63:0] w;
        w = {$urandom, $urandom};
        fq[f].push_back({i == n - 1, w});
        exp.push_back({1'b0, w});
      end
    end
    c = 16'hFFFF;
    foreach (exp[i]) c = ref_crc(c, exp[i][63:0], 64);
    trl = {EOE_1, 4'h0, 24'(exp.size() + 1), 16'h0, 4'h0, 1'b0, stat, exp_tts, 4'h0};
    c = ref_crc(c, trl, 64);
    trl[31:16] = c;
    exp.push_back({1'b1, trl});
    while (out_q.size() < exp.size()) tick();
    foreach (exp[i]) check_eq($sformatf("LV1 %0d word %0d", lv1, i), out_q[i], exp[i]);
    out_q.delete();
  endtask

  initial begin
    logic [31:0] rd;
    red_af = 0; red_ovf = 0; lb_valid = 0; lb_we = 0; lb_addr = 0; lb_wdata = 0;
    repeat (2) @(posedge clk);
    rst = 0; tick();
    lb(0, 4'd0, 0, rd);  check_eq("Source_id reset", 64'(rd), 520);
    for (int e = 1; e <= 40; e++) run_event(e, $urandom_range(0, 3563), -1, TTS_READY, 3'b000);
    lb(0, 4'd2, 0, rd);  check_eq("events sent", 64'(rd), 40);
    // link error reported by a fragment
    run_event(41, 7, -1, TTS_READY, 3'b010);
    // warning and busy
    red_af = 3'b010; repeat (3) tick();
    check_eq("TTS warning", 64'(tts), 64'(TTS_WARN));
    run_event(42, 8, -1, TTS_WARN, 3'b000);
    red_af = 0; red_ovf = 3'b100; repeat (3) tick();
    check_eq("TTS busy", 64'(tts), 64'(TTS_BUSY));
    run_event(43, 9, -1, TTS_BUSY, 3'b100);
    red_ovf = 0; repeat (3) tick();
    // event-number mismatch in fragment 2
    run_event(44, 10, 2, TTS_OOS, 3'b001);   // the trailer already reports it
    repeat (3) tick();
    check_eq("TTS out of sync", 64'(tts), 64'(TTS_OOS));
    lb(0, 4'd3, 0, rd);  check_eq("status", 64'(rd), {56'd0, TTS_OOS, 4'd1});
    lb(1, 4'd3, 1, rd);  repeat (3) tick();
    check_eq("TTS ready again", 64'(tts), 64'(TTS_READY));
    // new Source_id
    lb(1, 4'd0, 32'h123, rd);
    begin
      logic [63:0] h;
      tq.push_back({24'd45, 12'd11});
      for (int f = 0; f < 3; f++) fq[f].push_back({1'b1, FRAG_MARKER, 2'(f), 12'd11, 16'd45, 30'd0});
      while (out_q.size() < 5) tick();
      h = out_q[0][63:0];
      check_eq("Source_id field", 64'(h[19:8]), 64'h123);
      check_eq("Evt_lgth empty event", 64'(out_q[4][55:32]), 5);
      check_eq("K flags", {59'd0, out_q[0][64], out_q[1][64], out_q[2][64], out_q[3][64], out_q[4][64]}, 64'b10001);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
