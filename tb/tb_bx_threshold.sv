// tb_bx_threshold: loads random per-channel thresholds, streams random
// three-sample strips (in-time, early and late pulses and noise) and checks
// the kept strips (rule: s1 > threshold, s1 > s0, s1 >= s2), their order
// and values, and the hit count in the end-of-event record.
module tb_bx_threshold;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, in_valid, eoe_in_valid, hit_valid, eoe_out_valid;
  logic [6:0] cfg_chan;
  logic [15:0] cfg_data;
  sample_t in;
  link_eoe_t eoe_in, eoe_out;
  hit_t hit;

  bx_threshold dut (.clk, .rst, .cfg_we, .cfg_chan, .cfg_data, .in_valid, .in,
                    .eoe_in_valid, .eoe_in, .hit_valid, .hit, .eoe_out_valid, .eoe_out);

  int thr [128];
  ref_hit_t exp_q [$];
  int exp_n [$];
  int n_hits = 0, n_eoe = 0, total_exp = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (hit_valid) begin
      checks++;
      if (exp_q.size() == 0 || hit.mm != 2'(exp_q[0].mm) || hit.strip != 5'(exp_q[0].strip) ||
          int'(hit.s0) != exp_q[0].s0 || int'(hit.s1) != exp_q[0].s1 || int'(hit.s2) != exp_q[0].s2) begin
        failures++;
        $display("FAIL hit mm %0d strip %0d s1 %0d", hit.mm, hit.strip, hit.s1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      n_hits++;
    end
    if (eoe_out_valid) begin
      checks++;
      if (exp_n.size() == 0 || int'(eoe_out.nhits) != exp_n[0] || eoe_out.ec != 16'(n_eoe + 7)) begin
        failures++;
        $display("FAIL record nhits %0d", eoe_out.nhits);
      end
      if (exp_n.size()) void'(exp_n.pop_front());
      n_eoe++;
    end
  end

  initial begin
    int v [3][32];
    cfg_we = 0; cfg_chan = 0; cfg_data = 0; in_valid = 0; in = '0; eoe_in_valid = 0; eoe_in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int c = 0; c < 128; c++) begin
      thr[c] = $urandom_range(0, 60);
      cfg_we = 1; cfg_chan = 7'(c); cfg_data = 16'(thr[c]);
      @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int ev = 0; ev < 20; ev++) begin
      int nh;
      nh = 0;
      for (int mm = 0; mm < 4; mm++) begin
        for (int st = 0; st < 32; st++) begin
          int kind;
          kind = $urandom_range(0, 4);
          for (int s = 0; s < 3; s++) v[s][st] = int'($urandom_range(0, 40)) - 20;
          if (kind == 1) begin v[1][st] = $urandom_range(40, 900); v[2][st] = v[1][st] / 2; end
          if (kind == 2) begin v[0][st] = $urandom_range(100, 900); v[1][st] = v[0][st] / 2; end
          if (kind == 3) begin v[2][st] = $urandom_range(100, 900); v[1][st] = v[2][st] / 3; end
          if (kind == 4) begin v[1][st] = 50; v[2][st] = 50; v[0][st] = 49; end
          if (v[1][st] > thr[mm*32+st] && v[1][st] > v[0][st] && v[1][st] >= v[2][st]) begin
            exp_q.push_back('{mm, st, v[0][st], v[1][st], v[2][st]});
            nh++;
          end
        end
        for (int s = 0; s < 3; s++)
          for (int st = 0; st < 32; st++) begin
            in_valid = 1; in.mm = 2'(mm); in.smp = 2'(s); in.strip = 5'(st); in.val = 16'(v[s][st]);
            @(posedge clk); #1;
            in_valid = 0;
          end
      end
      exp_n.push_back(nh);
      total_exp += nh;
      eoe_in_valid = 1; eoe_in = '0; eoe_in.ec = 16'(ev + 7);
      @(posedge clk); #1;
      eoe_in_valid = 0;
      repeat (2) begin @(posedge clk); #1; end
    end
    checks++;
    if (n_hits != total_exp || n_eoe != 20 || total_exp == 0) begin
      failures++; $display("FAIL %0d hits of %0d, %0d records", n_hits, total_exp, n_eoe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
