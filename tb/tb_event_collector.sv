// tb_event_collector: 12 link buffers are modelled with queues. For each
// event every link gets a random number of hits (some none, one event
// with none at all) and a record; some records carry errors or a wrong
// event counter. The fragment on the 64-bit bus is checked word by word
// (header fields and masks, hits in link order, `last` flag), with the
// ready signal toggled at random.
module tb_event_collector;
  import esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  hit_t hit_dout [12];
  link_eoe_t eoe_dout [12];
  logic [11:0] hit_empty, hit_rd, eoe_empty, eoe_rd;
  logic zs_valid, zs_last, zs_ready;
  logic [63:0] zs_data;

  event_collector dut (.clk, .rst, .optorx_id(2'd2), .hit_dout, .hit_empty, .hit_rd,
                       .eoe_dout, .eoe_empty, .eoe_rd, .zs_valid, .zs_data, .zs_last, .zs_ready);

  hit_t hq [12][$];
  link_eoe_t eq [12][$];
  logic [64:0] exp_q [$];     // {last, word}
  int n_words = 0;

  always_comb
    for (int l = 0; l < 12; l++) begin
      hit_empty[l] = (hq[l].size() == 0);
      eoe_empty[l] = (eq[l].size() == 0);
      hit_dout[l]  = hq[l].size() ? hq[l][0] : '0;
      eoe_dout[l]  = eq[l].size() ? eq[l][0] : '0;
    end

  always @(posedge clk) if (!rst) begin
    if (zs_valid && zs_ready) begin
      checks++;
      if (exp_q.size() == 0 || {zs_last, zs_data} != exp_q[0]) begin
        failures++;
        $display("FAIL word %h last %b exp %h", zs_data, zs_last, exp_q.size() ? exp_q[0] : 65'd0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      n_words++;
    end
    for (int l = 0; l < 12; l++) begin
      if (hit_rd[l]) void'(hq[l].pop_front());
      if (eoe_rd[l]) void'(eq[l].pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    zs_ready = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int ev = 0; ev < 30; ev++) begin
      logic [11:0] emask, mmask;
      int total, bx, ec;
      logic [64:0] words [$];
      total = 0; emask = '0; mmask = '0; words.delete();
      bx = $urandom_range(0, 3563); ec = ev + 1;
      for (int l = 0; l < 12; l++) begin
        int n;
        link_eoe_t r;
        n = (ev == 3) ? 0 : $urandom_range(0, 5);
        if (l == 5 && ev % 4 == 1) n = 128;
        for (int i = 0; i < n; i++) begin
          hit_t h;
          h.mm = 2'($urandom); h.strip = 5'($urandom);
          h.s0 = 16'($urandom); h.s1 = 16'($urandom); h.s2 = 16'($urandom);
          hq[l].push_back(h);
          words.push_back({1'b0, 4'(l), h.mm, h.strip, 5'd0, h.s0, h.s1, h.s2});
        end
        r.bx = 12'(bx); r.ec = 16'(ec); r.nhits = 8'(n);
        r.crc_err = ($urandom_range(0, 9) == 0);
        if (l != 0 && $urandom_range(0, 14) == 0) begin r.ec = r.ec + 1; mmask[l] = 1; end
        emask[l] = r.crc_err;
        eq[l].push_back(r);
        total += n;
      end
      exp_q.push_back({total == 0, FRAG_MARKER, 2'd2, 12'(bx), 16'(ec), emask, mmask, 6'd0});
      foreach (words[i]) exp_q.push_back({i == words.size() - 1, words[i][63:0]});
      // wait until the fragment has gone, toggling ready
      while (exp_q.size() != 0) begin
        zs_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk); #1;
      end
      repeat (3) @(posedge clk); #1;
      checks++;
      for (int l = 0; l < 12; l++)
        if (hq[l].size() || eq[l].size()) begin
          failures++; $display("FAIL link %0d buffers not drained", l); break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
