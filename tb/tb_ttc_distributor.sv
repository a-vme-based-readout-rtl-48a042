// tb_ttc_distributor: drives bunch-counter resets, event-counter resets
// and level-1 accepts (each held for one bunch crossing = two clocks) and
// checks the trigger FIFO contents (LV1_id, BX_id) against a model of the
// LHC counters, the orbit wrap at 3564, and the lost-trigger count when
// the FIFO is full.
module tb_ttc_distributor;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic l1a, bcnt_res, evcnt_res, bc_strobe, trig_rd, trig_empty;
  logic [11:0] bx_cnt, trig_bx_id;
  logic [23:0] ev_cnt, trig_lv1_id;
  logic [4:0] trig_count;
  logic [15:0] trig_lost;

  ttc_distributor dut (.clk, .rst, .l1a, .bcnt_res, .evcnt_res, .bc_strobe, .bx_cnt, .ev_cnt,
                       .trig_rd, .trig_lv1_id, .trig_bx_id, .trig_empty, .trig_count, .trig_lost);

  logic [35:0] exp_q [$];
  int m_bx = 0, m_ev = 0, lost = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one bunch crossing: inputs set in the first clock, held for two clocks
  task automatic bx(logic a, logic br, logic er, logic rd = 0);
    trig_rd = rd;
    l1a = a; bcnt_res = br; evcnt_res = er;
    m_bx = br ? 0 : (m_bx + 1) % 3564;
    if (er) m_ev = 0;
    else if (a) begin
      m_ev++;
      if (exp_q.size() == 16) lost++;
      else exp_q.push_back({24'(m_ev), 12'(m_bx)});
    end
    @(posedge clk); #1; trig_rd = 0; @(posedge clk); #1;
    l1a = 0; bcnt_res = 0; evcnt_res = 0;
  endtask

  task automatic drain();
    while (exp_q.size()) begin
      checks++;
      if (trig_empty || {trig_lv1_id, trig_bx_id} != exp_q[0]) begin
        failures++;
        $display("FAIL trigger %0d/%0d exp %0d/%0d", trig_lv1_id, trig_bx_id, exp_q[0][35:12], exp_q[0][11:0]);
      end
      void'(exp_q.pop_front());
      bx(0, 0, 0, 1);
    end
  endtask

  initial begin
    l1a = 0; bcnt_res = 0; evcnt_res = 0; trig_rd = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // align to the crossing strobe
    @(posedge clk); #1;
    while (!bc_strobe) begin @(posedge clk); #1; end
    m_bx = int'(bx_cnt);
    bx(0, 1, 1);
    for (int t = 0; t < 9000; t++) begin
      bx($urandom_range(0, 99) < 2, (t % 3564) == 3000, t == 5000);
      if (exp_q.size() > 8) drain();
    end
    drain();
    checks++;
    if (int'(bx_cnt) != m_bx || int'(ev_cnt) != m_ev) begin
      failures++; $display("FAIL counters bx %0d/%0d ev %0d/%0d", bx_cnt, m_bx, ev_cnt, m_ev);
    end
    // overflow the FIFO: 20 accepts in a row
    for (int t = 0; t < 20; t++) bx(1, 0, 0);
    checks++;
    if (int'(trig_lost) != lost || lost != 4) begin failures++; $display("FAIL lost %0d exp %0d", trig_lost, lost); end
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
