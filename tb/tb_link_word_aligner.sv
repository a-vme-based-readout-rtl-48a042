// tb_link_word_aligner: sends idle pairs (K28.5, D16.2) and data pairs,
// with random gaps between characters and a few code errors, and checks
// the assembled words, their error flags and the raw lane copy.
module tb_link_word_aligner;
  import esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid, rx_k, rx_err;
  logic [7:0] rx_byte;
  logic word_valid, word_err, raw_valid;
  logic [15:0] word;
  logic [9:0] raw_lane;
  logic [16:0] exp_q [$];
  logic [9:0]  raw_q [$];

  link_word_aligner dut (.clk, .rst, .rx_valid, .rx_byte, .rx_k, .rx_err,
                         .word_valid, .word, .word_err, .raw_valid, .raw_lane);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, logic k, logic e);
    rx_valid = 1; rx_byte = b; rx_k = k; rx_err = e;
    raw_q.push_back({e, k, b});
    @(posedge clk); #1;
    rx_valid = 0;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
  endtask

  always @(posedge clk) if (!rst) begin
    if (word_valid) begin
      checks++;
      if (exp_q.size() == 0 || {word_err, word} != exp_q[0]) begin
        failures++;
        $display("FAIL word %h err %b", word, word_err);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (raw_valid) begin
      checks++;
      if (raw_q.size() == 0 || raw_lane != raw_q[0]) begin
        failures++; $display("FAIL raw lane %h exp %h t=%0t", raw_lane, raw_q.size() ? raw_q[0] : 0, $time);
      end
      if (raw_q.size() != 0) void'(raw_q.pop_front());
    end
  end

  initial begin
    rx_valid = 0; rx_byte = 0; rx_k = 0; rx_err = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // start on a stray byte to check re-alignment by the comma
    send(8'h33, 0, 0);
    for (int p = 0; p < 40; p++) begin
      repeat ($urandom_range(1, 3)) begin send(K28_5, 1, 0); send(8'h50, 0, 0); end
      for (int w = 0; w < 10; w++) begin
        logic [15:0] d; logic e;
        d = 16'($urandom);
        e = ($urandom_range(0, 40) == 0);
        exp_q.push_back({e, d});
        send(d[15:8], 0, e); send(d[7:0], 0, 0);
      end
    end
    send(K28_5, 1, 0); send(8'h50, 0, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || raw_q.size() != 0) begin
      failures++; $display("FAIL %0d words / %0d raw characters never came out", exp_q.size(), raw_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
