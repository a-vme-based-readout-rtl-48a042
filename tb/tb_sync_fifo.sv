// tb_sync_fifo: random pushes and pops against a queue model; checks
// order, count, full and empty flags.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr, rd, full, empty;
  logic [7:0] din, dout;
  logic [3:0] count;
  logic [7:0] q [$];

  sync_fifo #(.WIDTH(8), .DEPTH(8)) dut (.clk, .rst, .wr, .din, .rd, .dout, .full, .empty, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    for (int t = 0; t < 2000; t++) begin
      // compare state before this clock's operation
      checks++;
      if (count != 4'(q.size()) || full != (q.size() == 8) || empty != (q.size() == 0)) begin
        failures++;
        $display("FAIL flags: count %0d model %0d full %b empty %b", count, q.size(), full, empty);
      end
      if (q.size() != 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("FAIL data %h exp %h", dout, q[0]); end
      end
      wr  = (q.size() < 8) && ($urandom_range(0, 99) < (t < 1000 ? 70 : 30));
      rd  = (q.size() > 0) && ($urandom_range(0, 99) < (t < 1000 ? 30 : 70));
      din = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
