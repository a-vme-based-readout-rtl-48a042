// tb_local_bus_decoder: targets are modelled by slaves that acknowledge
// after a random delay with read data naming the target. Checks that each
// request reaches only its target, that the returned data come from it,
// and that unmapped targets are answered by the decoder.
module tb_local_bus_decoder;
  import esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic m_valid, m_ack, mrg_valid, mrg_ack;
  logic [24:0] m_addr;
  logic [31:0] m_rdata, mrg_rdata;
  logic [2:0] spy_valid, spy_ack;
  logic [31:0] spy_rdata [3];

  local_bus_decoder dut (.clk, .rst, .m_valid, .m_addr, .m_ack, .m_rdata, .spy_valid, .spy_ack,
                         .spy_rdata, .mrg_valid, .mrg_ack, .mrg_rdata);

  int seen [5] = '{default: 0};
  for (genvar i = 0; i < 4; i++) begin : g_slave
    logic v, a; logic [31:0] r; int d;
    if (i < 3) begin : g_spy
      assign v = spy_valid[i]; assign spy_ack[i] = a; assign spy_rdata[i] = r;
    end else begin : g_mrg
      assign v = mrg_valid; assign mrg_ack = a; assign mrg_rdata = r;
    end
    always @(posedge clk) begin
      a <= 0;
      if (rst) d <= 0;
      else if (v && !a) begin
        if (d > 0) d <= d - 1;
        else begin a <= 1; r <= 32'h1000 * (i + 1) + 32'(m_addr[7:0]); seen[i + 1]++; d <= $urandom_range(0, 3); end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_valid = 0; m_addr = 0;
    repeat (2) @(posedge clk);
    rst = 0; @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      int tg, n; logic [31:0] exp;
      int prev [5];
      tg = $urandom_range(0, 7);
      prev = seen;
      m_addr = {4'(tg), 13'd0, 8'($urandom)};
      exp = (tg >= 1 && tg <= 4) ? 32'h1000 * tg + 32'(m_addr[7:0]) : 32'hBAD0_ADD0;
      m_valid = 1; n = 0;
      @(posedge clk); #1;
      while (!m_ack && n < 20) begin @(posedge clk); #1; n++; end
      checks++;
      if (!m_ack || m_rdata != exp) begin failures++; $display("FAIL target %0d data %h exp %h", tg, m_rdata, exp); end
      @(posedge clk); #1;
      m_valid = 0;
      checks++;
      for (int k = 1; k <= 4; k++)
        if (seen[k] != prev[k] + ((k == tg) ? 1 : 0)) begin
          failures++; $display("FAIL target %0d served by %0d", tg, k); break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
