// tb_crc16_ccitt: checks the CRC register against the published check
// value of CRC-16/CCITT-FALSE ("123456789" -> 16'h29B1) with an 8-bit
// instance, and against a bit-serial model for random 16- and 64-bit words.
module tb_crc16_ccitt;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init, en;
  logic [7:0]  d8;
  logic [15:0] d16;
  logic [63:0] d64;
  logic [15:0] c8, c16, c64, n8, n16, n64;

  crc16_ccitt #(.DATA_W(8))  u8  (.clk, .rst, .init, .en, .data(d8),  .crc(c8),  .crc_next(n8));
  crc16_ccitt #(.DATA_W(16)) u16 (.clk, .rst, .init, .en, .data(d16), .crc(c16), .crc_next(n16));
  crc16_ccitt #(.DATA_W(64)) u64 (.clk, .rst, .init, .en, .data(d64), .crc(c64), .crc_next(n64));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s;
    logic [15:0] r16, r64;
    s = "123456789";
    init = 0; en = 0; d8 = 0; d16 = 0; d64 = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    init <= 1; @(posedge clk); init <= 0;
    for (int i = 0; i < 9; i++) begin
      en <= 1; d8 <= s[i];
      d16 <= 16'(s[i]); d64 <= 64'(s[i]);
      @(posedge clk);
    end
    en <= 0; @(posedge clk);
    check("check value 123456789", c8, 16'h29B1);
    // random words
    for (int t = 0; t < 20; t++) begin
      init <= 1; @(posedge clk); init <= 0;
      r16 = 16'hFFFF; r64 = 16'hFFFF;
      for (int i = 0; i < 1 + t; i++) begin
        logic [15:0] a; logic [63:0] b;
        a = 16'($urandom); b = {$urandom, $urandom};
        en <= 1; d16 <= a; d64 <= b;
        r16 = ref_crc(r16, 64'(a), 16);
        r64 = ref_crc(r64, b, 64);
        @(posedge clk);
      end
      en <= 0; @(posedge clk);
      check("crc16 words", c16, r16);
      check("crc64 words", c64, r64);
    end
    // init wins over enable
    en <= 1; init <= 1; @(posedge clk); en <= 0; init <= 0; @(posedge clk);
    check("init priority", c16, 16'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
