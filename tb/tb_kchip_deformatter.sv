// tb_kchip_deformatter: feeds 300-word packets (one word every 2 or 3
// clocks) and checks every unpacked sample and its tags, the end-of-event
// record (BX, event counter) and the error flag for good packets, packets
// with a corrupted data word, packets with K-chip flags set and packets
// with a link code error.
module tb_kchip_deformatter;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic word_valid, word_err, smp_valid, eoe_valid;
  logic [15:0] word;
  sample_t smp;
  link_eoe_t eoe;
  logic [15:0] mm_status [8];

  kchip_deformatter dut (.clk, .rst, .word_valid, .word, .word_err,
                         .smp_valid, .smp, .eoe_valid, .eoe, .mm_status);

  samples_t cur;
  int n_smp = 0, n_eoe = 0;
  logic exp_err;
  int exp_bx, exp_ec;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (smp_valid) begin
      int i;
      i = sidx(smp.mm, smp.smp, smp.strip);
      checks++;
      if (i != n_smp || smp.val != 16'(cur[n_smp])) begin
        failures++;
        $display("FAIL sample %0d: tags give %0d, value %h exp %h", n_smp, i, smp.val, cur[n_smp]);
      end
      n_smp++;
    end
    if (eoe_valid) begin
      checks++;
      if (n_smp != 384 || eoe.bx != 12'(exp_bx) || eoe.ec != 16'(exp_ec) || eoe.crc_err != exp_err) begin
        failures++;
        $display("FAIL eoe: after %0d samples bx %0d ec %0d err %b (exp %0d %0d %b)",
                 n_smp, eoe.bx, eoe.ec, eoe.crc_err, exp_bx, exp_ec, exp_err);
      end
      n_eoe++;
    end
  end

  initial begin
    packet_t pk;
    word_valid = 0; word = 0; word_err = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int p = 0; p < 12; p++) begin
      int kind;
      kind = p % 4;         // 0 good, 1 corrupted word, 2 flags, 3 code error
      for (int i = 0; i < 384; i++) cur[i] = 12'($urandom);
      exp_bx = $urandom_range(0, 3563); exp_ec = p + 1;
      make_packet(exp_bx, exp_ec, (kind == 2) ? 8'h04 : 8'h00, cur, pk);
      if (kind == 1) begin
        pk[100] ^= 16'h0040;
        // word 100 is the third word of sample group 29: its bits 11..0
        // are sample 119
        cur[119] ^= 12'h040;
      end
      exp_err = (kind != 0);
      n_smp = 0;
      for (int w = 0; w < 300; w++) begin
        word_valid = 1; word = pk[w]; word_err = (kind == 3 && w == 50);
        @(posedge clk); #1;
        word_valid = 0; word_err = 0;
        repeat ($urandom_range(1, 2)) begin @(posedge clk); #1; end
      end
      repeat (20) begin @(posedge clk); #1; end
    end
    checks++;
    if (n_eoe != 12) begin failures++; $display("FAIL %0d end-of-event records", n_eoe); end
    checks++;
    if (mm_status[7] != 16'h700A) begin failures++; $display("FAIL status word %h", mm_status[7]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
