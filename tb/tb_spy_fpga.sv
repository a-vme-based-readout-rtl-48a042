// tb_spy_fpga: with three SRAM models attached, starts a capture of raw
// beats over the local bus, drives random raw data (beats with gaps),
// and reads the SRAM contents back through the local bus, checking every
// lane's {k, byte} in all three SRAMs and both halves of the 36-bit
// words. Also checks the register file, the capture length, refusal of
// SRAM reads during a capture, and forwarding of parameter writes to the
// private bus. A second capture takes the zero-suppressed bus instead,
// with random valid/ready so that only handshaken words may be stored,
// and checks every stored word, its last flag and the unused SRAM.
module tb_spy_fpga;
  import esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] raw_valid;
  logic [119:0] raw_data;
  logic lb_valid, lb_we, lb_ack, cfg_we, sram_we;
  logic [20:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;
  logic [15:0] cfg_addr, cfg_data;
  logic [18:0] sram_addr;
  logic [35:0] sram_wdata [3], sram_rdata [3];
  logic zs_valid, zs_ready, zs_last;
  logic [63:0] zs_data;

  spy_fpga dut (.clk, .rst, .raw_valid, .raw_data,
                .zs_valid, .zs_ready, .zs_data, .zs_last, .lb_valid, .lb_we, .lb_addr, .lb_wdata,
                .lb_ack, .lb_rdata, .cfg_we, .cfg_addr, .cfg_data, .sram_addr, .sram_we,
                .sram_wdata, .sram_rdata);
  for (genvar j = 0; j < 3; j++) begin : g_mem
    cy7c1371_model u_mem (.clk, .a(sram_addr), .we(sram_we), .d(sram_wdata[j]), .q(sram_rdata[j]));
  end

  int n_cfg = 0;
  logic [31:0] last_cfg;
  always @(posedge clk) if (!rst && cfg_we) begin n_cfg++; last_cfg <= {cfg_addr, cfg_data}; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic lb(logic we, logic [20:0] a, logic [31:0] wd, output logic [31:0] rd);
    int n;
    lb_valid = 1; lb_we = we; lb_addr = a; lb_wdata = wd; n = 0;
    tick();
    while (!lb_ack && n < 50) begin tick(); n++; end
    rd = lb_rdata;
    lb_valid = 0;
    tick();
  endtask

  task automatic check_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] rd;
    logic [119:0] beats [$];
    lb_valid = 0; lb_we = 0; lb_addr = 0; lb_wdata = 0; raw_valid = 0; raw_data = 0;
    zs_valid = 0; zs_ready = 0; zs_data = 0; zs_last = 0;
    repeat (2) @(posedge clk);
    rst = 0; tick();
    lb(0, 21'h4, 0, rd);            check_eq("ID", rd, 32'h5350_0001);
    lb(1, 21'h1, 200, rd);
    lb(0, 21'h1, 0, rd);            check_eq("DEPTH", rd, 200);
    lb(1, 21'h0, 1, rd);
    lb(0, 21'h0, 0, rd);            check_eq("busy", rd, 1);
    // SRAM read refused while capturing
    lb(0, 21'h100005, 0, rd);       check_eq("refused read", rd, 32'hDEAD_0001);
    // 250 raw beats, only the first 200 stored
    for (int b = 0; b < 250; b++) begin
      logic [119:0] r;
      r = {$urandom, $urandom, $urandom, $urandom};
      beats.push_back(r);
      raw_valid = '1; raw_data = r; tick();
      raw_valid = '0;
      if ($urandom_range(0, 1)) tick();
    end
    lb(0, 21'h2, 0, rd);            check_eq("WPTR", rd, 200);
    lb(0, 21'h0, 0, rd);            check_eq("idle", rd, 0);
    for (int b = 0; b < 200; b += 7) begin
      for (int j = 0; j < 3; j++) begin
        logic [35:0] ew;
        for (int m = 0; m < 4; m++) ew[9*m +: 9] = beats[b][10*(4*j+m) +: 9];
        lb(1, 21'h3, 32'(j), rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("SRAM low", rd, ew[31:0]);
        lb(1, 21'h3, 32'(j + 4), rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("SRAM high", rd, 32'(ew[35:32]));
      end
    end
    // zero-suppressed capture: 60 words, with raw beats present as noise
    begin
      logic [64:0] zw [$];
      lb(1, 21'h1, 60, rd);
      lb(1, 21'h0, 3, rd);
      lb(0, 21'h0, 0, rd);          check_eq("zs busy", rd, 3);
      while (zw.size() < 80) begin
        zs_valid = $urandom_range(0, 3) != 0;
        zs_ready = $urandom_range(0, 2) != 0;
        zs_data  = {$urandom, $urandom};
        zs_last  = $urandom_range(0, 1);
        raw_valid = '1; raw_data = {$urandom, $urandom, $urandom, $urandom};
        if (zs_valid && zs_ready) zw.push_back({zs_last, zs_data});
        tick();
      end
      zs_valid = 0; zs_ready = 0; raw_valid = 0;
      lb(0, 21'h2, 0, rd);          check_eq("zs WPTR", rd, 60);
      lb(0, 21'h0, 0, rd);          check_eq("zs idle", rd, 2);
      for (int b = 0; b < 60; b++) begin
        lb(1, 21'h3, 0, rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("zs low", rd, zw[b][31:0]);
        lb(1, 21'h3, 4, rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("zs low top", rd, 32'(zw[b][35:32]));
        lb(1, 21'h3, 1, rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("zs high+last", rd, {3'b0, zw[b][64:36]});
        lb(1, 21'h3, 5, rd);
        lb(0, {2'd2, 19'(b)}, 0, rd);   check_eq("zs high top", rd, 0);
        if (b % 10 == 0) begin
          lb(1, 21'h3, 2, rd);
          lb(0, {2'd2, 19'(b)}, 0, rd); check_eq("zs unused", rd, 0);
        end
      end
    end
    // parameter forwarding
    lb(1, {2'd1, 3'd0, 16'hF123}, 32'h0000_ABCD, rd);
    check_eq("forwarded", last_cfg, 32'hF123_ABCD);
    check_eq("one forward", 32'(n_cfg), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
