// tb_pedestal_calib: loads random pedestals and gains for all 128
// channels, sends random samples and checks
// y = floor((x - pedestal) * gain / 256) one clock later, with tags kept.
// Also checks the reset values (pedestal 0, gain 1).
module tb_pedestal_calib;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, cfg_sel, in_valid, out_valid;
  logic [6:0] cfg_chan;
  logic [15:0] cfg_data;
  sample_t in, out;
  int ped [128], gain [128];
  int exp_val; sample_t exp_tag; logic exp_v;

  pedestal_calib dut (.clk, .rst, .cfg_we, .cfg_sel, .cfg_chan, .cfg_data,
                      .in_valid, .in, .out_valid, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int mm, int strip, int x, int p, int g);
    in_valid = 1; in = '0; in.mm = 2'(mm); in.strip = 5'(strip); in.smp = 2'($urandom_range(0, 2));
    in.val = 16'(x);
    exp_tag = in;
    exp_val = sat16(longint'(floor_div(longint'(x - p) * g, 256)));
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || $signed(out.val) != exp_val || out.mm != exp_tag.mm ||
        out.strip != exp_tag.strip || out.smp != exp_tag.smp) begin
      failures++;
      $display("FAIL ch %0d x %0d p %0d g %0d: got %0d exp %0d", mm*32+strip, x, p, g, $signed(out.val), exp_val);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_sel = 0; cfg_chan = 0; cfg_data = 0; in_valid = 0; in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    one(1, 5, 1234, 0, 256);               // reset values
    for (int c = 0; c < 128; c++) begin
      ped[c]  = $urandom_range(0, 4095);
      gain[c] = $urandom_range(0, 1023);
      cfg_we = 1; cfg_chan = 7'(c);
      cfg_sel = 0; cfg_data = 16'(ped[c]);  @(posedge clk); #1;
      cfg_sel = 1; cfg_data = 16'(gain[c]); @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int c;
      c = $urandom_range(0, 127);
      one(c / 32, c % 32, $urandom_range(0, 4095), ped[c], gain[c]);
    end
    one(0, 0, 0, ped[0], gain[0]);
    one(3, 31, 4095, ped[127], gain[127]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
