// tb_common_mode: streams groups of 32 strips (one strip every 1 or 2
// clocks) and checks every output against x - floor(mean of 32), in
// strip order, with the group's tags; checks that the end-of-event
// record comes out after the last strip of its event, and the latency of
// the first strip of a group (sent 1 clock after the group completes).
module tb_common_mode;
  import esdcc_pkg::*;
  import tb_esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, eoe_in_valid, out_valid, eoe_out_valid;
  sample_t in, out;
  link_eoe_t eoe_in, eoe_out;
  logic signed [15:0] cm_value;

  common_mode dut (.clk, .rst, .in_valid, .in, .eoe_in_valid, .eoe_in,
                   .out_valid, .out, .eoe_out_valid, .eoe_out, .cm_value);

  int exp_q [$];
  int tag_q [$];
  int n_out = 0, n_eoe = 0;
  longint t_last_in, t_first_out;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      logic signed [15:0] ov;
      ov = out.val;
      checks++;
      if (exp_q.size() == 0 || int'(ov) != exp_q[0] ||
          {out.mm, out.smp, out.strip} != 9'(tag_q[0])) begin
        failures++;
        $display("FAIL out %0d tag %h (exp %0d %h)", ov, {out.mm, out.smp, out.strip},
                 exp_q.size() ? exp_q[0] : 0, tag_q.size() ? tag_q[0] : 0);
      end
      if (exp_q.size()) begin void'(exp_q.pop_front()); void'(tag_q.pop_front()); end
      n_out++;
    end
    if (eoe_out_valid) begin
      n_eoe++;
      checks++;
      if (n_out != 12 * 32 * n_eoe || eoe_out.ec != 16'(n_eoe)) begin
        failures++;
        $display("FAIL end of event %0d after %0d strips", n_eoe, n_out);
      end
    end
  end

  initial begin
    int vals [32];
    in_valid = 0; in = '0; eoe_in_valid = 0; eoe_in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int ev = 1; ev <= 4; ev++) begin
      for (int g = 0; g < 12; g++) begin
        longint sum; int mean;
        sum = 0;
        for (int s = 0; s < 32; s++) begin
          vals[s] = (ev == 4 && g == 0) ? ((s % 2) ? 32767 : -32768)
                                        : int'($urandom_range(0, 2000)) - 1000;
          sum += vals[s];
        end
        mean = floor_div(sum, 32);
        for (int s = 0; s < 32; s++) begin
          exp_q.push_back(sat16(longint'(vals[s]) - mean));
          tag_q.push_back(int'({2'(g / 3), 2'(g % 3), 5'(s)}));
          in_valid = 1; in.mm = 2'(g / 3); in.smp = 2'(g % 3); in.strip = 5'(s);
          in.val = 16'(vals[s]);
          @(posedge clk); #1;
          in_valid = 0;
          if ($urandom_range(0, 1)) begin @(posedge clk); #1; end
        end
        // next group needs at least 32 clocks after this one completes
        repeat (20) begin @(posedge clk); #1; end
      end
      eoe_in_valid = 1; eoe_in = '0; eoe_in.ec = 16'(ev);
      @(posedge clk); #1;
      eoe_in_valid = 0;
      repeat (3) begin @(posedge clk); #1; end
    end
    // latency: a group arriving back to back, first output one clock after the last input
    for (int s = 0; s < 32; s++) begin
      in_valid = 1; in.mm = 0; in.smp = 0; in.strip = 5'(s); in.val = 16'(s);
      exp_q.push_back(s - 15); tag_q.push_back(s);
      @(posedge clk); #1;
    end
    in_valid = 0;
    checks++;
    if (out_valid || !(dut.draining)) begin
      failures++; $display("FAIL group not draining right after its last strip");
    end
    @(posedge clk); #1;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL first strip not out two clocks after the last input"); end
    repeat (60) begin @(posedge clk); #1; end
    checks++;
    if (n_out != 5 * 12 * 32 - 11 * 32 || n_eoe != 4) begin
      failures++; $display("FAIL %0d strips, %0d records out", n_out, n_eoe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
