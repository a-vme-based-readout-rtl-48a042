// tb_vme_interface: a VME master model runs A32/D32 single write and read
// cycles; a local bus slave model (a small memory acknowledging after a
// random delay) answers. Checks: data written and read back through the
// local bus, local bus address = A[26:2], DTACK* only after the data
// strobes and released after them, and no response to another slot's
// address or an unsupported address modifier.
module tb_vme_interface;
  import esdcc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic as_n, write_n, lword_n, data_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] addr;
  logic [31:0] din, dout;
  logic [4:0] ga_n;
  logic lb_valid, lb_we, lb_ack;
  logic [24:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;

  vme_interface dut (.clk, .rst, .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
                     .vme_lword_n(lword_n), .vme_am(am), .vme_addr(addr), .vme_data_in(din),
                     .vme_data_out(dout), .vme_data_oe(data_oe), .vme_dtack_n(dtack_n),
                     .vme_ga_n(ga_n), .lb_valid, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata);

  // local bus slave: 256-word memory on addresses [7:0]
  logic [31:0] mem [256];
  logic [24:0] last_addr;
  int wait_n;
  always @(posedge clk) begin
    lb_ack <= 0;
    if (lb_valid && !lb_ack) begin
      if (wait_n > 0) wait_n <= wait_n - 1;
      else begin
        lb_ack <= 1;
        last_addr <= lb_addr;
        if (lb_we) mem[lb_addr[7:0]] <= lb_wdata;
        lb_rdata <= mem[lb_addr[7:0]];
        wait_n <= $urandom_range(0, 4);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one VME cycle; returns 1 if DTACK* came
  task automatic cycle(logic wr, logic [31:0] a, logic [5:0] m, logic [31:0] wd,
                       output logic [31:0] rd, output logic acked);
    int n;
    addr = a[31:1]; am = m; write_n = !wr; lword_n = 0; din = wd;
    #7 as_n = 0;
    #7 ds_n = 2'b00;
    n = 0;
    while (dtack_n && n < 200) begin #5; n++; end
    acked = !dtack_n;
    #3 rd = dout;
    if (acked && !wr && !data_oe) begin failures++; $display("FAIL data drivers off during read"); end
    checks++;
    ds_n = 2'b11; as_n = 1;
    n = 0;
    while (!dtack_n && n < 50) begin #5; n++; end
    if (!dtack_n) begin failures++; $display("FAIL DTACK* not released"); end
    #20;
  endtask

  initial begin
    logic [31:0] rd, vals [16];
    logic ok;
    as_n = 1; ds_n = 2'b11; write_n = 1; lword_n = 1; am = 0; addr = 0; din = 0;
    ga_n = ~5'd7; wait_n = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      vals[i] = $urandom;
      cycle(1, {5'd7, 19'd0, 6'(i), 2'b00}, (i % 2) ? 6'h09 : 6'h0D, vals[i], rd, ok);
      checks++;
      if (!ok || last_addr != 25'(i)) begin failures++; $display("FAIL write %0d ack %b addr %h", i, ok, last_addr); end
    end
    for (int i = 0; i < 16; i++) begin
      cycle(0, {5'd7, 19'd0, 6'(i), 2'b00}, 6'h09, 0, rd, ok);
      checks++;
      if (!ok || rd != vals[i]) begin failures++; $display("FAIL read %0d: %h exp %h", i, rd, vals[i]); end
    end
    // high local address bits pass through
    cycle(0, {5'd7, 4'h4, 21'h1ABCD, 2'b00}, 6'h09, 0, rd, ok);
    checks++;
    if (!ok || last_addr != {4'h4, 21'h1ABCD}) begin failures++; $display("FAIL address %h", last_addr); end
    // another slot and a wrong AM: no answer
    cycle(1, {5'd8, 25'd0, 2'b00}, 6'h09, 32'h1, rd, ok);
    checks++;
    if (ok) begin failures++; $display("FAIL answered another slot"); end
    cycle(1, {5'd7, 25'd0, 2'b00}, 6'h39, 32'h1, rd, ok);
    checks++;
    if (ok) begin failures++; $display("FAIL answered A24 modifier"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
