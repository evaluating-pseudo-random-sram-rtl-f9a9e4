// Testbench of the event counters. Random strobes are applied to the eight
// event inputs of two instances, one 32 bits wide and one 4 bits wide so
// that saturation is reached; counts kept here are compared with every
// counter after every cycle.
module tb_perf_counters;
  logic clk = 0, rst_n = 0;
  logic [7:0] ev = '0;
  logic [31:0] c32 [8];
  logic [3:0]  c4  [8];
  int checks = 0, failures = 0;
  int ref_cnt [8];

  perf_counters #(.CNT_W(32)) u32 (
    .clk, .rst_n, .ev_access(ev[0]), .ev_read(ev[1]), .ev_penalty(ev[2]), .ev_conflict(ev[3]),
    .ev_conv_hit(ev[4]), .ev_migrate(ev[5]), .ev_war_stall(ev[6]), .ev_pr_read(ev[7]),
    .cnt_access(c32[0]), .cnt_read(c32[1]), .cnt_penalty(c32[2]), .cnt_conflict(c32[3]),
    .cnt_conv_hit(c32[4]), .cnt_migrate(c32[5]), .cnt_war_stall(c32[6]), .cnt_pr_read(c32[7]));
  perf_counters #(.CNT_W(4)) u4 (
    .clk, .rst_n, .ev_access(ev[0]), .ev_read(ev[1]), .ev_penalty(ev[2]), .ev_conflict(ev[3]),
    .ev_conv_hit(ev[4]), .ev_migrate(ev[5]), .ev_war_stall(ev[6]), .ev_pr_read(ev[7]),
    .cnt_access(c4[0]), .cnt_read(c4[1]), .cnt_penalty(c4[2]), .cnt_conflict(c4[3]),
    .cnt_conv_hit(c4[4]), .cnt_migrate(c4[5]), .cnt_war_stall(c4[6]), .cnt_pr_read(c4[7]));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        chk(int'(c32[i]) == ref_cnt[i], $sformatf("32-bit counter %0d", i));
        chk(int'(c4[i]) == (ref_cnt[i] > 15 ? 15 : ref_cnt[i]), $sformatf("4-bit counter %0d", i));
      end
      // each event with its own probability
      for (int i = 0; i < 8; i++) ev[i] = ($urandom % 8) <= i;
      for (int i = 0; i < 8; i++) if (ev[i]) ref_cnt[i]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
