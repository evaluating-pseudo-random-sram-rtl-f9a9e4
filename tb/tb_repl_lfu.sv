// Testbench of the LFU replacement state (16 entries, 4-bit counters so that
// saturation is reached). Random touches and fills are applied; reference
// counters kept here predict the victim (smallest count, lowest index on a
// tie) every cycle.
module tb_repl_lfu;
  logic clk = 0, rst_n = 0, touch = 0, fill = 0;
  logic [3:0] idx = '0, victim;
  int checks = 0, failures = 0;
  int cnt[16];
  int nsat = 0;

  repl_lfu #(.LINES(16), .CW(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int best, bi, r;
      @(negedge clk);
      best = cnt[0]; bi = 0;
      for (int k = 1; k < 16; k++) if (cnt[k] < best) begin best = cnt[k]; bi = k; end
      chk(int'(victim) == bi, $sformatf("victim %0d exp %0d", victim, bi));
      r = $urandom % 10;
      touch = r < 6;
      fill  = r == 9;
      idx = ($urandom % 2) ? 4'($urandom % 3) : 4'($urandom);
      if (fill) cnt[idx] = 1;
      else if (touch) begin
        if (cnt[idx] < 15) cnt[idx]++; else nsat++;
      end
    end
    chk(nsat > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
