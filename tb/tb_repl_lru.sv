// Testbench of the LRU replacement state (16 entries). Random touches, some
// cycles idle, are applied; a reference recency list kept here (most recent
// first) predicts the victim, which must be its last element every cycle.
module tb_repl_lru;
  logic clk = 0, rst_n = 0, touch = 0;
  logic [3:0] touch_idx = '0, victim;
  int checks = 0, failures = 0;
  int order[$];

  repl_lru dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) order.push_back(i);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      chk(int'(victim) == order[$], $sformatf("victim %0d exp %0d", victim, order[$]));
      touch = ($urandom % 4) != 0;
      // bias towards a few entries so the tail is not always the same
      touch_idx = ($urandom % 2) ? 4'($urandom % 4) : 4'($urandom);
      if (touch) begin
        foreach (order[k]) if (order[k] == int'(touch_idx)) begin order.delete(k); break; end
        order.push_front(int'(touch_idx));
      end
    end
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
