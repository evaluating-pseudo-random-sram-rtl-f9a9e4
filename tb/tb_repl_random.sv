// Testbench of the random replacement generator (16 entries). The expected
// victim sequence is produced here by a bit-serial model of the 16-bit LFSR
// x^16 + x^14 + x^13 + x^11 + 1 seeded with 16'hACE1; the test also checks
// that every entry is chosen and that the generator does not repeat a state
// within 1000 steps.
module tb_repl_random;
  logic clk = 0, rst_n = 0;
  logic [3:0] victim;
  int checks = 0, failures = 0;
  logic [15:0] s;
  int seen[16];
  int first_state;

  repl_random dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    bit repeat_seen;
    for (int i = 0; i < 16; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    s = 16'hACE1;
    first_state = s;
    repeat_seen = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};   // one step per edge since reset
      if (int'(s) == first_state) repeat_seen = 1;
      chk(victim == s[3:0], $sformatf("victim %0d exp %0d", victim, s[3:0]));
      seen[s[3:0]]++;
    end
    for (int i = 0; i < 16; i++) chk(seen[i] > 0, $sformatf("entry %0d never chosen", i));
    chk(!repeat_seen, "short period");
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
