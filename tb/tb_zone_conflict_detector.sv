// Testbench of the zone conflict detector at its default size (768 lines,
// 32 set-defined zones, 4-cycle pipeline). Random candidate locations are
// presented every cycle; a reference kept here records the cycle and
// location of the last read issued to each zone and predicts conflict,
// stall cycles, same-address and write-after-read outputs. Candidates without
// a conflict are issued at random, with bubbles in between, so zones are
// reused both while busy and right after they clear.
module tb_zone_conflict_detector;
  localparam int PIPE = 4, WAYS = 24;

  logic clk = 0, rst_n = 0, issue = 0;
  logic [9:0] issue_addr = '0, q_addr = '0;
  logic conflict, same_addr, war_hit;
  logic [2:0] stall_cycles;
  int checks = 0, failures = 0, n = 0;
  int zcyc[32], zaddr[32];
  int n_conf = 0, n_same = 0;

  zone_conflict_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) n <= n + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d %s", n, what); end
  endtask

  initial begin
    for (int z = 0; z < 32; z++) begin zcyc[z] = -100; zaddr[z] = -1; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int a, z, age;
      bit ec, es;
      @(negedge clk);
      // candidates from 4 zones so conflicts are frequent
      a = ($urandom % 4) * WAYS + ($urandom % 3);
      q_addr = 10'(a);
      #1;
      z = a / WAYS;
      age = n - zcyc[z];
      ec = age < PIPE;
      es = ec && zaddr[z] == a;
      chk(conflict == ec, $sformatf("conflict %0b exp %0b", conflict, ec));
      if (ec) begin
        chk(int'(stall_cycles) == PIPE - age, $sformatf("stall %0d exp %0d", stall_cycles, PIPE - age));
        chk(same_addr == es, "same_addr");
        n_conf++;
        if (es) n_same++;
      end
      chk(war_hit == es, "war_hit");
      issue = !ec && ($urandom % 3 != 0);
      issue_addr = q_addr;
      if (issue) begin zcyc[z] = n; zaddr[z] = a; end
    end
    chk(n_conf > 100 && n_same > 10, "conflicts and same-address conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
