// Directed testbench on a toy hybrid PR-SRAM: 8 lines in 4 zones of 2
// adjacent lines, a 4-line conventional SRAM, built once with a 2-cycle and
// once with a 4-cycle read pipeline.
//
//  1. Reads of lines 3, 6, 1, 2 in consecutive cycles: line 2 shares the
//     zone of line 3, read three cycles earlier, so it waits PIPE-3 cycles
//     (one cycle for PIPE = 4, none for PIPE = 2). It is a different line,
//     so nothing migrates.
//  2. Line 5 read twice in a row: the re-read waits PIPE-1 cycles, is
//     answered from the returning data on the conventional port and the line
//     migrates. A third read of line 5 is a one-cycle hit.
//  3. Line 4 (same zone as line 5) is read, and line 5 is read in the next
//     cycle: the hit is not held back by the busy zone.
// Waits, answering ports, data and counters are checked.
module tb_hybrid_example;
  import hybrid_sram_pkg::*;
  localparam int PIPES [2] = '{2, 4};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [2] = '{0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int P = PIPES[g];
    logic req_valid = 0, req_ready, req_write = 0;
    logic [2:0] req_addr = '0;
    logic [31:0] req_wdata = '0;
    logic [7:0] req_id = '0;
    logic pr_rsp_valid, cv_rsp_valid;
    logic [7:0] pr_rsp_id, cv_rsp_id;
    logic [31:0] pr_rsp_data, cv_rsp_data;
    logic [31:0] cnt_access, cnt_read, cnt_penalty, cnt_conflict, cnt_conv_hit,
                 cnt_migrate, cnt_war_stall, cnt_pr_read;

    hybrid_sram #(.WORDS(8), .LINE_BITS(32), .WAYS(2), .ZONES(4), .ZONING(ZONE_CONTIGUOUS),
                  .PIPE(P), .CONV_LINES(4), .REPL(REPL_LRU)) dut (
      .clk, .rst_n, .hybrid_en(1'b1), .*);

    int n = 0;
    always @(posedge clk) n <= n + 1;
    int  rsp_cycle [256];
    bit  rsp_conv  [256];
    logic [31:0] rsp_data [256];

    always @(negedge clk) if (rst_n) begin
      if (pr_rsp_valid) begin rsp_cycle[pr_rsp_id] = n; rsp_conv[pr_rsp_id] = 0; rsp_data[pr_rsp_id] = pr_rsp_data; end
      if (cv_rsp_valid) begin rsp_cycle[cv_rsp_id] = n; rsp_conv[cv_rsp_id] = 1; rsp_data[cv_rsp_id] = cv_rsp_data; end
    end

    // present a request until accepted; returns waited cycles and acceptance cycle
    task automatic rq(input bit wr, input int a, input int id, output int waited, output int at);
      @(negedge clk);
      req_valid = 1; req_write = wr; req_addr = 3'(a); req_wdata = 32'hA000 + 32'(a); req_id = 8'(id);
      waited = 0;
      #1;
      while (!req_ready) begin @(negedge clk); #1; waited++; end
      at = n;
      @(posedge clk);
      #1 req_valid = 0;
    endtask

    task automatic gap(input int k);
      repeat (k) @(negedge clk);
    endtask

    initial begin
      int w, at, at0, p0, m0, h0;
      int acc_at [256];
      for (int i = 0; i < 256; i++) rsp_cycle[i] = -1;
      wait (rst_n);
      for (int a = 0; a < 8; a++) rq(1, a, 0, w, at);
      gap(P + 1);

      // 1. reads 3, 6, 1, 2 back to back (request task re-drives every cycle)
      p0 = int'(cnt_penalty); m0 = int'(cnt_migrate);
      rq(0, 3, 1, w, acc_at[1]); chk(w == 0, "line 3");
      rq(0, 6, 2, w, acc_at[2]); chk(w == 0, "line 6");
      rq(0, 1, 3, w, acc_at[3]); chk(w == 0, "line 1");
      rq(0, 2, 4, w, acc_at[4]);
      chk(w == (P > 3 ? P - 3 : 0), $sformatf("PIPE %0d: line 2 waited %0d", P, w));
      chk(acc_at[4] - acc_at[1] == (P > 3 ? P : 3), "line 2 enters once the zone clears");
      gap(P + 2);
      chk(int'(cnt_penalty) - p0 == (P > 3 ? P - 3 : 0), "penalty count of step 1");
      chk(int'(cnt_migrate) == m0, "different line: no migration");
      for (int id = 1; id <= 4; id++) begin
        chk(rsp_cycle[id] - acc_at[id] == P && !rsp_conv[id], $sformatf("read %0d answered by the PR-SRAM after PIPE", id));
      end
      chk(rsp_data[4] == 32'hA002 && rsp_data[1] == 32'hA003, "data of step 1");

      // 2. re-read of line 5 migrates it
      h0 = int'(cnt_conv_hit);
      rq(0, 5, 5, w, acc_at[5]); chk(w == 0, "first read of line 5");
      rq(0, 5, 6, w, acc_at[6]); chk(w == P - 1, $sformatf("PIPE %0d: re-read waited %0d", P, w));
      rq(0, 5, 7, w, acc_at[7]); chk(w == 0, "third read of line 5 not held");
      gap(P + 2);
      chk(int'(cnt_migrate) - m0 == 1, "one migration");
      chk(rsp_conv[6] && rsp_cycle[6] - acc_at[6] == 1, "re-read answered by the conventional SRAM");
      chk(acc_at[6] - acc_at[5] == P, "re-read accepted when the first read returns");
      chk(rsp_conv[7] && rsp_cycle[7] - acc_at[7] == 1, "third read is a one-cycle hit");
      chk(rsp_data[5] == 32'hA005 && rsp_data[6] == 32'hA005 && rsp_data[7] == 32'hA005, "data of step 2");

      // 3. a hit is not held back by its busy zone
      rq(0, 4, 8, w, acc_at[8]); chk(w == 0, "line 4");
      rq(0, 5, 9, w, acc_at[9]); chk(w == 0, "hit on line 5 while its zone is busy");
      gap(P + 2);
      chk(int'(cnt_conv_hit) - h0 == 2, "two conventional hits");
      chk(rsp_conv[9] && rsp_data[9] == 32'hA005 && !rsp_conv[8] && rsp_data[8] == 32'hA004, "data of step 3");
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
