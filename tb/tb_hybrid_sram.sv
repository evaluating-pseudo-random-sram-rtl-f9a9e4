// End-to-end testbench of the hybrid PR-SRAM at its default (full) size:
// 768 lines of 1024 bits, 32 set-aligned zones, 4-cycle read pipeline and a
// 16-line LRU conventional SRAM.
//
// A cycle-level reference model written here independently of the RTL tracks
// the last read issued to each zone, the contents and LRU order of the
// conventional SRAM and the memory contents. Every cycle it predicts
// req_ready; on every accepted read it predicts which path answers (PR-SRAM
// after 4 cycles, conventional SRAM after 1 cycle) and with what data, and
// checks the response port, tag, data and cycle. At the end the event
// counters are compared with the model's own counts.
//
// Directed phases reproduce the timing examples of the design (four reads to
// different zones proceed back to back; a fifth read to a busy zone waits one
// cycle; a re-read of a line in flight migrates it), then random traffic
// with a hot set of lines exercises conflicts, migrations, evictions,
// write-after-read stalls and switching the conventional SRAM off and on.
// Each mechanism must occur at least once.
module tb_hybrid_sram;
  import hybrid_sram_pkg::*;

  localparam int WORDS = 768, LB = 1024, WAYS = 24, PIPE = 4, CONV = 16, IDW = 8;
  localparam int AW = 10;

  logic clk = 1'b0, rst_n = 1'b0, hybrid_en = 1'b1;
  logic req_valid = 1'b0, req_ready, req_write = 1'b0;
  logic [AW-1:0] req_addr = '0;
  logic [LB-1:0] req_wdata = '0;
  logic [IDW-1:0] req_id = '0;
  logic [IDW-1:0] next_id = '0;
  logic want_hybrid = 1'b1;   // mode applied at the next falling edge
  logic pr_rsp_valid, cv_rsp_valid;
  logic [IDW-1:0] pr_rsp_id, cv_rsp_id;
  logic [LB-1:0] pr_rsp_data, cv_rsp_data;
  logic [31:0] cnt_access, cnt_read, cnt_penalty, cnt_conflict, cnt_conv_hit,
               cnt_migrate, cnt_war_stall, cnt_pr_read;

  hybrid_sram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n = 0;  // cycle number, advanced at each rising edge
  always @(posedge clk) n <= n + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", n, what);
    end
  endtask

  // ---- reference model -----------------------------------------------------
  logic [LB-1:0] ref_mem [WORDS];
  int  zone_cyc [32];
  int  zone_addr[32];
  int  conv_q[$];          // conventional SRAM contents, most recent first
  bit  m_wait_same = 0, m_stalled = 0;
  // expected responses, indexed by cycle modulo 16
  bit            exp_pr_v [16], exp_cv_v [16];
  logic [IDW-1:0] exp_pr_id[16], exp_cv_id[16];
  logic [LB-1:0]  exp_pr_d [16], exp_cv_d [16];
  // model event counts
  int m_access = 0, m_read = 0, m_penalty = 0, m_conflict = 0, m_conv_hit = 0;
  int m_migrate = 0, m_war = 0, m_pr_read = 0, m_evict = 0, m_pure_on_cached = 0;
  int m_back_to_back = 0;

  function automatic int zone(int a); return a / WAYS; endfunction
  function automatic bit in_conv(int a);
    foreach (conv_q[i]) if (conv_q[i] == a) return 1;
    return 0;
  endfunction
  function automatic void conv_touch(int a);
    foreach (conv_q[i]) if (conv_q[i] == a) begin conv_q.delete(i); break; end
    conv_q.push_front(a);
  endfunction

  function automatic logic [LB-1:0] rand_line();
    logic [LB-1:0] v;
    for (int i = 0; i < LB / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // Check the response ports once per cycle, at the falling edge.
  always @(negedge clk) if (rst_n) begin
    int s;
    s = n % 16;
    check(pr_rsp_valid == exp_pr_v[s], $sformatf("pr_rsp_valid %0b exp %0b", pr_rsp_valid, exp_pr_v[s]));
    if (exp_pr_v[s] && pr_rsp_valid) begin
      check(pr_rsp_id == exp_pr_id[s], "pr_rsp_id");
      check(pr_rsp_data == exp_pr_d[s], "pr_rsp_data");
    end
    check(cv_rsp_valid == exp_cv_v[s], $sformatf("cv_rsp_valid %0b exp %0b", cv_rsp_valid, exp_cv_v[s]));
    if (exp_cv_v[s] && cv_rsp_valid) begin
      check(cv_rsp_id == exp_cv_id[s], "cv_rsp_id");
      check(cv_rsp_data == exp_cv_d[s], "cv_rsp_data");
    end
    exp_pr_v[s] = 0;
    exp_cv_v[s] = 0;
  end

  // One cycle: present (or hold) a request, check ready against the model,
  // and update the model with what was accepted. Returns 1 if accepted.
  task automatic cycle(input bit valid, input bit wr, input int a,
                       input logic [LB-1:0] wd, output bit acc);
    int  z;
    bit  conflict, same, ret, conv_hit, fwd, rd_stall, wr_stall, exp_ready;
    @(negedge clk);
    #1;
    req_valid = valid; req_write = wr; req_addr = AW'(a); req_wdata = wd;
    req_id = next_id;
    hybrid_en = want_hybrid;
    #1;
    z        = zone(a);
    conflict = (n - zone_cyc[z]) < PIPE;
    same     = zone_addr[z] == a;
    ret      = (n - zone_cyc[z]) == PIPE && same;
    conv_hit = hybrid_en && !wr && in_conv(a);
    fwd      = hybrid_en && !wr && !conv_hit && m_wait_same && ret;
    rd_stall = !wr && !conv_hit && !fwd && conflict;
    wr_stall = wr && conflict && same;
    exp_ready = !(rd_stall || wr_stall);
    check(req_ready == exp_ready,
          $sformatf("req_ready %0b exp %0b (addr %0d wr %0b)", req_ready, exp_ready, a, wr));
    acc = valid && exp_ready;
    if (valid && rd_stall) begin m_penalty++; if (!m_stalled) m_conflict++; end
    if (valid && wr_stall) m_war++;
    m_wait_same = valid && rd_stall && same && hybrid_en;
    m_stalled   = valid && rd_stall;
    if (acc) begin
      m_access++;
      if (wr) begin
        ref_mem[a] = wd;
      end else begin
        m_read++;
        if (conv_hit) begin
          m_conv_hit++;
          conv_touch(a);
          exp_cv_v[(n+1)%16] = 1; exp_cv_id[(n+1)%16] = req_id; exp_cv_d[(n+1)%16] = ref_mem[a];
        end else if (fwd) begin
          m_migrate++;
          if (conv_q.size() == CONV) begin void'(conv_q.pop_back()); m_evict++; end
          conv_q.push_front(a);
          exp_cv_v[(n+1)%16] = 1; exp_cv_id[(n+1)%16] = req_id; exp_cv_d[(n+1)%16] = ref_mem[a];
        end else begin
          m_pr_read++;
          if (!hybrid_en && in_conv(a)) m_pure_on_cached++;
          if (n - zone_cyc[z] == PIPE) m_back_to_back++;
          zone_cyc[z] = n; zone_addr[z] = a;
          exp_pr_v[(n+PIPE)%16] = 1; exp_pr_id[(n+PIPE)%16] = req_id; exp_pr_d[(n+PIPE)%16] = ref_mem[a];
        end
      end
    end
    if (acc) next_id = next_id + 1'b1;
    @(posedge clk);
  endtask

  // Present a request until it is accepted; returns the cycles it waited.
  task automatic issue(input bit wr, input int a, input logic [LB-1:0] wd, output int waited);
    bit acc;
    waited = 0;
    forever begin
      cycle(1, wr, a, wd, acc);
      if (acc) break;
      waited++;
    end
  endtask

  task automatic idle(input int k);
    bit acc;
    repeat (k) cycle(0, 0, 0, '0, acc);
  endtask

  // ---- stimulus ------------------------------------------------------------
  int w, p0;
  int hot[48];
  logic [LB-1:0] newv;

  initial begin
    for (int z = 0; z < 32; z++) begin zone_cyc[z] = -100; zone_addr[z] = -1; end
    for (int s = 0; s < 16; s++) begin exp_pr_v[s] = 0; exp_cv_v[s] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. fill the whole array
    for (int a = 0; a < WORDS; a++) issue(1, a, rand_line(), w);
    check(cnt_war_stall == 0, "no hazard while filling");

    // 2. four reads to four zones go back to back; a fifth read to the zone
    //    of the second one waits exactly one cycle (pipeline of 4)
    want_hybrid = 1'b0;
    idle(PIPE);
    p0 = int'(cnt_penalty);
    issue(0, 1*WAYS + 3, '0, w); check(w == 0, "read 1 not delayed");
    issue(0, 2*WAYS + 5, '0, w); check(w == 0, "read 2 not delayed");
    issue(0, 3*WAYS + 7, '0, w); check(w == 0, "read 3 not delayed");
    issue(0, 4*WAYS + 1, '0, w); check(w == 0, "read 4 not delayed");
    issue(0, 2*WAYS + 9, '0, w); check(w == 1, $sformatf("zone conflict waited %0d, exp 1", w));
    idle(PIPE + 1);
    check(int'(cnt_penalty) - p0 == 1, "one penalty cycle counted");

    // 3. same-line re-read in the next cycle: waits 3 cycles, is answered by
    //    the returning read and migrates; the next read hits in one cycle
    want_hybrid = 1'b1;
    issue(0, 100, '0, w); check(w == 0, "first read");
    issue(0, 100, '0, w); check(w == PIPE - 1, $sformatf("migrating re-read waited %0d", w));
    check(in_conv(100), "line 100 migrated (model)");
    issue(0, 100, '0, w); check(w == 0, "conventional hit not delayed");
    idle(PIPE + 1);

    // 4. write-after-read: a write behind a read of the same line waits
    issue(0, 200, '0, w);
    newv = rand_line();
    issue(1, 200, newv, w); check(w == PIPE - 1, $sformatf("WAR write waited %0d", w));
    issue(0, 200, '0, w);
    idle(PIPE + 1);

    // 5. pure PR-SRAM mode ignores a line held in the conventional SRAM
    want_hybrid = 1'b0;
    issue(0, 100, '0, w);
    issue(1, 100, rand_line(), w);     // write-through keeps the copy coherent
    idle(PIPE + 1);
    want_hybrid = 1'b1;
    issue(0, 100, '0, w);              // conventional hit sees the new data
    idle(PIPE + 1);

    // 6. random traffic on a hot set of lines in a few zones
    for (int i = 0; i < 48; i++) hot[i] = ($urandom % 6) * WAYS + ($urandom % WAYS);
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom % 100;
      if (r < 40) idle(1);
      else if (r < 41) begin want_hybrid = ~want_hybrid; idle(1); end
      else if (r < 52) issue(1, hot[$urandom % 48], rand_line(), w);
      else if (r < 60) issue(0, $urandom % WORDS, '0, w);
      else issue(0, hot[$urandom % 48], '0, w);
    end
    want_hybrid = 1'b1;
    idle(PIPE + 2);

    // 7. counters against the model
    check(cnt_access    == 32'(m_access),   "cnt_access");
    check(cnt_read      == 32'(m_read),     "cnt_read");
    check(cnt_penalty   == 32'(m_penalty),  "cnt_penalty");
    check(cnt_conflict  == 32'(m_conflict), "cnt_conflict");
    check(cnt_conv_hit  == 32'(m_conv_hit), "cnt_conv_hit");
    check(cnt_migrate   == 32'(m_migrate),  "cnt_migrate");
    check(cnt_war_stall == 32'(m_war),      "cnt_war_stall");
    check(cnt_pr_read   == 32'(m_pr_read),  "cnt_pr_read");

    // every mechanism happened
    $display("accesses %0d penalty %0d (rate %0d per 100) conflicts %0d conv hits %0d migrations %0d evictions %0d WAR stalls %0d pure-mode reads of cached lines %0d back-to-back zone reuse %0d",
             m_access, m_penalty, m_penalty * 100 / m_access, m_conflict, m_conv_hit,
             m_migrate, m_evict, m_war, m_pure_on_cached, m_back_to_back);
    check(m_conflict > 0,       "zone-conflict stall happened");
    check(m_migrate > 0,        "migration happened");
    check(m_conv_hit > 0,       "conventional hit happened");
    check(m_evict > 0,          "conventional eviction happened");
    check(m_war > 0,            "write-after-read stall happened");
    check(m_pure_on_cached > 0, "pure PR-SRAM mode used");
    check(m_back_to_back > 0,   "zone reused right after clearing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
