// Testbench of the conventional SRAM: three 4-line instances with LRU, LFU
// and random replacement receive the same random reads, writes and installs
// of lines from a 64-line space. Each instance has its own reference here
// (entries with tag, data and policy state: recency order for LRU, use counts
// for LFU). Before every operation all 64 locations are looked up and hit
// and data are compared with the reference. For random replacement the
// victim cannot be predicted, so the reference learns it from the lookup
// sweep and checks that exactly one old line left.
module tb_conv_sram;
  import hybrid_sram_pkg::*;
  localparam int L = 4, LB = 32;

  logic clk = 0, rst_n = 0, rd_en = 0, wr_en = 0, ins_en = 0;
  logic [5:0] lk_addr = '0, wr_addr = '0, ins_addr = '0;
  logic [LB-1:0] wr_data = '0, ins_data = '0;
  logic hit [3];
  logic [LB-1:0] data [3];

  conv_sram #(.LINES(L), .AW(6), .LINE_BITS(LB), .REPL(REPL_LRU)) u_lru (
    .clk, .rst_n, .lk_addr, .lk_hit(hit[0]), .lk_data(data[0]), .rd_en, .wr_en, .wr_addr,
    .wr_data, .ins_en, .ins_addr, .ins_data);
  conv_sram #(.LINES(L), .AW(6), .LINE_BITS(LB), .REPL(REPL_LFU)) u_lfu (
    .clk, .rst_n, .lk_addr, .lk_hit(hit[1]), .lk_data(data[1]), .rd_en, .wr_en, .wr_addr,
    .wr_data, .ins_en, .ins_addr, .ins_data);
  conv_sram #(.LINES(L), .AW(6), .LINE_BITS(LB), .REPL(REPL_RANDOM)) u_rnd (
    .clk, .rst_n, .lk_addr, .lk_hit(hit[2]), .lk_data(data[2]), .rd_en, .wr_en, .wr_addr,
    .wr_data, .ins_en, .ins_addr, .ins_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit       mv [3][L];
  int       mt [3][L];
  logic [LB-1:0] md [3][L];
  int       lru[$];            // recency order of entry numbers, instance 0
  int       cnt[L];            // use counts, instance 1
  bit       pend = 0;          // instance 2: install into a full store pending
  int       pend_tag; logic [LB-1:0] pend_data;
  int       evictions[3] = '{0, 0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int find(int inst, int tag);
    for (int i = 0; i < L; i++) if (mv[inst][i] && mt[inst][i] == tag) return i;
    return -1;
  endfunction

  function automatic int free_entry(int inst);
    for (int i = 0; i < L; i++) if (!mv[inst][i]) return i;
    return -1;
  endfunction

  task automatic sweep();
    if (pend) begin
      int gone, nb;
      nb = 0; gone = -1;
      for (int i = 0; i < L; i++) begin
        lk_addr = 6'(mt[2][i]); #0.01;
        if (!hit[2]) begin nb++; gone = i; end
      end
      chk(nb == 1, "random replacement evicts exactly one line");
      if (gone >= 0) begin mt[2][gone] = pend_tag; md[2][gone] = pend_data; end
      pend = 0;
    end
    for (int a = 0; a < 64; a++) begin
      lk_addr = 6'(a); #0.01;
      for (int k = 0; k < 3; k++) begin
        int e;
        e = find(k, a);
        chk(hit[k] == (e >= 0), $sformatf("inst %0d hit of %0d", k, a));
        if (e >= 0 && hit[k]) chk(data[k] == md[k][e], $sformatf("inst %0d data of %0d", k, a));
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) for (int i = 0; i < L; i++) mv[k][i] = 0;
    for (int i = 0; i < L; i++) begin lru.push_back(i); cnt[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int r, a;
      @(negedge clk); #1;
      rd_en = 0; wr_en = 0; ins_en = 0;
      sweep();
      r = $urandom % 10;
      a = $urandom % 12;          // small working set: frequent hits and evictions
      lk_addr = 6'(a);
      if (r < 5) begin
        rd_en = 1;
        // LRU / LFU policy updates on a hit
        begin int e; e = find(0, a); if (e >= 0) begin
          foreach (lru[q]) if (lru[q] == e) begin lru.delete(q); break; end
          lru.push_front(e); end end
        begin int e; e = find(1, a); if (e >= 0 && cnt[e] < 255) cnt[e]++; end
      end else if (r < 7) begin
        wr_en = 1; wr_addr = 6'(a); wr_data = $urandom;
        for (int k = 0; k < 3; k++) begin int e; e = find(k, a); if (e >= 0) md[k][e] = wr_data; end
      end else begin
        // install a line that is absent from all three
        if (find(0, a) < 0 && find(1, a) < 0 && find(2, a) < 0 && !pend) begin
          ins_en = 1; ins_addr = 6'(a); ins_data = $urandom;
          // LRU
          begin int e; e = free_entry(0);
            if (e < 0) begin e = lru[$]; evictions[0]++; end
            mv[0][e] = 1; mt[0][e] = a; md[0][e] = ins_data;
            foreach (lru[q]) if (lru[q] == e) begin lru.delete(q); break; end
            lru.push_front(e); end
          // LFU
          begin int e, best; e = free_entry(1);
            if (e < 0) begin
              e = 0; best = cnt[0];
              for (int i = 1; i < L; i++) if (cnt[i] < best) begin best = cnt[i]; e = i; end
              evictions[1]++;
            end
            mv[1][e] = 1; mt[1][e] = a; md[1][e] = ins_data; cnt[e] = 1; end
          // random
          begin int e; e = free_entry(2);
            if (e >= 0) begin mv[2][e] = 1; mt[2][e] = a; md[2][e] = ins_data; end
            else begin pend = 1; pend_tag = a; pend_data = ins_data; evictions[2]++; end
          end
        end
      end
    end
    @(negedge clk); #1;
    rd_en = 0; wr_en = 0; ins_en = 0;
    sweep();
    for (int k = 0; k < 3; k++) chk(evictions[k] > 50, "evictions exercised");
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
