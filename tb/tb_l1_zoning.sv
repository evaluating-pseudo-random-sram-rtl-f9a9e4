// Testbench of the hybrid PR-SRAM sized as an L1 data cache: 1024 lines of
// 128 B organised as 4 sets of 256 ways, compared under the three zoning
// methods: set-defined (4 zones), contiguous (32 zones of 32 adjacent lines)
// and non-contiguous (32 zones striped over a stride of 32).
//
// Each instance gets its own driver with the same request stream: mostly
// streaming reads through consecutive lines, some random reads and writes.
// Every read answer (from either port) is checked against the memory
// contents at acceptance, matched by tag, and every read must be answered.
// The penalty rates must come out ordered as the zoning study found:
// non-contiguous lowest, set-defined highest.
module tb_l1_zoning;
  import hybrid_sram_pkg::*;

  localparam int WORDS = 1024, LB = 1024, WAYS = 256;
  localparam zoning_e ZM [3] = '{ZONE_SET_DEFINED, ZONE_CONTIGUOUS, ZONE_STRIDED};
  localparam int      ZN [3] = '{4, 32, 32};
  localparam int      NREQ = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int penalty [3], access [3];
  bit done [3] = '{0, 0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // shared request stream: {write, addr}
  int stream_a [NREQ];
  bit stream_w [NREQ];

  function automatic logic [LB-1:0] line_val(int a, int ver);
    logic [LB-1:0] v;
    for (int i = 0; i < LB / 32; i++) v[i*32 +: 32] = 32'(a * 7919 + ver * 104729 + i);
    return v;
  endfunction

  initial begin
    int a;
    a = 0;
    for (int i = 0; i < NREQ; i++) begin
      int r;
      r = $urandom % 100;
      if (r < 70) begin a = (a + 1) % WORDS; stream_a[i] = a; stream_w[i] = 0; end
      else if (r < 90) begin stream_a[i] = $urandom % WORDS; stream_w[i] = 0; end
      else begin stream_a[i] = $urandom % WORDS; stream_w[i] = 1; end
    end
  end

  for (genvar g = 0; g < 3; g++) begin : g_inst
    logic req_valid = 0, req_ready, req_write = 0;
    logic [9:0] req_addr = '0;
    logic [LB-1:0] req_wdata = '0;
    logic [7:0] req_id = '0;
    logic pr_rsp_valid, cv_rsp_valid;
    logic [7:0] pr_rsp_id, cv_rsp_id;
    logic [LB-1:0] pr_rsp_data, cv_rsp_data;
    logic [31:0] cnt_access, cnt_read, cnt_penalty, cnt_conflict, cnt_conv_hit,
                 cnt_migrate, cnt_war_stall, cnt_pr_read;

    hybrid_sram #(.WORDS(WORDS), .LINE_BITS(LB), .WAYS(WAYS), .ZONES(ZN[g]),
                  .ZONING(ZM[g]), .PIPE(4), .CONV_LINES(16), .REPL(REPL_LRU)) dut (
      .clk, .rst_n, .hybrid_en(1'b1), .*);

    int ver [WORDS];
    logic [LB-1:0] exp_d [256];
    bit            exp_v [256];
    int outstanding = 0, answered = 0, reads = 0;

    always @(negedge clk) if (rst_n) begin
      if (pr_rsp_valid) begin
        chk(exp_v[pr_rsp_id] && pr_rsp_data == exp_d[pr_rsp_id], $sformatf("inst %0d pr data", g));
        exp_v[pr_rsp_id] = 0; answered++;
      end
      if (cv_rsp_valid) begin
        chk(exp_v[cv_rsp_id] && cv_rsp_data == exp_d[cv_rsp_id], $sformatf("inst %0d cv data", g));
        exp_v[cv_rsp_id] = 0; answered++;
      end
    end

    initial begin
      for (int i = 0; i < WORDS; i++) ver[i] = 0;
      for (int i = 0; i < 256; i++) exp_v[i] = 0;
      wait (rst_n);
      // fill
      for (int i = 0; i < WORDS; i++) begin
        @(negedge clk);
        req_valid = 1; req_write = 1; req_addr = 10'(i); req_wdata = line_val(i, 0);
        #1;
        while (!req_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      req_valid = 0;
      repeat (5) @(negedge clk);
      // stream
      for (int i = 0; i < NREQ; i++) begin
        int ad;
        ad = stream_a[i];
        req_valid = 1; req_write = stream_w[i]; req_addr = 10'(ad); req_id = 8'(i);
        if (stream_w[i]) begin ver[ad]++; req_wdata = line_val(ad, ver[ad]); end
        #1;
        while (!req_ready) begin @(negedge clk); #1; end
        if (!stream_w[i]) begin
          exp_d[8'(i)] = line_val(ad, ver[ad]); exp_v[8'(i)] = 1; reads++;
        end
        @(negedge clk);
      end
      req_valid = 0;
      repeat (8) @(negedge clk);
      chk(answered == reads, $sformatf("inst %0d: %0d of %0d reads answered", g, answered, reads));
      penalty[g] = int'(cnt_penalty);
      access[g]  = int'(cnt_access) - WORDS;
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("penalty cycles per 100 accesses: set-defined %0d, contiguous %0d, non-contiguous %0d",
             penalty[0] * 100 / access[0], penalty[1] * 100 / access[1], penalty[2] * 100 / access[2]);
    chk(penalty[2] < penalty[1], "non-contiguous zoning beats contiguous");
    chk(penalty[1] <= penalty[0], "contiguous zoning no worse than set-defined");
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
