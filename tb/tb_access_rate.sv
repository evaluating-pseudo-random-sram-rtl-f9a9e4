// Bursty-traffic testbench of the hybrid PR-SRAM at its default (L2 bank)
// size, hybrid mode against pure PR-SRAM mode.
//
// GPU cache banks see short bursts of requests separated by long idle
// gaps. For each of five access rates (0.027, 0.080, 0.095, 0.099 and 0.059
// accesses per cycle, the rates measured on the L2 bank for a neural net,
// 2-D and 3-D convolution, speckle-reducing diffusion and back-propagation)
// a synthetic stream is generated. Bursts of 4 to 16 requests stay mostly
// within one set and often re-read one of the last few lines, and the idle
// gaps set the average rate. The traces themselves are not available, so the
// streams only imitate their character.
//
// Two instances receive the same stream, one with the conventional SRAM
// enabled and one without. Every read answer is checked against the memory
// contents by tag, every read must be answered, and for every rate the
// hybrid instance must lose fewer cycles to zone conflicts than the pure
// one, with at least one migration.
module tb_access_rate;
  localparam int WORDS = 768, LB = 1024, WAYS = 24;
  localparam int NB = 5, NREQ = 2000;
  localparam int RATE_PPM [NB] = '{27000, 80000, 95000, 99000, 59000};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pen [2][NB], acc [2][NB], mig [2][NB];
  bit done [2] = '{0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int s_addr [NB][NREQ];
  bit s_wr   [NB][NREQ];
  int s_gap  [NB][NREQ];

  function automatic logic [LB-1:0] line_val(int a, int ver);
    logic [LB-1:0] v;
    for (int i = 0; i < LB / 32; i++) v[i*32 +: 32] = 32'(a * 7919 + ver * 104729 + i * 31);
    return v;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      int i, recent[3];
      i = 0;
      recent = '{0, 1, 2};
      while (i < NREQ) begin
        int len, set;
        len = 4 + $urandom % 13;
        set = $urandom % (WORDS / WAYS);
        for (int k = 0; k < len && i < NREQ; k++) begin
          int r, a;
          r = $urandom % 100;
          if (r < 50)      a = recent[$urandom % 3];
          else if (r < 85) a = set * WAYS + $urandom % WAYS;
          else             a = $urandom % WORDS;
          recent[$urandom % 3] = a;
          s_addr[b][i] = a;
          s_wr[b][i]   = ($urandom % 10) == 0;
          // idle gap after the burst gives the average access rate
          s_gap[b][i]  = (k == len - 1) ? len * (1_000_000 / RATE_PPM[b] - 1) : 0;
          i++;
        end
      end
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_inst
    logic req_valid = 0, req_ready, req_write = 0;
    logic [9:0] req_addr = '0;
    logic [LB-1:0] req_wdata = '0;
    logic [7:0] req_id = '0;
    logic pr_rsp_valid, cv_rsp_valid;
    logic [7:0] pr_rsp_id, cv_rsp_id;
    logic [LB-1:0] pr_rsp_data, cv_rsp_data;
    logic [31:0] cnt_access, cnt_read, cnt_penalty, cnt_conflict, cnt_conv_hit,
                 cnt_migrate, cnt_war_stall, cnt_pr_read;

    hybrid_sram dut (.clk, .rst_n, .hybrid_en(g == 0), .*);

    int ver [WORDS];
    logic [LB-1:0] exp_d [256];
    bit            exp_v [256];
    int answered = 0, reads = 0;

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
      int id;
      id = 0;
      for (int i = 0; i < WORDS; i++) ver[i] = 0;
      for (int i = 0; i < 256; i++) exp_v[i] = 0;
      wait (rst_n);
      for (int i = 0; i < WORDS; i++) begin
        @(negedge clk);
        req_valid = 1; req_write = 1; req_addr = 10'(i); req_wdata = line_val(i, 0);
        #1;
        while (!req_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      req_valid = 0;
      repeat (5) @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        int p0, a0, m0;
        p0 = int'(cnt_penalty); a0 = int'(cnt_access); m0 = int'(cnt_migrate);
        for (int i = 0; i < NREQ; i++) begin
          int ad;
          ad = s_addr[b][i];
          req_valid = 1; req_write = s_wr[b][i]; req_addr = 10'(ad); req_id = 8'(id);
          if (s_wr[b][i]) begin ver[ad]++; req_wdata = line_val(ad, ver[ad]); end
          #1;
          while (!req_ready) begin @(negedge clk); #1; end
          if (!s_wr[b][i]) begin
            exp_d[8'(id)] = line_val(ad, ver[ad]); exp_v[8'(id)] = 1; reads++;
          end
          id++;
          @(negedge clk);
          if (s_gap[b][i] > 0) begin
            req_valid = 0;
            repeat (s_gap[b][i]) @(negedge clk);
          end
        end
        req_valid = 0;
        repeat (8) @(negedge clk);
        pen[g][b] = int'(cnt_penalty) - p0;
        acc[g][b] = int'(cnt_access) - a0;
        mig[g][b] = int'(cnt_migrate) - m0;
      end
      chk(answered == reads, $sformatf("inst %0d: %0d of %0d reads answered", g, answered, reads));
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    for (int b = 0; b < NB; b++) begin
      $display("rate %0d.%03d: penalty cycles per 100 accesses hybrid %0d, pure PR-SRAM %0d; migrations %0d",
               RATE_PPM[b] / 1000000, (RATE_PPM[b] / 1000) % 1000,
               pen[0][b] * 100 / acc[0][b], pen[1][b] * 100 / acc[1][b], mig[0][b]);
      chk(pen[0][b] < pen[1][b], "hybrid loses fewer cycles than pure PR-SRAM");
      chk(mig[0][b] > 0 && mig[1][b] == 0, "migrations only in hybrid mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
