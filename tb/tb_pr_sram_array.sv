// Testbench of the PR-SRAM array model at its default size (768 x 1024 bits,
// 32 set-defined zones, 4-cycle read pipeline). The array is filled through
// the write port, then random reads are issued that respect the zone rule
// (no read into a zone with a read in flight), mixed with writes to lines
// that are not being read. Every read must come back exactly 4 cycles later
// with its tag, location and the contents written last. A directed case
// shows where the cells are sensed: a write one or two cycles after a read
// of the same line changes what the read returns, a write in the read's last
// cycle does not.
module tb_pr_sram_array;
  localparam int WORDS = 768, LB = 1024, PIPE = 4, WAYS = 24;

  logic clk = 0, rst_n = 0, rd_en = 0, wr_en = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0, rd_addr_o;
  logic [7:0] rd_id = '0, rd_id_o;
  logic [LB-1:0] wr_data = '0, rd_data;
  logic rd_valid;

  pr_sram_array dut (.*);

  always #5 clk = ~clk;
  int n = 0;
  always @(posedge clk) n <= n + 1;

  int checks = 0, failures = 0;
  logic [LB-1:0] ref_mem [WORDS];
  int zcyc[32], zaddr[32];
  bit ev[16]; logic [9:0] ea[16]; logic [7:0] ei[16]; logic [LB-1:0] ed[16];
  int nreads = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d %s", n, what); end
  endtask

  function automatic logic [LB-1:0] rand_line();
    logic [LB-1:0] v;
    for (int i = 0; i < LB / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  always @(negedge clk) if (rst_n) begin
    int s;
    s = n % 16;
    chk(rd_valid == ev[s], "rd_valid timing");
    if (ev[s] && rd_valid) begin
      chk(rd_addr_o == ea[s], "rd_addr_o");
      chk(rd_id_o == ei[s], "rd_id_o");
      chk(rd_data == ed[s], "rd_data");
    end
    ev[s] = 0;
  end

  // drive one cycle; expected data of a read is given by the caller
  task automatic drive(input bit r, input bit w, input int a, input logic [LB-1:0] d,
                       input logic [LB-1:0] exp_rd);
    @(negedge clk); #1;
    rd_en = r; wr_en = w; rd_addr = 10'(a); wr_addr = 10'(a); wr_data = d;
    rd_id = 8'(n);
    if (r) begin
      ev[(n+PIPE)%16] = 1; ea[(n+PIPE)%16] = 10'(a); ei[(n+PIPE)%16] = 8'(n);
      ed[(n+PIPE)%16] = exp_rd;
      zcyc[a / WAYS] = n; zaddr[a / WAYS] = a;
      nreads++;
    end
    if (w) ref_mem[a] = d;
  endtask

  initial begin
    logic [LB-1:0] v1, v2;
    for (int z = 0; z < 32; z++) begin zcyc[z] = -100; zaddr[z] = -1; end
    for (int s = 0; s < 16; s++) ev[s] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) drive(0, 1, a, rand_line(), '0);
    for (int i = 0; i < 10000; i++) begin
      int a, r;
      a = $urandom % WORDS;
      r = $urandom % 10;
      if (r < 6 && n - zcyc[a / WAYS] >= PIPE)
        drive(1, 0, a, '0, ref_mem[a]);
      else if (r < 8 && !(n - zcyc[a / WAYS] < PIPE && zaddr[a / WAYS] == a))
        drive(0, 1, a, rand_line(), '0);
      else
        drive(0, 0, 0, '0, '0);
    end
    drive(0, 0, 0, '0, '0);
    drive(0, 0, 0, '0, '0);
    drive(0, 0, 0, '0, '0);
    drive(0, 0, 0, '0, '0);
    // sensing point: write 2 cycles after the read is seen, 3 cycles after is not
    v1 = rand_line(); v2 = rand_line();
    drive(1, 0, 5, '0, v1);         // read issued in cycle t, expects v1
    drive(0, 0, 0, '0, '0);         // t+1
    drive(0, 1, 5, v1, '0);         // t+2: write v1 before sensing
    drive(0, 1, 5, v2, '0);         // t+3: written while sensing, not seen
    drive(0, 0, 0, '0, '0);
    drive(0, 0, 0, '0, '0);
    drive(1, 0, 5, '0, v2);
    repeat (6) drive(0, 0, 0, '0, '0);
    chk(nreads > 1000, "enough reads");
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
