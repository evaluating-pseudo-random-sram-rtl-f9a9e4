// Conventional SRAM of the hybrid design: a small fully associative store.
//
// Holds up to LINES lines that were migrated out of the PR-SRAM, each tagged
// with its PR-SRAM location. Any line can go in any entry. A lookup compares
// the location with every valid tag in the same cycle (lk_hit, lk_data are
// combinational). When a lookup is used as a read (rd_en with a hit) the
// replacement state records the use. A write (wr_en) updates the line only
// if it is present, keeping the copy coherent with the PR-SRAM. An install
// (ins_en) fills a free entry if there is one, otherwise replaces the victim
// chosen by the policy REPL (LRU, LFU or random); installing a line that is
// already present just rewrites it.
//
// All updates happen at the clock edge. Fully associative placement and the
// three policies follow the design; free-entry-first filling is this
// implementation's choice. rd_en, wr_en and ins_en may be set together only
// for different lines.
module conv_sram
  import hybrid_sram_pkg::*;
#(
  parameter int unsigned LINES     = 16,
  parameter int unsigned AW        = 10,
  parameter int unsigned LINE_BITS = 1024,
  parameter repl_e       REPL      = REPL_LRU,
  localparam int unsigned IW       = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        lk_addr,
  output logic                 lk_hit,
  output logic [LINE_BITS-1:0] lk_data,
  input  logic                 rd_en,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LINE_BITS-1:0] wr_data,
  input  logic                 ins_en,
  input  logic [AW-1:0]        ins_addr,
  input  logic [LINE_BITS-1:0] ins_data
);

  logic [LINES-1:0]     valid_q;
  logic [AW-1:0]        tag_q  [LINES];
  logic [LINE_BITS-1:0] data_q [LINES];

  logic [IW-1:0] lk_idx, wr_idx, ins_hit_idx, free_idx, victim, ins_idx;
  logic          wr_hit, ins_hit, has_free;

  // Associative search of the three ports and of a free entry.
  always_comb begin
    lk_hit = 1'b0;  lk_idx = '0;
    wr_hit = 1'b0;  wr_idx = '0;
    ins_hit = 1'b0; ins_hit_idx = '0;
    has_free = 1'b0; free_idx = '0;
    for (int i = LINES - 1; i >= 0; i--) begin
      if (valid_q[i] && tag_q[i] == lk_addr)  begin lk_hit  = 1'b1; lk_idx      = IW'(i); end
      if (valid_q[i] && tag_q[i] == wr_addr)  begin wr_hit  = 1'b1; wr_idx      = IW'(i); end
      if (valid_q[i] && tag_q[i] == ins_addr) begin ins_hit = 1'b1; ins_hit_idx = IW'(i); end
      if (!valid_q[i])                        begin has_free = 1'b1; free_idx   = IW'(i); end
    end
    if (ins_hit)       ins_idx = ins_hit_idx;
    else if (has_free) ins_idx = free_idx;
    else               ins_idx = victim;
  end

  assign lk_data = data_q[lk_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < LINES; i++) tag_q[i] <= '0;
    end else if (ins_en) begin
      valid_q[ins_idx] <= 1'b1;
      tag_q[ins_idx]   <= ins_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_hit) data_q[wr_idx] <= wr_data;
    if (ins_en)          data_q[ins_idx] <= ins_data;
  end

  // ---- replacement policy ------------------------------------------------
  if (REPL == REPL_LRU) begin : g_lru
    repl_lru #(.LINES(LINES)) u_repl (
      .clk, .rst_n,
      .touch    (ins_en || (rd_en && lk_hit)),
      .touch_idx(ins_en ? ins_idx : lk_idx),
      .victim
    );
  end else if (REPL == REPL_LFU) begin : g_lfu
    repl_lfu #(.LINES(LINES)) u_repl (
      .clk, .rst_n,
      .touch(rd_en && lk_hit),
      .fill (ins_en && !ins_hit),
      .idx  (ins_en ? ins_idx : lk_idx),
      .victim
    );
  end else begin : g_random
    repl_random #(.LINES(LINES)) u_repl (.clk, .rst_n, .victim);
  end

  a_distinct_lines: assert property (@(posedge clk) disable iff (!rst_n)
      ins_en |-> !(wr_en && wr_addr == ins_addr))
    else $error("write and install of the same line in one cycle");

endmodule
