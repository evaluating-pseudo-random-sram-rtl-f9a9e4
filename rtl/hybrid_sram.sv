// Hybrid pseudo-random SRAM: the data array of one GPU L2 cache bank.
//
// Main idea. A pseudo-random SRAM (PR-SRAM) saves dynamic read energy by
// splitting its cells into zones and pipelining each read over PIPE cycles.
// Reads to different zones overlap, one per cycle, but a read to a zone that
// still has a read in flight must wait until that zone clears, and every
// access behind it waits too: those are penalty cycles. Many conflicts in
// GPU cache traffic are re-reads of the very line already in flight. The
// hybrid design catches those: the returning data answers the waiting read
// and is also copied into a small fully associative conventional SRAM, which
// then answers further reads of that line in one cycle with no zone rules.
// Other conflicts just stall. hybrid_en = 0 turns the conventional SRAM off
// for a pure PR-SRAM (lowest energy, more penalty cycles).
//
// Default size is one bank of the 6 MB GV100-class L2: 768 lines of 128 B,
// 24-way, zones aligned with the 32 sets, a 4-cycle read pipeline, and a 2 kB
// (16-line) conventional SRAM with LRU replacement.
//
// Interface, one request per cycle (valid/ready; hold the request stable
// while it is not accepted):
//   read   -> conventional hit:  cv_rsp_* one cycle after acceptance
//          -> migrated re-read:  accepted in the cycle the earlier read
//                                returns, cv_rsp_* one cycle later
//          -> PR-SRAM read:      pr_rsp_* PIPE cycles after acceptance
//   write  -> one cycle, no response; updates the PR-SRAM and any copy in the
//             conventional SRAM. Held back while a read of the same location
//             is in flight (write-after-read hazard).
// Responses carry the request's tag because conventional hits overtake
// PR-SRAM reads. cnt_* count the events listed in perf_counters.
//
// The zone-conflict stall, the same-address migration, the one-cycle lookup
// of the conventional SRAM, the write-after-read check and the mode switch
// follow the design. The handshake, the two response ports, write-through of
// writes and the synchronous active-low reset are this implementation's
// choices.
module hybrid_sram
  import hybrid_sram_pkg::*;
#(
  parameter int unsigned WORDS      = 768,
  parameter int unsigned LINE_BITS  = 1024,
  parameter int unsigned WAYS       = 24,
  parameter int unsigned ZONES      = 32,
  parameter zoning_e     ZONING     = ZONE_SET_DEFINED,
  parameter int unsigned PIPE       = 4,
  parameter int unsigned CONV_LINES = 16,
  parameter repl_e       REPL       = REPL_LRU,
  parameter int unsigned ID_W       = 8,
  parameter int unsigned CNT_W      = 32,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hybrid_en,
  // request
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_write,
  input  logic [AW-1:0]        req_addr,
  input  logic [LINE_BITS-1:0] req_wdata,
  input  logic [ID_W-1:0]      req_id,
  // read data from the PR-SRAM
  output logic                 pr_rsp_valid,
  output logic [ID_W-1:0]      pr_rsp_id,
  output logic [LINE_BITS-1:0] pr_rsp_data,
  // read data from the conventional SRAM
  output logic                 cv_rsp_valid,
  output logic [ID_W-1:0]      cv_rsp_id,
  output logic [LINE_BITS-1:0] cv_rsp_data,
  // event counters
  output logic [CNT_W-1:0]     cnt_access,
  output logic [CNT_W-1:0]     cnt_read,
  output logic [CNT_W-1:0]     cnt_penalty,
  output logic [CNT_W-1:0]     cnt_conflict,
  output logic [CNT_W-1:0]     cnt_conv_hit,
  output logic [CNT_W-1:0]     cnt_migrate,
  output logic [CNT_W-1:0]     cnt_war_stall,
  output logic [CNT_W-1:0]     cnt_pr_read
);

  localparam int unsigned SW = $clog2(PIPE) + 1;

  // ---- sub-blocks ----------------------------------------------------------
  logic                 conflict, same_addr, war_hit;
  logic [SW-1:0]        stall_cycles;
  logic                 ret_valid;
  logic [AW-1:0]        ret_addr;
  logic [ID_W-1:0]      ret_id;
  logic [LINE_BITS-1:0] ret_data;
  logic                 lk_hit;
  logic [LINE_BITS-1:0] lk_data;

  logic pr_rd, pr_wr, cv_rd, cv_ins, cv_wr;

  zone_conflict_detector #(
    .WORDS(WORDS), .WAYS(WAYS), .ZONES(ZONES), .ZONING(ZONING), .PIPE(PIPE)
  ) u_detect (
    .clk, .rst_n,
    .issue     (pr_rd),
    .issue_addr(req_addr),
    .q_addr    (req_addr),
    .conflict, .stall_cycles, .same_addr, .war_hit
  );

  pr_sram_array #(
    .WORDS(WORDS), .LINE_BITS(LINE_BITS), .WAYS(WAYS), .ZONES(ZONES),
    .ZONING(ZONING), .PIPE(PIPE), .ID_W(ID_W)
  ) u_pr_sram (
    .clk, .rst_n,
    .rd_en    (pr_rd),
    .rd_addr  (req_addr),
    .rd_id    (req_id),
    .wr_en    (pr_wr),
    .wr_addr  (req_addr),
    .wr_data  (req_wdata),
    .rd_valid (ret_valid),
    .rd_addr_o(ret_addr),
    .rd_id_o  (ret_id),
    .rd_data  (ret_data)
  );

  conv_sram #(
    .LINES(CONV_LINES), .AW(AW), .LINE_BITS(LINE_BITS), .REPL(REPL)
  ) u_conv (
    .clk, .rst_n,
    .lk_addr (req_addr),
    .lk_hit,
    .lk_data,
    .rd_en   (cv_rd),
    .wr_en   (cv_wr),
    .wr_addr (req_addr),
    .wr_data (req_wdata),
    .ins_en  (cv_ins),
    .ins_addr(req_addr),
    .ins_data(ret_data)
  );

  // ---- access control ------------------------------------------------------
  logic wait_same_q;   // the request was held back by a same-address conflict
  logic stalled_q;     // the request was held back last cycle
  logic use_conv, use_fwd, rd_stall, wr_stall;
  logic rd_acc, wr_acc;

  always_comb begin
    use_conv  = hybrid_en && !req_write && lk_hit;
    // The read in flight for this very line returns now: answer from it.
    use_fwd   = hybrid_en && !req_write && !lk_hit && wait_same_q &&
                ret_valid && ret_addr == req_addr;
    rd_stall  = !req_write && !use_conv && !use_fwd && conflict;
    wr_stall  = req_write && war_hit;
    req_ready = !(rd_stall || wr_stall);

    rd_acc = req_valid && req_ready && !req_write;
    wr_acc = req_valid && req_ready && req_write;
    pr_rd  = rd_acc && !use_conv && !use_fwd;
    pr_wr  = wr_acc;
    cv_rd  = rd_acc && use_conv;
    cv_ins = rd_acc && use_fwd;
    cv_wr  = wr_acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wait_same_q  <= 1'b0;
      stalled_q    <= 1'b0;
      cv_rsp_valid <= 1'b0;
      cv_rsp_id    <= '0;
    end else begin
      wait_same_q  <= req_valid && rd_stall && same_addr && hybrid_en;
      stalled_q    <= req_valid && rd_stall;
      cv_rsp_valid <= cv_rd || cv_ins;
      if (cv_rd || cv_ins) cv_rsp_id <= req_id;
    end
  end

  always_ff @(posedge clk) begin
    if (cv_rd)       cv_rsp_data <= lk_data;
    else if (cv_ins) cv_rsp_data <= ret_data;
  end

  assign pr_rsp_valid = ret_valid;
  assign pr_rsp_id    = ret_id;
  assign pr_rsp_data  = ret_data;

  // ---- event counters ------------------------------------------------------
  perf_counters #(.CNT_W(CNT_W)) u_counters (
    .clk, .rst_n,
    .ev_access   (rd_acc || wr_acc),
    .ev_read     (rd_acc),
    .ev_penalty  (req_valid && rd_stall),
    .ev_conflict (req_valid && rd_stall && !stalled_q),
    .ev_conv_hit (cv_rd),
    .ev_migrate  (cv_ins),
    .ev_war_stall(req_valid && wr_stall),
    .ev_pr_read  (pr_rd),
    .cnt_access, .cnt_read, .cnt_penalty, .cnt_conflict,
    .cnt_conv_hit, .cnt_migrate, .cnt_war_stall, .cnt_pr_read
  );

  // ---- handshake rules -----------------------------------------------------
  a_hold_request: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=>
        req_valid && $stable(req_write) && $stable(req_addr) && $stable(req_id))
    else $error("request changed while held back");
  // A stall never lasts longer than the remaining pipeline occupancy.
  a_stall_bound: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && rd_stall |-> stall_cycles != '0 && stall_cycles < SW'(PIPE))
    else $error("stall longer than the pipeline");

endmodule
