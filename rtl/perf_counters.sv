// Event counters of the hybrid SRAM.
//
// Counts the events from which the figures of merit of a PR-SRAM are taken:
// accepted accesses and reads, penalty cycles (cycles a read is held back by
// a zone conflict), zone-conflict events, reads served by the conventional
// SRAM, lines migrated to it, cycles a write waits on a write-after-read
// hazard, and reads performed by the PR-SRAM itself. The penalty rate is
// 100 * cnt_penalty / cnt_access; dynamic energy follows from cnt_pr_read
// and the conventional-SRAM counts weighted by the per-access energies of the
// two memories. Each counter adds its strobe at the clock edge and saturates
// at its maximum. The metrics are the design's; saturation is this
// implementation's choice.
module perf_counters #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ev_access,
  input  logic             ev_read,
  input  logic             ev_penalty,
  input  logic             ev_conflict,
  input  logic             ev_conv_hit,
  input  logic             ev_migrate,
  input  logic             ev_war_stall,
  input  logic             ev_pr_read,
  output logic [CNT_W-1:0] cnt_access,
  output logic [CNT_W-1:0] cnt_read,
  output logic [CNT_W-1:0] cnt_penalty,
  output logic [CNT_W-1:0] cnt_conflict,
  output logic [CNT_W-1:0] cnt_conv_hit,
  output logic [CNT_W-1:0] cnt_migrate,
  output logic [CNT_W-1:0] cnt_war_stall,
  output logic [CNT_W-1:0] cnt_pr_read
);

  localparam int unsigned N = 8;

  logic [N-1:0]     ev;
  logic [CNT_W-1:0] cnt_q [N];

  assign ev = {ev_pr_read, ev_war_stall, ev_migrate, ev_conv_hit,
               ev_conflict, ev_penalty, ev_read, ev_access};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (ev[i] && cnt_q[i] != '1) cnt_q[i] <= cnt_q[i] + CNT_W'(1);
    end
  end

  assign cnt_access    = cnt_q[0];
  assign cnt_read      = cnt_q[1];
  assign cnt_penalty   = cnt_q[2];
  assign cnt_conflict  = cnt_q[3];
  assign cnt_conv_hit  = cnt_q[4];
  assign cnt_migrate   = cnt_q[5];
  assign cnt_war_stall = cnt_q[6];
  assign cnt_pr_read   = cnt_q[7];

endmodule
