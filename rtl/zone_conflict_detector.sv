// Zone conflict detector of the PR-SRAM pipeline.
//
// A PR-SRAM read occupies its zone for PIPE cycles: a read issued in cycle t
// holds the zone in cycles t .. t+PIPE-1 and its data returns in cycle t+PIPE.
// This block keeps a shift register with one slot per pipeline cycle. Every
// cycle a slot enters, holding the read issued that cycle or a bubble when no
// read was issued, and the oldest slot leaves. Slot k holds the read issued
// k+1 cycles ago, so PIPE-1 slots cover every read that still blocks a zone.
//
// For a candidate location q_addr it reports, combinationally:
//   conflict     - a read in flight uses the candidate's zone;
//   stall_cycles - how many cycles until that zone is free (PIPE-1-k for
//                  slot k), i.e. the penalty cycles a read would suffer;
//   same_addr    - the conflicting read is to q_addr itself, the case in
//                  which the hybrid SRAM migrates the line to its
//                  conventional SRAM;
//   war_hit      - some read in flight is to q_addr, so a one-cycle write
//                  to it now would finish before that read (write-after-read
//                  hazard).
// The slot-per-cycle pipeline with bubbles and the stall rule follow the
// design; the slot encoding is this implementation's own. The controller
// never issues a read into a busy zone, so at most one slot matches a zone.
module zone_conflict_detector
  import hybrid_sram_pkg::*;
#(
  parameter int unsigned WORDS  = 768,
  parameter int unsigned WAYS   = 24,
  parameter int unsigned ZONES  = 32,
  parameter zoning_e     ZONING = ZONE_SET_DEFINED,
  parameter int unsigned PIPE   = 4,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned SW    = $clog2(PIPE) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  logic [AW-1:0] issue_addr,
  input  logic [AW-1:0] q_addr,
  output logic          conflict,
  output logic [SW-1:0] stall_cycles,
  output logic          same_addr,
  output logic          war_hit
);

  localparam int unsigned ZW    = (ZONES > 1) ? $clog2(ZONES) : 1;
  localparam int unsigned SLOTS = PIPE - 1;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] addr;
    logic [ZW-1:0] zone;
  } slot_t;

  slot_t         slot_q [SLOTS];
  logic [ZW-1:0] issue_zone, q_zone;

  initial assert (PIPE >= 2) else $error("PIPE must be at least 2");

  zone_map #(.WORDS(WORDS), .WAYS(WAYS), .ZONES(ZONES), .ZONING(ZONING))
    u_issue_zone (.addr(issue_addr), .zone(issue_zone));
  zone_map #(.WORDS(WORDS), .WAYS(WAYS), .ZONES(ZONES), .ZONING(ZONING))
    u_q_zone (.addr(q_addr), .zone(q_zone));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < SLOTS; k++) slot_q[k] <= '0;
    end else begin
      slot_q[0] <= '{valid: issue, addr: issue_addr, zone: issue_zone};
      for (int k = 1; k < SLOTS; k++) slot_q[k] <= slot_q[k-1];
    end
  end

  always_comb begin
    conflict     = 1'b0;
    stall_cycles = '0;
    same_addr    = 1'b0;
    war_hit      = 1'b0;
    for (int k = 0; k < SLOTS; k++) begin
      if (slot_q[k].valid && slot_q[k].zone == q_zone) begin
        conflict     = 1'b1;
        stall_cycles = SW'(SLOTS - k);
        same_addr    = (slot_q[k].addr == q_addr);
      end
      if (slot_q[k].valid && slot_q[k].addr == q_addr) war_hit = 1'b1;
    end
  end

  // A read must never be issued into a zone that is still busy.
  property p_no_issue_into_busy_zone;
    @(posedge clk) disable iff (!rst_n)
      issue |-> !(conflict && q_addr == issue_addr);
  endproperty
  a_no_issue_into_busy_zone: assert property (p_no_issue_into_busy_zone);

endmodule
