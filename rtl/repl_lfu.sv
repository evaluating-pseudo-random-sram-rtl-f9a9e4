// Least-frequently-used replacement state for a fully associative store.
//
// One use counter per entry. Filling an entry sets its counter to 1, every
// later use adds 1, and the victim is the entry with the smallest count
// (lowest entry number on a tie). Counters saturate at 2^CW-1. The policy is
// the design's; counter width, saturation and tie-break are this
// implementation's choices.
//
// Interface: touch or fill with idx is sampled at the clock edge (fill wins
// if both are set); victim is combinational from the registered counters.
module repl_lfu #(
  parameter int unsigned LINES = 16,
  parameter int unsigned CW    = 8,
  localparam int unsigned IW   = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          touch,
  input  logic          fill,
  input  logic [IW-1:0] idx,
  output logic [IW-1:0] victim
);

  logic [CW-1:0] cnt_q [LINES];
  logic [CW-1:0] best;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) cnt_q[i] <= '0;
    end else if (fill) begin
      cnt_q[idx] <= CW'(1);
    end else if (touch && cnt_q[idx] != '1) begin
      cnt_q[idx] <= cnt_q[idx] + CW'(1);
    end
  end

  always_comb begin
    victim = '0;
    best   = cnt_q[0];
    for (int i = 1; i < LINES; i++) begin
      if (cnt_q[i] < best) begin
        best   = cnt_q[i];
        victim = IW'(i);
      end
    end
  end

endmodule
