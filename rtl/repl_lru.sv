// Least-recently-used replacement state for a fully associative store.
//
// Keeps the entry numbers in recency order in a shift register: position 0
// is the most recently used entry, position LINES-1 the least recently used
// one, which is the victim. Touching an entry moves it to position 0 and
// shifts the entries that were ahead of it down by one, so the least recently
// used number is always the one at the tail. This shift-register form is the
// one the design proposes for LRU; reset order 0..LINES-1 is this
// implementation's choice.
//
// Interface: touch/touch_idx is sampled at the clock edge (use or fill of an
// entry); victim is a registered value, valid every cycle.
module repl_lru #(
  parameter int unsigned LINES = 16,
  localparam int unsigned IW   = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          touch,
  input  logic [IW-1:0] touch_idx,
  output logic [IW-1:0] victim
);

  logic [IW-1:0] order_q [LINES];
  logic [IW-1:0] order_d [LINES];
  logic          passed;

  always_comb begin
    order_d = order_q;
    passed  = 1'b0;
    if (touch) begin
      order_d[0] = touch_idx;
      // Entries ahead of the touched one move back one place.
      for (int i = 1; i < LINES; i++) begin
        if (order_q[i-1] == touch_idx) passed = 1'b1;
        order_d[i] = passed ? order_q[i] : order_q[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) order_q[i] <= IW'(i);
    end else begin
      order_q <= order_d;
    end
  end

  assign victim = order_q[LINES-1];

endmodule
