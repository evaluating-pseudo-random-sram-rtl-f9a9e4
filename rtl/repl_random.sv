// Random replacement: victim chosen by a free-running random number generator.
//
// The generator is a 16-bit maximal-length Fibonacci LFSR (taps 16, 14, 13,
// 11; period 65535) stepping every cycle; the victim is the LFSR value modulo
// LINES. The design only asks for a cheap random number generator and names
// analogue entropy sources as options; the LFSR is this implementation's
// digital stand-in. The seed must be non-zero.
//
// Interface: victim is registered and changes every cycle after reset.
module repl_random #(
  parameter int unsigned LINES = 16,
  parameter logic [15:0] SEED  = 16'hACE1,
  localparam int unsigned IW   = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [IW-1:0] victim
);

  logic [15:0] lfsr_q;
  logic        fb;

  initial assert (SEED != 16'h0) else $error("LFSR seed must be non-zero");

  assign fb = lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10];

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr_q <= SEED;
    else        lfsr_q <= {lfsr_q[14:0], fb};
  end

  assign victim = IW'(32'(lfsr_q) % LINES);

endmodule
