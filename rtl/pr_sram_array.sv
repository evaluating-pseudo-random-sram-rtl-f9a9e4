// Functional model of the pseudo-random SRAM (PR-SRAM) macro.
//
// The PR-SRAM divides its cells into zones and spreads a read over PIPE
// cycles, which lets it run at lower dynamic energy; reads to different zones
// overlap, one new read per cycle. This module models that behaviour in
// synthesizable form: a WORDS x LINE_BITS array, a read pipeline of PIPE-1
// stages carrying the location and a tag, and a one-cycle write port. The
// cells are sensed in the last pipeline cycle, so a write to a location whose
// read is still in flight changes what that read returns; the controller has
// to avoid that write-after-read hazard, as the real macro would require.
//
// Timing: rd_en in cycle t -> rd_valid, rd_data, rd_addr_o, rd_id_o in cycle
// t+PIPE. wr_en in cycle t -> array updated at the end of cycle t.
// The zoning, the PIPE-cycle read and the one-cycle write follow the design.
// Analogue properties (energy, sense amplifiers, clocking) are not modelled.
// A read issued into a zone that still has a read in flight is a protocol
// error and is caught by an assertion.
module pr_sram_array
  import hybrid_sram_pkg::*;
#(
  parameter int unsigned WORDS     = 768,
  parameter int unsigned LINE_BITS = 1024,
  parameter int unsigned WAYS      = 24,
  parameter int unsigned ZONES     = 32,
  parameter zoning_e     ZONING    = ZONE_SET_DEFINED,
  parameter int unsigned PIPE      = 4,
  parameter int unsigned ID_W      = 8,
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  input  logic [ID_W-1:0]      rd_id,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LINE_BITS-1:0] wr_data,
  output logic                 rd_valid,
  output logic [AW-1:0]        rd_addr_o,
  output logic [ID_W-1:0]      rd_id_o,
  output logic [LINE_BITS-1:0] rd_data
);

  localparam int unsigned STAGES = PIPE - 1;
  localparam int unsigned ZW     = (ZONES > 1) ? $clog2(ZONES) : 1;

  typedef struct packed {
    logic            valid;
    logic [AW-1:0]   addr;
    logic [ID_W-1:0] id;
  } stage_t;

  logic [LINE_BITS-1:0] mem [WORDS];
  stage_t               stage_q [STAGES];
  stage_t               last;

  initial assert (PIPE >= 2) else $error("PIPE must be at least 2");

  assign last = stage_q[STAGES-1];

  // One-cycle write.
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // Read pipeline; the cells are sensed in the final stage.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < STAGES; k++) stage_q[k] <= '0;
      rd_valid  <= 1'b0;
      rd_addr_o <= '0;
      rd_id_o   <= '0;
    end else begin
      stage_q[0] <= '{valid: rd_en, addr: rd_addr, id: rd_id};
      for (int k = 1; k < STAGES; k++) stage_q[k] <= stage_q[k-1];
      rd_valid  <= last.valid;
      rd_addr_o <= last.addr;
      rd_id_o   <= last.id;
    end
  end

  always_ff @(posedge clk) begin
    if (last.valid) rd_data <= mem[last.addr];
  end

  // ---- protocol checks ---------------------------------------------------
  logic [ZW-1:0] rd_zone;
  logic [ZW-1:0] stage_zone [STAGES];
  logic          zone_busy;

  zone_map #(.WORDS(WORDS), .WAYS(WAYS), .ZONES(ZONES), .ZONING(ZONING))
    u_rd_zone (.addr(rd_addr), .zone(rd_zone));

  for (genvar k = 0; k < STAGES; k++) begin : g_stage_zone
    zone_map #(.WORDS(WORDS), .WAYS(WAYS), .ZONES(ZONES), .ZONING(ZONING))
      u_zone (.addr(stage_q[k].addr), .zone(stage_zone[k]));
  end

  always_comb begin
    zone_busy = 1'b0;
    for (int k = 0; k < STAGES; k++)
      if (stage_q[k].valid && stage_zone[k] == rd_zone) zone_busy = 1'b1;
  end

  a_zone_free: assert property (@(posedge clk) disable iff (!rst_n)
                                rd_en |-> !zone_busy)
    else $error("PR-SRAM read issued into a busy zone");
  a_single_port: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(rd_en && wr_en))
    else $error("PR-SRAM read and write in the same cycle");

endmodule
