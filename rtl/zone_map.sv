// Zone mapper of the PR-SRAM.
//
// Converts a line location of the cache bank's data array into the number of
// the PR-SRAM zone that holds it. Locations are numbered set * WAYS + way, so
// the lines of one set are adjacent. Three zoning methods are supported:
//   set-defined    - one zone per cache set (zone = addr / WAYS); the default,
//                    matching how the L2 bank was zoned;
//   contiguous     - ZONES groups of WORDS/ZONES adjacent locations;
//   non-contiguous - zones interleaved over a stride of ZONES
//                    (zone = addr mod ZONES), the method that gave the
//                    fewest conflicts in the 1024-line, 4-set L1 cache.
// The three methods come from the design; the location numbering is this
// implementation's choice. Purely combinational, no timing of its own.
module zone_map
  import hybrid_sram_pkg::*;
#(
  parameter int unsigned WORDS  = 768,
  parameter int unsigned WAYS   = 24,
  parameter int unsigned ZONES  = 32,
  parameter zoning_e     ZONING = ZONE_SET_DEFINED,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned ZW    = (ZONES > 1) ? $clog2(ZONES) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [ZW-1:0] zone
);

  localparam int unsigned ZONE_SIZE = WORDS / ZONES;

  // Parameter sanity: every zoning needs a whole number of lines per zone.
  initial begin
    assert (WORDS % ZONES == 0) else $error("WORDS must be a multiple of ZONES");
    assert (ZONING != ZONE_SET_DEFINED || WORDS / WAYS == ZONES)
      else $error("set-defined zoning needs ZONES == WORDS / WAYS");
  end

  always_comb begin
    unique case (ZONING)
      ZONE_SET_DEFINED: zone = ZW'(32'(addr) / WAYS);
      ZONE_CONTIGUOUS:  zone = ZW'(32'(addr) / ZONE_SIZE);
      default:          zone = ZW'(32'(addr) % ZONES);
    endcase
  end

endmodule
