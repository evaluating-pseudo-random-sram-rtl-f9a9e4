// Shared types for the hybrid pseudo-random SRAM.
//
// A pseudo-random SRAM (PR-SRAM) splits its array into zones and pipelines a
// read over several cycles; a second read to the same zone must wait until the
// first one has left the pipeline. The enums below select how line locations
// are grouped into zones and which replacement policy the small conventional
// SRAM of the hybrid design uses. The three zoning methods and the three
// policies are the ones the design was evaluated with; their encodings are
// this implementation's own.
package hybrid_sram_pkg;

  // How a line location (set * WAYS + way) is assigned to a zone.
  //   ZONE_SET_DEFINED : one zone per cache set          zone = addr / WAYS
  //   ZONE_CONTIGUOUS  : ZONES blocks of adjacent lines  zone = addr / (WORDS / ZONES)
  //   ZONE_STRIDED     : zones interleaved by stride     zone = addr % ZONES
  typedef enum logic [1:0] {
    ZONE_SET_DEFINED = 2'd0,
    ZONE_CONTIGUOUS  = 2'd1,
    ZONE_STRIDED     = 2'd2
  } zoning_e;

  // Replacement policy of the conventional SRAM.
  typedef enum logic [1:0] {
    REPL_LRU    = 2'd0,
    REPL_LFU    = 2'd1,
    REPL_RANDOM = 2'd2
  } repl_e;

endpackage
