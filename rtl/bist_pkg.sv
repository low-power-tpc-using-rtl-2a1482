// bist_pkg: types shared by the test-per-clock BIST blocks.
//
// seed_gen_e selects which pseudo-random register supplies the seeds of the
// multiple-single-input-change (MSIC) pattern generator: a conventional LFSR,
// the bit-swapping LFSR (the default of this design) or a 90/150 hybrid
// cellular automaton. bist_state_e lists the states of the BIST controller, scan_phase_e the phases of the
// scan-chain pattern generator.
package bist_pkg;

  typedef enum logic [1:0] {
    SG_LFSR   = 2'd0,
    SG_BSLFSR = 2'd1,
    SG_HCA    = 2'd2
  } seed_gen_e;

  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_INIT    = 2'd1,
    ST_RUNNING = 2'd2,
    ST_COMPARE = 2'd3
  } bist_state_e;

  // phases of the scan-chain pattern generator (msic_scan_tpg)
  typedef enum logic [1:0] {
    SC_IDLE    = 2'd0,
    SC_INIT    = 2'd1,
    SC_SHIFT   = 2'd2,
    SC_CAPTURE = 2'd3
  } scan_phase_e;

endpackage
