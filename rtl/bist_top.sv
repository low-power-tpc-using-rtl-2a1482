// bist_top: low-power test-per-clock built-in self-test around a
// combinational circuit under test (CUT).
//
// Blocks: bist_controller sequences a session; msic_tpg produces one
// multiple-single-input-change pattern per clock (bit-swapping LFSR seed XOR
// twisted ring counter by default); the CUT, which sits outside this module,
// receives the pattern on cut_in and returns its response on cut_out in the
// same clock; misr compacts the responses; tra compares the final signature
// with golden_sig. Defaults are sized for a 36-input, 7-output CUT and a
// session of 1000 patterns.
//
// Session: raise start and keep it high. After N_IN+1 initialisation clocks
// the 1000 patterns are applied, one per clock, then done rises and result
// shows whether the signature matched (1 = fault free). done and result hold
// until start falls, which returns the controller to idle. cut_in is
// meaningful only while the controller is running. state shows the controller
// state and seed_step pulses on each clock that moves to a new seed.
//
// Beside it sits msic_scan_tpg, the same pattern scheme arranged for a
// full-scan circuit (SCAN_CHAINS chains of SCAN_L cells, SCAN_PI primary
// inputs). It runs while scan_run is high and drives the scan_* ports; its
// seed generator is of the same kind (SEED_GEN) with its own default
// polynomial and seed. The scan chains and the response compaction of such
// a circuit are outside this module.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned      N_IN        = 36,
  parameter int unsigned      N_OUT       = 7,
  parameter int unsigned      TEST_LENGTH = 1000,
  parameter seed_gen_e        SEED_GEN    = SG_BSLFSR,
  parameter logic [N_IN-1:0]  LFSR_TAPS   = N_IN'(64'h8_0100_0000),
  parameter logic [N_IN-1:0]  HCA_RULES   = N_IN'(64'h4_208D_A619),
  parameter logic [N_IN-1:0]  SEED        = N_IN'(64'h9_E37A_5C4B),
  parameter logic [N_OUT-1:0] MISR_TAPS   = N_OUT'(8'h60),
  parameter int unsigned      SCAN_PI     = 36,
  parameter int unsigned      SCAN_CHAINS = 8,
  parameter int unsigned      SCAN_L      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N_OUT-1:0] golden_sig,
  output logic [N_IN-1:0]  cut_in,
  input  logic [N_OUT-1:0] cut_out,
  output logic [N_OUT-1:0] signature,
  output logic             done,
  output logic             result,
  output bist_state_e      state,
  output logic             seed_step,
  // scan-chain pattern generator
  input  logic                   scan_run,
  output logic [SCAN_CHAINS-1:0] scan_si,
  output logic                   scan_se,
  output logic                   scan_capture,
  output logic [SCAN_PI-1:0]     scan_pi,
  output logic                   scan_seed_step,
  output scan_phase_e            scan_phase
);

  logic        tpg_init, tpg_en, misr_clear, misr_en;
  logic        pass;

  bist_controller #(
    .TEST_LENGTH(TEST_LENGTH),
    .INIT_CYCLES(N_IN + 1)
  ) u_bc (
    .clk, .rst_n, .start,
    .tpg_init, .tpg_en, .misr_clear, .misr_en, .done, .state
  );

  msic_tpg #(
    .N(N_IN), .SEED_GEN(SEED_GEN), .LFSR_TAPS(LFSR_TAPS),
    .HCA_RULES(HCA_RULES), .SEED(SEED)
  ) u_tpg (
    .clk, .rst_n, .init(tpg_init), .en(tpg_en),
    .pattern(cut_in), .seed(), .ring(), .seed_step
  );

  misr #(.W(N_OUT), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en), .d(cut_out), .sig(signature)
  );

  tra #(.W(N_OUT)) u_tra (
    .sig(signature), .golden(golden_sig), .en(done), .pass
  );

  assign result = pass;

  // Generator for circuits with scan chains; it shares no state with the
  // test-per-clock session above.
  msic_scan_tpg #(
    .N_PI(SCAN_PI), .N_CHAINS(SCAN_CHAINS), .L(SCAN_L), .SEED_GEN(SEED_GEN)
  ) u_scan_tpg (
    .clk, .rst_n, .run(scan_run), .scan_in(scan_si), .scan_en(scan_se),
    .capture(scan_capture), .pi(scan_pi), .seed_step(scan_seed_step),
    .phase(scan_phase)
  );

endmodule
