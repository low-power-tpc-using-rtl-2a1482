// msic_tpg: multiple single-input-change (MSIC) test pattern generator for
// test-per-clock BIST.
//
// Pattern = seed XOR twisted-ring vector, one XOR gate per CUT input.
//   * The seed generator (SEED_GEN: bit-swapping LFSR by default, or a plain
//     LFSR, or a 90/150 hybrid cellular automaton) supplies an N-bit seed.
//   * The reconfigurable twisted ring counter (rtrc) in normal mode walks
//     through its 2N single-bit-change vectors starting from all zeros.
//   * A small control circuit counts the counter's clocks; on the 2N-th it
//     also clocks the seed generator (in the two-clock picture, Clock1 fires
//     once per 2N pulses of Clock2), and the counter has returned to zero.
// Each seed therefore produces 2N patterns in which every pattern differs from
// the previous one in exactly one bit; only the change of seed alters several
// bits. Here both clocks are the same clock with separate enables; that, and
// changing seed and counter on the same edge, are this design's choices.
//
// Interface: init (held for more than N clocks) loads the seed, runs the
// counter in start mode to clear it and zeroes the control counter. Each clock
// with en high moves to the next pattern; seed_step flags the clocks on which
// the seed generator moves. pattern is combinational from registers. An
// assertion checks the single-input-change property while the counter holds
// a Johnson codeword.
module msic_tpg
  import bist_pkg::*;
#(
  parameter int unsigned  N         = 36,
  parameter seed_gen_e    SEED_GEN  = SG_BSLFSR,
  parameter logic [N-1:0] LFSR_TAPS = N'(64'h8_0100_0000),
  parameter logic [N-1:0] HCA_RULES = N'(64'h4_208D_A619),
  parameter logic [N-1:0] SEED      = N'(64'h9_E37A_5C4B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  output logic [N-1:0] pattern,
  output logic [N-1:0] seed,
  output logic [N-1:0] ring,
  output logic         seed_step
);

  localparam int unsigned CW = $clog2(2 * N);

  logic [CW-1:0] vec_count;
  logic          rtrc_m0, rtrc_start, rtrc_en;

  // control circuit: count 2N counter vectors per seed
  always_ff @(posedge clk) begin
    if (!rst_n || init)                       vec_count <= '0;
    else if (en && vec_count == CW'(2*N - 1)) vec_count <= '0;
    else if (en)                              vec_count <= vec_count + 1'b1;
  end

  assign seed_step  = en && (vec_count == CW'(2*N - 1));

  // counter modes: start mode during init, normal mode while running
  assign rtrc_m0    = init;
  assign rtrc_start = !init;
  assign rtrc_en    = init || en;

  rtrc #(.N(N)) u_rtrc (
    .clk, .rst_n, .en(rtrc_en), .m0(rtrc_m0), .start(rtrc_start), .q(ring)
  );

  generate
    if (SEED_GEN == SG_BSLFSR) begin : g_bslfsr
      bs_lfsr #(.N(N), .TAPS(LFSR_TAPS), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(init), .en(seed_step), .q(seed)
      );
    end else if (SEED_GEN == SG_HCA) begin : g_hca
      hca #(.N(N), .RULES(HCA_RULES), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(init), .en(seed_step), .q(seed)
      );
    end else begin : g_lfsr
      lfsr #(.N(N), .TAPS(LFSR_TAPS), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(init), .en(seed_step), .q(seed)
      );
    end
  endgenerate

  // XOR network
  assign pattern = seed ^ ring;

  // A Johnson codeword is 0...01...1 or 1...10...0: x & (x+1) clears the low
  // run of ones, and ~x must clear the same way for the second form.
  function automatic logic is_johnson(logic [N-1:0] x);
    logic [N-1:0] nx;
    nx = ~x;
    return ((x & (x + 1'b1)) == '0) || ((nx & (nx + 1'b1)) == '0);
  endfunction

  // Inside one seed group every new pattern changes exactly one input.
  a_single_input_change: assert property (
    @(posedge clk) disable iff (!rst_n)
    (en && !init && !seed_step && is_johnson(ring)) |=>
      ($countones(pattern ^ $past(pattern)) == 1)
  ) else $error("msic_tpg: pattern changed in more than one bit within a seed group");

endmodule
