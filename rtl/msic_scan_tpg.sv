// msic_scan_tpg: MSIC pattern generator for a full-scan circuit with
// N_CHAINS scan chains of L cells each and N_PI primary inputs.
//
// The seed generator (bit-swapping LFSR by default) holds an N_PI-bit seed C
// that is applied to the primary inputs. An L-bit reconfigurable twisted ring
// counter holds a codeword K. To load one test vector the counter runs L
// clocks in circular-shift mode while scan chain j receives C[j] XOR
// K[L-1-j] of the rotating codeword; after L clocks every chain holds the
// codeword rotated by its own index and XORed with its seed bit, and the
// codeword is back where it started. A capture clock follows (scan_en low),
// on which the counter makes one normal-mode (Johnson) step to the next
// codeword. After 2L codewords the counter is back at zero and the seed
// generator steps once on the same capture clock. Successive vectors of one
// seed therefore differ in exactly one cell of every chain.
//
// Sizes are not fixed by the scheme; the defaults (36 inputs, 8 chains of 16
// cells) and the choice of which counter bit feeds which chain are this
// design's own. N_CHAINS must not exceed N_PI or L.
//
// Interface and timing: while run is low the generator idles. When run is
// seen high, L+1 clocks of start mode clear the counter and load the seed;
// then each vector takes L shift clocks (scan_en = 1, scan_in valid) and one
// capture clock (scan_en = 0, capture = 1). pi is the seed, stable for the
// whole vector. seed_step pulses on the capture clock that moves the seed.
module msic_scan_tpg
  import bist_pkg::*;
#(
  parameter int unsigned     N_PI      = 36,
  parameter int unsigned     N_CHAINS  = 8,
  parameter int unsigned     L         = 16,
  parameter seed_gen_e       SEED_GEN  = SG_BSLFSR,
  parameter logic [N_PI-1:0] LFSR_TAPS = N_PI'(64'h8_0100_0000),
  parameter logic [N_PI-1:0] HCA_RULES = N_PI'(64'h4_208D_A619),
  parameter logic [N_PI-1:0] SEED      = N_PI'(64'h9_E37A_5C4B)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  output logic [N_CHAINS-1:0] scan_in,
  output logic                scan_en,
  output logic                capture,
  output logic [N_PI-1:0]     pi,
  output logic                seed_step,
  output scan_phase_e         phase
);

  localparam int unsigned SW = $clog2(L + 1);
  localparam int unsigned VW = $clog2(2 * L);

  logic [SW-1:0] shift_count;
  logic [VW-1:0] vec_count;
  logic [L-1:0]  ring;
  logic          rtrc_m0, rtrc_start, load_seed;

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      phase       <= SC_IDLE;
      shift_count <= '0;
      vec_count   <= '0;
    end else begin
      unique case (phase)
        SC_IDLE: begin
          phase       <= SC_INIT;
          shift_count <= '0;
        end
        SC_INIT: begin
          if (shift_count == SW'(L)) begin
            phase       <= SC_SHIFT;
            shift_count <= '0;
            vec_count   <= '0;
          end else begin
            shift_count <= shift_count + 1'b1;
          end
        end
        SC_SHIFT: begin
          if (shift_count == SW'(L - 1)) begin
            phase       <= SC_CAPTURE;
            shift_count <= '0;
          end else begin
            shift_count <= shift_count + 1'b1;
          end
        end
        SC_CAPTURE: begin
          phase     <= SC_SHIFT;
          vec_count <= (vec_count == VW'(2*L - 1)) ? '0 : vec_count + 1'b1;
        end
        default: phase <= SC_IDLE;
      endcase
    end
  end

  // counter mode per phase: start mode in init, circular shift while
  // loading the chains, one normal (Johnson) step on the capture clock
  always_comb begin
    rtrc_m0    = (phase != SC_CAPTURE);
    rtrc_start = (phase != SC_INIT);
    load_seed  = (phase == SC_INIT);
    scan_en    = (phase == SC_SHIFT);
    capture    = (phase == SC_CAPTURE);
    seed_step  = capture && (vec_count == VW'(2*L - 1));
  end

  rtrc #(.N(L)) u_rtrc (
    .clk, .rst_n, .en(phase != SC_IDLE), .m0(rtrc_m0), .start(rtrc_start), .q(ring)
  );

  generate
    if (SEED_GEN == SG_BSLFSR) begin : g_bslfsr
      bs_lfsr #(.N(N_PI), .TAPS(LFSR_TAPS), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(load_seed), .en(seed_step), .q(pi)
      );
    end else if (SEED_GEN == SG_HCA) begin : g_hca
      hca #(.N(N_PI), .RULES(HCA_RULES), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(load_seed), .en(seed_step), .q(pi)
      );
    end else begin : g_lfsr
      lfsr #(.N(N_PI), .TAPS(LFSR_TAPS), .SEED(SEED)) u_seed (
        .clk, .rst_n, .load(load_seed), .en(seed_step), .q(pi)
      );
    end
  endgenerate

  // XOR network: chain j takes seed bit j and counter bit L-1-j
  always_comb
    for (int j = 0; j < N_CHAINS; j++)
      scan_in[j] = pi[j] ^ ring[L-1-j];

endmodule
