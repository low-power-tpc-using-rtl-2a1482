// bist_controller: BIST controller (BC) for a test-per-clock session.
//
// States:
//   IDLE    - Start = 0. Nothing moves.
//   INIT    - INIT_CYCLES clocks: the pattern generator loads its seed and its
//             twisted ring counter runs in start mode, which needs more than
//             n clocks to clear it; the MISR is cleared.
//   RUNNING - TEST_LENGTH clocks: each clock one pattern is applied, its
//             response compacted and the generator advanced.
//   COMPARE - done is high and the signature is compared with the golden one;
//             the controller stays here until Start returns to 0.
// Start = 0 in any state returns to IDLE. The IDLE/RUNNING/COMPARE sequence
// and the count of 1000 follow the original scheme; the separate INIT state
// and holding COMPARE until Start falls are this design's choices.
//
// Timing: with Start raised in cycle 0, INIT spans cycles 1..INIT_CYCLES,
// RUNNING the next TEST_LENGTH cycles, and done rises
// INIT_CYCLES + TEST_LENGTH + 1 clocks after Start was first seen.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LENGTH = 1000,
  parameter int unsigned INIT_CYCLES = 37
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        tpg_init,
  output logic        tpg_en,
  output logic        misr_clear,
  output logic        misr_en,
  output logic        done,
  output bist_state_e state
);

  localparam int unsigned MAXC = (TEST_LENGTH > INIT_CYCLES) ? TEST_LENGTH : INIT_CYCLES;
  localparam int unsigned CW   = $clog2(MAXC + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      count <= '0;
    end else if (!start) begin
      state <= ST_IDLE;
      count <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          state <= ST_INIT;
          count <= '0;
        end
        ST_INIT: begin
          if (count == CW'(INIT_CYCLES - 1)) begin
            state <= ST_RUNNING;
            count <= '0;
          end else begin
            count <= count + 1'b1;
          end
        end
        ST_RUNNING: begin
          if (count == CW'(TEST_LENGTH - 1)) begin
            state <= ST_COMPARE;
            count <= '0;
          end else begin
            count <= count + 1'b1;
          end
        end
        ST_COMPARE: ;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_init   = (state == ST_INIT);
    misr_clear = (state == ST_INIT);
    tpg_en     = (state == ST_RUNNING);
    misr_en    = (state == ST_RUNNING);
    done       = (state == ST_COMPARE);
  end

  // at most one of initialise, run and compare at any time
  a_phases_exclusive: assert property (
    @(posedge clk) disable iff (!rst_n) $onehot0({tpg_init, tpg_en, done})
  ) else $error("bist_controller: overlapping session phases");

endmodule
