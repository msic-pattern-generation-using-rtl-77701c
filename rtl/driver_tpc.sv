// driver_tpc: clock and control block of the test-per-clock generator.
//
// After a start pulse it first clears the twisted ring counter in Start mode
// (N+1 Clock2 pulses), then for each of n_seeds seeds:
//   1. one Clock1 pulse: the seed circuit makes a new seed (state SEED);
//   2. 2N Clock2 pulses in Normal mode: the counter steps through its 2N
//      twisted vectors and returns to all 0s (state RUN).
// vec_valid marks the RUN cycles, in which seed XOR counter is a new test
// vector on the CUT inputs. A test thus takes N+1 + n_seeds*(1+2N) cycles
// after start, then done rises and stays high until the next start.
// The sequence of seeds and vectors follows the published test procedure;
// the start/n_seeds/done handshake, the clearing phase at the beginning and
// the use of clock enables instead of two clocks are this design's choices.
module driver_tpc
  import msic_pkg::*;
#(
  parameter int unsigned N = 6     // twisted ring counter length
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,      // begin a test (pulse)
  input  logic [15:0] n_seeds,    // test length in seeds
  output logic        clk1_en,    // Clock1: new seed
  output logic        clk2_en,    // Clock2: counter step
  output logic        rj_mode,    // counter mode, see rtrc
  output logic        init,
  output logic        vec_valid,  // a new vector is applied this cycle
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_SEED, S_RUN, S_DONE} state_e;

  localparam int CW = $clog2(2*N + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [15:0]   seeds_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      seeds_done <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_CLEAR;
            cnt        <= '0;
            seeds_done <= '0;
          end
        end
        S_CLEAR: begin
          if (cnt == CW'(N)) begin
            cnt   <= '0;
            state <= (n_seeds == 16'd0) ? S_DONE : S_SEED;
          end else cnt <= cnt + 1'b1;
        end
        S_SEED: state <= S_RUN;
        S_RUN: begin
          if (cnt == CW'(2*N - 1)) begin
            cnt        <= '0;
            seeds_done <= seeds_done + 16'd1;
            state      <= (seeds_done + 16'd1 == n_seeds) ? S_DONE : S_SEED;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    clk1_en   = (state == S_SEED);
    clk2_en   = (state == S_CLEAR) || (state == S_RUN);
    rj_mode   = (state == S_CLEAR) ? MODE_START.rj_mode : MODE_NORMAL.rj_mode;
    init      = (state == S_CLEAR) ? MODE_START.init    : MODE_NORMAL.init;
    vec_valid = (state == S_RUN);
    busy      = (state != S_IDLE) && (state != S_DONE);
    done      = (state == S_DONE);
  end

  // Clock1 and Clock2 are never given in the same cycle, and a new test is
  // not started while one is running.
  a_one_clock: assert property (@(posedge clk) disable iff (!rst_n) !(clk1_en && clk2_en));
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
