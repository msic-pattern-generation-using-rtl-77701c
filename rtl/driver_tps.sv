// driver_tps: clock and control block of the test-per-scan generator.
//
// After a start pulse it clears the twisted ring counter in Start mode
// (LEN+1 Clock2 pulses). Then, for each of n_seeds seeds:
//   1. SEED:    one Clock1 pulse, the seed circuit makes a new seed;
//   2. TWIST:   M0 = 0 (Normal mode), one Clock2 pulse: a new twisted vector;
//   3. SHIFT:   M0 = start = 1 (Circular shift), LEN Clock2 pulses while the
//               scan chains shift, loading seed XOR twisted codeword;
//   4. CAPTURE: one capture cycle;
//   steps 2-4 repeat until 2*LEN twisted vectors have been applied.
// After the last seed, UNLOAD shifts the chains LEN more times so the last
// capture reaches the MISR, then done rises. misr_en marks the cycles whose
// data the MISR takes; misr_po selects the CUT primary outputs (capture
// cycle) instead of the scan-outs (shift cycles).
// One seed takes 2*LEN*(LEN+2)+1 cycles. The step order follows the
// published test procedure, with M0 on rj_mode and start on init; the
// start/n_seeds/done handshake, the clearing and unloading phases and the
// clock enables are this design's choices.
module driver_tps
  import msic_pkg::*;
#(
  parameter int unsigned LEN = 5    // scan length = counter length
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] n_seeds,
  output logic        clk1_en,
  output logic        clk2_en,
  output logic        rj_mode,      // M0
  output logic        init,         // start line of the counter
  output logic        scan_shift,
  output logic        scan_capture,
  output logic        misr_en,
  output logic        misr_po,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_SEED, S_TWIST, S_SHIFT, S_CAPTURE, S_UNLOAD, S_DONE
  } state_e;

  localparam int CW = $clog2(2*LEN + 1);

  state_e        state;
  logic [CW-1:0] cnt;      // shift / clear counter
  logic [CW-1:0] twists;   // twisted vectors applied for this seed
  logic [15:0]   seeds_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      twists     <= '0;
      seeds_done <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_CLEAR;
            cnt        <= '0;
            twists     <= '0;
            seeds_done <= '0;
          end
        end
        S_CLEAR: begin
          if (cnt == CW'(LEN)) begin
            cnt   <= '0;
            state <= (n_seeds == 16'd0) ? S_DONE : S_SEED;
          end else cnt <= cnt + 1'b1;
        end
        S_SEED: begin
          twists <= '0;
          state  <= S_TWIST;
        end
        S_TWIST: begin
          twists <= twists + 1'b1;
          state  <= S_SHIFT;
        end
        S_SHIFT: begin
          if (cnt == CW'(LEN - 1)) begin
            cnt   <= '0;
            state <= S_CAPTURE;
          end else cnt <= cnt + 1'b1;
        end
        S_CAPTURE: begin
          if (twists == CW'(2*LEN)) begin
            seeds_done <= seeds_done + 16'd1;
            state      <= (seeds_done + 16'd1 == n_seeds) ? S_UNLOAD : S_SEED;
          end else state <= S_TWIST;
        end
        S_UNLOAD: begin
          if (cnt == CW'(LEN - 1)) begin
            cnt   <= '0;
            state <= S_DONE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    clk1_en      = (state == S_SEED);
    clk2_en      = (state == S_CLEAR) || (state == S_TWIST) || (state == S_SHIFT);
    unique case (state)
      S_CLEAR: {rj_mode, init} = MODE_START;
      S_SHIFT: {rj_mode, init} = MODE_CIRC;
      default: {rj_mode, init} = MODE_NORMAL;
    endcase
    scan_shift   = (state == S_SHIFT) || (state == S_UNLOAD);
    scan_capture = (state == S_CAPTURE);
    misr_en      = scan_shift || scan_capture;
    misr_po      = scan_capture;
    busy         = (state != S_IDLE) && (state != S_DONE);
    done         = (state == S_DONE);
  end

  // Clock1 and Clock2 are never given in the same cycle, and a new test is
  // not started while one is running.
  a_one_clock: assert property (@(posedge clk) disable iff (!rst_n) !(clk1_en && clk2_en));
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
