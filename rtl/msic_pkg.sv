// msic_pkg: types and constants shared by the MSIC test pattern generator.
//
// seed_kind_e selects the register used as seed circuit: a conventional
// LFSR, a bit-swapping LFSR or a low-power LFSR.
//
// lfsr_taps(W) returns the feedback tap mask of a maximal-length Fibonacci
// register of W stages (2 <= W <= 32). Stage k (1 = first stage, W = last
// stage) is bit W-k of the register, because every register of this design
// shifts toward bit 0 and takes its feedback into bit W-1. The tap lists are
// a standard table of primitive polynomials; the generator itself only asks
// for "a primitive polynomial" and leaves the choice open.
package msic_pkg;

  typedef enum logic [1:0] {
    SEED_LFSR = 2'd0,   // conventional LFSR
    SEED_BS   = 2'd1,   // bit-swapping LFSR
    SEED_LP   = 2'd2    // low-power LFSR (intermediate patterns)
  } seed_kind_e;

  // Mode of the reconfigurable twisted ring counter as a pair (rj_mode, init).
  typedef struct packed {
    logic rj_mode;      // 1: Start / Circular shift, 0: Normal
    logic init;         // 0 with rj_mode=1: clear; 1 with rj_mode=1: rotate
  } rtrc_mode_t;

  localparam rtrc_mode_t MODE_START  = '{rj_mode: 1'b1, init: 1'b0};
  localparam rtrc_mode_t MODE_CIRC   = '{rj_mode: 1'b1, init: 1'b1};
  localparam rtrc_mode_t MODE_NORMAL = '{rj_mode: 1'b0, init: 1'b1};

  // Mask with bit (w - k) set for every tap stage k.
  function automatic logic [31:0] stage_mask(int w, int k);
    logic [31:0] m;
    m = '0;
    m[w - k] = 1'b1;
    return m;
  endfunction

  function automatic logic [31:0] lfsr_taps(int w);
    logic [31:0] m;
    m = stage_mask(w, w);
    case (w)
      2:  m |= stage_mask(w, 1);
      3:  m |= stage_mask(w, 2);
      4:  m |= stage_mask(w, 3);
      5:  m |= stage_mask(w, 3);
      6:  m |= stage_mask(w, 5);
      7:  m |= stage_mask(w, 6);
      8:  m |= stage_mask(w, 4) | stage_mask(w, 3) | stage_mask(w, 2);
      9:  m |= stage_mask(w, 5);
      10: m |= stage_mask(w, 7);
      11: m |= stage_mask(w, 9);
      12: m |= stage_mask(w, 6) | stage_mask(w, 4) | stage_mask(w, 1);
      13: m |= stage_mask(w, 4) | stage_mask(w, 3) | stage_mask(w, 1);
      14: m |= stage_mask(w, 5) | stage_mask(w, 3) | stage_mask(w, 1);
      15: m |= stage_mask(w, 14);
      16: m |= stage_mask(w, 15) | stage_mask(w, 13) | stage_mask(w, 4);
      17: m |= stage_mask(w, 14);
      18: m |= stage_mask(w, 11);
      19: m |= stage_mask(w, 6) | stage_mask(w, 2) | stage_mask(w, 1);
      20: m |= stage_mask(w, 17);
      21: m |= stage_mask(w, 19);
      22: m |= stage_mask(w, 21);
      23: m |= stage_mask(w, 18);
      24: m |= stage_mask(w, 23) | stage_mask(w, 22) | stage_mask(w, 17);
      25: m |= stage_mask(w, 22);
      26: m |= stage_mask(w, 6) | stage_mask(w, 2) | stage_mask(w, 1);
      27: m |= stage_mask(w, 5) | stage_mask(w, 2) | stage_mask(w, 1);
      28: m |= stage_mask(w, 25);
      29: m |= stage_mask(w, 27);
      30: m |= stage_mask(w, 6) | stage_mask(w, 4) | stage_mask(w, 1);
      31: m |= stage_mask(w, 28);
      32: m |= stage_mask(w, 22) | stage_mask(w, 2) | stage_mask(w, 1);
      default: m = '0;
    endcase
    return m;
  endfunction

endpackage
