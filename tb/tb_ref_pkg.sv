// tb_ref_pkg: reference models for the MSIC testbenches.
//
// Everything here is written from the behaviour of the generator, not from
// the RTL: the feedback masks are listed bit by bit for the widths the
// testbenches use, the twisted ring counter and the low-power LFSR patterns
// are computed in closed form, and two small stand-in response functions
// play the circuit under test.
package tb_ref_pkg;

  // Feedback masks (bit 0 = last stage) of the primitive polynomials used:
  //  4: x^4+x^3+1    6: x^6+x^5+1    7: x^7+x^6+1
  //  8: x^8+x^4+x^3+x^2+1            13: x^13+x^4+x^3+x+1
  function automatic logic [63:0] ref_mask(int w);
    case (w)
      4:  return 64'h3;
      6:  return 64'h3;
      7:  return 64'h3;
      8:  return 64'h71;
      13: return 64'h1601;
      default: begin
        $fatal(1, "ref_mask: width %0d not tabulated", w);
        return 64'h0;
      end
    endcase
  endfunction

  function automatic logic [63:0] wmask(int w);
    return (64'h1 << w) - 64'h1;
  endfunction

  // One LFSR step: shift toward bit 0, parity of the taps into bit w-1.
  function automatic logic [63:0] ref_next(int w, logic [63:0] s);
    logic fb;
    fb = ^(s & ref_mask(w));
    return ((s >> 1) | (64'(fb) << (w - 1))) & wmask(w);
  endfunction

  function automatic logic [63:0] ref_lfsr(int w, int steps, logic [63:0] init = 64'h1);
    logic [63:0] s;
    s = init;
    for (int i = 0; i < steps; i++) s = ref_next(w, s);
    return s;
  endfunction

  // Bit-swapping output: swap pairs (0,1), (2,3), ... when bit 0 is 1.
  function automatic logic [63:0] ref_swap(int w, logic [63:0] s);
    logic [63:0] q;
    q = s;
    if (s[0])
      for (int i = 0; i + 1 < w; i += 2) begin
        q[i] = s[i+1];
        q[i+1] = s[i];
      end
    return q;
  endfunction

  // Low-power LFSR pattern p (0: T1, 1: T1k, 2: T2k, 3: T3k) of state t1.
  function automatic logic [63:0] ref_lp(int w, logic [63:0] t1, int p);
    logic [63:0] t2, q;
    int lo;
    lo = w / 2;
    t2 = ref_next(w, t1);
    q  = t1;
    for (int i = 0; i < w; i++) begin
      logic a, b, r;
      a = t1[i];
      b = t2[i];
      r = (a == b) ? a : t1[0];
      case (p)
        0: q[i] = a;
        1: q[i] = (i >= lo) ? a : r;
        2: q[i] = (i >= lo) ? a : b;
        default: q[i] = (i >= lo) ? r : b;
      endcase
    end
    return q;
  endfunction

  // kind: 0 LFSR, 1 BS-LFSR, 2 LP-LFSR; idx = number of Clock1 pulses.
  function automatic logic [63:0] ref_seed(int kind, int w, int idx);
    case (kind)
      0: return ref_lfsr(w, idx);
      1: return ref_swap(w, ref_lfsr(w, idx));
      default: return ref_lp(w, ref_lfsr(w, idx / 4), idx % 4);
    endcase
  endfunction

  // Twisted ring counter after t Normal-mode steps from all 0s.
  function automatic logic [63:0] ref_johnson(int len, int t);
    int u;
    u = t % (2 * len);
    if (u <= len) return wmask(u);
    return wmask(len) & ~wmask(u - len);
  endfunction

  function automatic logic [63:0] ref_misr(int w, logic [63:0] sig, logic [63:0] d);
    return (ref_next(w, sig) ^ d) & wmask(w);
  endfunction

  // Stand-in CUT, 7 outputs from up to 64 inputs: mixes parity and AND terms.
  function automatic logic [6:0] cut_po(logic [63:0] in);
    logic [6:0] o;
    for (int b = 0; b < 7; b++)
      o[b] = ^(in & (64'h9E3779B97F4A7C15 >> b)) ^ (in[b] & in[b+9] & ~in[b+20]);
    return o;
  endfunction

  // Stand-in next-state function for scan cells (n bits).
  function automatic logic [63:0] cut_ppo(logic [63:0] in, int n);
    logic [63:0] o;
    o = '0;
    for (int i = 0; i < n; i++)
      o[i] = in[(i * 7 + 3) % 36] ^ (in[i] & in[(i + 1) % 36]);
    return o & wmask(n);
  endfunction

  function automatic int popcount(logic [63:0] v);
    int c;
    c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
