// viterbi_ref_pkg: independent reference models used by the testbenches.
//
// ref_encode is a bit-by-bit K=7 encoder written from the tap lists (G1 taps the
// input and the bits 1, 2, 3 and 6 steps old; G0 the input and the bits 2, 3, 5 and 6
// steps old). ref_decode is a plain integer-metric Viterbi decoder: correlation
// metrics, state 0 starts at 0 and the others at -64, the odd predecessor wins ties,
// and every frame of D stages is traced back from state 0. It shares no code with the
// RTL and uses unbounded integer metrics instead of modulo arithmetic.
package viterbi_ref_pkg;

  // Code bits of one input bit u given the history h (h[k] = bit k steps old).
  function automatic void ref_code(input bit u, input bit [6:1] h, output bit g1, output bit g0);
    g1 = u ^ h[1] ^ h[2] ^ h[3] ^ h[6];
    g0 = u ^ h[2] ^ h[3] ^ h[5] ^ h[6];
  endfunction

  // Encode a whole bit sequence from the all-zero start.
  function automatic void ref_encode(input bit data[], output bit c1[], output bit c0[]);
    bit [6:1] h = '0;
    c1 = new[data.size()];
    c0 = new[data.size()];
    foreach (data[i]) begin
      ref_code(data[i], h, c1[i], c0[i]);
      h = {h[5:1], data[i]};
    end
  endfunction

  // Signed level of a 3-bit soft code (Table: 000 -> +3 ... 111 -> -4).
  function automatic int ref_level(input bit [2:0] c);
    case (c)
      3'b000: return 3;  3'b001: return 2;  3'b010: return 1;  3'b011: return 0;
      3'b100: return -1; 3'b101: return -2; 3'b110: return -3; default: return -4;
    endcase
  endfunction

  // Soft code of a level, clamped to -4..+3.
  function automatic bit [2:0] ref_code_of(input int level);
    if (level > 3)  level = 3;
    if (level < -4) level = -4;
    return 3'(3 - level);
  endfunction

  // Branch metric for expected pair {x, y} and received levels l1, l0.
  function automatic int ref_bm(input bit x, input bit y, input int l1, input int l0);
    return (x ? -l1 : l1) + (y ? -l0 : l0);
  endfunction

  // Frame-by-frame Viterbi decoding of n stages (n a multiple of d).
  function automatic void ref_decode(input bit [2:0] s1[], input bit [2:0] s0[], input int d,
                                     output bit out[]);
    int n = s1.size();
    int pm[64], npm[64];
    bit [63:0] dec[];
    dec = new[n];
    out = new[n];
    for (int s = 0; s < 64; s++) pm[s] = (s == 0) ? 0 : -64;
    for (int t = 0; t < n; t++) begin
      int l1 = ref_level(s1[t]);
      int l0 = ref_level(s0[t]);
      for (int s = 0; s < 64; s++) begin
        bit u = s[5];
        int m[2];
        for (int k = 0; k < 2; k++) begin
          int p = ((s & 31) << 1) | k;   // predecessor state
          bit [6:1] h;
          bit g1, g0;
          for (int b = 1; b <= 6; b++) h[b] = p[6-b];   // p[5] is 1 step old
          ref_code(u, h, g1, g0);
          m[k] = pm[p] + ref_bm(g1, g0, l1, l0);
        end
        if (m[0] > m[1]) begin npm[s] = m[0]; dec[t][s] = 1'b0; end
        else             begin npm[s] = m[1]; dec[t][s] = 1'b1; end
      end
      pm = npm;
    end
    for (int f = 0; f < n / d; f++) begin
      int s = 0;
      for (int t = (f + 1) * d - 1; t >= f * d; t--) begin
        out[t] = s[5];
        s = ((s & 31) << 1) | int'(dec[t][s]);
      end
    end
  endfunction

endpackage
