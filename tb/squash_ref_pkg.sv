// Reference models for the self-healing SAC testbenches.
//
// The approximate squarers are modelled independently of the RTL structure:
// the exact square plus, for every approximated 2x2 element whose inputs hit
// its error case, the element error times its significance. A square
// element errs by -4 (S1) or +4 (S2) when its 2-bit digit is 2; a multiply
// element errs by -2 (M1) or +2 (M2) when both digits are 3.
package squash_ref_pkg;

  // significance of the ten elements of the 8x8 squarer
  function automatic longint sq8_weight(input int k);
    case (k)
      0: return 1;     1: return 8;      2: return 16;
      3: return 32;    4: return 128;    5: return 128;   6: return 512;
      7: return 256;   8: return 2048;   9: return 4096;
      default: return 0;
    endcase
  endfunction

  function automatic int digit(input int a, input int i);
    return (a >> (2 * i)) & 3;
  endfunction

  // true when element k of the 8x8 squarer sees its error case
  function automatic bit sq8_hit(input int a, input int k);
    int d0, d1, d2, d3;
    d0 = digit(a, 0); d1 = digit(a, 1); d2 = digit(a, 2); d3 = digit(a, 3);
    case (k)
      0: return d0 == 2;
      1: return d0 == 3 && d1 == 3;
      2: return d1 == 2;
      3: return d0 == 3 && d2 == 3;
      4: return d0 == 3 && d3 == 3;
      5: return d2 == 3 && d1 == 3;
      6: return d1 == 3 && d3 == 3;
      7: return d2 == 2;
      8: return d2 == 3 && d3 == 3;
      9: return d3 == 2;
      default: return 0;
    endcase
  endfunction

  function automatic bit is_square_elem(input int k);
    return k == 0 || k == 2 || k == 7 || k == 9;
  endfunction

  // error of the 8x8 squarer; pos = 1 for the S2/M2 mirror squarer
  function automatic longint sq8_err(input int a, input logic [9:0] mask, input bit pos);
    longint e = 0;
    for (int k = 0; k < 10; k++) begin
      if (mask[k] && sq8_hit(a, k)) begin
        e += (is_square_elem(k) ? 4 : 2) * sq8_weight(k) * (pos ? 1 : -1);
      end
    end
    return e;
  endfunction

  function automatic longint sq8_ref(input int a, input logic [9:0] mask, input bit pos);
    return longint'(a) * a + sq8_err(a, mask, pos);
  endfunction

  // truncated sign-forced squarer: pos squares floor(|a|/2^t),
  // neg squares ceil(|a|/2^t); both scaled back by 4^t
  function automatic longint trunc_ref(input int a, input int t, input bit neg);
    longint m, q;
    m = (a < 0) ? -a : a;
    q = neg ? ((m + (1 << t) - 1) >> t) : (m >> t);
    return (q * q) << (2 * t);
  endfunction

  // approximately normal integer sample (sum of 12 uniforms), clipped to 0..255
  function automatic int norm8(input real mu, input real sigma);
    real s = 0.0;
    int  v;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    v = int'(mu + sigma * (s - 6.0));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

endpackage
