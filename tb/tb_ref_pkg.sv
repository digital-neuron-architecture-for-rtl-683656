// tb_ref_pkg: golden integer model of the neuron arithmetic for the testbenches.
//
// Every function works on plain integers holding 3.12 values (value * 4096)
// and restates the arithmetic rules of the architecture independently of the
// RTL: multiplier = floor(a*b / 4096) with the integer field wrapped to three
// bits and the product's own sign kept; adders clamp to [-32768, 32767]; the
// PLAN sigmoid uses the segment limits 1, 2.375, 5 and the unit 4095. The
// ideal_* functions give the exact real-valued functions for error checks.
package tb_ref_pkg;

  localparam int UNIT = 4095;

  function automatic int to_s16(input int v);
    int r;
    r = v & 32'hFFFF;
    return (r >= 32768) ? r - 65536 : r;
  endfunction

  function automatic int ref_mul(input int a, input int b);
    longint p, q;
    p = longint'(a) * longint'(b);
    q = p >>> 12;                       // floor division by 4096
    // keep 15 magnitude bits of q, replace bit 15 by the product's sign
    return (p < 0 ? -32768 : 0) + int'(q & 64'h7FFF);
  endfunction

  function automatic int ref_add(input int a, input int b);
    int s;
    s = a + b;
    if (s > 32767)  return 32767;
    if (s < -32768) return -32768;
    return s;
  endfunction

  function automatic int ref_seg(input int z);
    int az;
    az = (z < 0) ? -z : z;
    if (az > 32767) az = 32767;
    if (az >= 5 * 4096)          return 3;
    if (az >= 2 * 4096 + 1536)   return 2;   // 2.375
    if (az >= 4096)              return 1;
    return 0;
  endfunction

  function automatic int ref_sigma(input int z);
    int az, sp;
    az = (z < 0) ? -z : z;
    if (az > 32767) az = 32767;
    case (ref_seg(z))
      0: sp = az / 4  + 2048;   // 0.25*|z|    + 0.5
      1: sp = az / 8  + 2560;   // 0.125*|z|   + 0.625
      2: sp = az / 32 + 3456;   // 0.03125*|z| + 0.84375
      default: sp = UNIT;
    endcase
    return (z < 0) ? UNIT - sp : sp;
  endfunction

  function automatic int ref_sigmaD(input int s);
    return ref_mul(s, UNIT - s);
  endfunction

  function automatic int ref_tanh(input int s);
    return 2 * s - UNIT;
  endfunction

  function automatic int ref_tanhD(input int sd);
    return ref_add(sd, sd);
  endfunction

  function automatic real to_real(input int v);
    return real'(v) / 4096.0;
  endfunction

  function automatic real ideal_sigma(input real z);
    return 1.0 / (1.0 + $exp(-z));
  endfunction

  function automatic real ideal_sigmaD(input real z);
    real s;
    s = ideal_sigma(z);
    return s * (1.0 - s);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
