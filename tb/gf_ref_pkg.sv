// gf_ref_pkg: reference GF(2^q) arithmetic for the testbenches.
//
// The functions work differently from the RTL on purpose: a multiplication is
// a full carry-less product of two q-bit values followed by polynomial long
// division by the field polynomial, and an inverse is found by exhaustive
// search. They are slow and only meant as an independent model.
package gf_ref_pkg;

  // Carry-less product of a and b, reduced modulo poly (degree q, bit q set).
  function automatic int unsigned gf_mul_ref(int unsigned a, int unsigned b,
                                             int unsigned poly, int q);
    int unsigned prod;
    prod = 0;
    for (int i = 0; i < q; i++)
      if (((b >> i) & 1) != 0) prod ^= (a << i);
    for (int d = 2*q - 2; d >= q; d--)
      if (((prod >> d) & 1) != 0) prod ^= (poly << (d - q));
    return prod;
  endfunction

  function automatic int unsigned gf_inv_ref(int unsigned a, int unsigned poly, int q);
    for (int unsigned x = 1; x < (1 << q); x++)
      if (gf_mul_ref(a, x, poly, q) == 1) return x;
    return 0;
  endfunction

  // Next state of a Q-bit Fibonacci LFSR with feedback polynomial poly,
  // written from the recurrence of the sequence it produces: the state holds
  // the last q elements a_t .. a_{t+q-1} (a_{t+q-1} in bit 0), and the new
  // element is a_{t+q} = sum of p_k * a_{t+k} over GF(2).
  function automatic int unsigned lfsr_next_ref(int unsigned s, int unsigned poly, int q);
    bit a [32];
    bit nxt;
    for (int i = 0; i < q; i++) a[i] = bit'((s >> (q - 1 - i)) & 1);  // a[i] = a_{t+i}
    nxt = 0;
    for (int k = 0; k < q; k++) if (((poly >> k) & 1) != 0) nxt ^= a[k];
    return ((s << 1) & ((1 << q) - 1)) | int'(nxt);
  endfunction

endpackage
