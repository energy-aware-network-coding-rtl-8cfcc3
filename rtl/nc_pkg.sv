// nc_pkg: constants and types shared by the network coding encoder.
//
// The encoder works over GF(2^8) with at most 8 source packets (the
// generation size) of at most 1 KB each, as in the accelerator this RTL
// follows. The field polynomial and the per-lane LFSR polynomials are this
// design's own choice: the source names neither.
//
// GF_POLY is x^8 + x^4 + x^3 + x^2 + 1 (0x11D), a primitive polynomial widely
// used for byte-oriented codes. LFSR_POLYS lists eight different primitive
// polynomials of degree 8, one per coefficient LFSR, so that no two lanes
// produce the same sequence up to a shift.
package nc_pkg;

  localparam int Q     = 8;     // field size in bits, GF(2^Q)
  localparam int N_MAX = 8;     // largest generation size (RAM/LFSR/multiplier lanes)
  localparam int L_MAX = 1024;  // largest packet length in symbols (1 KB at Q = 8)

  localparam logic [Q:0] GF_POLY = 9'h11D;

  // Primitive polynomials of degree 8, bit 8 included, one per lane.
  localparam logic [8:0] LFSR_POLYS [8] = '{
    9'h11D, 9'h12B, 9'h15F, 9'h163, 9'h165, 9'h169, 9'h171, 9'h187
  };

  // Reset seeds of the coefficient LFSRs, nonzero and different per lane.
  localparam logic [7:0] LFSR_SEEDS [8] = '{
    8'h01, 8'h5A, 8'hC3, 8'h27, 8'h9E, 8'h64, 8'hB1, 8'h3D
  };

  typedef logic [Q-1:0] sym_t;

endpackage
