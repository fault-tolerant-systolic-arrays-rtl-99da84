// ft_pkg: shared constants, types and elaboration-time functions for the
// residue-checked systolic arrays.
//
// A binary systolic array is shadowed by NB residue arrays, each computing the
// same weighted sums modulo one base b_k. Because reduction modulo b_k commutes
// with addition and multiplication, the residue of the binary result must equal
// the residue array's result; the differences (the syndrome) are zero when no
// error occurred and identify an additive error +/-2^i otherwise.
//
// Defaults: 8-bit unsigned X and W, 20-bit results, bases 5, 11 and 19. The
// bases come from the published coverage table for that triple (20 bits for
// single errors under any pair, 20 bits for two consecutive errors); the data
// widths are this design's own choice. The same triple covers two arbitrary
// (simultaneous, same-sign) errors only up to 10 result bits, so the array
// with the any-kind network uses 4-bit data and 10-bit results. Residues are carried in DIG_W = 5 bits,
// enough for any base below 32.
package ft_pkg;

  localparam int unsigned DATA_W = 8;   // width of X and W
  localparam int unsigned RES_W  = 20;  // width of a result (n in the error model)
  localparam int unsigned CHK_W  = 22;  // width of the column/row check sums
  localparam int unsigned DIG_W  = 5;   // width of a residue digit
  localparam int unsigned N_BASES = 3;  // number of residue arrays
  localparam int unsigned AK_DW  = 4;   // X and W of the any-kind array
  localparam int unsigned AK_YW  = 10;  // its results (covered width for 5, 11, 19)

  typedef logic [7:0] base_t;
  // Default bases, index 0 = b1.
  localparam base_t [2:0] BASES3 = {8'd19, 8'd11, 8'd5};
  localparam base_t [1:0] BASES2 = {8'd11, 8'd5};

  // Check-sum structure of the fault-localization processing element.
  typedef enum logic [1:0] {
    CHK_A = 2'd0,  // one extra adder: Y' down the column
    CHK_B = 2'd1,  // two extra adders: Y' down, Y'' right
    CHK_C = 2'd2   // one three-input adder, result sent down and right
  } chk_variant_e;

  // Multiplexer selection of the error correction networks.
  typedef enum logic [1:0] {
    SEL_BIN = 2'd0,  // alpha0: binary result as it is
    SEL_C1  = 2'd1,  // alpha1: binary result + single correction
    SEL_C2  = 2'd2,  // alpha2: binary result + stored + second correction
    SEL_C3  = 2'd3   // alpha3: as alpha2, using the other stored syndrome
  } sel_e;

  // Residue of a signed value v modulo m, in 0..m-1.
  function automatic int unsigned smod(longint v, int unsigned m);
    longint r, mm;
    mm = 64'(m);
    r  = v % mm;
    if (r < 0) r = r + mm;
    return 32'(r);
  endfunction

  // Residue of 2^i modulo m.
  function automatic int unsigned pow2_mod(int unsigned i, int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned k = 0; k < i; k++) r = (2 * r) % m;
    return r;
  endfunction

  // Residue of the error sgn*2^i modulo m (sgn = 0: +2^i, sgn = 1: -2^i).
  function automatic int unsigned err_mod(int unsigned i, bit sgn, int unsigned m);
    int unsigned p;
    p = pow2_mod(i, m);
    return (sgn && p != 0) ? m - p : p;
  endfunction

endpackage
