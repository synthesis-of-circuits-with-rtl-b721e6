// bl_pkg: constants, types and elaboration-time helpers shared by the
// Bose-Lin concurrent-error-detection (CED) blocks.
//
// A Bose-Lin code word is an information word followed by R check bits that
// encode the number of ones in the information word modulo 2**R. The check
// bits hold that count bit-wise complemented (as in a Berger code), so that
// a unidirectional error moves the count of the information bits and the
// value encoded by the check bits in opposite directions; with the plain
// count, a 0->1 error on one information bit and one check bit would give a
// code word again. With R = 2
// (the main configuration) the code detects every unidirectional error of up
// to t = 2 bits; R = 3 (modulo 8) gives t = 3. Larger R needs the modified
// counts of the general Bose-Lin construction and is not supported here.
//
// The helpers below run only at elaboration: they build the truth tables of
// the table-defined example logic and the separate check-bit tables that go
// with them. The check-bit tables are computed from the functional tables so
// that the check bits are independent functions of the primary inputs, as a
// CED circuit requires (a check bit derived from the protected outputs would
// copy their errors and hide them).
package bl_pkg;

  // Main configuration: 2 check bits, detecting up to t = 2 unidirectional errors.
  localparam int unsigned BL_R_DEFAULT = 2;

  // Largest truth table the helpers handle (entries x width bits), and the
  // widest table row.
  localparam int unsigned TBL_MAX   = 8192;
  localparam int unsigned ROW_MAX   = 32;

  typedef logic [TBL_MAX-1:0] table_t;

  // Two-rail checker output. A fault-free checker that sees a code word gives
  // one of the two complementary values; 2'b00 and 2'b11 signal an error.
  typedef struct packed {
    logic r1;
    logic r0;
  } rail_t;

  function automatic logic rail_ok(rail_t r);
    return r.r1 ^ r.r0;
  endfunction

  // One step of a 32-bit xorshift generator (used for example tables only).
  function automatic logic [31:0] xorshift32(logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Example truth table: ENTRIES rows of WIDTH bits, row i at bits
  // [i*WIDTH +: WIDTH], filled from a seeded pseudo-random sequence.
  function automatic table_t example_table(int unsigned seed, int unsigned entries,
                                           int unsigned width);
    table_t      t;
    logic [31:0] s;
    t = '0;
    s = 32'h9E37_79B9 ^ seed;
    for (int unsigned i = 0; i < entries; i++) begin
      s = xorshift32(s);
      for (int unsigned b = 0; b < width; b++) t[i*width + b] = s[b];
    end
    return t;
  endfunction

  // Check-bit table for a functional table. Row i holds the complement of
  // the count, modulo 2**r, of the ones in row i of tbl plus the ones in the
  // low count_addr_bits bits of the row index i. count_addr_bits = 0 gives the
  // plain Bose-Lin check bits of the row; a non-zero value folds part of the
  // input (the present state) into the count, as the output check bits of
  // the self-checking sequential machine require.
  function automatic table_t check_table(table_t tbl, int unsigned entries,
                                         int unsigned width, int unsigned r,
                                         int unsigned count_addr_bits);
    table_t      c;
    int unsigned n;
    c = '0;
    for (int unsigned i = 0; i < entries; i++) begin
      n = 0;
      for (int unsigned b = 0; b < width; b++) n += int'(tbl[i*width + b]);
      for (int unsigned b = 0; b < count_addr_bits; b++) n += (i >> b) & 1;
      for (int unsigned b = 0; b < r; b++) c[i*r + b] = ~n[b];
    end
    return c;
  endfunction

  // Check bits of a row-sized word: the complement of its number of ones
  // modulo 2**r, in the r low bits (reset-value helper).
  function automatic logic [ROW_MAX-1:0] check_bits(logic [ROW_MAX-1:0] v, int unsigned r);
    int unsigned n;
    n = 0;
    for (int unsigned b = 0; b < ROW_MAX; b++) n += int'(v[b]);
    return ROW_MAX'(~n & ((1 << r) - 1));
  endfunction

endpackage
