// fast_adder_pkg -- shared sizes of the expected-time fast adder.
//
// The adder is sized by three numbers:
//   N  operand width in bits,
//   D  Near Adder block size: operands are cut into N/D blocks of D bits and
//      added in overlapping windows of 2*D bits,
//   C  number of bit pairs the Checker samples in each discarded block.
// The analysis behind the design picks D = sqrt(N) and C = log2(N); that rule
// is what the functions below compute. The operand width itself is not fixed
// by the method; 64 bits is this design's choice of default.
package fast_adder_pkg;

  // Integer square root, rounded down.
  function automatic int unsigned isqrt(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  // Ceiling of log2, with log2(1) = 0.
  function automatic int unsigned clog2(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < x) r++;
    return r;
  endfunction

  localparam int unsigned N_DEFAULT = 64;
  localparam int unsigned D_DEFAULT = isqrt(N_DEFAULT);   // 8
  localparam int unsigned C_DEFAULT = clog2(N_DEFAULT);   // 6

endpackage
