// Shared constants of the Classic McEliece datapath.
//
// The defaults are those of parameter set mceliece348864 (NIST level 1):
// code length n = 3488, n-k = 768 parity rows, error weight t = 64,
// field degree m = 12 and sigma1 = 16 bits per random index.  The systemizer
// column-block size and the Encode word width default to 32 bits, the
// "32-bit design" configuration.  Every module takes these as parameter
// defaults, so a smaller instance only needs parameter overrides.
package mce_pkg;
  localparam int unsigned MCE_N      = 3488;  // code length n
  localparam int unsigned MCE_NK     = 768;   // n - k = m * t, parity-check rows
  localparam int unsigned MCE_T      = 64;    // error weight t
  localparam int unsigned MCE_M      = 12;    // field degree m
  localparam int unsigned MCE_SIGMA1 = 16;    // bits drawn per candidate index
  localparam int unsigned MCE_S      = 32;    // column-block size s / word width
  // FixedWeight draws 512 random bits beyond sigma1 * t
  localparam int unsigned MCE_EXTRA_BITS = 512;
  localparam int unsigned MCE_NCHUNK = (MCE_SIGMA1 * MCE_T + MCE_EXTRA_BITS) / MCE_SIGMA1;
endpackage
