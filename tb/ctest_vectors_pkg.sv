// ctest_vectors_pkg -- published C-test pattern sets and expected responses.
//
// One table per array, transcribed from the design's test-generation
// results. Each entry is the full pattern applied to the array pins and the
// response a fault-free array must give. A few entries differ from the
// published tables where a published entry contradicts the rest of its own
// row or another table; each is marked where it occurs.
// Used by the block testbenches and the end-to-end testbench.
package ctest_vectors_pkg;

  // Table of the 16 C-test patterns of the 4 x 4 MCPM: a, b, c (MSB first), d (d3..d0), TEST1, TEST2, expected p7..p0.
  typedef struct packed { logic [3:0] a; logic [3:0] b; logic [3:0] c; logic [3:0] d; logic test1; logic test2; logic [7:0] p; } mcpm_vec_t;
  localparam int unsigned MCPM_TESTS_N = 16;
  localparam mcpm_vec_t MCPM_TESTS [16] = '{
    '{4'b0000, 4'b0000, 4'b0000, 4'b0000, 1'b0, 1'b0, 8'b00000000},
    '{4'b0000, 4'b1111, 4'b0000, 4'b0000, 1'b0, 1'b0, 8'b00000000},
    '{4'b1111, 4'b0000, 4'b0000, 4'b0000, 1'b0, 1'b0, 8'b00000000},
    '{4'b1010, 4'b1111, 4'b1010, 4'b1111, 1'b0, 1'b0, 8'b10101111},
    '{4'b0000, 4'b0000, 4'b1111, 4'b0000, 1'b1, 1'b1, 8'b01111111},
    '{4'b0000, 4'b1111, 4'b1111, 4'b0000, 1'b1, 1'b1, 8'b01111111},
    '{4'b1111, 4'b0000, 4'b1111, 4'b0000, 1'b1, 1'b1, 8'b01111111},
    '{4'b1111, 4'b1010, 4'b1111, 4'b0101, 1'b1, 1'b1, 8'b01111010},
    '{4'b1111, 4'b0101, 4'b0000, 4'b1010, 1'b1, 1'b1, 8'b10000101},
    '{4'b1111, 4'b1111, 4'b0000, 4'b1111, 1'b1, 1'b1, 8'b10000000},
    '{4'b0101, 4'b1111, 4'b0101, 4'b0000, 1'b0, 1'b0, 8'b01010000},
    '{4'b1111, 4'b1111, 4'b1111, 4'b1111, 1'b0, 1'b0, 8'b11111111},
    '{4'b0000, 4'b0000, 4'b1010, 4'b1111, 1'b0, 1'b0, 8'b10101111},
    '{4'b0000, 4'b0000, 4'b0101, 4'b1111, 1'b1, 1'b1, 8'b11010000},
    '{4'b0000, 4'b1010, 4'b0000, 4'b1111, 1'b0, 1'b1, 8'b10000101},
    '{4'b0000, 4'b0101, 4'b1111, 4'b1111, 1'b1, 1'b0, 8'b11111010}
  };

  // The 16 C-test patterns of the 4 x 4 MCSM: a, b, c', c, d (MSB first), e, expected p7..p0.
  typedef struct packed { logic [3:0] a; logic [3:0] b; logic [3:0] cp; logic [3:0] c; logic [3:0] d; logic e; logic [7:0] p; } mcsm_vec_t;
  localparam int unsigned MCSM_TESTS_N = 16;
  localparam mcsm_vec_t MCSM_TESTS [16] = '{
    '{4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 1'b0, 8'b00000000},
    '{4'b0000, 4'b1111, 4'b0000, 4'b0000, 4'b0000, 1'b0, 8'b00000000},
    '{4'b1111, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 1'b0, 8'b00000000},
    '{4'b0101, 4'b1111, 4'b1111, 4'b1010, 4'b1010, 1'b1, 8'b01011111},
    '{4'b1111, 4'b1010, 4'b0101, 4'b0000, 4'b1111, 1'b0, 8'b11110101},
    '{4'b1111, 4'b1111, 4'b0000, 4'b0000, 4'b1111, 1'b1, 8'b00000000},
    '{4'b0000, 4'b0000, 4'b1111, 4'b1111, 4'b0000, 1'b0, 8'b11111111},
    '{4'b0000, 4'b1111, 4'b1111, 4'b1111, 4'b0000, 1'b0, 8'b11111111},
    '{4'b1111, 4'b0000, 4'b1111, 4'b1111, 4'b0000, 1'b0, 8'b11111111},
    '{4'b1111, 4'b0101, 4'b1010, 4'b1111, 4'b0000, 1'b1, 8'b00001010},
    '{4'b1010, 4'b1111, 4'b0000, 4'b0101, 4'b0101, 1'b0, 8'b10100000},
    '{4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 1'b1, 8'b11111111},
    '{4'b0000, 4'b0000, 4'b1111, 4'b1010, 4'b1111, 1'b0, 8'b10011111},
    '{4'b0000, 4'b0000, 4'b0000, 4'b0101, 4'b1111, 1'b0, 8'b01000000},
    '{4'b1010, 4'b0000, 4'b1111, 4'b1010, 4'b1111, 1'b0, 8'b10011111},
    '{4'b0101, 4'b0000, 4'b0000, 4'b0101, 4'b1111, 1'b0, 8'b01000000}
  };

  // The 16 C-test patterns of the 5 x 5 MCSM_B: a, b, d, S1..S3, expected p9..p1 (e = a0 & b1, p0 = a0 & b0 are formed by the testbench).
  typedef struct packed { logic [4:0] a; logic [4:0] b; logic [3:0] d; logic s1; logic s2; logic s3; logic [9:1] p; } mcsmb_vec_t;
  localparam int unsigned MCSMB_TESTS_N = 16;
  localparam mcsmb_vec_t MCSMB_TESTS [16] = '{
    '{5'b00000, 5'b00000, 4'b0000, 1'b0, 1'b0, 1'b0, 9'b000000000},
    '{5'b00000, 5'b11110, 4'b0000, 1'b0, 1'b0, 1'b0, 9'b000000000},
    '{5'b01111, 5'b00000, 4'b0000, 1'b0, 1'b0, 1'b0, 9'b000000000},
    '{5'b10101, 5'b11111, 4'b1010, 1'b0, 1'b0, 1'b0, 9'b101011111},
    '{5'b11111, 5'b10101, 4'b1111, 1'b1, 1'b1, 1'b1, 9'b011110101},
  // row 6: response taken from the identical MCSM_C pattern (S4 = 0)
    '{5'b01111, 5'b11110, 4'b1111, 1'b0, 1'b0, 1'b0, 9'b100000000},
    '{5'b10000, 5'b00000, 4'b0000, 1'b1, 1'b1, 1'b1, 9'b011111111},
    '{5'b10000, 5'b11111, 4'b0000, 1'b1, 1'b1, 1'b0, 9'b011111111},
    '{5'b11111, 5'b00000, 4'b0000, 1'b1, 1'b1, 1'b1, 9'b011111111},
    '{5'b11111, 5'b01010, 4'b0000, 1'b1, 1'b1, 1'b1, 9'b100001010},
    '{5'b01010, 5'b11110, 4'b0101, 1'b1, 1'b0, 1'b0, 9'b010100000},
    '{5'b11111, 5'b11111, 4'b1111, 1'b0, 1'b0, 1'b0, 9'b111111111},
    '{5'b10000, 5'b00000, 4'b1111, 1'b0, 1'b1, 1'b1, 9'b110011111},
    '{5'b00000, 5'b00001, 4'b1111, 1'b1, 1'b0, 1'b0, 9'b101000000},
    '{5'b11010, 5'b00000, 4'b1111, 1'b0, 1'b1, 1'b1, 9'b110011111},
    '{5'b10101, 5'b00000, 4'b1111, 1'b1, 1'b0, 1'b0, 9'b101000000}
  };

  // The 16 C-test patterns of the 5 x 5 MCSM_C: a, b, d, S1..S4, expected p9..p0 (e = a0 & b1).
  typedef struct packed { logic [4:0] a; logic [4:0] b; logic [3:0] d; logic s1; logic s2; logic s3; logic s4; logic [9:0] p; } mcsmc_vec_t;
  localparam int unsigned MCSMC_TESTS_N = 16;
  localparam mcsmc_vec_t MCSMC_TESTS [16] = '{
    '{5'b00000, 5'b00000, 4'b0000, 1'b0, 1'b0, 1'b0, 1'b1, 10'b0000000000},
    '{5'b00000, 5'b11111, 4'b0000, 1'b0, 1'b0, 1'b0, 1'b0, 10'b0000000000},
    '{5'b01111, 5'b00000, 4'b0000, 1'b0, 1'b0, 1'b0, 1'b1, 10'b0000000000},
    '{5'b10101, 5'b11111, 4'b1010, 1'b0, 1'b0, 1'b0, 1'b0, 10'b1010111111},
    '{5'b11111, 5'b10101, 4'b1111, 1'b1, 1'b1, 1'b1, 1'b1, 10'b1111101011},
    '{5'b01111, 5'b11110, 4'b1111, 1'b0, 1'b0, 1'b0, 1'b0, 10'b1000000000},
    '{5'b10000, 5'b00000, 4'b0000, 1'b1, 1'b1, 1'b1, 1'b0, 10'b0111111110},
    '{5'b10000, 5'b11111, 4'b0000, 1'b1, 1'b1, 1'b0, 1'b1, 10'b1111111110},
    '{5'b11111, 5'b00000, 4'b0000, 1'b1, 1'b1, 1'b1, 1'b0, 10'b0111111110},
    '{5'b11111, 5'b01010, 4'b0000, 1'b1, 1'b1, 1'b1, 1'b0, 10'b1000010100},
    '{5'b01010, 5'b11110, 4'b0101, 1'b1, 1'b0, 1'b0, 1'b0, 10'b0101000000},
    '{5'b11111, 5'b11111, 4'b1111, 1'b0, 1'b0, 1'b0, 1'b0, 10'b1111111111},
    '{5'b10000, 5'b00000, 4'b1111, 1'b0, 1'b1, 1'b1, 1'b0, 10'b1100111110},
    '{5'b00000, 5'b00000, 4'b1111, 1'b1, 1'b0, 1'b0, 1'b0, 10'b1010000000},
    '{5'b11010, 5'b00000, 4'b1111, 1'b0, 1'b1, 1'b1, 1'b0, 10'b1100111110},
    '{5'b00101, 5'b00000, 4'b1111, 1'b1, 1'b0, 1'b0, 1'b0, 10'b1010000000}
  };

  // The 16 C-test patterns of the 5 x 5 MBWM: a, b, d, S6..S1, expected P9..P0.
  typedef struct packed { logic [4:0] a; logic [4:0] b; logic [3:0] d; logic [5:0] s; logic [9:0] p; } mbwm_vec_t;
  localparam int unsigned MBWM_TESTS_N = 16;
  localparam mbwm_vec_t MBWM_TESTS [16] = '{
    '{5'b00000, 5'b00000, 4'b0000, 6'b001000, 10'b0000000000},
    '{5'b00000, 5'b11110, 4'b0000, 6'b100000, 10'b1100000000},
    '{5'b01111, 5'b00000, 4'b0000, 6'b001000, 10'b0000000000},
    '{5'b10101, 5'b11111, 4'b1010, 6'b100000, 10'b0010101111},
    '{5'b11111, 5'b10101, 4'b1111, 6'b101111, 10'b0000001011},
    '{5'b01111, 5'b11110, 4'b1111, 6'b010000, 10'b0100000000},
    '{5'b10000, 5'b00000, 4'b0000, 6'b010111, 10'b1111111110},
    '{5'b10000, 5'b11111, 4'b0000, 6'b111011, 10'b0011101110},
    '{5'b11111, 5'b00000, 4'b0000, 6'b010111, 10'b1111111110},
    '{5'b11111, 5'b01010, 4'b0000, 6'b110111, 10'b0000000100},
    '{5'b01010, 5'b11110, 4'b0101, 6'b000001, 10'b0001010000},
    '{5'b11111, 5'b11111, 4'b1111, 6'b000000, 10'b0111111111},
    '{5'b10000, 5'b00000, 4'b1111, 6'b000110, 10'b0101001110},
    '{5'b00000, 5'b00001, 4'b1111, 6'b010001, 10'b1010010000},
    '{5'b11010, 5'b00000, 4'b1111, 6'b000110, 10'b0101001110},
  // row 16: a = 00101 as in the MCSM_C table; 10101 contradicts the response
    '{5'b00101, 5'b00000, 4'b1111, 6'b010001, 10'b1010010000}
  };

  // The 20 C-test patterns of the 4 x 4 MNRD: D, n0..n6, d0..d3, Test1, Test2, expected r0..r6, q0..q3.
  typedef struct packed { logic dctl; logic [0:6] n; logic [0:3] d; logic test1; logic test2; logic [0:6] r; logic [0:3] q; } mnrd_vec_t;
  localparam int unsigned MNRD_TESTS_N = 20;
  localparam mnrd_vec_t MNRD_TESTS [20] = '{
    '{1'b0, 7'b0000000, 4'b0000, 1'b0, 1'b0, 7'b0000000, 4'b0000},
    '{1'b0, 7'b1010000, 4'b1010, 1'b1, 1'b1, 7'b0000101, 4'b1111},
    '{1'b0, 7'b0101111, 4'b1010, 1'b0, 1'b1, 7'b1111010, 4'b0101},
    '{1'b0, 7'b0101010, 4'b1010, 1'b1, 1'b0, 7'b0101010, 4'b1010},
    '{1'b0, 7'b1010101, 4'b0101, 1'b0, 1'b1, 7'b1010101, 4'b0101},
    '{1'b0, 7'b1010000, 4'b0101, 1'b1, 1'b0, 7'b0000101, 4'b1010},
  // rows 7, 12, 17: divisor corrected (0000, 0101, 1111) to match the response
    '{1'b0, 7'b0101010, 4'b0000, 1'b0, 1'b0, 7'b0101010, 4'b0000},
    '{1'b0, 7'b1111111, 4'b1111, 1'b1, 1'b1, 7'b1111111, 4'b1111},
    '{1'b0, 7'b1111111, 4'b0000, 1'b0, 1'b0, 7'b1111111, 4'b0000},
    '{1'b0, 7'b0000000, 4'b1111, 1'b1, 1'b1, 7'b0000000, 4'b1111},
    '{1'b1, 7'b0000000, 4'b1111, 1'b1, 1'b1, 7'b0000000, 4'b0000},
    '{1'b1, 7'b1010000, 4'b0101, 1'b0, 1'b0, 7'b0000101, 4'b1111},
    '{1'b1, 7'b0101111, 4'b0101, 1'b1, 1'b0, 7'b1111010, 4'b0101},
    '{1'b1, 7'b0101010, 4'b0101, 1'b0, 1'b1, 7'b0101010, 4'b1010},
    '{1'b1, 7'b1010101, 4'b1010, 1'b1, 1'b0, 7'b1010101, 4'b0101},
    '{1'b1, 7'b1010000, 4'b1010, 1'b0, 1'b1, 7'b0000101, 4'b1010},
    '{1'b1, 7'b0101010, 4'b1111, 1'b1, 1'b1, 7'b0101010, 4'b0000},
    '{1'b1, 7'b1111111, 4'b0000, 1'b0, 1'b0, 7'b1111111, 4'b1111},
    '{1'b1, 7'b0000000, 4'b0000, 1'b0, 1'b0, 7'b0000000, 4'b1111},
    '{1'b1, 7'b1111111, 4'b1111, 1'b1, 1'b1, 7'b1111111, 4'b0000}
  };

  // The 40 C-test patterns of the 4 x 4 MRSD: the row mode D the pattern sets up, n, d, a, z, Test1, Test2, expected r, q, b (index 0 first).
  typedef struct packed { logic dmode; logic [0:6] n; logic [0:3] d; logic [0:6] a; logic [0:3] z; logic test1; logic test2; logic [0:6] r; logic [0:3] q; logic [0:6] b; } mrsd_vec_t;
  localparam int unsigned MRSD_TESTS_N = 40;
  localparam mrsd_vec_t MRSD_TESTS [40] = '{
    '{1'b0, 7'b1111111, 4'b0000, 7'b0000000, 4'b0000, 1'b0, 1'b0, 7'b1111111, 4'b0000, 7'b0000000},
    '{1'b0, 7'b0101111, 4'b1010, 7'b1010000, 4'b1111, 1'b1, 1'b1, 7'b1111010, 4'b1111, 7'b0000101},
    '{1'b0, 7'b1010000, 4'b1010, 7'b0101111, 4'b0101, 1'b0, 1'b1, 7'b0000101, 4'b0101, 7'b1111010},
    '{1'b0, 7'b1010101, 4'b1010, 7'b0101010, 4'b1010, 1'b1, 1'b0, 7'b1010101, 4'b1010, 7'b0101010},
    '{1'b0, 7'b0101010, 4'b0101, 7'b1010101, 4'b0101, 1'b0, 1'b1, 7'b0101010, 4'b0101, 7'b1010101},
    '{1'b0, 7'b0101111, 4'b0101, 7'b1010000, 4'b1010, 1'b1, 1'b0, 7'b1111010, 4'b1010, 7'b0000101},
    '{1'b0, 7'b1010000, 4'b0101, 7'b0101111, 4'b0000, 1'b0, 1'b0, 7'b0000101, 4'b0000, 7'b1111010},
    '{1'b0, 7'b0000000, 4'b1111, 7'b1111111, 4'b1111, 1'b1, 1'b1, 7'b0000000, 4'b1111, 7'b1111111},
    '{1'b0, 7'b0000000, 4'b0000, 7'b1111111, 4'b0000, 1'b0, 1'b0, 7'b0000000, 4'b0000, 7'b1111111},
    '{1'b0, 7'b1111111, 4'b1111, 7'b0000000, 4'b1111, 1'b1, 1'b1, 7'b1111111, 4'b1111, 7'b0000000},
    '{1'b0, 7'b1111111, 4'b0000, 7'b1111111, 4'b0000, 1'b0, 1'b0, 7'b1111111, 4'b0000, 7'b1111111},
    '{1'b0, 7'b0101111, 4'b1010, 7'b0101111, 4'b1111, 1'b1, 1'b1, 7'b1111010, 4'b1111, 7'b1111010},
    '{1'b0, 7'b1010000, 4'b1010, 7'b1010000, 4'b0101, 1'b0, 1'b1, 7'b0000101, 4'b0101, 7'b0000101},
    '{1'b0, 7'b1010101, 4'b1010, 7'b1010101, 4'b1010, 1'b1, 1'b0, 7'b1010101, 4'b1010, 7'b1010101},
    '{1'b0, 7'b0101010, 4'b0101, 7'b0101010, 4'b0101, 1'b0, 1'b1, 7'b0101010, 4'b0101, 7'b0101010},
    '{1'b0, 7'b0101111, 4'b0101, 7'b0101111, 4'b1010, 1'b1, 1'b0, 7'b1111010, 4'b1010, 7'b1111010},
    '{1'b0, 7'b1010000, 4'b0101, 7'b1010000, 4'b0000, 1'b0, 1'b0, 7'b0000101, 4'b0000, 7'b0000101},
    '{1'b0, 7'b0000000, 4'b1111, 7'b0000000, 4'b1111, 1'b1, 1'b1, 7'b0000000, 4'b1111, 7'b0000000},
    '{1'b0, 7'b0000000, 4'b0000, 7'b0000000, 4'b0000, 1'b0, 1'b0, 7'b0000000, 4'b0000, 7'b0000000},
    '{1'b0, 7'b1111111, 4'b1111, 7'b1111111, 4'b1111, 1'b1, 1'b1, 7'b1111111, 4'b1111, 7'b1111111},
    '{1'b1, 7'b1111111, 4'b0000, 7'b0000000, 4'b0000, 1'b1, 1'b1, 7'b1111111, 4'b0000, 7'b0000000},
    '{1'b1, 7'b0101010, 4'b1010, 7'b1010001, 4'b1010, 1'b0, 1'b1, 7'b0101010, 4'b1010, 7'b0010101},
    '{1'b1, 7'b1010101, 4'b1010, 7'b0101101, 4'b0101, 1'b1, 1'b0, 7'b1010101, 4'b0101, 7'b1011010},
    '{1'b1, 7'b0101010, 4'b0101, 7'b1010100, 4'b0000, 1'b1, 1'b1, 7'b0101010, 4'b0000, 7'b1000101},
    '{1'b1, 7'b1010101, 4'b0101, 7'b0101110, 4'b0101, 1'b1, 1'b0, 7'b1010101, 4'b0101, 7'b1101010},
    '{1'b1, 7'b0000000, 4'b1111, 7'b1111111, 4'b1111, 1'b0, 1'b0, 7'b0000000, 4'b1111, 7'b1111111},
    '{1'b1, 7'b0000000, 4'b0000, 7'b0000000, 4'b0000, 1'b1, 1'b1, 7'b0000000, 4'b0000, 7'b0000000},
    '{1'b1, 7'b1111111, 4'b1111, 7'b1111111, 4'b1111, 1'b0, 1'b0, 7'b1111111, 4'b1111, 7'b1111111},
    '{1'b1, 7'b0000000, 4'b0000, 7'b0000101, 4'b1111, 1'b0, 1'b0, 7'b0000000, 4'b1111, 7'b1010000},
    '{1'b1, 7'b1111111, 4'b1111, 7'b0000101, 4'b0000, 1'b1, 1'b1, 7'b1111111, 4'b0000, 7'b1010000},
    '{1'b1, 7'b1111111, 4'b0000, 7'b1111111, 4'b0000, 1'b1, 1'b1, 7'b1111111, 4'b0000, 7'b1111111},
    '{1'b1, 7'b0101010, 4'b1010, 7'b0101110, 4'b1010, 1'b0, 1'b1, 7'b0101010, 4'b1010, 7'b1101010},
    '{1'b1, 7'b1010101, 4'b1010, 7'b1010010, 4'b0101, 1'b1, 1'b0, 7'b1010101, 4'b0101, 7'b0100101},
    '{1'b1, 7'b0101010, 4'b0101, 7'b0101011, 4'b0000, 1'b1, 1'b1, 7'b0101010, 4'b0000, 7'b0111010},
    '{1'b1, 7'b1010101, 4'b0101, 7'b1010001, 4'b0101, 1'b1, 1'b0, 7'b1010101, 4'b0101, 7'b0010101},
    '{1'b1, 7'b0000000, 4'b1111, 7'b0000000, 4'b1111, 1'b0, 1'b0, 7'b0000000, 4'b1111, 7'b0000000},
    '{1'b1, 7'b0000000, 4'b0000, 7'b1111111, 4'b0000, 1'b1, 1'b1, 7'b0000000, 4'b0000, 7'b1111111},
    '{1'b1, 7'b1111111, 4'b1111, 7'b0000000, 4'b1111, 1'b0, 1'b0, 7'b1111111, 4'b1111, 7'b0000000},
    '{1'b1, 7'b0000000, 4'b0000, 7'b1111010, 4'b1111, 1'b0, 1'b0, 7'b0000000, 4'b1111, 7'b0101111},
    '{1'b1, 7'b1111111, 4'b1111, 7'b1111010, 4'b0000, 1'b1, 1'b1, 7'b1111111, 4'b0000, 7'b0101111}
  };

endpackage
