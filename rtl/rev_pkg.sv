// Shared constants of the testable sequential circuits.
// Every testable circuit has two control lines C1 and C2. In normal operation
// C1 = 1 and C2 = 0, which makes the fan-out gates copy and complement the
// stored bit. For the two-vector test every input, C1 and C2 included, is
// driven to 0 (then every output must be 0) or to 1 (then every output must
// be 1); any unidirectional stuck-at fault shows as an output that breaks the
// pattern. The encoding {C1, C2} of the three modes is this design's choice.
package rev_pkg;
  typedef enum logic [1:0] {
    MODE_TEST_ZEROS = 2'b00,  // all-0 test vector
    MODE_NORMAL     = 2'b10,  // C1 = 1, C2 = 0
    MODE_TEST_ONES  = 2'b11   // all-1 test vector
  } test_mode_e;
endpackage
