// src_pkg - types and constants shared by the spectral response compactors
// and the BIST test controller.
//
// The compactors analyse each primary-output (PO) bit stream of a circuit
// under test with the 2x2 Hadamard matrix H(1) = [1 1; 1 -1]: the first row
// adds the previous and the current bit of a PO, the second row subtracts
// them. The constants below name the compactors SRC1..SRC5 so the top level
// can index its per-compactor pass/fail flags; the enum is the state of the
// two-run test controller (bist_ctrl).
package src_pkg;

  // Number of compactor variants instantiated side by side in the top level.
  localparam int unsigned NUM_SRC = 5;

  // Index of each compactor in the top level's pass/fail vectors.
  typedef enum int unsigned {
    SRC1 = 0,
    SRC2 = 1,
    SRC3 = 2,
    SRC4 = 3,
    SRC5 = 4
  } src_id_e;

  // Test controller states: init pulse, run of the test set, end-of-run
  // signature check, then the second run or done.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_INIT  = 3'd1,
    ST_RUN   = 3'd2,
    ST_CHECK = 3'd3,
    ST_DONE  = 3'd4
  } bist_state_e;

endpackage
