// adder_pkg: constants and the slice-to-lookahead bundle shared by the
// Ling / lookahead / conditional-sum 32-bit adder.
//
// The adder is built from N_SLICES identical slices of SLICE_W bits. Each
// slice sends four signals to the lookahead network: H (positive logic),
// and, in negative logic, NP3 (complement of A3 OR B3) and two copies of
// the complemented group propagate, NPA and NPB. NPA is the copy that is
// wire-ORed with the neighbouring slice's NPA to form a two-slice
// propagate; NPB goes to the lookahead on its own. Slice width, slice
// count and the signal set follow the published design.
package adder_pkg;

  parameter int unsigned SLICE_W  = 4;
  parameter int unsigned N_SLICES = 8;
  parameter int unsigned WIDTH    = SLICE_W * N_SLICES;

  // Signals sent from one slice to the lookahead network.
  typedef struct packed {
    logic h;    // Ling pseudo-generate, positive logic
    logic np3;  // ~(A3 | B3), negative logic P3
    logic npa;  // ~(P3 P2 P1 P0), copy used for the two-slice wire-OR
    logic npb;  // ~(P3 P2 P1 P0), copy sent to the lookahead directly
  } slice_la_t;

endpackage
