// sort_pkg: types shared by the comparison-free sorter.
//
// The sorter has two stages that alternate forever: a write stage that
// takes N elements in, and a read stage that streams them out in ascending
// order. The control unit's state register uses the enum below. No
// constants live here because every size follows from one module parameter,
// the element width DW (N = K = 2**DW).
package sort_pkg;

  // WRITE: waiting for or taking in elements (also the state after reset).
  // READ:  scanning the Hamming-matrix columns and emitting sorted values.
  typedef enum logic {
    ST_WRITE = 1'b0,
    ST_READ  = 1'b1
  } sort_state_e;

endpackage
