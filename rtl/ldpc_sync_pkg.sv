// ldpc_sync_pkg: constants and types shared by the pilotless LDPC frame synchronizer.
//
// The synchronizer checks the parity constraints of a quasi-cyclic LDPC code on a sliding
// window of hard-decision bits. The code used throughout is the rate-1/2, length-1944
// quasi-cyclic code of IEEE 802.11n: a 12 x 24 base matrix whose entries are circulant
// shifts of an 81 x 81 identity (-1 marks an all-zero block). Expanded, it gives
// 972 constraints, 810 of degree 7 and 162 of degree 8, and the circulant size 81.
// The code choice, the circulant size and the degree counts follow the source design; the
// shift values themselves are those of the 802.11n standard, which the source only cites.
//
// Constraint c = br*Z + k (base row br, row k inside the circulant) checks variable
// bc*Z + ((k + BASE[br][bc]) mod Z) for every base column bc with BASE[br][bc] >= 0.
// The circulant size Z is a parameter of the modules, so that tests can run the same
// matrix structure on a smaller code (shifts are then taken modulo Z).
package ldpc_sync_pkg;

  localparam int unsigned MB = 12;        // base-matrix rows (constraint groups)
  localparam int unsigned NB = 24;        // base-matrix columns (variable groups)
  localparam int unsigned Z_DEFAULT = 81; // circulant size of the 1944-bit code

  typedef int base_row_t [NB];

  localparam base_row_t BASE [MB] = '{
    '{57, -1, -1, -1, 50, -1, 11, -1, 50, -1, 79, -1,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 3, -1, 28, -1,  0, -1, -1, -1, 55,  7, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{30, -1, -1, -1, 24, 37, -1, -1, 56, 14, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{62, 53, -1, -1, 53, -1, -1,  3, 35, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{40, -1, -1, 20, 66, -1, -1, 22, 28, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{ 0, -1, -1, -1,  8, -1, 42, -1, 50, -1, -1,  8, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{69, 79, 79, -1, -1, -1, 56, -1, 52, -1, -1, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{65, -1, -1, -1, 38, 57, -1, -1, 72, -1, 27, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{64, -1, -1, -1, 14, 52, -1, -1, 30, -1, -1, 32, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, 45, -1, 70,  0, -1, -1, -1, 77,  9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{ 2, 56, -1, 57, 35, -1, -1, -1, -1, -1, 12, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{24, -1, 61, -1, 60, -1, -1, 27, 51, -1, -1, 16,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Index of the variable that constraint (br, k) reads in base column bc (BASE[br][bc] >= 0).
  function automatic int unsigned var_index(int unsigned br, int unsigned k, int unsigned bc,
                                            int unsigned z);
    return bc * z + ((k + int'(BASE[br][bc])) % z);
  endfunction

  // Width of a count of up to n events.
  function automatic int unsigned count_width(int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

  // Decision rule of the synchronizer.
  typedef enum logic [1:0] {
    METHOD_MAXIMUM   = 2'd0,  // offset with the fewest unsatisfied constraints over M frames
    METHOD_THRESHOLD = 2'd1,  // first offset whose unsatisfied count is at or below a bound
    METHOD_LIST      = 2'd2   // keep the GAMMA best offsets, then re-examine only those
  } sync_method_e;

endpackage
