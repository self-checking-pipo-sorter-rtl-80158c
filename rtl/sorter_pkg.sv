// sorter_pkg -- shared widths and types of the self-checking odd-even
// transposition (PIPO) sorter.
//
// Every stored word is a separable Berger codeword: DATA_W information bits
// followed by CHK_W check bits that hold the binary count of 0s in the
// information bits. With 15 information bits and 4 check bits (the sizes of
// register A and register CSRA of each cell) the code is of maximal length,
// 15 = 2**4 - 1, so the count of 1s is exactly the bitwise complement of the
// count of 0s. The checkers rely on that.
//
// The package sets the default word sizes; modules carry their own
// parameters (defaulting to these constants) so a testbench can shrink them.
// A codeword travels as a flat vector {data, chk}, data in the upper bits.
package sorter_pkg;

  localparam int unsigned DATA_W = 15;  // register A
  localparam int unsigned CHK_W  = 4;   // register CSRA, ceil(log2(DATA_W+1))

  // Two-rail signal pair: 01 or 10 means "no error", 00 or 11 means "error".
  typedef struct packed {
    logic r1;
    logic r0;
  } rail_t;

endpackage
