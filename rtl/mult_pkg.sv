// Shared types of the 4x4 pipelined array multiplier.
//
// Both multiplier versions (synchronous and micropipelined) move the same
// bundle of signals down the array: the two operands, the product bits that
// are already final, and the carry-save vector (sum bits, carry bits and one
// ripple carry used by the two carry-propagate rows). One bundle is held by
// every latch bar of the array. The field layout is this design's own choice;
// the array itself follows the published four-bit multiplier floorplan.
package mult_pkg;
  localparam int unsigned N  = 4;        // operand width of the published example
  localparam int unsigned PW = 2 * N;    // product width
  localparam int unsigned NROWS = 5;     // adder rows: 3 carry-save + 2 carry-propagate

  typedef struct packed {
    logic [N-1:0]  a;   // multiplicand, carried down for the partial products
    logic [N-1:0]  b;   // multiplier, carried down for the partial products
    logic [PW-1:0] p;   // product bits that are final (low bits first)
    logic [PW-1:0] s;   // carry-save sum vector, indexed by bit weight
    logic [PW-1:0] c;   // carry-save carry vector, indexed by bit weight
    logic          r;   // ripple carry between the two carry-propagate rows
  } stage_t;

  localparam int unsigned STAGE_W = $bits(stage_t);
endpackage
