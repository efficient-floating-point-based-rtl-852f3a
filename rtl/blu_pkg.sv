// blu_pkg: types shared by the block LU decomposition engine.
//
// Every word that travels through the LU array carries a tag next to its
// floating-point value: the row and column of the element inside its b x b
// block, the slot of the block in the current stack of matrices, the parity
// of the stack (stacks alternate between two storage banks) and the
// operation the block is taking part in. The processing elements decide
// what to do with a word from its tag alone, so control is distributed along
// the array instead of being driven by a central sequencer. The
// matrix-multiply array uses two lanes with tags of their own.
//
// Index fields are 8 bits wide, which bounds the block size and the stack
// size at 256; the row field of the multiply array is 16 bits wide.
package blu_pkg;

  // Operation carried by a block in the LU array.
  typedef enum logic [1:0] {
    OP_ZERO = 2'd0,   // padding (zero) matrix: flows through, nothing stored
    OP_LU   = 2'd1,   // opLU : L11, U11 of the diagonal block
    OP_L    = 2'd2,   // opL  : L21 = A21 * inv(U11)
    OP_U    = 2'd3    // opU  : U12 = inv(L11) * A12
  } lu_op_e;

  typedef struct packed {
    logic       valid;
    lu_op_e     op;
    logic       par;     // stack parity, selects the storage bank
    logic [7:0] slot;    // position of the block in the stack, 0 .. S-1
    logic [7:0] row;     // row inside the block, 0 .. b-1
    logic [7:0] col;     // column inside the block, 0 .. b-1
  } lu_tag_t;

  // Lane B of the matrix-multiply array: U12 rows to preload, or L21 values.
  typedef enum logic [0:0] {
    MB_L = 1'b0,
    MB_U = 1'b1
  } mm_kind_e;

  typedef struct packed {
    logic       valid;
    mm_kind_e   kind;
    logic [7:0] k;       // inner index: L21 column or U12 row
    logic [7:0] j;       // U12 column (preload only)
  } mm_btag_t;

  // Lane A of the matrix-multiply array: one token per output element.
  typedef struct packed {
    logic        valid;
    logic        first;  // first token of an output row: swap L registers
    logic [15:0] row;    // running row number of the sweep
    logic [7:0]  col;    // output column, 0 .. b-1
  } mm_atag_t;

endpackage
