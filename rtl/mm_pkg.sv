// Shared types and constants for the linear-array floating-point matrix
// multipliers (Algorithms 1, 2 and 3).
//
// All matrix elements are IEEE-754 double-precision words.  Words that move
// along the PE chain carry a valid bit and small index tags so that each PE
// can tell which matrix element sits in its register; the tags are produced
// by the stream controllers from their loop counters.  Index fields are a
// fixed 16 bits wide, which bounds the problem size to 65535.
package mm_pkg;

  localparam int unsigned FP_W  = 64;   // double precision
  localparam int unsigned IDX_W = 16;   // row/column/step index tags
  localparam int unsigned LANE_W = 4;   // sub-matrix index x (Algorithm 2)

  typedef logic [FP_W-1:0]  fp_t;
  typedef logic [IDX_W-1:0] idx_t;

  // Element of A travelling right: a_{ik} (row i within the A sub-matrix,
  // step k), with flags for the first and the last step of the sum.
  typedef struct packed {
    logic valid;
    logic first;   // k == 0: start a new sum
    logic last;    // k == n-1: this update produces a final C element
    idx_t i;
    idx_t k;
    fp_t  data;
  } a_word_t;

  // Element of B travelling right: b_{kj}.
  typedef struct packed {
    logic valid;
    idx_t k;
    idx_t j;
    fp_t  data;
  } b_word_t;

  // Final element of C travelling left, tagged with its position.  For the
  // r-lane array, x is the A sub-matrix index; the lane it travels on gives
  // the B sub-matrix index y.
  typedef struct packed {
    logic                valid;
    logic [LANE_W-1:0]   x;
    idx_t                i;
    idx_t                j;
    fp_t                 data;
  } c_word_t;

  // Algorithm 3: one transfer slot carries (at most) one element of A and
  // one element of B; both stay W = sqrt(M)/p cycles in every PE.
  typedef struct packed {
    logic valid;
    logic preload;   // first B row of the whole run: stays one cycle per PE
    // A part
    logic a_valid;
    logic a_first;   // first update of this C block element
    logic a_last;    // last update: final value
    logic a_bank;    // which B register bank holds row q
    idx_t a_i;       // row within the block
    idx_t row_base;  // g * sqrt(M)
    idx_t col_base;  // h * sqrt(M)
    fp_t  a;
    // B part
    logic b_valid;
    logic b_bank;
    idx_t b_j;       // column within the block
    fp_t  b;
  } slot_t;

  // Algorithm 3 result word (global position in C).
  typedef struct packed {
    logic valid;
    idx_t row;
    idx_t col;
    fp_t  data;
  } c3_word_t;

endpackage
