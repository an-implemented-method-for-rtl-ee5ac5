// systolic_pkg: types, constants and index helpers shared by the band
// matrix multiplication arrays.
//
// Every array in this design computes C = A * B for n x n band matrices with
// the inner product step c(i,j) := c(i,j) + a(i,k) * b(k,j). Matrix elements
// travel between processors as tokens: a value plus a valid bit. A processor
// whose a and b inputs both carry a valid token executes an inner product
// step; otherwise it only forwards what it received. Band widths follow the
// usual convention: p is the largest distance of a potentially non-zero
// element above the diagonal, q the largest below it.
//
// The element widths are this design's own choice (the method leaves them
// open): 16-bit signed a and b elements, and a c accumulator wide enough for
// the sum of up to four full-scale products without overflow.
package systolic_pkg;

  localparam int DATA_W = 16;              // width of a and b elements
  localparam int ACC_W  = 2 * DATA_W + 2;  // width of c elements
  localparam int STEP_W = 16;              // width of the signed step counter

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [STEP_W-1:0] step_t;

  // A token on an a or b channel.
  typedef struct packed {
    logic  v;
    data_t d;
  } dtok_t;

  // A token on a c channel.
  typedef struct packed {
    logic v;
    acc_t d;
  } ctok_t;

  // Sequencer state shared by the three arrays.
  typedef enum logic [1:0] {
    ST_IDLE,  // nothing loaded yet
    ST_RUN,   // one systolic step per clock cycle
    ST_DONE   // result matrix valid
  } run_state_e;

  // Product of two elements, sign-extended to the accumulator width.
  function automatic acc_t ip_mul(data_t x, data_t y);
    return acc_t'(x) * acc_t'(y);
  endfunction

  // True when (r, c) is a position of an n x n matrix inside the band
  // with upper width p and lower width q.
  function automatic logic in_band(int r, int c, int p, int q, int n);
    return (r >= 0) && (r < n) && (c >= 0) && (c < n) &&
           ((c - r) <= p) && ((r - c) <= q);
  endfunction

  function automatic int imax(int x, int y);
    return (x > y) ? x : y;
  endfunction

  function automatic int imin(int x, int y);
    return (x < y) ? x : y;
  endfunction

endpackage
