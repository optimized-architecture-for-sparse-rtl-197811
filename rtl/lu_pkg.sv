// lu_pkg: types, constants and fixed-point helpers shared by the sparse LU
// decomposition engine.
//
// Number format: matrix values are signed 16-bit fixed point with 8 fraction
// bits (Q8.8), so 1.0 is 256; this matches the 16-bit L and U result words of
// the engine. Input elements are 4-bit unsigned integers. The reciprocal of a
// pivot is kept with 16 fraction bits in a 32-bit signed word so that the
// multipliers L(i,j) = A(i,j) * (1/pivot) lose little precision. All
// arithmetic truncates toward minus infinity (arithmetic shift) and saturates
// to the Q8.8 range; both are choices of this design.
//
// Memory requests of the processing units travel as mem_req_t: one read port
// (data returns one cycle after rd_en) and one write port, both addressed by
// a logical row and a column.
package lu_pkg;

  localparam int unsigned DATA_W       = 16;  // L/U word width
  localparam int unsigned FRAC_W       = 8;   // fraction bits of a matrix word
  localparam int unsigned A_W          = 4;   // input element width
  localparam int unsigned RECIP_W      = 32;  // reciprocal word width
  localparam int unsigned RECIP_FRAC_W = 16;  // fraction bits of the reciprocal
  localparam int unsigned IDX_W        = 8;   // row/column index width (N <= 256)

  typedef logic signed [DATA_W-1:0]  q_t;
  typedef logic signed [RECIP_W-1:0] recip_t;
  typedef logic [IDX_W-1:0]          idx_t;

  localparam q_t Q_ONE = q_t'(1 << FRAC_W);
  localparam q_t Q_MAX = q_t'(16'sh7FFF);
  localparam q_t Q_MIN = q_t'(16'sh8000);

  // Phase of the engine, driven by the loop controller.
  typedef enum logic [2:0] {
    PH_LOAD   = 3'd0,  // receiving the input matrix
    PH_PIVOT  = 3'd1,  // pivot search in column j
    PH_PUPD   = 3'd2,  // row interchange, reciprocal, pivot row fetch
    PH_UPDATE = 3'd3,  // multipliers and row updates below the pivot
    PH_OUTPUT = 3'd4   // streaming L and U out
  } phase_e;

  typedef struct packed {
    logic rd_en;
    idx_t rd_row;   // logical row
    idx_t rd_col;
    logic wr_en;
    idx_t wr_row;   // logical row
    idx_t wr_col;
    q_t   wr_data;
  } mem_req_t;

  localparam mem_req_t MEM_REQ_IDLE = '0;

  // Saturate a wide signed value to Q8.8.
  function automatic q_t sat_q(input logic signed [63:0] v);
    if (v > 64'(signed'(Q_MAX)))      return Q_MAX;
    else if (v < 64'(signed'(Q_MIN))) return Q_MIN;
    else                              return q_t'(v);
  endfunction

  // Multiplier of the elimination step: a * recip, back to Q8.8.
  function automatic q_t mul_recip(input q_t a, input recip_t r);
    logic signed [63:0] p;
    p = 64'(a) * 64'(r);
    return sat_q(p >>> RECIP_FRAC_W);
  endfunction

  // Row update of one element: a - l * u, in Q8.8.
  function automatic q_t mac_sub(input q_t a, input q_t l, input q_t u);
    logic signed [63:0] p;
    p = 64'(l) * 64'(u);
    return sat_q(64'(a) - (p >>> FRAC_W));
  endfunction

  // Magnitude of a Q8.8 word, one bit wider so that -32768 is exact.
  function automatic logic [DATA_W:0] mag_q(input q_t a);
    return a[DATA_W-1] ? (DATA_W+1)'(-(17'(signed'(a)))) : (DATA_W+1)'(a);
  endfunction

endpackage
