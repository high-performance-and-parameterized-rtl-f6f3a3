// lu_pkg: types and constants shared by the LU-decomposition array.
//
// The array moves every matrix element as a self-describing token: the
// token names what it is (an element of a row of A, of a column of A, a
// finished element of U, a partial column result on its way to PE_0 or an
// element of L), which PE owns it, where it lives in the matrix and where
// its partial sum a'_{x,y} lives in the owner's S1 storage.  PEs only look
// at the tokens that reach them from their neighbours, so the only global
// signals are clock and reset.
//
// The pipeline depths of the floating-point units are those of the 64-bit
// units the design was characterised with: multiplier 8, adder/subtractor
// 11 and divider 58 stages.  The field widths are this design's choice and
// cover matrices of up to 65535 x 65535 and S1 storages of up to 2^24 words.
package lu_pkg;

  localparam int unsigned FP_W   = 64;  // IEEE-754 double precision
  localparam int unsigned LAT_MUL = 8;  // l1
  localparam int unsigned LAT_ADD = 11; // l2
  localparam int unsigned LAT_DIV = 58; // l3

  localparam int unsigned IDX_W  = 16;  // row / column index
  localparam int unsigned PE_W   = 8;   // PE number
  localparam int unsigned SA_W   = 24;  // S1 address

  typedef logic [FP_W-1:0]  fp_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [PE_W-1:0]  pe_id_t;
  typedef logic [SA_W-1:0]  saddr_t;

  typedef enum logic [2:0] {
    T_NONE  = 3'd0, // empty slot
    T_ROW_A = 3'd1, // Stage 1: a_{k,y}, y > k, travels on the U chain
    T_COL_A = 3'd2, // Stage 2: a_{x,k}, x >= k, travels on the U chain
    T_U_OUT = 3'd3, // finished u_{k,y}, travels on the U chain to memory
    T_COL_P = 3'd4, // a'_{x,k} = a_{x,k} - sum, travels on the L ring to PE_0
    T_L     = 3'd5  // Stage 3: l_{x,k}, travels on the L ring from PE_0
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e kind;
    logic      first;  // iteration k = 0: no partial sums exist yet
    logic      last;   // last token of its Stage-2 or Stage-3 stream
    pe_id_t    pe;     // owning PE of column y (T_ROW_A, T_COL_A)
    idx_t      x;      // matrix row
    idx_t      y;      // matrix column (the iteration k for T_L)
    idx_t      c;      // local column number inside the owning PE
    saddr_t    sbase;  // S1 address of local column 0 of row x
    fp_t       data;
  } tok_t;

  localparam tok_t TOK_NONE = '{kind: T_NONE, first: 1'b0, last: 1'b0, pe: '0,
                                x: '0, y: '0, c: '0, sbase: '0, data: '0};

  // Cycles from the issue of the last multiply of Stage 3 in a PE to the
  // write of its sum into S1 (S2 read, multiplier, product register, S1
  // read, adder) plus slack.
  localparam int unsigned PE_MAC_DRAIN = LAT_MUL + LAT_ADD + 6;

endpackage
