// hpc_pkg: constants, types and small functions shared by the histogram
// peak-climbing clustering processor.
//
// Feature samples are 32-bit two's complement fixed-point numbers with one
// integer bit and 31 fraction bits (range [-1, +1)), as the architecture
// specifies. Histogram bin indexes are 3 bits wide because the number of
// quantisation levels Q is restricted to 3..8. The reciprocal table 1/Q that
// replaces the division of the cell-size step holds six entries; its values
// are floor(2^31 / Q), a rounding choice of this implementation.
package hpc_pkg;

  localparam int unsigned DATA_W = 32;   // feature sample width (1.31)
  localparam int unsigned IDX_W  = 3;    // histogram bin index width per dimension
  localparam int unsigned Q_MIN  = 3;    // smallest supported number of levels
  localparam int unsigned Q_MAX  = 8;    // largest supported number of levels
  localparam int unsigned Q_W    = 4;    // width of the Q input (holds 3..8)

  // The J per-vector processing elements are generated in groups of GROUP
  // elements (rows of the element array); this keeps every generate loop
  // short for elaboration tools and has no effect on the logic.
  localparam int unsigned GROUP  = 256;

  // Processing steps of one frame, in the order the controller runs them.
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,
    PH_MINMAX  = 3'd1,
    PH_CS      = 3'd2,
    PH_INDEX   = 3'd3,
    PH_DENSITY = 3'd4,
    PH_LINK    = 3'd5,
    PH_DONE    = 3'd6
  } phase_e;

  // Reciprocal of Q in 0.31 fixed point: floor(2^31 / Q). Six entries, Q=3..8;
  // any other value of Q is treated as Q_MAX.
  function automatic logic [DATA_W-1:0] q_inverse(input logic [Q_W-1:0] q);
    logic [DATA_W-1:0] r;
    unique case (q)
      4'd3:    r = 32'h2AAA_AAAA;  // 2^31/3
      4'd4:    r = 32'h2000_0000;  // 2^31/4
      4'd5:    r = 32'h1999_9999;  // 2^31/5
      4'd6:    r = 32'h1555_5555;  // 2^31/6
      4'd7:    r = 32'h1249_2492;  // 2^31/7
      default: r = 32'h1000_0000;  // 2^31/8
    endcase
    return r;
  endfunction

  // Q limited to the supported range 3..8.
  function automatic logic [Q_W-1:0] q_clamp(input logic [Q_W-1:0] q);
    if (q < Q_W'(Q_MIN)) return Q_W'(Q_MIN);
    if (q > Q_W'(Q_MAX)) return Q_W'(Q_MAX);
    return q;
  endfunction

  // Neighbour test of two histogram bins given as n 3-bit coordinates packed
  // in the low 3*n bits of `a` and `b` (n <= MAX_DIM): true when every
  // coordinate differs by at most one, so the bins lie within a distance of
  // sqrt(n). A bin is its own neighbour.
  localparam int unsigned MAX_DIM = 64;
  function automatic logic bins_are_neighbors(input logic [MAX_DIM*IDX_W-1:0] a,
                                              input logic [MAX_DIM*IDX_W-1:0] b,
                                              input int unsigned n);
    for (int unsigned k = 0; k < n; k++) begin
      logic [IDX_W-1:0] ak, bk;
      ak = a[IDX_W*k +: IDX_W];
      bk = b[IDX_W*k +: IDX_W];
      if (!((ak == bk) || (ak == bk + 1'b1 && ak != '0) || (bk == ak + 1'b1 && bk != '0)))
        return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
