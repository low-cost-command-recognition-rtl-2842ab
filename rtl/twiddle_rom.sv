// twiddle_rom - cosine and sine look-up table for the DFT and sliding DFT.
//
// Holds N entries of cos(2*pi*i/N) and sin(2*pi*i/N) as signed TW_W-bit
// fixed-point numbers (Q1.15 at the default width: scaled by 32768, rounded
// to nearest, +1.0 clamped to 32767).  The two 128 x 16 tables and their
// 7-bit address come from the DFT block diagrams; the number format and the
// rounding are this design's choice.  The contents are computed at
// elaboration from the formula above, so no data file is needed.
//
// Interface: addr selects the entry; cos_o/sin_o follow combinationally
// (the diagrams show no register at the table outputs).
module twiddle_rom #(
  parameter int unsigned N    = cr_pkg::N_DFT,
  parameter int unsigned TW_W = cr_pkg::TW_W
) (
  input  logic [$clog2(N)-1:0]   addr,
  output logic signed [TW_W-1:0] cos_o,
  output logic signed [TW_W-1:0] sin_o
);

  typedef logic signed [TW_W-1:0] tw_t;

  function automatic tw_t [N-1:0] make_cos();
    tw_t [N-1:0] t;
    for (int unsigned i = 0; i < N; i++) t[i] = tw_t'(cr_pkg::twiddle_cos(i, N, TW_W));
    return t;
  endfunction

  function automatic tw_t [N-1:0] make_sin();
    tw_t [N-1:0] t;
    for (int unsigned i = 0; i < N; i++) t[i] = tw_t'(cr_pkg::twiddle_sin(i, N, TW_W));
    return t;
  endfunction

  localparam tw_t [N-1:0] COS_TAB = make_cos();
  localparam tw_t [N-1:0] SIN_TAB = make_sin();

  assign cos_o = COS_TAB[addr];
  assign sin_o = SIN_TAB[addr];

endmodule
