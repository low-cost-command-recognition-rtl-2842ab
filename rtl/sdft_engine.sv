// sdft_engine - sliding DFT: refreshes all N coefficients after each sample.
//
// Once the direct DFT has produced X_k for the first N samples, each new
// sample x(n) updates every bin with the sliding-DFT recursion
//     X_k(n) = ( X_k(n-1) + x(n) - x(n-N) ) * e^{+j 2 pi k / N}
// which keeps X_k(n) equal to the N-point DFT of the last N samples.  A
// circular sample buffer of depth N supplies x(n-N); the difference
// x(n) - x(n-N) is added to the real part of the stored coefficient (a), the
// imaginary part (b) passes unchanged, and a complex multiplier forms
// (a + jb)(c + jd) with c = cos(2 pi k/N), d = sin(2 pi k/N):
//     Re = a*c - b*d,   Im = a*d + b*c.
// The result is written back and also streamed out, k = 0..N-1, one bin per
// accepted output beat.
//
// From the sliding-DFT block diagram: the 128-deep x(n-N) FIFO and the
// subtractor, the adder in the real path, the k counter addressing the
// 128 x 16 cos/sin tables, the four-multiplier complex multiplier with its
// a, b, c, d operands, the two 128 x 16 coefficient stores and the
// multiplexer that loads ReX(k)/ImX(k) from the direct DFT.  Choices of this
// design: the printed sign convention of eq. (2) is read as the standard
// recursion above (it matches the diagram's operand labels); coefficients
// are kept scaled by 2^-COEF_SHIFT like the direct DFT, the difference is
// added at full precision before the product is rounded, and results
// saturate; the sample buffer is SAMPLE_W bits wide (the diagram prints 16).
// Fixed-point twiddles do not have magnitude exactly 1, so over very long
// runs the coefficients drift slowly; reloading from the direct DFT resets
// them.
//
// Interface and timing:
//   seed_valid/seed_k/seed_re/seed_im  load a coefficient (the multiplexer
//                          path from the DFT); only while idle.
//   run                    0: accepted samples only fill the sample buffer
//                          (one per clock).  1: each accepted sample starts
//                          an update of all N bins.
//   s_valid/s_ready/s_data sample input; s_ready is low during an update.
//   o_valid/o_ready/o_k/o_re/o_im/o_last  updated bins; one bin is written
//                          back per clock in which o_valid && o_ready, so an
//                          update takes N clocks without back-pressure.
module sdft_engine #(
  parameter int unsigned N        = cr_pkg::N_DFT,
  parameter int unsigned SAMPLE_W = cr_pkg::SAMPLE_W,
  parameter int unsigned TW_W     = cr_pkg::TW_W,
  parameter int unsigned COEF_W   = cr_pkg::COEF_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       seed_valid,
  input  logic [$clog2(N)-1:0]       seed_k,
  input  logic signed [COEF_W-1:0]   seed_re,
  input  logic signed [COEF_W-1:0]   seed_im,
  input  logic                       run,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  output logic                       o_valid,
  input  logic                       o_ready,
  output logic [$clog2(N)-1:0]       o_k,
  output logic signed [COEF_W-1:0]   o_re,
  output logic signed [COEF_W-1:0]   o_im,
  output logic                       o_last
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned SH = cr_pkg::coef_shift(SAMPLE_W, N, COEF_W);

  logic signed [SAMPLE_W-1:0] x_fifo [N];   // FIFO of the last N samples
  logic [AW-1:0]              wp;           // oldest sample = x(n-N)
  logic signed [SAMPLE_W:0]   diff;         // x(n) - x(n-N)
  logic [AW-1:0]              k;            // k COUNTER
  logic                       busy;
  logic signed [COEF_W-1:0]   re_mem [N];
  logic signed [COEF_W-1:0]   im_mem [N];
  logic signed [TW_W-1:0]     c, d;
  logic                       take, step;

  twiddle_rom #(.N(N), .TW_W(TW_W)) u_lut (.addr(k), .cos_o(c), .sin_o(d));

  assign s_ready = !busy;
  assign take    = s_valid && s_ready;
  assign step    = busy && o_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      k    <= '0;
      busy <= 1'b0;
      diff <= '0;
    end else if (take) begin
      x_fifo[wp] <= s_data;
      wp         <= wp + 1'b1;
      if (run) begin
        diff <= (SAMPLE_W+1)'(s_data) - (SAMPLE_W+1)'(x_fifo[wp]);
        k    <= '0;
        busy <= 1'b1;
      end
    end else if (step) begin
      k <= k + 1'b1;
      if (k == AW'(N - 1)) busy <= 1'b0;
    end
  end

  // Complex multiplier.  a and b are carried with SH extra fraction bits so
  // the sample difference is not truncated before the multiply.  Results are
  // rounded (half up), shifted back by TW_W-1+SH and saturated to COEF_W.
  localparam int unsigned OPW = COEF_W + SH + 1;          // a, b
  localparam int unsigned PW  = OPW + TW_W + 1;           // a*c - b*d
  localparam int unsigned RSH = TW_W - 1 + SH;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (RSH - 1);
  localparam logic signed [PW-1:0] HI   = PW'((1 << (COEF_W - 1)) - 1);
  localparam logic signed [PW-1:0] LO   = -PW'(1 << (COEF_W - 1));

  logic signed [OPW-1:0] a, b;
  logic signed [PW-1:0]  re_full, im_full, re_rnd, im_rnd;

  always_comb begin
    a       = (OPW'(re_mem[k]) <<< SH) + OPW'(diff);
    b       =  OPW'(im_mem[k]) <<< SH;
    re_full = PW'(a) * PW'(c) - PW'(b) * PW'(d);
    im_full = PW'(a) * PW'(d) + PW'(b) * PW'(c);
    re_rnd  = (re_full + HALF) >>> RSH;
    im_rnd  = (im_full + HALF) >>> RSH;
    o_re    = (re_rnd > HI) ? HI[COEF_W-1:0] : (re_rnd < LO) ? LO[COEF_W-1:0] : re_rnd[COEF_W-1:0];
    o_im    = (im_rnd > HI) ? HI[COEF_W-1:0] : (im_rnd < LO) ? LO[COEF_W-1:0] : im_rnd[COEF_W-1:0];
  end

  // Coefficient stores with the load multiplexer from the direct DFT.
  always_ff @(posedge clk) begin
    if (step) begin
      re_mem[k] <= o_re;
      im_mem[k] <= o_im;
    end else if (seed_valid) begin
      re_mem[seed_k] <= seed_re;
      im_mem[seed_k] <= seed_im;
    end
  end

  assign o_valid = busy;
  assign o_k     = k;
  assign o_last  = busy && (k == AW'(N - 1));

  a_no_seed_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !seed_valid);

endmodule
