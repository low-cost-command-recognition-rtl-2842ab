// dft_engine - direct N-point DFT of the first microsegment.
//
// The engine computes X(k) = sum_n x(n) e^{-j 2 pi k n / N} for the first N
// samples of an utterance, one sample at a time.  A sample is requested
// (DATA_REQ), taken into the input register when it is offered (DATA_READY),
// and then combined with all N frequencies in N clocks: the cos/sin table is
// addressed with (n*k) mod N, the two products are added to the running
// ReX(k)/ImX(k) values, and the sums are written back.  For the first sample
// a multiplexer feeds zero instead of the stored value, which clears the
// stores without a separate pass.  After the last (n = k = N-1) step the
// engine raises READ_SIG for one clock and holds the N coefficients until
// restart.
//
// From the DFT block diagram: the 12-bit input register, the two multipliers,
// the two adders, the zero multiplexers, the 128 x 16 ReX/ImX coefficient
// stores, the n/k counters with the mod-128 address and the
// receive/compute control unit with DATA_READY, DATA_REQ, WR, EOC and
// READ_SIG.  Choices of this design: ImX accumulates -x*sin (the sign of
// eq. (1)); each product is rounded and scaled by 2^-COEF_SHIFT so that a
// full-scale segment fits the 16-bit stores, and the sums saturate; the
// coefficient "FIFOs" are circular buffers whose position is k, written as
// N-entry memories indexed by k (a FIFO that always holds N words and is
// read and written once per k step is exactly that).
//
// Interface and timing:
//   s_valid/s_ready/s_data   DATA_READY / DATA_REQ / x(n).  A sample is taken
//                            on a clock where both are high; the next is
//                            requested N clocks later.
//   read_sig                 one-clock pulse after the last step.
//   done                     high while results are held (until restart).
//   rd_k -> rd_re, rd_im     combinational read of the stores, used by the
//                            result-transfer unit.
//   restart                  in the done state, begins a new transform.
module dft_engine #(
  parameter int unsigned N        = cr_pkg::N_DFT,
  parameter int unsigned SAMPLE_W = cr_pkg::SAMPLE_W,
  parameter int unsigned TW_W     = cr_pkg::TW_W,
  parameter int unsigned COEF_W   = cr_pkg::COEF_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  output logic                       read_sig,
  output logic                       done,
  input  logic                       restart,
  input  logic [$clog2(N)-1:0]       rd_k,
  output logic signed [COEF_W-1:0]   rd_re,
  output logic signed [COEF_W-1:0]   rd_im
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned SH = cr_pkg::coef_shift(SAMPLE_W, N, COEF_W);

  typedef enum logic [1:0] {S_REQ, S_ACC, S_DONE} state_t;
  state_t state;

  logic signed [SAMPLE_W-1:0] x_reg;        // REG
  logic                       wr;           // WR: load REG
  logic                       ce_cnt;       // CE_CNT n,k
  logic [AW-1:0]              n, k, addr;
  logic                       last_k, eoc;
  logic signed [TW_W-1:0]     c, s;
  logic signed [COEF_W-1:0]   re_mem [N];   // FIFO ReX(k)
  logic signed [COEF_W-1:0]   im_mem [N];   // FIFO ImX(k)
  logic signed [COEF_W-1:0]   re_prev, im_prev, re_next, im_next;

  dft_index_counter #(.N(N)) u_cnt (
    .clk, .rst, .ce(ce_cnt), .n, .k, .addr, .last_k, .eoc
  );

  twiddle_rom #(.N(N), .TW_W(TW_W)) u_lut (
    .addr, .cos_o(c), .sin_o(s)
  );

  // Control unit: request a sample, accumulate it over all k, signal the end.
  assign s_ready = (state == S_REQ);
  assign wr      = s_valid && s_ready;
  assign ce_cnt  = (state == S_ACC);
  assign done    = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_REQ;
      read_sig <= 1'b0;
      x_reg    <= '0;
    end else begin
      read_sig <= 1'b0;
      unique case (state)
        S_REQ:  if (wr) begin
                  x_reg <= s_data;
                  state <= S_ACC;
                end
        S_ACC:  if (eoc) begin
                  state    <= S_DONE;
                  read_sig <= 1'b1;
                end else if (last_k) begin
                  state <= S_REQ;
                end
        S_DONE: if (restart) state <= S_REQ;
        default: state <= S_REQ;
      endcase
    end
  end

  // Datapath: zero multiplexer, multiply, add, write back.
  localparam int unsigned PW  = SAMPLE_W + TW_W;
  localparam int unsigned RSH = TW_W - 1 + SH;
  localparam int unsigned SW_ = COEF_W + 2;
  localparam logic signed [PW-1:0]  HALF = PW'(1) <<< (RSH - 1);
  localparam logic signed [SW_-1:0] HI   = SW_'((1 << (COEF_W - 1)) - 1);
  localparam logic signed [SW_-1:0] LO   = -SW_'(1 << (COEF_W - 1));

  logic signed [PW-1:0]  pr_full, pi_full, pr, pi;
  logic signed [SW_-1:0] re_sum, im_sum;

  always_comb begin
    re_prev = (n == '0) ? '0 : re_mem[k];
    im_prev = (n == '0) ? '0 : im_mem[k];
    pr_full = PW'(x_reg) * PW'(c);
    pi_full = PW'(x_reg) * PW'(s);
    pr      = (pr_full + HALF) >>> RSH;     // rounded x*cos / 2^SH
    pi      = (pi_full + HALF) >>> RSH;     // rounded x*sin / 2^SH
    re_sum  = SW_'(re_prev) + SW_'(pr);
    im_sum  = SW_'(im_prev) - SW_'(pi);
    re_next = (re_sum > HI) ? HI[COEF_W-1:0] : (re_sum < LO) ? LO[COEF_W-1:0] : re_sum[COEF_W-1:0];
    im_next = (im_sum > HI) ? HI[COEF_W-1:0] : (im_sum < LO) ? LO[COEF_W-1:0] : im_sum[COEF_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (ce_cnt) begin
      re_mem[k] <= re_next;
      im_mem[k] <= im_next;
    end
  end

  assign rd_re = re_mem[rd_k];
  assign rd_im = im_mem[rd_k];

  // The counters must sit at n = k = 0 whenever a new transform starts.
  property p_start_aligned;
    @(posedge clk) disable iff (rst) (state == S_REQ) |-> (k == '0);
  endproperty
  a_start_aligned: assert property (p_start_aligned);

endmodule
