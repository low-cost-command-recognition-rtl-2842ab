// dft_result_transfer - streams the DFT coefficients out of the stores.
//
// The second control unit of the DFT block diagram ("transfer the results of
// DFT computation").  On the READ_SIG pulse it walks k = 0..N-1, one per
// clock, reading ReX(k)/ImX(k) from the DFT engine's stores, and registers
// each word into an output stage, the way a FIFO presents its head word.  The
// diagram gives the unit's purpose and its READ_SIG, CLK and RESET inputs;
// the stream format (valid, index, last, no back-pressure) and the output
// register are this design's choices: the consumer, the sliding-DFT
// coefficient store, takes one word per clock.
//
// Interface and timing: rd_k addresses the engine's stores and rd_re/rd_im
// must return the data in the same clock.  o_valid is high for exactly N
// clocks, starting two clocks after read_sig (one to address, one to
// register); o_last marks k = N-1.  busy is high from the clock after
// read_sig through the last beat.
module dft_result_transfer #(
  parameter int unsigned N      = cr_pkg::N_DFT,
  parameter int unsigned COEF_W = cr_pkg::COEF_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     read_sig,
  output logic [$clog2(N)-1:0]     rd_k,
  input  logic signed [COEF_W-1:0] rd_re,
  input  logic signed [COEF_W-1:0] rd_im,
  output logic                     o_valid,
  output logic [$clog2(N)-1:0]     o_k,
  output logic signed [COEF_W-1:0] o_re,
  output logic signed [COEF_W-1:0] o_im,
  output logic                     o_last,
  output logic                     busy
);

  localparam int unsigned AW = $clog2(N);

  logic [AW-1:0] idx;
  logic          rd_busy;   // addressing the stores

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_busy <= 1'b0;
      idx     <= '0;
    end else if (!rd_busy) begin
      if (read_sig) begin
        rd_busy <= 1'b1;
        idx     <= '0;
      end
    end else begin
      idx <= idx + 1'b1;
      if (idx == AW'(N - 1)) rd_busy <= 1'b0;
    end
  end

  // Output stage: the word read at address idx appears one clock later.
  always_ff @(posedge clk) begin
    if (rst) begin
      o_valid <= 1'b0;
      o_last  <= 1'b0;
    end else begin
      o_valid <= rd_busy;
      o_last  <= rd_busy && (idx == AW'(N - 1));
    end
    o_k  <= idx;
    o_re <= rd_re;
    o_im <= rd_im;
  end

  assign rd_k = idx;
  assign busy = rd_busy || o_valid;

endmodule
