// bin_energy - energy of each frequency bin, |X(k)|^2 = Re^2 + Im^2.
//
// The segmentation works on a vector of per-frequency energy values taken
// from the spectrum.  This stage squares and adds the two parts of each
// coefficient in one registered step and forwards the bin index and the
// end-of-vector mark with it.  Using the squared magnitude (no square root)
// is this design's choice; the text only says "energy values".
//
// Interface and timing: a valid/ready stream in, the same stream out one
// register later (a one-entry pipeline that accepts a new bin whenever the
// output is empty or being taken).  e_data is unsigned, 2*COEF_W bits.
module bin_energy #(
  parameter int unsigned N      = cr_pkg::N_DFT,
  parameter int unsigned COEF_W = cr_pkg::COEF_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     i_valid,
  output logic                     i_ready,
  input  logic [$clog2(N)-1:0]     i_k,
  input  logic signed [COEF_W-1:0] i_re,
  input  logic signed [COEF_W-1:0] i_im,
  input  logic                     i_last,
  output logic                     e_valid,
  input  logic                     e_ready,
  output logic [$clog2(N)-1:0]     e_k,
  output logic [2*COEF_W-1:0]      e_data,
  output logic                     e_last
);

  localparam int unsigned EW = 2 * COEF_W;

  logic signed [EW-1:0] re_x, im_x;
  logic [EW-1:0]        re_sq, im_sq;

  assign re_x    = EW'(i_re);
  assign im_x    = EW'(i_im);
  assign re_sq   = re_x * re_x;
  assign im_sq   = im_x * im_x;
  assign i_ready = !e_valid || e_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      e_valid <= 1'b0;
      e_k     <= '0;
      e_data  <= '0;
      e_last  <= 1'b0;
    end else if (i_ready) begin
      e_valid <= i_valid;
      if (i_valid) begin
        e_k    <= i_k;
        e_data <= re_sq + im_sq;
        e_last <= i_last;
      end
    end
  end

endmodule
