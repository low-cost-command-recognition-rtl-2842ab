// dft_index_counter - sample/frequency counters of the direct DFT.
//
// Two N-state counters step through every (n, k) pair of the N-point DFT.
// k is the inner counter: it advances on every enabled clock, and n advances
// when k wraps, so one sample is combined with all N frequencies in N clocks.
// The table address is the product n*k reduced mod N, which indexes
// cos/sin(2*pi*n*k/N) in an N-entry table.  The n and k counters, the count
// enable, the mod-128 multiplier and the EOC output are those of the DFT
// block diagram; the counting order and the reset behaviour are choices of
// this design.
//
// Interface: ce advances the counters; rst (synchronous, active high) clears
// them.  eoc is high while n = k = N-1, i.e. during the last step; the
// counters wrap to zero after it.
module dft_index_counter #(
  parameter int unsigned N = cr_pkg::N_DFT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  output logic [$clog2(N)-1:0] n,
  output logic [$clog2(N)-1:0] k,
  output logic [$clog2(N)-1:0] addr,
  output logic                 last_k,
  output logic                 eoc
);

  localparam int unsigned AW = $clog2(N);
  localparam logic [AW-1:0] LAST = AW'(N - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      n <= '0;
      k <= '0;
    end else if (ce) begin
      if (k == LAST) begin
        k <= '0;
        n <= (n == LAST) ? '0 : n + 1'b1;
      end else begin
        k <= k + 1'b1;
      end
    end
  end

  // N is a power of two, so "mod N" keeps the low AW bits of the product.
  assign addr   = n * k;
  assign last_k = (k == LAST);
  assign eoc    = (k == LAST) && (n == LAST);

  initial assert ((1 << AW) == N) else $error("N must be a power of two");

endmodule
