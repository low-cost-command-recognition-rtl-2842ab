// seq_divider - unsigned restoring divider, one quotient bit per clock.
//
// Helper of the spectral segmenter, which divides each cluster sum by the
// number of vectors in the cluster.  start loads the operands; DW clocks
// later done pulses for one clock with quotient = dividend / divisor
// (truncated).  A zero divisor gives an all-ones quotient.  start is ignored
// while busy.
module seq_divider #(
  parameter int unsigned DW = 48,   // dividend and quotient width
  parameter int unsigned VW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient
);

  localparam int unsigned CW = $clog2(DW + 1);

  logic [VW-1:0] rem;   // always below the divisor
  logic [VW-1:0] dvs;
  logic [DW-1:0] q;
  logic [CW-1:0] cnt;
  logic [VW:0]   trial;

  assign trial = {rem, q[DW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      dvs  <= '0;
      q    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rem  <= '0;
          dvs  <= divisor;
          q    <= dividend;
          cnt  <= CW'(DW);
        end
      end else begin
        // Shift the next dividend bit into the remainder and subtract if it fits.
        if (trial >= {1'b0, dvs}) begin
          rem <= VW'(trial - {1'b0, dvs});
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= VW'(trial);
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = q;

endmodule
