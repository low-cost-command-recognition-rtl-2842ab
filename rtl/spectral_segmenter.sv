// spectral_segmenter - merges similar spectral vectors into averaged segments.
//
// Each time step of the transform delivers one vector of VEC_LEN bin
// energies.  The segmenter measures the contrast between this vector and the
// previous one as their squared Euclidean distance and the vector's energy
// as the sum of its elements.  Vectors whose contrast stays below the
// contrast threshold join the current cluster (their elements are summed and
// counted).  A vector whose contrast reaches the threshold marks a boundary:
// if the cluster's mean energy is above the silence threshold, the cluster's
// average vector is emitted, extended by one more element holding the number
// of vectors in the cluster (VEC_LEN + 1 elements in all); the cluster is
// then cleared and the boundary vector starts the next one.  A cluster at or
// below the silence threshold is discarded at the boundary instead.
//
// The two criteria (energy threshold for silence, Euclidean contrast of
// adjacent vectors), the grouping of low-contrast vectors, the averaging and
// the extra count element come from the description of the segmentation.
// Choices of this design: distances are compared squared, so contrast_thr
// is the square of the contrast threshold; the silence test uses the mean
// energy of the cluster being closed (cluster energy > silence_thr * count);
// a silent cluster is dropped; the first vector after reset opens a cluster;
// a cluster that reaches the largest count is closed as if at a boundary;
// averages are truncated.
//
// Interface and timing:
//   i_valid/i_ready/i_data/i_last  one element per beat, i_last on element
//                     VEC_LEN-1.  i_ready is low while the segmenter updates
//                     the cluster (VEC_LEN clocks) or emits a segment.
//   o_valid/o_ready/o_data/o_idx/o_last  emitted segment: elements 0..VEC_LEN-1
//                     are the averages (each takes one divide of DW clocks),
//                     element VEC_LEN is the count, with o_last.
//   boundary, silence_drop  one-clock pulses when a boundary emits or drops
//                     a cluster.
module spectral_segmenter #(
  parameter int unsigned VEC_LEN = cr_pkg::N_DFT,
  parameter int unsigned ELEM_W  = 2 * cr_pkg::COEF_W,
  parameter int unsigned CNT_W   = 16,
  localparam int unsigned IW     = $clog2(VEC_LEN + 1),
  localparam int unsigned DIST_W = 2 * ELEM_W + 2 + $clog2(VEC_LEN),
  localparam int unsigned EN_W   = ELEM_W + $clog2(VEC_LEN)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DIST_W-1:0] contrast_thr,
  input  logic [EN_W-1:0]   silence_thr,
  input  logic              i_valid,
  output logic              i_ready,
  input  logic [ELEM_W-1:0] i_data,
  input  logic              i_last,
  output logic              o_valid,
  input  logic              o_ready,
  output logic [ELEM_W-1:0] o_data,
  output logic [IW-1:0]     o_idx,
  output logic              o_last,
  output logic              boundary,
  output logic              silence_drop
);

  localparam int unsigned SUM_W  = ELEM_W + CNT_W;
  localparam int unsigned CEN_W  = EN_W + CNT_W;
  localparam int unsigned D_W    = ELEM_W + 1;
  localparam int unsigned AW     = $clog2(VEC_LEN);

  typedef enum logic [2:0] {S_IN, S_DECIDE, S_ADD, S_LOAD, S_DIV, S_OUT, S_CNT} state_t;
  state_t state;

  logic [ELEM_W-1:0] prev_mem [VEC_LEN];   // previous (then current) vector
  logic [SUM_W-1:0]  sum_mem  [VEC_LEN];   // cluster element sums
  logic [IW-1:0]     idx;
  logic [AW-1:0]     ai;                   // idx as a memory address
  logic [DIST_W-1:0] contrast;
  logic [EN_W-1:0]   energy;
  logic [CEN_W-1:0]  cl_energy;
  logic [CNT_W-1:0]  count;
  logic              have_prev;

  logic signed [D_W-1:0]   d;
  logic signed [2*D_W-1:0] d_sq;
  logic [IW-1:0]           idx_next;
  logic                    idx_end;

  logic                div_start, div_busy, div_done;
  logic [SUM_W-1:0]    quotient;
  logic [ELEM_W-1:0]   avg;

  seq_divider #(.DW(SUM_W), .VW(CNT_W)) u_div (
    .clk, .rst, .start(div_start), .dividend(sum_mem[ai]),
    .divisor(count), .busy(div_busy), .done(div_done), .quotient
  );

  assign d        = D_W'(i_data) - D_W'(prev_mem[ai]);
  assign d_sq     = d * d;
  assign ai       = idx[AW-1:0];
  assign idx_next = idx + 1'b1;
  assign idx_end  = (idx == IW'(VEC_LEN - 1));
  assign i_ready  = (state == S_IN);
  assign div_start = (state == S_DIV) && !div_busy && !div_done;
  // The mean of ELEM_W-bit values fits in ELEM_W bits.
  assign avg      = ELEM_W'(quotient);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IN;
      idx          <= '0;
      contrast         <= '0;
      energy       <= '0;
      cl_energy    <= '0;
      count        <= '0;
      have_prev    <= 1'b0;
      boundary     <= 1'b0;
      silence_drop <= 1'b0;
      o_valid      <= 1'b0;
      o_data       <= '0;
      o_last       <= 1'b0;
    end else begin
      boundary     <= 1'b0;
      silence_drop <= 1'b0;
      unique case (state)
        // Take a vector: contrast to the previous one and its energy.
        S_IN: if (i_valid) begin
          contrast          <= contrast + DIST_W'(unsigned'(d_sq));
          energy        <= energy + EN_W'(i_data);
          prev_mem[ai] <= i_data;
          idx           <= idx_next;
          if (i_last || idx_end) begin
            idx   <= '0;
            state <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          if (count == '0) begin
            state <= S_LOAD;               // empty cluster: the vector opens it
          end else if ((!have_prev || contrast < contrast_thr) && (count != '1)) begin
            state <= S_ADD;
          end else if (count != '0 &&
                       cl_energy > CEN_W'(silence_thr) * CEN_W'(count)) begin
            boundary <= 1'b1;
            state    <= S_DIV;
          end else begin
            silence_drop <= (count != '0);
            state        <= S_LOAD;
          end
          have_prev <= 1'b1;
        end
        // Low contrast: add the vector to the cluster.
        S_ADD: begin
          sum_mem[ai] <= sum_mem[ai] + SUM_W'(prev_mem[ai]);
          idx          <= idx_next;
          if (idx_end) begin
            idx       <= '0;
            count     <= count + 1'b1;
            cl_energy <= cl_energy + CEN_W'(energy);
            contrast      <= '0;
            energy    <= '0;
            state     <= S_IN;
          end
        end
        // Boundary: the vector starts a new cluster.
        S_LOAD: begin
          sum_mem[ai] <= SUM_W'(prev_mem[ai]);
          idx          <= idx_next;
          if (idx_end) begin
            idx       <= '0;
            count     <= CNT_W'(1);
            cl_energy <= CEN_W'(energy);
            contrast      <= '0;
            energy    <= '0;
            state     <= S_IN;
          end
        end
        // Emit the average vector, one divide per element.
        S_DIV: if (div_done) begin
          o_valid <= 1'b1;
          o_data  <= avg;
          o_last  <= 1'b0;
          state   <= S_OUT;
        end
        S_OUT: if (o_ready) begin
          o_valid <= 1'b0;
          idx     <= idx_next;
          if (idx_end) begin
            o_valid <= 1'b1;
            o_data  <= ELEM_W'(count);
            o_last  <= 1'b1;
            state   <= S_CNT;
          end else begin
            state <= S_DIV;
          end
        end
        // Element VEC_LEN: the number of vectors in the cluster.
        S_CNT: if (o_ready) begin
          o_valid <= 1'b0;
          o_last  <= 1'b0;
          idx     <= '0;
          state   <= S_LOAD;
        end
        default: state <= S_IN;
      endcase
    end
  end

  assign o_idx = idx;

  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    o_valid && !o_ready |=> o_valid && $stable(o_data) && $stable(o_idx));

endmodule
