// dtw_classifier - picks the stored command closest to the spoken one by
// dynamic time warping.
//
// A spoken command arrives as a sequence of segment vectors (DIM elements
// each).  For every stored prototype sequence the classifier fills the DTW
// cost table
//     D(i,j) = d(i,j) + min( D(i-1,j), D(i,j-1), D(i-1,j-1) ),  D(0,0) = d(0,0)
// where d(i,j) is the local distance between query vector i and prototype
// vector j, keeping only two rows of the table.  The total D(M-1,L-1) is
// divided by the path-length bound M+L so that prototypes of different
// lengths compete fairly; the comparison is done by cross-multiplication, so
// no divider is needed.  The command with the lowest normalised cost is
// reported.  The work grows with M*L per prototype, the O(M^2) of DTW.
//
// Taken from the description: DTW as the classifier, a similarity measure
// between sequences that may vary in time or speed, and the choice of the
// most suitable command from a set of prototype patterns; NUM_CMD = 20 is the
// size of the command set used in the evaluation.  Choices of this design:
// the local distance is the sum of absolute element differences (L1), the
// step pattern is the symmetric one above, the cost is normalised by M+L,
// at most MAX_SEQ vectors per sequence are kept (later query vectors are
// dropped and flagged), and the prototypes are written by the host through
// a load port.  Each table cell takes DIM clocks plus one.
//
// Interface and timing:
//   q_valid/q_ready/q_data/q_last  query elements, q_last on element DIM-1;
//                      accepted while idle.
//   t_we/t_cmd/t_vec/t_elem/t_data  write one prototype element (idle only).
//   t_len_we/t_len     set the number of vectors of prototype t_cmd
//                      (0 = unused slot).
//   classify           start.
//   r_valid            one-clock pulse with r_cmd, r_cost (raw D(M-1,L-1)),
//                      r_found (0 if no prototype was loaded or the query
//                      is empty).  The query
//                      buffer is then emptied.
module dtw_classifier #(
  parameter int unsigned DIM     = cr_pkg::N_DFT + 1,
  parameter int unsigned ELEM_W  = 2 * cr_pkg::COEF_W,
  parameter int unsigned MAX_SEQ = 32,
  parameter int unsigned NUM_CMD = 20,
  localparam int unsigned EW     = $clog2(DIM),
  localparam int unsigned SW     = $clog2(MAX_SEQ + 1),
  localparam int unsigned CW     = $clog2(NUM_CMD),
  localparam int unsigned COST_W = ELEM_W + EW + $clog2(2 * MAX_SEQ) + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              q_valid,
  output logic              q_ready,
  input  logic [ELEM_W-1:0] q_data,
  input  logic              q_last,
  output logic              q_overflow,
  input  logic              t_we,
  input  logic [CW-1:0]     t_cmd,
  input  logic [SW-1:0]     t_vec,
  input  logic [EW-1:0]     t_elem,
  input  logic [ELEM_W-1:0] t_data,
  input  logic              t_len_we,
  input  logic [SW-1:0]     t_len,
  input  logic              classify,
  output logic              busy,
  output logic              r_valid,
  output logic              r_found,
  output logic [CW-1:0]     r_cmd,
  output logic [COST_W-1:0] r_cost
);

  localparam int unsigned QDEPTH = MAX_SEQ * DIM;
  localparam int unsigned TDEPTH = NUM_CMD * MAX_SEQ * DIM;
  localparam int unsigned QAW    = $clog2(QDEPTH);
  localparam int unsigned TAW    = $clog2(TDEPTH);
  localparam int unsigned RW     = $clog2(MAX_SEQ);
  localparam int unsigned NW     = SW + 1;                  // width of M+L
  localparam logic [COST_W-1:0] INF = '1;

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_DIST, S_CELL, S_NEXT, S_DONE} state_t;
  state_t state;

  logic [ELEM_W-1:0] q_mem [QDEPTH];
  logic [ELEM_W-1:0] t_mem [TDEPTH];
  logic [SW-1:0]     t_len_mem [NUM_CMD];
  logic [COST_W-1:0] row [2][MAX_SEQ];

  logic [SW-1:0]     q_len, q_vec;
  logic [EW-1:0]     q_elem;
  logic [CW-1:0]     cmd;
  logic [SW-1:0]     cur_len;
  logic [RW-1:0]     i, j;
  logic              rsel;                 // row[rsel] is row i
  logic [EW-1:0]     e;
  logic [COST_W-1:0] local_d;
  logic              best_ok;
  logic [CW-1:0]     best_cmd;
  logic [COST_W-1:0] best_cost;
  logic [NW-1:0]     best_norm;

  logic [ELEM_W-1:0] qa, ta, absdiff;
  logic [COST_W-1:0] up, left, diag, m, d_ij;
  logic [NW-1:0]     norm;
  logic              better;

  assign q_ready = (state == S_IDLE);
  assign busy    = (state != S_IDLE);

  // Operand fetch for the local distance and its absolute difference.
  assign qa      = q_mem[QAW'(i) * QAW'(DIM) + QAW'(e)];
  assign ta      = t_mem[(TAW'(cmd) * TAW'(MAX_SEQ) + TAW'(j)) * TAW'(DIM) + TAW'(e)];
  assign absdiff = (qa > ta) ? qa - ta : ta - qa;

  // Neighbouring cells of D(i,j): up = D(i-1,j), left = D(i,j-1), diag = D(i-1,j-1).
  always_comb begin
    up   = (i != '0)              ? row[!rsel][j]       : INF;
    left = (j != '0)              ? row[rsel][j - 1'b1] : INF;
    diag = (i != '0 && j != '0)   ? row[!rsel][j - 1'b1] : INF;
    m    = (up < left) ? up : left;
    m    = (diag < m) ? diag : m;
    d_ij = (i == '0 && j == '0) ? local_d : local_d + m;
  end

  // d_ij/(M+L) < best_cost/best_norm, compared without division.
  assign norm   = NW'(q_len) + NW'(cur_len);
  assign better = !best_ok ||
                  ((COST_W + NW)'(d_ij) * (COST_W + NW)'(best_norm) <
                   (COST_W + NW)'(best_cost) * (COST_W + NW)'(norm));

  always_ff @(posedge clk) begin
    if (t_we && state == S_IDLE)
      t_mem[(TAW'(t_cmd) * TAW'(MAX_SEQ) + TAW'(t_vec)) * TAW'(DIM) + TAW'(t_elem)] <= t_data;
    if (q_valid && q_ready && q_len < SW'(MAX_SEQ))
      q_mem[QAW'(q_vec) * QAW'(DIM) + QAW'(q_elem)] <= q_data;
    if (state == S_CELL)
      row[rsel][j] <= d_ij;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NUM_CMD; c++) t_len_mem[c] <= '0;
    end else if (t_len_we && state == S_IDLE) begin
      t_len_mem[t_cmd] <= t_len;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      q_len      <= '0;
      q_vec      <= '0;
      q_elem     <= '0;
      q_overflow <= 1'b0;
      cmd        <= '0;
      cur_len    <= '0;
      i          <= '0;
      j          <= '0;
      e          <= '0;
      rsel       <= 1'b0;
      local_d    <= '0;
      best_ok    <= 1'b0;
      best_cmd   <= '0;
      best_cost  <= '0;
      best_norm  <= '0;
      r_valid    <= 1'b0;
      r_found    <= 1'b0;
      r_cmd      <= '0;
      r_cost     <= '0;
    end else begin
      r_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (q_valid) begin
            // Collect query vectors; beyond MAX_SEQ they are dropped.
            if (q_last || q_elem == EW'(DIM - 1)) begin
              q_elem <= '0;
              if (q_len < SW'(MAX_SEQ)) begin
                q_len <= q_len + 1'b1;
                q_vec <= q_vec + 1'b1;
              end else begin
                q_overflow <= 1'b1;
              end
            end else begin
              q_elem <= q_elem + 1'b1;
            end
          end else if (classify) begin
            // An empty query is answered at once with nothing found.
            cmd     <= '0;
            best_ok <= 1'b0;
            state   <= (q_len == '0) ? S_DONE : S_CMD;
          end
        end
        // Start a prototype (or skip an empty slot).
        S_CMD: begin
          cur_len <= t_len_mem[cmd];
          if (t_len_mem[cmd] == '0) begin
            state <= S_NEXT;
          end else begin
            i       <= '0;
            j       <= '0;
            e       <= '0;
            rsel    <= 1'b0;
            local_d <= '0;
            state   <= S_DIST;
          end
        end
        // Local distance d(i,j), one element per clock.
        S_DIST: begin
          local_d <= local_d + COST_W'(absdiff);
          e       <= e + 1'b1;
          if (e == EW'(DIM - 1)) state <= S_CELL;
        end
        // D(i,j) (d_ij) is written to the row store by the block above.
        S_CELL: begin
          e       <= '0;
          local_d <= '0;
          state   <= S_DIST;
          if (SW'(j) == cur_len - 1'b1) begin
            j    <= '0;
            rsel <= !rsel;
            if (SW'(i) == q_len - 1'b1) begin
              if (better) begin
                best_ok   <= 1'b1;
                best_cmd  <= cmd;
                best_cost <= d_ij;
                best_norm <= norm;
              end
              state <= S_NEXT;
            end else begin
              i <= i + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        S_NEXT: begin
          if (cmd == CW'(NUM_CMD - 1)) begin
            state <= S_DONE;
          end else begin
            cmd   <= cmd + 1'b1;
            state <= S_CMD;
          end
        end
        S_DONE: begin
          r_valid    <= 1'b1;
          r_found    <= best_ok;
          r_cmd      <= best_cmd;
          r_cost     <= best_cost;
          q_len      <= '0;
          q_vec      <= '0;
          q_overflow <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
