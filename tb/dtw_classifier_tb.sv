// dtw_classifier_tb - DTW classification against a full-table DTW model.
//
// Small configuration: 3-element vectors of 8 bits, up to 6 vectors per
// sequence, 4 prototype slots of which the last stays empty.  Each trial
// loads random prototypes, sends a query (a time-warped, noisy copy of one
// prototype, or random vectors, sometimes longer than 6 vectors), and
// compares the reported command, cost and overflow flag with a model that
// fills the whole DTW table and normalises by M+L.  A classify with no
// prototypes, or with an empty query, must report nothing found.
module dtw_classifier_tb;
  localparam int DIM = 3, EW = 8, MS = 6, NC = 4;
  localparam int ELW = $clog2(DIM), SW = $clog2(MS + 1), CW = $clog2(NC);
  localparam int COST_W = EW + ELW + $clog2(2 * MS) + 1;

  logic clk = 0, rst = 1;
  logic q_valid = 0, q_ready, q_last = 0, q_overflow;
  logic [EW-1:0] q_data = '0;
  logic t_we = 0, t_len_we = 0;
  logic [CW-1:0] t_cmd = '0;
  logic [SW-1:0] t_vec = '0, t_len = '0;
  logic [ELW-1:0] t_elem = '0;
  logic [EW-1:0] t_data = '0;
  logic classify = 0, busy, r_valid, r_found;
  logic [CW-1:0] r_cmd;
  logic [COST_W-1:0] r_cost;

  int checks = 0, failures = 0;
  int tmpl [NC][MS][DIM];
  int tlen [NC];
  int qv [12][DIM];
  int qlen;

  dtw_classifier #(.DIM(DIM), .ELEM_W(EW), .MAX_SEQ(MS), .NUM_CMD(NC)) dut (
    .clk, .rst, .q_valid, .q_ready, .q_data, .q_last, .q_overflow,
    .t_we, .t_cmd, .t_vec, .t_elem, .t_data, .t_len_we, .t_len,
    .classify, .busy, .r_valid, .r_found, .r_cmd, .r_cost);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dtw_cost(int c, int m);
    longint D [MS][MS];
    for (int i = 0; i < m; i++)
      for (int j = 0; j < tlen[c]; j++) begin
        longint d = 0, best;
        for (int e = 0; e < DIM; e++) d += (qv[i][e] > tmpl[c][j][e]) ? qv[i][e] - tmpl[c][j][e]
                                                                      : tmpl[c][j][e] - qv[i][e];
        if (i == 0 && j == 0) best = 0;
        else begin
          best = 64'h3fffffffffffffff;
          if (i > 0 && D[i-1][j] < best) best = D[i-1][j];
          if (j > 0 && D[i][j-1] < best) best = D[i][j-1];
          if (i > 0 && j > 0 && D[i-1][j-1] < best) best = D[i-1][j-1];
        end
        D[i][j] = d + best;
      end
    return D[m-1][tlen[c]-1];
  endfunction

  task automatic load_templates();
    for (int c = 0; c < NC; c++) begin
      tlen[c] = (c == NC - 1) ? 0 : $urandom_range(2, MS);
      for (int j = 0; j < MS; j++)
        for (int e = 0; e < DIM; e++) begin
          tmpl[c][j][e] = $urandom_range(0, 255);
          @(negedge clk);
          t_we = 1; t_cmd = CW'(c); t_vec = SW'(j); t_elem = ELW'(e); t_data = EW'(tmpl[c][j][e]);
        end
      @(negedge clk);
      t_we = 0; t_len_we = 1; t_len = SW'(tlen[c]);
      @(negedge clk);
      t_len_we = 0;
    end
  endtask

  task automatic send_query();
    for (int i = 0; i < qlen; i++)
      for (int e = 0; e < DIM; e++) begin
        @(negedge clk);
        q_valid = 1; q_data = EW'(qv[i][e]); q_last = (e == DIM - 1);
        while (!q_ready) @(negedge clk);
      end
    @(negedge clk);
    q_valid = 0; q_last = 0;
  endtask

  task automatic run_classify(output bit found, output int cmd, output longint cost);
    @(negedge clk) classify = 1;
    @(negedge clk) classify = 0;
    while (!r_valid) @(negedge clk);
    found = r_found; cmd = r_cmd; cost = longint'(r_cost);
  endtask

  initial begin
    bit found;
    int cmd, m;
    longint cost;
    repeat (3) @(posedge clk);
    rst <= 0;
    // Empty query: answered with nothing found.
    run_classify(found, cmd, cost);
    checks++;
    if (found) begin failures++; $display("found a command for an empty query"); end
    // No prototypes loaded yet.
    qlen = 2;
    for (int i = 0; i < qlen; i++) for (int e = 0; e < DIM; e++) qv[i][e] = 7;
    for (int c = 0; c < NC; c++) tlen[c] = 0;
    send_query();
    run_classify(found, cmd, cost);
    checks++;
    if (found) begin failures++; $display("found a command with no prototypes"); end

    for (int trial = 0; trial < 40; trial++) begin
      int src, best_c;
      longint best_cost, best_norm;
      bit ovf_exp;
      load_templates();
      src = $urandom_range(0, NC - 2);
      qlen = (trial % 8 == 7) ? $urandom_range(7, 12) : $urandom_range(1, MS);
      for (int i = 0; i < qlen; i++) begin
        int j;
        j = (i * tlen[src]) / qlen;
        for (int e = 0; e < DIM; e++) begin
          int v;
          v = (trial % 5 == 4) ? $urandom_range(0, 255) : tmpl[src][j][e] + $urandom_range(0, 10) - 5;
          qv[i][e] = (v < 0) ? 0 : (v > 255) ? 255 : v;
        end
      end
      send_query();
      ovf_exp = (qlen > MS);
      checks++;
      if (q_overflow != ovf_exp) begin failures++; $display("trial %0d: overflow %0b", trial, q_overflow); end
      m = (qlen > MS) ? MS : qlen;
      best_c = -1; best_cost = 0; best_norm = 1;
      for (int c = 0; c < NC; c++) if (tlen[c] != 0) begin
        longint cc;
        cc = dtw_cost(c, m);
        if (best_c < 0 || cc * best_norm < best_cost * (m + tlen[c])) begin
          best_c = c; best_cost = cc; best_norm = m + tlen[c];
        end
      end
      run_classify(found, cmd, cost);
      checks++;
      if (!found || cmd != best_c || cost != best_cost) begin
        failures++;
        $display("trial %0d: cmd %0d cost %0d, expected %0d cost %0d", trial, cmd, cost, best_c, best_cost);
      end
      checks++;
      if (q_overflow) begin failures++; $display("overflow flag not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
