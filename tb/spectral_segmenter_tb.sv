// spectral_segmenter_tb - segmentation of scripted and random vector streams.
//
// Runs the segmenter with 4-element vectors of 16-bit energies and an 8-bit
// cluster count.  A scripted part (silence, two distinct steady sounds,
// silence) must give exactly two segments with the right averages and
// counts; a random part (steady runs with noise, jumps, silent stretches and
// one run of 300 equal vectors that overflows the count) is compared element
// by element with a model of the segmentation written here.  The output is
// stalled at random.  Boundaries, silence drops and count overflow must
// each occur.
module spectral_segmenter_tb;
  localparam int L    = 4;
  localparam int EW   = 16;
  localparam int CW   = 8;
  localparam int DW   = 2 * EW + 2 + $clog2(L);
  localparam int NW   = EW + $clog2(L);
  localparam int CMAX = (1 << CW) - 1;

  logic clk = 0, rst = 1;
  logic [DW-1:0] contrast_thr = DW'(1000);
  logic [NW-1:0] silence_thr  = NW'(100);
  logic i_valid = 0, i_ready, i_last = 0;
  logic [EW-1:0] i_data = '0;
  logic o_valid, o_ready = 1, o_last, boundary, silence_drop;
  logic [EW-1:0] o_data;
  logic [$clog2(L+1)-1:0] o_idx;

  int checks = 0, failures = 0;
  int expq [$];           // expected output elements
  int n_boundary = 0, n_drop = 0, n_overflow = 0, n_out = 0, n_seg = 0;

  // model state
  longint prev [L], csum [L];
  longint ccount = 0, cenergy = 0;
  bit have_prev = 0;

  spectral_segmenter #(.VEC_LEN(L), .ELEM_W(EW), .CNT_W(CW)) dut (
    .clk, .rst, .contrast_thr, .silence_thr, .i_valid, .i_ready, .i_data, .i_last,
    .o_valid, .o_ready, .o_data, .o_idx, .o_last, .boundary, .silence_drop);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference segmentation of one vector.
  task automatic model(int v [L]);
    longint d2 = 0, e = 0;
    for (int i = 0; i < L; i++) begin
      d2 += longint'(v[i] - prev[i]) * (v[i] - prev[i]);
      e  += v[i];
    end
    if ((!have_prev || d2 < longint'(contrast_thr)) && ccount != CMAX) begin
      for (int i = 0; i < L; i++) csum[i] += v[i];
      ccount++;
      cenergy += e;
    end else begin
      if (ccount == CMAX) n_overflow++;
      if (ccount != 0 && cenergy > longint'(silence_thr) * ccount) begin
        for (int i = 0; i < L; i++) expq.push_back(int'(csum[i] / ccount));
        expq.push_back(int'(ccount));
      end
      for (int i = 0; i < L; i++) csum[i] = v[i];
      ccount = 1;
      cenergy = e;
    end
    have_prev = 1;
    for (int i = 0; i < L; i++) prev[i] = v[i];
  endtask

  task automatic send(int v [L]);
    model(v);
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      i_valid = 1;
      i_data  = EW'(v[i]);
      i_last  = (i == L - 1);
      while (!i_ready) @(negedge clk);
    end
    @(negedge clk);
    i_valid = 0;
    i_last  = 0;
  endtask

  // Output monitor.
  always @(posedge clk) if (!rst) begin
    if (boundary) n_boundary++;
    if (silence_drop) n_drop++;
    if (o_valid && o_ready) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output %0d", o_data);
      end else begin
        int e;
        e = expq.pop_front();
        if (int'(o_data) != e || int'(o_idx) != n_out % (L + 1) ||
            o_last != (n_out % (L + 1) == L)) begin
          failures++;
          if (failures < 10) $display("out %0d: %0d idx %0d, expected %0d", n_out, o_data, o_idx, e);
        end
      end
      n_out++;
      if (o_last) n_seg++;
    end
  end

  always @(negedge clk) o_ready <= ($urandom_range(0, 3) != 0);

  function automatic int noisy(int v);
    int r;
    r = v + $urandom_range(0, 6) - 3;
    return (r < 0) ? 0 : r;
  endfunction

  initial begin
    int v [L];
    for (int i = 0; i < L; i++) begin prev[i] = 0; csum[i] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    // Scripted: silence, sound A, sound B, silence.
    repeat (5) begin v = '{noisy(1), noisy(0), noisy(2), noisy(1)}; send(v); end
    repeat (6) begin v = '{noisy(1000), noisy(200), noisy(50), noisy(10)}; send(v); end
    repeat (4) begin v = '{noisy(10), noisy(900), noisy(800), noisy(5)}; send(v); end
    repeat (5) begin v = '{noisy(1), noisy(0), noisy(2), noisy(1)}; send(v); end
    wait (expq.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (n_seg != 2) begin failures++; $display("scripted part: %0d segments, expected 2", n_seg); end
    // Random part.
    for (int run = 0; run < 40; run++) begin
      int base [L];
      int len;
      for (int i = 0; i < L; i++) base[i] = (run % 5 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 4000);
      len = (run == 20) ? 300 : $urandom_range(1, 12);
      for (int r = 0; r < len; r++) begin
        for (int i = 0; i < L; i++) v[i] = (run == 20) ? base[i] : noisy(base[i]);
        send(v);
      end
    end
    wait (expq.size() == 0);
    repeat (200) @(posedge clk);
    checks += 4;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    if (n_boundary == 0) begin failures++; $display("no segment boundary"); end
    if (n_drop == 0) begin failures++; $display("no silence drop"); end
    if (n_overflow == 0) begin failures++; $display("count never reached its limit"); end
    $display("segments=%0d boundaries=%0d silence_drops=%0d count_limits=%0d",
             n_seg, n_boundary, n_drop, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
