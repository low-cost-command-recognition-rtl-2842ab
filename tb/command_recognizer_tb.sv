// command_recognizer_tb - end-to-end run of the recogniser at full size.
//
// After reset a 600-sample tone mixture runs through the device with no
// prototypes loaded; the classifier must report nothing found.  Then two
// synthetic "words" are built from tones that sit between silences:
// word A is a tone in bin 10 followed by one in bin 30, word B a tone in
// bin 40 followed by one in bin 12.  Each word is spoken once to train: the
// segment vectors the device emits are captured and written back as the
// word's prototype.  Then each word is spoken again with fresh noise and the
// classifier must name the right prototype.  A last utterance with a lower
// contrast threshold produces more segments than the classifier keeps
// and must raise the overflow flag.
//
// Along the way: every 97th spectrum is compared with the exact DFT / 8 of
// the last 128 samples; the sample interval in the sliding phase must be 129
// clocks when nothing downstream stalls; and the test counts how often each
// mechanism occurred (direct DFT, seeding of the sliding DFT, sliding
// updates, downstream back-pressure on the sample input, segment
// boundaries, silence drops, resync, classification, query overflow) and
// fails on any that never happened.
module command_recognizer_tb;
  localparam int N = 128;
  localparam int DIM = N + 1;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready, resync = 0, dft_done, sliding;
  logic signed [11:0] s_data = '0;
  logic spec_valid;
  logic [6:0] spec_k;
  logic signed [15:0] spec_re, spec_im;
  logic [72:0] contrast_thr;
  logic [38:0] silence_thr;
  logic seg_valid, seg_last, seg_boundary, seg_silence_drop;
  logic [31:0] seg_data;
  logic [7:0] seg_idx;
  logic t_we = 0, t_len_we = 0;
  logic [4:0] t_cmd = '0;
  logic [5:0] t_vec = '0, t_len = '0;
  logic [7:0] t_elem = '0;
  logic [31:0] t_data = '0;
  logic classify = 0, cls_busy, q_overflow, r_valid, r_found;
  logic [4:0] r_cmd;
  logic [46:0] r_cost;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_dft = 0, n_seed = 0, n_spectra = 0, n_stall = 0, n_boundary = 0, n_drop = 0;
  int n_resync = 0, n_classify = 0, n_overflow = 0;

  int hist [$];                  // samples since the last resync
  int spec_count = 0;            // spectra since the last resync
  longint seg_vec [64][DIM];
  int n_seg = 0, seg_elem = 0;
  int last_accept = -1;
  bit last_sliding = 0;           // previous sample was taken in the sliding phase
  bit stall_mark = 0;

  command_recognizer dut (
    .clk, .rst, .s_valid, .s_ready, .s_data, .resync, .dft_done, .sliding,
    .spec_valid, .spec_k, .spec_re, .spec_im,
    .contrast_thr, .silence_thr, .seg_valid, .seg_data, .seg_idx, .seg_last,
    .seg_boundary, .seg_silence_drop,
    .t_we, .t_cmd, .t_vec, .t_elem, .t_data, .t_len_we, .t_len,
    .classify, .cls_busy, .q_overflow, .r_valid, .r_found, .r_cmd, .r_cost);

  always #5 clk = ~clk;

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitors
  logic sliding_q = 0, dft_done_q = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      sliding_q  <= sliding;
      dft_done_q <= dft_done;
      if (dft_done && !dft_done_q) n_dft++;
      if (sliding && !sliding_q) n_seed++;
      if (spec_valid && spec_k == 7'(N - 1)) n_spectra++;
      if (seg_boundary) n_boundary++;
      if (seg_silence_drop) n_drop++;
      if (r_valid) n_classify++;
      if (q_overflow && !cls_busy && classify) n_overflow++;
      // A sample waits longer than one update: something downstream stalls.
      if (sliding && last_sliding && s_valid && !s_ready && last_accept >= 0 &&
          cycle - last_accept > N + 1 &&
          !stall_mark) begin
        n_stall++;
        stall_mark = 1;
      end
      if (seg_valid) begin
        if (n_seg < 64) seg_vec[n_seg][seg_elem] = longint'(seg_data);
        seg_elem++;
        if (seg_last) begin
          n_seg++;
          seg_elem = 0;
        end
      end
    end
  end

  // Spot check of the spectrum: bin values against the exact DFT / 8.
  always @(posedge clk) if (!rst && spec_valid) begin
    if (spec_k == 7'(N - 1)) spec_count <= spec_count + 1;
    if (spec_count % 97 == 5 && hist.size() >= N) begin
      real er, ei;
      int last;
      last = hist.size() - 1;
      er = 0.0; ei = 0.0;
      for (int m = 0; m < N; m++) begin
        er += hist[last - N + 1 + m] * $cos(2.0 * PI * spec_k * m / N) / 8.0;
        ei -= hist[last - N + 1 + m] * $sin(2.0 * PI * spec_k * m / N) / 8.0;
      end
      checks++;
      if (spec_re - er > 80 || er - spec_re > 80 || spec_im - ei > 80 || ei - spec_im > 80) begin
        failures++;
        if (failures < 10)
          $display("spectrum %0d bin %0d: %0d,%0d exact %f,%f", spec_count, spec_k, spec_re,
                   spec_im, er, ei);
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  function automatic int tone(int n, int bin, int amp);
    return $rtoi(amp * $sin(2.0 * PI * bin * n / N));
  endfunction

  task automatic send(int v);
    int t0;
    @(negedge clk);
    s_valid = 1;
    s_data  = 12'(v);
    t0 = cycle;
    while (!s_ready) @(negedge clk);
    if (sliding && last_sliding && last_accept >= 0 && !stall_mark) begin
      checks++;
      if (cycle - last_accept != N + 1) begin
        failures++;
        $display("sliding-phase sample interval %0d clocks, expected %0d", cycle - last_accept, N + 1);
      end
    end
    stall_mark   = 0;
    last_accept  = cycle;
    last_sliding = sliding;
    hist.push_back(v);
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic noise_run(int len);
    for (int i = 0; i < len; i++) send($urandom_range(0, 4) - 2);
  endtask

  task automatic word(bit b);
    int f1, f2;
    f1 = b ? 40 : 10;
    f2 = b ? 12 : 30;
    noise_run(300);
    for (int i = 0; i < 500; i++) send(tone(i, f1, 1000) + $urandom_range(0, 4) - 2);
    for (int i = 0; i < 500; i++) send(tone(i, f2, 700) + $urandom_range(0, 4) - 2);
    noise_run(400);
    repeat (20000) @(posedge clk);     // let the last segment drain
  endtask

  task automatic do_resync();
    @(negedge clk) resync = 1;
    @(negedge clk) resync = 0;
    n_resync++;
    hist.delete();
    spec_count = 0;
    last_accept = -1;
  endtask

  task automatic do_classify(output bit found, output int cmd);
    @(negedge clk) classify = 1;
    @(negedge clk) classify = 0;
    while (!r_valid) @(negedge clk);
    found = r_found;
    cmd = r_cmd;
  endtask

  task automatic load_prototype(int c);
    int len;
    len = (n_seg > 32) ? 32 : n_seg;
    for (int j = 0; j < len; j++)
      for (int e = 0; e < DIM; e++) begin
        @(negedge clk);
        t_we = 1; t_cmd = 5'(c); t_vec = 6'(j); t_elem = 8'(e); t_data = 32'(seg_vec[j][e]);
      end
    @(negedge clk);
    t_we = 0; t_len_we = 1; t_cmd = 5'(c); t_len = 6'(len);
    @(negedge clk);
    t_len_we = 0;
  endtask

  initial begin
    bit found;
    int cmd;
    contrast_thr = 73'd8_000_000_000_000;
    silence_thr  = 39'd60_000_000;
    repeat (3) @(posedge clk);
    rst <= 0;

    // Warm-up: a tone mixture from the first sample on, so that the direct
    // DFT result seeds a non-trivial sliding DFT; its spectra are spot-checked.
    for (int i = 0; i < 600; i++) send(tone(i, 5, 800) + tone(i, 21, 600));
    repeat (20000) @(posedge clk);
    do_classify(found, cmd);
    checks++;
    if (found) begin failures++; $display("a command was found before any prototype was loaded"); end

    // Training.
    for (int w = 0; w < 2; w++) begin
      do_resync();
      n_seg = 0;
      word(w[0]);
      $display("training word %0d: %0d segments", w, n_seg);
      checks++;
      if (n_seg == 0) begin failures++; $display("no segments for word %0d", w); end
      do_classify(found, cmd);
      load_prototype(w);
    end

    // Recognition.
    for (int w = 0; w < 2; w++) begin
      do_resync();
      n_seg = 0;
      word(w[0]);
      do_classify(found, cmd);
      $display("word %0d: %0d segments, recognised as %0d (found %0b)", w, n_seg, cmd, found);
      checks++;
      if (!found || cmd != w) begin failures++; $display("word %0d misrecognised", w); end
    end

    // Too many segments for the query buffer.
    do_resync();
    contrast_thr = 73'd1_000_000_000_000;
    n_seg = 0;
    word(1'b0);
    checks++;
    if (!q_overflow) begin failures++; $display("no query overflow with %0d segments", n_seg); end
    do_classify(found, cmd);

    $display("mechanisms: dft=%0d seed=%0d spectra=%0d stalls=%0d boundaries=%0d silence_drops=%0d resync=%0d classify=%0d overflow=%0d",
             n_dft, n_seed, n_spectra, n_stall, n_boundary, n_drop, n_resync, n_classify, n_overflow);
    checks += 9;
    if (n_dft == 0)      begin failures++; $display("direct DFT never ran"); end
    if (n_seed == 0)     begin failures++; $display("sliding DFT never seeded"); end
    if (n_spectra == 0)  begin failures++; $display("no sliding update"); end
    if (n_stall == 0)    begin failures++; $display("no back-pressure stall"); end
    if (n_boundary == 0) begin failures++; $display("no segment boundary"); end
    if (n_drop == 0)     begin failures++; $display("no silence drop"); end
    if (n_resync == 0)   begin failures++; $display("no resync"); end
    if (n_classify == 0) begin failures++; $display("no classification"); end
    if (n_overflow == 0) begin failures++; $display("no query overflow"); end
    $display("finished after %0d clocks", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
