// command_set_tb - a full 20-command vocabulary through the recogniser.
//
// Exercises the largest configuration the design is sized for: all NUM_CMD
// = 20 prototype slots filled, and every command recognised against all 20.
// Each synthetic command is a pair of tones between stretches of low noise:
// command w uses bin 4+3w for its first tone and bin 60-3w for its second,
// so no two commands share a tone bin.  Each command is spoken once to train
// (the segment vectors the device emits become its prototype) and once more
// to test, this time with fresh noise and tone durations 10 % longer or
// shorter, so the classifier has to warp in time.  The loudness stays the
// same: the contrast threshold is absolute, so a quieter take crosses it
// less often and yields other segments.  Every
// test utterance must be assigned to its own command.  The run also checks
// that every utterance yields at least one segment and fits in the query
// buffer, and reports the number of segments per command.
//
// The design runs with its default parameters.  About 45 million clocks.
module command_set_tb;
  localparam int N = 128;
  localparam int DIM = N + 1;
  localparam int NCMD = 20;
  localparam int MAXV = 32;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready, resync = 0, dft_done, sliding;
  logic signed [11:0] s_data = '0;
  logic spec_valid;
  logic [6:0] spec_k;
  logic signed [15:0] spec_re, spec_im;
  logic [72:0] contrast_thr = 73'd6_500_000_000_000;
  logic [38:0] silence_thr  = 39'd60_000_000;
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

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  logic [31:0] seg_vec [MAXV][DIM];
  int n_seg = 0, seg_elem = 0;

  command_recognizer dut (
    .clk, .rst, .s_valid, .s_ready, .s_data, .resync, .dft_done, .sliding,
    .spec_valid, .spec_k, .spec_re, .spec_im,
    .contrast_thr, .silence_thr, .seg_valid, .seg_data, .seg_idx, .seg_last,
    .seg_boundary, .seg_silence_drop,
    .t_we, .t_cmd, .t_vec, .t_elem, .t_data, .t_len_we, .t_len,
    .classify, .cls_busy, .q_overflow, .r_valid, .r_found, .r_cmd, .r_cost);

  always #5 clk = ~clk;

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Capture the segment vectors of the current utterance.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && seg_valid) begin
      if (n_seg < MAXV) seg_vec[n_seg][seg_elem] = seg_data;
      seg_elem++;
      if (seg_last) begin
        n_seg++;
        seg_elem = 0;
      end
    end
  end

  function automatic int tone(int n, int bin, real amp);
    return $rtoi(amp * $sin(2.0 * PI * bin * n / N));
  endfunction

  task automatic send(int v);
    @(negedge clk);
    s_valid = 1;
    s_data  = 12'(v);
    while (!s_ready) @(negedge clk);
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic noise_run(int len);
    for (int i = 0; i < len; i++) send($urandom_range(0, 4) - 2);
  endtask

  // Command w; the test take stretches the tones by 'stretch' and scales them.
  task automatic utterance(int w, real stretch, real gain);
    int f1, f2, l1, l2;
    f1 = 4 + 3 * w;
    f2 = 60 - 3 * w;
    l1 = $rtoi(500.0 * stretch);
    l2 = $rtoi(450.0 / stretch);
    noise_run(300);
    for (int i = 0; i < l1; i++) send(tone(i, f1, 1000.0 * gain) + $urandom_range(0, 4) - 2);
    for (int i = 0; i < l2; i++) send(tone(i, f2, 700.0 * gain) + $urandom_range(0, 4) - 2);
    noise_run(400);
    repeat (20000) @(posedge clk);     // let the last segment drain
  endtask

  task automatic do_resync();
    @(negedge clk) resync = 1;
    @(negedge clk) resync = 0;
    n_seg = 0;
    seg_elem = 0;
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
    len = (n_seg > MAXV) ? MAXV : n_seg;
    for (int j = 0; j < len; j++)
      for (int e = 0; e < DIM; e++) begin
        @(negedge clk);
        t_we = 1; t_cmd = 5'(c); t_vec = 6'(j); t_elem = 8'(e); t_data = seg_vec[j][e];
      end
    @(negedge clk);
    t_we = 0; t_len_we = 1; t_cmd = 5'(c); t_len = 6'(len);
    @(negedge clk);
    t_len_we = 0;
  endtask

  initial begin
    bit found;
    int cmd, correct;
    int maxseg = 0, minseg = 99;
    repeat (3) @(posedge clk);
    rst <= 0;

    for (int w = 0; w < NCMD; w++) begin
      do_resync();
      utterance(w, 1.0, 1.0);
      checks++;
      if (n_seg == 0 || n_seg > MAXV) begin
        failures++;
        $display("training command %0d: %0d segments", w, n_seg);
      end
      if (n_seg > maxseg) maxseg = n_seg;
      if (n_seg < minseg) minseg = n_seg;
      do_classify(found, cmd);             // empties the query buffer
      load_prototype(w);
    end

    correct = 0;
    for (int w = 0; w < NCMD; w++) begin
      real stretch;
      stretch = (w % 2 == 0) ? 1.1 : 0.9;
      do_resync();
      utterance(w, stretch, 1.0);
      checks++;
      if (q_overflow) begin failures++; $display("command %0d overflowed the query", w); end
      do_classify(found, cmd);
      $display("command %2d: %2d segments, recognised as %2d (found %0b)", w, n_seg, cmd, found);
      checks++;
      if (found && cmd == w) correct++;
      else begin failures++; $display("command %0d misrecognised", w); end
    end
    $display("training takes gave %0d to %0d segments", minseg, maxseg);
    $display("recognised %0d of %0d commands after %0d clocks", correct, NCMD, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
