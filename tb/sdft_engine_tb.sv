// sdft_engine_tb - sliding DFT against a fixed-point model and a real DFT.
//
// Fills the sample buffer with 128 samples (run = 0), seeds the coefficient
// stores with the rounded exact DFT of those samples / 8, then slides over
// 300 more samples (run = 1).  After every sample all 128 bins must match a
// bit-exact model of the recursion and stay within 48 LSB of the exact DFT /
// 8 of the last 128 samples.  The first 100 updates run without
// back-pressure and must take exactly 128 clocks from sample to last bin;
// the rest see random o_ready.
module sdft_engine_tb;
  localparam int N = 128;
  localparam int M = 300;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1;
  logic seed_valid = 0;
  logic [6:0] seed_k = '0;
  logic signed [15:0] seed_re = '0, seed_im = '0;
  logic run = 0, s_valid = 0, s_ready;
  logic signed [11:0] s_data = '0;
  logic o_valid, o_ready = 1, o_last;
  logic [6:0] o_k;
  logic signed [15:0] o_re, o_im;

  int checks = 0, failures = 0, cycle = 0;
  int x [N + M];
  longint mre [N], mim [N];

  sdft_engine dut (.clk, .rst, .seed_valid, .seed_k, .seed_re, .seed_im, .run,
                   .s_valid, .s_ready, .s_data, .o_valid, .o_ready, .o_k, .o_re, .o_im, .o_last);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tw(int i, bit is_sin);
    real v;
    longint r;
    v = is_sin ? $sin(2.0 * PI * i / N) : $cos(2.0 * PI * i / N);
    r = longint'($rtoi($floor(v * 32768.0 + 0.5)));
    return (r > 32767) ? 32767 : r;
  endfunction

  function automatic longint rsat(longint v);  // round half up /2^18, saturate to 16 bits
    longint r;
    r = (v + (64'sd1 <<< 17)) >>> 18;
    return (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
  endfunction

  function automatic real exact(int last, int k, bit im);
    real acc = 0.0;
    for (int m = 0; m < N; m++)
      acc += x[last - N + 1 + m] * (im ? -$sin(2.0 * PI * k * m / N) : $cos(2.0 * PI * k * m / N));
    return acc / 8.0;
  endfunction

  task automatic send(int v);
    @(negedge clk);
    s_valid = 1;
    s_data  = 12'(v);
    while (!s_ready) @(negedge clk);
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < N + M; i++)
      x[i] = $rtoi(900.0 * $sin(2.0 * PI * 9.3 * i / N) + 500.0 * $cos(2.0 * PI * 31.0 * i / N))
             + $urandom_range(0, 400) - 200;
    repeat (3) @(posedge clk);
    rst <= 0;
    // Fill the sample buffer.
    for (int i = 0; i < N; i++) send(x[i]);
    // Seed with the exact DFT of the first block.
    for (int k = 0; k < N; k++) begin
      mre[k] = longint'($rtoi($floor(exact(N - 1, k, 0) + 0.5)));
      mim[k] = longint'($rtoi($floor(exact(N - 1, k, 1) + 0.5)));
      @(negedge clk);
      seed_valid = 1; seed_k = 7'(k); seed_re = 16'(mre[k]); seed_im = 16'(mim[k]);
    end
    @(negedge clk);
    seed_valid = 0;
    run = 1;
    for (int n = N; n < N + M; n++) begin
      int beats, t0;
      longint diff;
      diff = longint'(x[n] - x[n - N]);
      @(negedge clk);
      s_valid = 1;
      s_data  = 12'(x[n]);
      while (!s_ready) @(negedge clk);
      t0 = cycle;
      @(negedge clk);
      s_valid = 0;
      beats = 0;
      while (beats < N) begin
        o_ready = (n < N + 100) ? 1'b1 : ($urandom_range(0, 2) != 0);
        #1;
        if (o_valid && o_ready) begin
          longint a, b, re, im;
          real er, ei;
          a  = (mre[beats] <<< 3) + diff;
          b  = mim[beats] <<< 3;
          re = rsat(a * tw(beats, 0) - b * tw(beats, 1));
          im = rsat(a * tw(beats, 1) + b * tw(beats, 0));
          mre[beats] = re;
          mim[beats] = im;
          checks++;
          if (int'(o_k) != beats || longint'(o_re) != re || longint'(o_im) != im ||
              o_last != (beats == N - 1)) begin
            failures++;
            if (failures < 10)
              $display("n=%0d k=%0d: %0d,%0d model %0d,%0d", n, o_k, o_re, o_im, re, im);
          end
          er = exact(n, beats, 0);
          ei = exact(n, beats, 1);
          checks++;
          if (o_re - er > 48 || er - o_re > 48 || o_im - ei > 48 || ei - o_im > 48) begin
            failures++;
            if (failures < 10) $display("n=%0d k=%0d: %0d,%0d exact %f,%f", n, beats, o_re, o_im, er, ei);
          end
          beats++;
          if (beats == N && n < N + 100) begin
            checks++;
            if (cycle - t0 != N) begin
              failures++;
              $display("update took %0d clocks, expected %0d", cycle - t0, N);
            end
          end
        end
        @(negedge clk);
      end
      checks++;
      if (o_valid) begin failures++; $display("extra output beat after sample %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
