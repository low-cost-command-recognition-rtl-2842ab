// dft_engine_tb - direct DFT against a fixed-point model and a real DFT.
//
// Feeds 128 samples with random gaps in DATA_READY, then reads ReX(k),
// ImX(k) back through the read port.  Each bin must equal a bit-exact model
// (products rounded to /2^18, summed, saturated to 16 bits) and lie within
// 64 LSB of the exact DFT / 8.  Also checks the handshake: one sample per
// DATA_REQ, 128 clocks of computation per sample, READ_SIG 129 clocks
// after the last sample is taken, and a second transform after restart (a
// pure tone, whose energy must sit in its own bin and its mirror).
module dft_engine_tb;
  localparam int N = 128;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready;
  logic signed [11:0] s_data = '0;
  logic read_sig, done, restart = 0;
  logic [6:0] rd_k = '0;
  logic signed [15:0] rd_re, rd_im;

  int checks = 0, failures = 0;
  int x [N];
  int accept_cycle [N];
  int cycle = 0, read_sig_cycle = -1, read_sig_count = 0;

  dft_engine dut (.clk, .rst, .s_valid, .s_ready, .s_data, .read_sig, .done, .restart,
                  .rd_k, .rd_re, .rd_im);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (read_sig && !rst) begin
      read_sig_cycle <= cycle;
      read_sig_count <= read_sig_count + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tw(int i, bit is_sin);
    real v;
    int r;
    v = is_sin ? $sin(2.0 * PI * i / N) : $cos(2.0 * PI * i / N);
    r = $rtoi($floor(v * 32768.0 + 0.5));
    return (r > 32767) ? 32767 : r;
  endfunction

  function automatic longint rnd(longint v);  // round half up, / 2^18
    return (v + (64'sd1 <<< 17)) >>> 18;
  endfunction

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic feed();
    for (int n = 0; n < N; n++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      s_valid = 1;
      s_data  = 12'(x[n]);
      // The sample is taken at the first rising edge with DATA_REQ high.
      while (!s_ready) @(negedge clk);
      accept_cycle[n] = cycle;
      @(negedge clk);
      s_valid = 0;
      // Each sample takes N clocks before the next request.
      if (n > 0) begin
        checks++;
        if (accept_cycle[n] - accept_cycle[n-1] < N + 1) begin
          failures++;
          $display("sample %0d accepted %0d clocks after the previous", n,
                   accept_cycle[n] - accept_cycle[n-1]);
        end
      end
    end
  endtask

  task automatic check_bins(int tol);
    int mre [N], mim [N];
    for (int k = 0; k < N; k++) begin mre[k] = 0; mim[k] = 0; end
    for (int n = 0; n < N; n++)
      for (int k = 0; k < N; k++) begin
        mre[k] = sat16(longint'(mre[k]) + rnd(longint'(x[n]) * tw((n * k) % N, 0)));
        mim[k] = sat16(longint'(mim[k]) - rnd(longint'(x[n]) * tw((n * k) % N, 1)));
      end
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += x[n] * $cos(2.0 * PI * k * n / N) / 8.0;
        ei -= x[n] * $sin(2.0 * PI * k * n / N) / 8.0;
      end
      rd_k = 7'(k);
      #1;
      checks += 2;
      if (int'(rd_re) != mre[k] || int'(rd_im) != mim[k]) begin
        failures++;
        $display("bin %0d: %0d,%0d model %0d,%0d", k, rd_re, rd_im, mre[k], mim[k]);
      end
      if ((rd_re - er) > tol || (er - rd_re) > tol || (rd_im - ei) > tol || (ei - rd_im) > tol) begin
        failures++;
        $display("bin %0d: %0d,%0d exact %f,%f", k, rd_re, rd_im, er, ei);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // Transform 1: random full-range samples.
    for (int n = 0; n < N; n++) x[n] = $urandom_range(0, 4095) - 2048;
    feed();
    wait (read_sig_count == 1);
    @(posedge clk);
    checks++;
    if (read_sig_cycle - accept_cycle[N-1] != N + 1) begin
      failures++;
      $display("READ_SIG %0d clocks after the last sample, expected %0d",
               read_sig_cycle - accept_cycle[N-1], N + 1);
    end
    checks++;
    if (!done || s_ready) begin failures++; $display("not holding results"); end
    check_bins(64);
    // Transform 2: a tone in bin 10.
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    for (int n = 0; n < N; n++) x[n] = $rtoi(1500.0 * $cos(2.0 * PI * 10 * n / N));
    feed();
    wait (read_sig_count == 2);
    @(posedge clk);
    check_bins(64);
    for (int k = 0; k < N; k++) begin
      rd_k = 7'(k);
      #1;
      checks++;
      if ((k == 10 || k == 118) != (rd_re > 10000)) begin
        failures++;
        $display("tone: bin %0d re=%0d", k, rd_re);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
