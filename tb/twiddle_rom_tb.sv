// twiddle_rom_tb - checks every table entry against cos/sin computed here.
//
// Each entry must equal round(2^15 * cos(2 pi i / 128)) (and likewise for
// sin), with +1.0 clamped to 32767, and lie within half an LSB of the exact
// value otherwise.
module twiddle_rom_tb;
  localparam int N = 128;
  localparam int W = 16;
  localparam real PI = 3.141592653589793;

  logic [6:0]          addr;
  logic signed [W-1:0] c, s;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N), .TW_W(W)) dut (.addr, .cos_o(c), .sin_o(s));

  function automatic int expect_val(real v);
    int r;
    r = $rtoi($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      real ec, es;
      addr = 7'(i);
      #1;
      ec = $cos(2.0 * PI * i / N);
      es = $sin(2.0 * PI * i / N);
      checks += 2;
      if (int'(c) != expect_val(ec)) begin
        failures++;
        $display("cos[%0d]=%0d expected %0d", i, c, expect_val(ec));
      end
      if (int'(s) != expect_val(es)) begin
        failures++;
        $display("sin[%0d]=%0d expected %0d", i, s, expect_val(es));
      end
    end
    // Spot values that need no arithmetic at all.
    addr = 7'd0;  #1; checks++; if (c != 16'sd32767 || s != 16'sd0) failures++;
    addr = 7'd32; #1; checks++; if (c != 16'sd0 || s != 16'sd32767) failures++;
    addr = 7'd64; #1; checks++; if (c != -16'sd32768 || s != 16'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
