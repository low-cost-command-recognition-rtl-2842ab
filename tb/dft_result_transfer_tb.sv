// dft_result_transfer_tb - the transfer unit reads a model store in order.
//
// The testbench plays the DFT engine's coefficient stores (random contents,
// combinational read).  After each READ_SIG pulse the unit must present
// exactly 128 beats, starting two clocks later (address, then output
// register), with k = 0..127, the stored values, o_last on the final beat
// and busy from the clock after READ_SIG until the last beat has gone.
module dft_result_transfer_tb;
  localparam int N = 128;
  logic clk = 0, rst = 1, read_sig = 0;
  logic [6:0] rd_k, o_k;
  logic signed [15:0] rd_re, rd_im, o_re, o_im;
  logic o_valid, o_last, busy;
  logic signed [15:0] mre [N], mim [N];
  int checks = 0, failures = 0;

  dft_result_transfer dut (.clk, .rst, .read_sig, .rd_k, .rd_re, .rd_im,
                           .o_valid, .o_k, .o_re, .o_im, .o_last, .busy);

  assign rd_re = mre[rd_k];
  assign rd_im = mim[rd_k];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int pass = 0; pass < 3; pass++) begin
      int beats;
      for (int k = 0; k < N; k++) begin
        mre[k] = 16'($urandom);
        mim[k] = 16'($urandom);
      end
      repeat ($urandom_range(1, 10)) @(negedge clk);
      checks++;
      if (o_valid || busy) begin failures++; $display("active before READ_SIG"); end
      read_sig = 1;
      @(negedge clk);
      read_sig = 0;
      checks++;
      if (o_valid || !busy) begin
        failures++; $display("first clock after READ_SIG: valid=%0b busy=%0b", o_valid, busy);
      end
      @(negedge clk);
      beats = 0;
      while (o_valid) begin
        checks++;
        if (int'(o_k) != beats || o_re != mre[beats] || o_im != mim[beats] ||
            o_last != (beats == N - 1) || !busy) begin
          failures++;
          $display("beat %0d: k=%0d re=%0d im=%0d last=%0b", beats, o_k, o_re, o_im, o_last);
        end
        beats++;
        @(negedge clk);
      end
      checks++;
      if (beats != N) begin failures++; $display("%0d beats, expected %0d", beats, N); end
      checks++;
      if (busy) begin failures++; $display("busy after the last beat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
