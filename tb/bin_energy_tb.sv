// bin_energy_tb - squared magnitude of random bins under random back-pressure.
//
// A producer offers 1000 random (k, Re, Im, last) beats, extremes included,
// with random gaps; a consumer takes them with random stalls.  Every output
// must equal Re^2 + Im^2 of the matching input, in order, with k and last
// carried along; the output must hold while stalled.
module bin_energy_tb;
  localparam int NB = 1000;
  logic clk = 0, rst = 1;
  logic i_valid = 0, i_ready, i_last = 0, e_valid, e_ready = 0, e_last;
  logic [6:0] i_k = '0, e_k;
  logic signed [15:0] i_re = '0, i_im = '0;
  logic [31:0] e_data;
  int checks = 0, failures = 0;
  int in_re [NB], in_im [NB];
  int sent = 0, got = 0;

  bin_energy dut (.clk, .rst, .i_valid, .i_ready, .i_k, .i_re, .i_im, .i_last,
                  .e_valid, .e_ready, .e_k, .e_data, .e_last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) begin
      in_re[i] = $urandom_range(0, 65535) - 32768;
      in_im[i] = $urandom_range(0, 65535) - 32768;
    end
    in_re[0] = -32768; in_im[0] = -32768;
    in_re[1] = 32767;  in_im[1] = -32768;
    repeat (3) @(posedge clk);
    rst <= 0;
  end

  // Producer and consumer, both driven at the falling edge.
  always @(negedge clk) if (!rst) begin
    if (i_valid && i_ready) sent++;
    if (e_valid && e_ready) begin
      longint exp_e;
      exp_e = longint'(in_re[got]) * in_re[got] + longint'(in_im[got]) * in_im[got];
      checks++;
      if (longint'(e_data) != exp_e || int'(e_k) != got % 128 || e_last != (got % 128 == 127)) begin
        failures++;
        if (failures < 10) $display("beat %0d: %0d expected %0d", got, e_data, exp_e);
      end
      got++;
    end
    if (sent < NB && $urandom_range(0, 3) != 0) begin
      i_valid <= 1;
      i_re    <= 16'(in_re[sent]);
      i_im    <= 16'(in_im[sent]);
      i_k     <= 7'(sent % 128);
      i_last  <= (sent % 128 == 127);
    end else begin
      i_valid <= 0;
    end
    e_ready <= ($urandom_range(0, 3) != 0);
    if (got == NB) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
    e_valid && !e_ready |=> e_valid && $stable(e_data)) else failures++;
endmodule
