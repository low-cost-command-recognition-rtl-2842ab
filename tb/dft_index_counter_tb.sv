// dft_index_counter_tb - random count enables against a software model.
//
// Checks n, k, the (n*k) mod 128 address, last_k and eoc every clock, that a
// full pass takes exactly 128*128 enabled clocks, and that reset clears.
module dft_index_counter_tb;
  localparam int N = 128;
  logic clk = 0, rst = 1, ce = 0;
  logic [6:0] n, k, addr;
  logic last_k, eoc;
  int checks = 0, failures = 0;
  int mn = 0, mk = 0, enabled = 0, eoc_at = -1;

  dft_index_counter #(.N(N)) dut (.clk, .rst, .ce, .n, .k, .addr, .last_k, .eoc);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks++;
    if (int'(n) != mn || int'(k) != mk || int'(addr) != (mn * mk) % N ||
        last_k != (mk == N - 1) || eoc != (mn == N - 1 && mk == N - 1)) begin
      failures++;
      if (failures < 10)
        $display("t=%0t n=%0d k=%0d addr=%0d exp n=%0d k=%0d addr=%0d", $time, n, k, addr,
                 mn, mk, (mn * mk) % N);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check_now();
    while (eoc_at < 0 || enabled < N * N + 300) begin
      ce = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (ce) begin
        if (eoc && eoc_at < 0) eoc_at = enabled + 1;
        enabled++;
        if (mk == N - 1) begin mk = 0; mn = (mn + 1) % N; end
        else mk++;
      end
      #1 check_now();
    end
    checks++;
    if (eoc_at != N * N) begin
      failures++;
      $display("eoc after %0d enabled clocks, expected %0d", eoc_at, N * N);
    end
    rst <= 1;
    @(posedge clk); #1;
    checks++;
    if (n != 0 || k != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
