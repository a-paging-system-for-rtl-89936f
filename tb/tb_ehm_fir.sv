// tb_ehm_fir: drives random signed samples at random times and compares the
// running sum with the sum of the last five samples kept by the testbench.
// Also checks that the sum is held between samples and that clear empties it.
module tb_ehm_fir;
  logic clk = 0, rst_n = 0;
  logic clear, sample_en;
  logic signed [8:0] e_in;
  logic signed [11:0] sum;
  int hist[$];
  int checks = 0, failures = 0;

  ehm_fir #(.N_TAPS(5), .E_W(9)) dut (.clk, .rst_n, .clear, .sample_en, .e_in, .sum);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum();
    int s = 0;
    for (int i = 0; i < hist.size() && i < 5; i++) s += hist[hist.size() - 1 - i];
    return s;
  endfunction

  initial begin
    clear = 0; sample_en = 0; e_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sum == 0, "empty after reset");
    for (int k = 0; k < 300; k++) begin
      int v;
      v = (k % 50 < 10) ? 255 : ((k % 50 < 20) ? -255 : int'($urandom_range(0, 510)) - 255);
      e_in = 9'(v); sample_en = 1;
      hist.push_back(v);
      @(negedge clk); sample_en = 0; e_in = 9'($urandom);
      check(int'(sum) == ref_sum(), $sformatf("sample %0d: sum %0d want %0d", k, sum, ref_sum()));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(int'(sum) == ref_sum(), "sum held between samples");
      if (k == 150) begin
        clear = 1; @(negedge clk); clear = 0;
        hist.delete();
        check(sum == 0, "clear empties the window");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
