// tb_doh_reset: measures the CCUM reset pulses: the power-up pulse after the
// platform reset, host-fired pulses of several lengths (0 acting as 1), and a
// pulse restarted by a second fire.
module tb_doh_reset;
  logic clk = 0, rst_n = 0, fire = 0, ccum_reset_n;
  logic [15:0] len = '0;
  int checks = 0, failures = 0;

  doh_reset dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // number of clocks ccum_reset_n stays low, sampled at negedges
  task automatic low_time(output int n);
    n = 0;
    while (!ccum_reset_n) begin n++; @(negedge clk); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    check(!ccum_reset_n, "reset held during platform reset");
    rst_n = 1;
    low_time(n);
    check(n == 64, $sformatf("power-up pulse %0d", n));
    repeat (5) @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      int l;
      l = (k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? 2 : (k == 3) ? 17 : 1000;
      len = 16'(l); fire = 1;
      @(negedge clk); fire = 0;
      low_time(n);
      check(n == ((l == 0) ? 1 : l), $sformatf("pulse %0d for len %0d", n, l));
      check(ccum_reset_n, "released");
      repeat (3) @(negedge clk);
    end
    // restart in the middle
    len = 16'd20; fire = 1; @(negedge clk); fire = 0;
    repeat (10) @(negedge clk);
    fire = 1; @(negedge clk); fire = 0;
    low_time(n);
    check(n == 20, "restarted pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
