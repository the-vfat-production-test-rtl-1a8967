// tb_pattern_generator: loads interval tables into the pattern RAM, runs
// bursts and measures every pulse time against the intervals.
// Uses a 16-word RAM and an 8-bit down counter so that the "0 means 2^CNT_W"
// rule (256 clocks here) can be checked quickly. Covers: first-pulse latency
// (T1 + 2 after start), exact spacing, clamping of 1 and 2 to 3, burst length,
// full-RAM burst for length 0, loop mode and stop.
module tb_pattern_generator;
  localparam int WORDS = 16, CW = 8;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, loop = 0;
  logic [4:0] burst_len = '0, pulse_count;
  logic pulse, busy;
  logic [3:0] host_addr = '0;
  logic host_we = 0;
  logic [CW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint ptimes[$];
  int tab[WORDS];

  pattern_generator #(.WORDS(WORDS), .CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pulse) ptimes.push_back(cyc);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int eff(int t);
    if (t == 0) return 1 << CW;
    if (t < 3) return 3;
    return t;
  endfunction

  task automatic load_table();
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); host_addr = 4'(i); host_we = 1; host_wdata = CW'(tab[i]);
    end
    @(negedge clk); host_we = 0;
    // read back through the host port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); host_addr = 4'(i);
      @(posedge clk); #1;
      check(host_rdata == CW'(tab[i]), "host read-back");
    end
  endtask

  task automatic run_burst(int len, bit lp, int wait_pulses);
    longint t0;
    int n;
    ptimes.delete();
    @(negedge clk); burst_len = 5'(len); loop = lp; start = 1;
    t0 = cyc;     // value sampled at the start edge
    @(negedge clk); start = 0;
    n = (len == 0) ? WORDS : len;
    if (!lp) begin
      wait (!busy);
      repeat (3) @(posedge clk);
      check(ptimes.size() == n, $sformatf("pulse count %0d vs %0d", ptimes.size(), n));
      check(pulse_count == 5'(n), "pulse_count register");
    end else begin
      wait (ptimes.size() >= wait_pulses);
      @(negedge clk); stop = 1; @(negedge clk); stop = 0;
      repeat (3) @(posedge clk);
      check(!busy, "stop ends the burst");
    end
    // timing: pulse k at t0 + 2 + sum(T1..Tk)
    begin
      longint t = t0 + 2;
      for (int k = 0; k < ptimes.size(); k++) begin
        t += eff(tab[k % n]);
        check(ptimes[k] == t, $sformatf("pulse %0d at %0d expected %0d", k, ptimes[k], t));
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) tab[i] = 3 + ($urandom % 20);
    tab[2] = 1; tab[3] = 2; tab[4] = 0;  // clamped and 2^CW intervals
    load_table();
    run_burst(5, 0, 0);
    run_burst(9, 0, 0);
    run_burst(0, 0, 0);                  // full RAM
    for (int i = 0; i < WORDS; i++) tab[i] = 3 + ($urandom % 7);
    load_table();
    run_burst(1, 0, 0);
    run_burst(4, 1, 11);                 // loop mode, stopped after 11 pulses
    check(ptimes.size() >= 11, "loop continues past the burst length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
