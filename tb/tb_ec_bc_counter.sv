// tb_ec_bc_counter: drives random transmitted-command strobes and checks the
// event/bunch counters and the per-LV1A records against a reference model:
// BC counts clocks and restarts at BC0, EC counts LV1As, Resynch clears both,
// a record carries the EC/BC values of the clock its LV1A was sent in and
// appears one clock later. Runs long enough for both counters to wrap.
module tb_ec_bc_counter;
  import ttp_pkg::*;
  logic clk = 0, rst_n = 0;
  t1_req_t sent = '0;
  logic [7:0] ec, ev_ec;
  logic [11:0] bc, ev_bc;
  logic ev_valid;
  int checks = 0, failures = 0;
  int m_ec = 0, m_bc = 0;
  int exp_ec = -1, exp_bc = -1;
  int n_wrap_bc = 0, n_events = 0;

  ec_bc_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 60000; i++) begin
      // counters before the edge
      check(ec == 8'(m_ec) && bc == 12'(m_bc), $sformatf("counters ec=%0d bc=%0d model %0d %0d", ec, bc, m_ec, m_bc));
      if (exp_ec >= 0) begin
        check(ev_valid && ev_ec == 8'(exp_ec) && ev_bc == 12'(exp_bc), "event record");
        n_events++;
      end else check(!ev_valid, "no spurious record");
      r = $urandom % 1000;
      sent = '0;
      if (i < 10000) begin
        if (r < 300) sent.lv1a = 1;          // many events: EC wraps
      end else begin
        if (r < 20) sent.lv1a = 1;
        else if (r == 20) sent.bc0 = 1;
        else if (r == 21) sent.resynch = 1;
        else if (r == 22) sent.calpulse = 1;
      end
      exp_ec = sent.lv1a ? m_ec : -1;
      exp_bc = m_bc;
      if (sent.resynch) begin m_ec = 0; m_bc = 0; end
      else begin
        if (sent.lv1a) m_ec = (m_ec + 1) % 256;
        m_bc = sent.bc0 ? 0 : (m_bc + 1) % 4096;
        if (m_bc == 0 && !sent.bc0) n_wrap_bc++;
      end
      @(negedge clk);
    end
    check(n_wrap_bc > 0, "BC wrapped");
    check(n_events > 256, "EC wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
