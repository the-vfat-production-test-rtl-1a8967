// tb_t1_encoder: decodes the serial T1 line independently (start bit '1',
// then two code bits) and checks the decoded commands, their order under the
// priority rules, their timing (start bit the clock after the request, one
// command per 3 clocks) and the `sent` and `lost` reports.
module tb_t1_encoder;
  import ttp_pkg::*;
  logic clk = 0, rst_n = 0;
  t1_req_t req = '0, sent, lost;
  logic t1_out, busy;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { int code; longint t; } ev_t;
  ev_t got[$];
  int  sent_codes[$];
  int  lost_n = 0;

  t1_encoder dut (.*);
  always #5 clk = ~clk;

  // independent line decoder
  int dstate = 0;
  int dcode;
  longint dstart;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      case (dstate)
        0: if (t1_out) begin dstate = 1; dstart = cyc; end
        1: begin dcode = t1_out ? 2 : 0; dstate = 2; end
        default: begin
          dcode += t1_out ? 1 : 0;
          got.push_back('{dcode, dstart});
          dstate = 0;
        end
      endcase
      if (sent.lv1a)     sent_codes.push_back(0);
      if (sent.bc0)      sent_codes.push_back(1);
      if (sent.resynch)  sent_codes.push_back(2);
      if (sent.calpulse) sent_codes.push_back(3);
      if (sent != '0) begin
        checks++;
        if (!t1_out) begin failures++; $display("FAIL sent without start bit"); end
      end
      if (lost != '0) lost_n++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // request in the next clock; returns the cycle number of that clock
  task automatic request(t1_req_t r, output longint t);
    @(negedge clk); req = r; t = cyc;
    @(negedge clk); req = '0;
  endtask

  task automatic expect_seq(int codes[$], longint t_first, int gap);
    repeat (20) @(posedge clk);
    check(got.size() == codes.size(), $sformatf("decoded %0d commands, expected %0d", got.size(), codes.size()));
    for (int i = 0; i < codes.size() && i < got.size(); i++) begin
      check(got[i].code == codes[i], $sformatf("command %0d code %0d expected %0d", i, got[i].code, codes[i]));
      if (gap > 0) check(got[i].t == t_first + i * gap, $sformatf("command %0d at %0d", i, got[i].t));
    end
    check(sent_codes == codes, "sent strobes match the line");
    got.delete(); sent_codes.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t;
    t1_req_t r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!t1_out, "line idles low");

    // each command alone: pattern and one-clock latency
    r = '0; r.lv1a = 1;     request(r, t); expect_seq('{0}, t + 1, 3);
    r = '0; r.bc0 = 1;      request(r, t); expect_seq('{1}, t + 1, 3);
    r = '0; r.resynch = 1;  request(r, t); expect_seq('{2}, t + 1, 3);
    r = '0; r.calpulse = 1; request(r, t); expect_seq('{3}, t + 1, 3);

    // all four at once: Resynch, BC0, CalPulse, LV1A, back to back
    r = '1; request(r, t); expect_seq('{2, 1, 3, 0}, t + 1, 3);

    // LV1A first, then CalPulse and BC0 while the line is busy:
    // BC0 overtakes CalPulse
    @(negedge clk); req = '0; req.lv1a = 1; t = cyc;
    @(negedge clk); req = '0; req.calpulse = 1;
    @(negedge clk); req = '0; req.bc0 = 1;
    @(negedge clk); req = '0;
    expect_seq('{0, 1, 3}, t + 1, 3);

    // a repeated LV1A while one is still pending is lost
    lost_n = 0;
    @(negedge clk); req = '0; req.resynch = 1; req.lv1a = 1; t = cyc;
    @(negedge clk); req = '0; req.lv1a = 1;
    @(negedge clk); req = '0;
    expect_seq('{2, 0}, t + 1, 3);
    check(lost_n == 1, "one request reported lost");

    // random traffic spaced by >= 3 clocks: nothing lost, latency 1
    lost_n = 0;
    for (int i = 0; i < 200; i++) begin
      int c = $urandom % 4;
      r = '0;
      case (c) 0: r.lv1a = 1; 1: r.bc0 = 1; 2: r.resynch = 1; default: r.calpulse = 1; endcase
      request(r, t);
      repeat (4) @(posedge clk);
      check(got.size() == 1 && got[0].code == c && got[0].t == t + 1, "spaced request");
      got.delete(); sent_codes.delete();
      repeat ($urandom % 4) @(negedge clk);
    end
    check(lost_n == 0, "no loss at spacing >= 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
