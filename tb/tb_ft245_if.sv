// tb_ft245_if: runs the byte command protocol through the FT245 interface at
// 40 MHz against the FT245 behavioural model and a 64-word memory on the
// internal bus (read data two clocks after the request). Checks single and
// burst writes and reads, the no-increment flag, the FEC target flag, the
// read time-out answer, and the FT245 bus timing rules checked by the model.
module tb_ft245_if;
  logic clk = 0, rst_n = 0;
  logic [7:0] usb_d_in, usb_d_out;
  logic usb_d_oe, usb_rd_n, usb_wr, usb_rxf_n, usb_txe_n;
  logic [15:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata = '0;
  logic bus_we, bus_re, bus_fec, bus_rvalid = 0;
  int checks = 0, failures = 0;
  logic [31:0] mem [64];
  int fec_writes = 0, fec_reads = 0;
  bit mute = 0;    // memory stops answering reads

  ft245_if dut (.*);
  ft245_model usb (.*);
  always #12.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // internal bus slave
  logic [1:0] rd_pipe = '0;
  logic [31:0] rd_q0 = '0, rd_q1 = '0;
  always @(posedge clk) begin
    if (bus_we) begin
      if (bus_fec) fec_writes++;
      else mem[bus_addr[5:0]] <= bus_wdata;
    end
    if (bus_re && bus_fec) fec_reads++;
    rd_pipe <= {rd_pipe[0], bus_re && !mute};
    rd_q0 <= bus_fec ? 32'hFEC0_0000 | 32'(bus_addr) : mem[bus_addr[5:0]];
    rd_q1 <= rd_q0;
    bus_rvalid <= rd_pipe[0];
    bus_rdata <= rd_q0;
  end

  task automatic header(bit wr, bit fec, bit noinc, int addr, int n);
    usb.put_byte({wr, fec, noinc, 5'b0});
    usb.put_byte(8'(addr >> 8)); usb.put_byte(8'(addr));
    usb.put_byte(8'((n - 1) >> 8)); usb.put_byte(8'(n - 1));
  endtask

  task automatic host_write(bit fec, bit noinc, int addr, logic [31:0] words[$]);
    header(1, fec, noinc, addr, words.size());
    foreach (words[i]) for (int b = 3; b >= 0; b--) usb.put_byte(words[i][8*b +: 8]);
    wait (usb.from_host.size() == 0);
    repeat (10) @(posedge clk);
  endtask

  task automatic host_read(bit fec, bit noinc, int addr, int n, output logic [31:0] words[$]);
    usb.to_host.delete();
    header(0, fec, noinc, addr, n);
    wait (usb.to_host.size() == 4 * n);
    words.delete();
    for (int i = 0; i < n; i++)
      words.push_back({usb.to_host[4*i], usb.to_host[4*i+1], usb.to_host[4*i+2], usb.to_host[4*i+3]});
    repeat (10) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] wq[$], rq[$];
    for (int i = 0; i < 64; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    usb.armed = 1;
    // single write, single read
    host_write(0, 0, 5, '{32'hCAFE_F00D});
    check(mem[5] == 32'hCAFE_F00D, "single write");
    host_read(0, 0, 5, 1, rq);
    check(rq.size() == 1 && rq[0] == 32'hCAFE_F00D, "single read");
    // burst write of 20 words, burst read back
    wq.delete();
    for (int i = 0; i < 20; i++) wq.push_back($urandom);
    host_write(0, 0, 10, wq);
    for (int i = 0; i < 20; i++) check(mem[10 + i] == wq[i], "burst write");
    host_read(0, 0, 10, 20, rq);
    check(rq == wq, "burst read");
    // no-increment burst write: the last word stays at one address
    host_write(0, 1, 40, '{32'h1, 32'h2, 32'h3});
    check(mem[40] == 32'h3 && mem[41] != 32'h2, "no-increment write");
    host_read(0, 1, 12, 3, rq);
    check(rq.size() == 3 && rq[0] == wq[2] && rq[2] == wq[2], "no-increment read");
    // FEC target
    host_write(1, 0, 16'h0123, '{32'h55, 32'h66});
    check(fec_writes == 2, "FEC writes");
    host_read(1, 0, 16'h0200, 2, rq);
    check(fec_reads == 2 && rq[0] == 32'hFEC0_0200 && rq[1] == 32'hFEC0_0201, "FEC reads");
    // no answer: time-out word
    mute = 1;
    host_read(0, 0, 3, 1, rq);
    check(rq[0] == 32'hFFFF_FFFF, "read time-out answer");
    mute = 0;
    // host slow to accept: txe_n held high for a while
    usb.tx_blocked = 1;
    fork
      host_read(0, 0, 10, 4, rq);
      begin repeat (300) @(posedge clk); usb.tx_blocked = 0; end
    join
    check(rq.size() == 4 && rq[0] == wq[0] && rq[3] == wq[3], "read with back-pressure");
    check(usb.errors == 0, $sformatf("FT245 timing violations: %0d", usb.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
