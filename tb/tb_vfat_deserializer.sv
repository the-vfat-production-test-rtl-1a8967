// tb_vfat_deserializer: sends random VFAT packets on the serial line, with
// random idle gaps (including back-to-back packets), and checks the twelve
// 16-bit words written per packet, their timing (a word one clock after its
// last bit), the header-error count for a corrupted header and the drop rule
// when fewer than 12 FIFO words are free.
module tb_vfat_deserializer;
  import vfat_pkt_pkg::*;
  logic clk = 0, rst_n = 0, din = 0;
  logic [10:0] fifo_free = 11'd1024;
  logic wr_en, pkt_done, busy;
  logic [15:0] wr_data;
  logic [7:0] pkt_cnt, drop_cnt, hdr_err_cnt;
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [15:0] exp_words[$];
  longint exp_times[$];
  int n_words = 0, n_done = 0;

  vfat_deserializer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] w;
  longint tt;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en) begin
      n_words++;
      if (exp_words.size() == 0) check(0, "unexpected word");
      else begin
        w  = exp_words.pop_front();
        tt = exp_times.pop_front();
        check(wr_data == w, $sformatf("word %h expected %h", wr_data, w));
        check(cyc == tt, $sformatf("word at %0d expected %0d", cyc, tt));
      end
    end
    if (pkt_done) n_done++;
  end

  // send a packet; bits are applied at negedges, sampled at the next posedge
  task automatic send(pkt_t p, bit expect_stored);
    for (int i = 191; i >= 0; i--) begin
      @(negedge clk); din = p[i];
      if (expect_stored && i % 16 == 0) begin
        exp_words.push_back(p[i +: 16]);
        exp_times.push_back(cyc + 1);   // sampled at edge cyc, written one clock later
      end
    end
    @(negedge clk); din = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pkt_t p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      p = make_pkt(12'($urandom), 8'(n), 4'($urandom), 12'($urandom), rand_data());
      send(p, 1);
      if (n % 3 == 0) begin
        // next packet immediately: the idle clock after `send` is the only gap
      end else repeat ($urandom % 20) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(exp_words.size() == 0, "all words written");
    check(n_words == 1200 && n_done == 100 && pkt_cnt == 8'd100, "100 packets stored");
    check(hdr_err_cnt == 0 && drop_cnt == 0, "no errors so far");

    // corrupted EC header nibble: stored, counted
    p = make_pkt(12'h123, 8'h45, 4'h6, 12'h789, rand_data());
    p[191-16-:4] = 4'b1101;
    send(p, 1);
    repeat (3) @(negedge clk);
    check(hdr_err_cnt == 8'd1, "header error counted");

    // not enough room: packet dropped whole, next one stored again
    fifo_free = 11'd11;
    p = make_pkt(12'h1, 8'h2, 4'h3, 12'h4, rand_data());
    send(p, 0);
    fifo_free = 11'd12;
    p = make_pkt(12'h5, 8'h6, 4'h7, 12'h8, rand_data());
    send(p, 1);
    repeat (3) @(negedge clk);
    check(drop_cnt == 8'd1, "drop counted");
    check(exp_words.size() == 0 && n_words == 1224, "dropped packet not written");
    check(!busy, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
