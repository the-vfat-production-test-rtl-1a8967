// tb_readout_subsystem: four channels at the full 1024-word FIFO size.
// Sends different packets on the four Roman Pot lines at once and reads every
// FIFO back; switches to the GEM lines and checks the RP lines are ignored;
// fills one FIFO with 86 packets and checks that exactly 85 are kept (1020
// words) and one is counted as dropped; checks the s-bit selection.
module tb_readout_subsystem;
  import vfat_pkt_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0, sel_gem = 0, clr = 0;
  logic [NCH-1:0] rp_data = '0, gem_data = '0, rp_sbit = '0, gem_sbit = '0, sbit;
  logic [NCH-1:0] rd_en = '0, empty;
  logic [NCH-1:0][15:0] rd_data;
  logic [NCH-1:0][10:0] count;
  logic [NCH-1:0][7:0] pkt_cnt, drop_cnt, hdr_err_cnt;
  int checks = 0, failures = 0;
  pkt_t sent_pkts[NCH][$];

  readout_subsystem dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one packet on each channel in `mask`, on the RP or the GEM lines
  task automatic send_all(bit gem, logic [NCH-1:0] mask);
    pkt_t p[NCH], other[NCH];
    for (int c = 0; c < NCH; c++) begin
      p[c] = make_pkt(12'($urandom), 8'($urandom), 4'h0, 12'(c), rand_data());
      other[c] = make_pkt(12'($urandom), 8'($urandom), 4'hF, 12'hF00 + 12'(c), rand_data());
      if (mask[c]) sent_pkts[c].push_back(p[c]);
    end
    for (int i = 191; i >= 0; i--) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        // the unselected lines carry other packets, which must be ignored
        if (gem) begin gem_data[c] = mask[c] & p[c][i]; rp_data[c] = other[c][i]; end
        else     begin rp_data[c]  = mask[c] & p[c][i]; gem_data[c] = other[c][i]; end
      end
    end
    @(negedge clk); rp_data = '0; gem_data = '0;
    repeat (3) @(negedge clk);
  endtask

  task automatic drain(int c, int max_pkts);
    pkt_t p;
    int k = 0;
    while (sent_pkts[c].size() > 0 && k < max_pkts) begin
      p = sent_pkts[c].pop_front();
      k++;
      for (int w = 0; w < 12; w++) begin
        @(negedge clk);
        check(!empty[c], "FIFO holds the packet");
        check(rd_data[c] == pkt_word(p, w), $sformatf("ch%0d word %0d: %h vs %h", c, w, rd_data[c], pkt_word(p, w)));
        rd_en[c] = 1;
        @(negedge clk); rd_en[c] = 0;
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
    repeat (3) @(negedge clk);
    // Roman Pot lines, all four channels in parallel
    for (int n = 0; n < 5; n++) send_all(0, 4'b1111);
    for (int c = 0; c < NCH; c++) check(count[c] == 11'd60, "60 words per channel");
    for (int c = 0; c < NCH; c++) drain(c, 100);
    check(empty == 4'b1111, "all drained");
    // GEM lines
    sel_gem = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 3; n++) send_all(1, 4'b1111);
    for (int c = 0; c < NCH; c++) drain(c, 100);
    check(empty == 4'b1111, "GEM packets drained");
    for (int c = 0; c < NCH; c++) check(pkt_cnt[c] == 8'd8 && hdr_err_cnt[c] == 0, "packet counts");
    // fill channel 2: 86 packets, only 85 fit in 1024 words
    for (int n = 0; n < 86; n++) send_all(1, 4'b0100);
    check(count[2] == 11'd1020, $sformatf("85 packets kept (%0d words)", count[2]));
    check(drop_cnt[2] == 8'd1, "one packet dropped");
    drain(2, 85);
    void'(sent_pkts[2].pop_front());   // the dropped one
    check(empty[2], "exactly 85 packets read");
    // clear
    send_all(1, 4'b1111);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(empty == 4'b1111, "clear empties the FIFOs");
    // s-bit selection, one clock of latency
    @(negedge clk); rp_sbit = 4'b0101; gem_sbit = 4'b1010;
    @(negedge clk); check(sbit == 4'b1010, "GEM s-bits selected");
    sel_gem = 0;
    @(negedge clk); check(sbit == 4'b0101, "RP s-bits selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
