// tb_ttp_top: end-to-end test of the whole platform at its default sizes.
// A host drives everything through the FT245 model and the byte protocol;
// eight VFAT models (four on the Roman Pot lines, four on the GEM lines) all
// listen to the T1 line. The test loads trigger patterns, runs bursts in every
// trigger mode and from every trigger source, reads the EC/BC FIFOs and the
// packet FIFOs back over USB and compares them with what the VFAT models
// produced. It makes each mechanism happen and counts it: RAM-pattern bursts,
// loop mode and stop, LV1A / CalPulse / CalPulse+LV1A modes, external and TTC
// triggers, host one-shot T1 commands with priority ordering, lost T1
// requests, RP/GEM switching, packet-FIFO overflow (85 packets kept), header
// errors, s-bit recording, FIFO clear, CCUM resets and FEC-core access.
module tb_ttp_top;
  import ttp_pkg::*;
  import vfat_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] usb_d_in, usb_d_out;
  logic usb_d_oe, usb_rd_n, usb_wr, usb_rxf_n, usb_txe_n;
  logic ext_trig = 0, ttc_l1a = 0, t1_out, ccum_reset_n;
  logic [3:0] rp_data, gem_data, rp_sbit, gem_sbit;
  logic [15:0] fec_addr;
  logic [31:0] fec_wdata, fec_rdata = '0;
  logic fec_we, fec_re, fec_rvalid = 0;

  int checks = 0, failures = 0;

  ttp_top dut (.*);
  ft245_model usb (.*);

  for (genvar c = 0; c < 4; c++) begin : g_vfat
    vfat_model #(.CHIP_ID(12'h100 + 12'(c))) rp  (.clk, .rst_n, .t1_in(t1_out), .data_out(rp_data[c]),  .sbit_out(rp_sbit[c]));
    vfat_model #(.CHIP_ID(12'h200 + 12'(c))) gem (.clk, .rst_n, .t1_in(t1_out), .data_out(gem_data[c]), .sbit_out(gem_sbit[c]));
  end

  always #12.5 clk = ~clk;   // 40 MHz

  // FEC core stand-in: answers reads two clocks later
  int fec_w = 0, fec_r = 0;
  logic [31:0] fec_last_w;
  logic [1:0] fec_pipe = '0;
  always @(posedge clk) begin
    if (rst_n && fec_we) begin fec_w++; fec_last_w <= fec_wdata; end
    if (rst_n && fec_re) fec_r++;
    fec_pipe   <= {fec_pipe[0], fec_re};
    fec_rvalid <= fec_pipe[1];
    fec_rdata  <= 32'hFEC0_0000 | 32'(fec_addr);
  end

  // CCUM reset pulses
  int n_ccum_reset = 0;
  always @(negedge ccum_reset_n) n_ccum_reset++;

  // mechanisms
  int m_burst = 0, m_loop = 0, m_mode_lv1a = 0, m_mode_cal = 0, m_mode_cal_lv1a = 0,
      m_ext = 0, m_ttc = 0, m_priority = 0, m_lost = 0, m_gem = 0, m_overflow = 0,
      m_hdr_err = 0, m_sbit = 0, m_clear = 0, m_doh = 0, m_fec = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int RB = 'h400;

  task automatic wreg(logic [7:0] r, logic [31:0] v);
    usb.host_write(0, 0, RB + r, '{v});
  endtask

  task automatic rreg(logic [7:0] r, output logic [31:0] v);
    logic [31:0] q[$];
    usb.host_read(0, 0, RB + r, 1, q);
    v = q[0];
  endtask

  function automatic logic [31:0] ctrl(logic gem, logic lp, trig_src_e src, trig_mode_e mode);
    return {26'd0, gem, lp, 2'(src), 2'(mode)};
  endfunction

  task automatic cmd(int bitn);
    wreg(R_COMMAND, 32'(1) << bitn);
  endtask

  task automatic load_pattern(int intervals[$]);
    logic [31:0] q[$];
    foreach (intervals[i]) q.push_back(32'(intervals[i]));
    usb.host_write(0, 0, 0, q);
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do begin rreg(R_STATUS, s); end while (s[0]);
    repeat (400) @(posedge clk);   // last packets leave the VFATs
  endtask

  task automatic run_burst(int intervals[$]);
    load_pattern(intervals);
    wreg(R_BURST_LEN, intervals.size());
    cmd(C_PG_START);
    wait_idle();
    m_burst++;
  endtask

  // EC/BC FIFO against a VFAT model's packets (all models see the same T1)
  int ev_seen = 0;   // packets of rp[0] already compared
  task automatic check_events();
    logic [31:0] e[$], b[$];
    int n = g_vfat[0].rp.sent.size() - ev_seen;
    if (n <= 0) return;
    usb.host_read(0, 1, RB + R_EC_FIFO, n, e);
    usb.host_read(0, 1, RB + R_BC_FIFO, n, b);
    for (int i = 0; i < n; i++) begin
      pkt_t p = g_vfat[0].rp.sent[ev_seen + i];
      check(!e[i][31] && e[i][7:0] == p[171:164], $sformatf("EC %0d vs packet %0d", e[i][7:0], p[171:164]));
      check(!b[i][31] && b[i][11:0] == p[187:176], $sformatf("BC %0d vs packet %0d", b[i][11:0], p[187:176]));
    end
    ev_seen += n;
  endtask

  // readout FIFO of channel c against the packets of the selected models
  int ro_seen[2][4];
  task automatic check_readout(bit gem, int max_pkts = 1000);
    logic [31:0] q[$];
    for (int c = 0; c < 4; c++) begin
      int n = (gem ? g_vfat_sent_gem(c) : g_vfat_sent_rp(c)) - ro_seen[gem][c];
      if (n > max_pkts) n = max_pkts;
      if (n <= 0) continue;
      usb.host_read(0, 1, RB + R_RO_DATA0 + c, 12 * n, q);
      for (int k = 0; k < n; k++) begin
        pkt_t p = gem ? g_vfat_pkt_gem(c, ro_seen[gem][c] + k) : g_vfat_pkt_rp(c, ro_seen[gem][c] + k);
        for (int w = 0; w < 12; w++)
          check(q[12*k + w] == {16'h0, pkt_word(p, w)}, $sformatf("ch%0d pkt %0d word %0d: %h vs %h", c, k, w, q[12*k+w], pkt_word(p, w)));
      end
      ro_seen[gem][c] += n;
    end
  endtask

  function automatic int g_vfat_sent_rp(int c);
    case (c) 0: return g_vfat[0].rp.sent.size(); 1: return g_vfat[1].rp.sent.size();
             2: return g_vfat[2].rp.sent.size(); default: return g_vfat[3].rp.sent.size(); endcase
  endfunction
  function automatic int g_vfat_sent_gem(int c);
    case (c) 0: return g_vfat[0].gem.sent.size(); 1: return g_vfat[1].gem.sent.size();
             2: return g_vfat[2].gem.sent.size(); default: return g_vfat[3].gem.sent.size(); endcase
  endfunction
  function automatic pkt_t g_vfat_pkt_rp(int c, int k);
    case (c) 0: return g_vfat[0].rp.sent[k]; 1: return g_vfat[1].rp.sent[k];
             2: return g_vfat[2].rp.sent[k]; default: return g_vfat[3].rp.sent[k]; endcase
  endfunction
  function automatic pkt_t g_vfat_pkt_gem(int c, int k);
    case (c) 0: return g_vfat[0].gem.sent[k]; 1: return g_vfat[1].gem.sent[k];
             2: return g_vfat[2].gem.sent[k]; default: return g_vfat[3].gem.sent[k]; endcase
  endfunction

  task automatic pulse_input(bit ext);
    @(negedge clk);
    if (ext) ext_trig = 1; else ttc_l1a = 1;
    @(negedge clk); ttc_l1a = 0;
    repeat (3) @(negedge clk); ext_trig = 0;
    repeat (300) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v, q[$];
    int iv[$];
    int n0, c0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    usb.armed = 1;
    // power-up reset of the CCUM
    wait (ccum_reset_n);
    check(n_ccum_reset <= 1, "one power-up CCUM reset");

    // synchronise the front end
    cmd(C_RESYNCH);
    cmd(C_BC0);
    repeat (20) @(posedge clk);
    check(g_vfat[0].rp.n_resynch == 1 && g_vfat[0].rp.n_bc0 == 1, "single T1 commands reach the VFATs");

    // pattern RAM read-back
    iv = '{300, 250, 400, 210, 333, 260, 290, 500, 222, 1000};
    load_pattern(iv);
    usb.host_read(0, 0, 0, 10, q);
    foreach (iv[i]) check(q[i] == 32'(iv[i]), "pattern RAM read-back");

    // 1) LV1A burst from the pattern RAM, Roman Pot readout
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_INTERNAL, MODE_LV1A));
    run_burst(iv);
    rreg(R_PULSES, v);
    check(v == 10, "burst of 10 pulses");
    check(g_vfat[0].rp.n_lv1a == 10, "10 LV1A received");
    m_mode_lv1a++;
    rreg(R_EVT_FILL, v);
    check(v[8:0] == 10 && v[23:16] == 0, $sformatf("10 events waiting, none lost (%h)", v));
    rreg(R_COUNTERS, v);
    check(v[7:0] == 10, $sformatf("live event counter (%h)", v));
    repeat (400) @(posedge clk);
    rreg(R_PKT_CNT, v);
    check(v == 32'h0A0A_0A0A, $sformatf("10 packets received per channel (%h)", v));
    check_events();
    check_readout(0);

    // 2) CalPulse + LV1A mode, latency 20, with s-bits
    wreg(R_CAL_LAT, 20);
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_INTERNAL, MODE_CAL_LV1A));
    n0 = g_vfat[0].rp.n_lv1a; c0 = g_vfat[0].rp.n_cal;
    run_burst('{400, 400, 400, 400, 400});
    check(g_vfat[0].rp.n_cal - c0 == 5 && g_vfat[0].rp.n_lv1a - n0 == 5, "CalPulse+LV1A pairs");
    m_mode_cal_lv1a++;
    rreg(R_SBIT_STAT, v);
    check(v[8:0] == 5 && v[23:16] == 0, $sformatf("5 s-bit records, none lost (%h)", v));
    usb.host_read(0, 1, RB + R_SBIT_FIFO, 5, q);
    foreach (q[i]) check(!q[i][31] && q[i][15:12] == 4'b1111, $sformatf("s-bit word %h", q[i]));
    rreg(R_SBIT_FIFO, v);
    check(v[31], "s-bit FIFO then empty");
    m_sbit++;
    check_events();
    check_readout(0);

    // 3) CalPulse only
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_INTERNAL, MODE_CALPULSE));
    n0 = g_vfat[0].rp.n_lv1a; c0 = g_vfat[0].rp.n_cal;
    run_burst('{50, 60, 70});
    check(g_vfat[0].rp.n_cal - c0 == 3 && g_vfat[0].rp.n_lv1a == n0, "CalPulse mode");
    m_mode_cal++;
    usb.host_read(0, 1, RB + R_SBIT_FIFO, 3, q);   // drain the s-bit words

    // 4) external and TTC triggers
    n0 = g_vfat[0].rp.n_lv1a;
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_EXTERNAL, MODE_LV1A));
    pulse_input(1); pulse_input(1); pulse_input(0);   // the TTC pulse is ignored
    check(g_vfat[0].rp.n_lv1a - n0 == 2, "external triggers");
    m_ext++;
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_TTC, MODE_LV1A));
    pulse_input(0); pulse_input(1);                   // the external pulse is ignored
    check(g_vfat[0].rp.n_lv1a - n0 == 3, "TTC trigger");
    m_ttc++;
    check_events();
    check_readout(0);

    // 5) priority: all four host commands in one write
    g_vfat[0].rp.cmd_log.delete();
    wreg(R_COMMAND, (1 << C_LV1A) | (1 << C_CALPULSE) | (1 << C_BC0) | (1 << C_RESYNCH));
    repeat (400) @(posedge clk);
    check(g_vfat[0].rp.cmd_log.size() == 4 && g_vfat[0].rp.cmd_log[0] == 2 && g_vfat[0].rp.cmd_log[1] == 1 &&
          g_vfat[0].rp.cmd_log[2] == 3 && g_vfat[0].rp.cmd_log[3] == 0, "Resynch, BC0, CalPulse, LV1A order");
    m_priority++;
    usb.host_read(0, 1, RB + R_SBIT_FIFO, 1, q);
    check_events();
    check_readout(0);

    // 6) requests faster than the T1 line: some LV1A are lost, counters stay in step
    wreg(R_CAL_LAT, 1);
    wreg(R_CONTROL, ctrl(1'b0, 1'b0, SRC_INTERNAL, MODE_CAL_LV1A));
    run_burst('{3, 3, 3, 3, 3, 3});
    rreg(R_LOST_CMDS, v);
    check(v > 0, $sformatf("lost T1 requests reported (%0d)", v));
    if (v > 0) m_lost++;
    repeat (3000) @(posedge clk);
    check_events();
    check_readout(0);
    usb.host_read(0, 1, RB + R_SBIT_FIFO, 8, q);

    // 7) GEM hybrids
    wreg(R_CONTROL, ctrl(1'b1, 1'b0, SRC_INTERNAL, MODE_LV1A));
    for (int c = 0; c < 4; c++) ro_seen[1][c] = g_vfat_sent_gem(c);
    for (int c = 0; c < 4; c++) ro_seen[0][c] = g_vfat_sent_rp(c);
    repeat (400) @(posedge clk);
    run_burst('{300, 300, 300});
    check_events();
    check_readout(1);
    for (int c = 0; c < 4; c++) ro_seen[0][c] = g_vfat_sent_rp(c);
    rreg(R_RO_COUNT0, v);
    check(v == 0, "GEM packets all read");
    m_gem++;

    // 8) header error on one packet
    g_vfat[2].gem.corrupt_next = 1;
    run_burst('{300});
    rreg(R_HDR_ERR, v);
    check(v[23:16] == 8'd1 && v[31:24] == 0 && v[15:0] == 0, $sformatf("header error on channel 2 (%h)", v));
    if (v[23:16] == 8'd1) m_hdr_err++;
    check_events();
    check_readout(1);

    // 9) loop mode, stopped by the host
    wreg(R_CONTROL, ctrl(1'b1, 1'b1, SRC_INTERNAL, MODE_LV1A));
    wreg(R_BURST_LEN, 2);
    load_pattern('{300, 300});
    n0 = g_vfat[0].gem.n_lv1a;
    cmd(C_PG_START);
    repeat (2500) @(posedge clk);
    cmd(C_PG_STOP);
    wait_idle();
    check(g_vfat[0].gem.n_lv1a - n0 >= 7, "loop mode keeps triggering");
    m_loop++;
    check_events();
    check_readout(1);

    // 10) overflow: 86 packets into 1024-word FIFOs, 85 kept
    wreg(R_CONTROL, ctrl(1'b1, 1'b0, SRC_INTERNAL, MODE_LV1A));
    iv.delete();
    for (int i = 0; i < 86; i++) iv.push_back(200 + (i % 7));
    run_burst(iv);
    rreg(R_RO_COUNT0 + 1, v);
    check(v == 1020, $sformatf("85 packets kept (%0d words)", v));
    rreg(R_DROPPED, v);
    check(v == 32'h0101_0101, $sformatf("one packet dropped per channel (%h)", v));
    if (v == 32'h0101_0101) m_overflow++;
    check_events();
    check_readout(1, 85);
    for (int c = 0; c < 4; c++) ro_seen[1][c] = g_vfat_sent_gem(c);

    // 11) FIFO clear
    run_burst('{300, 300});
    cmd(C_CLEAR);
    rreg(R_STATUS, v);
    check(v[11:8] == 4'hF && v[1] && v[2], "clear empties the FIFOs");
    m_clear++;
    ev_seen = g_vfat[0].rp.sent.size();
    for (int c = 0; c < 4; c++) ro_seen[1][c] = g_vfat_sent_gem(c);

    // 12) CCUM reset from the host
    wreg(R_DOH_LEN, 100);
    n0 = n_ccum_reset;
    cmd(C_DOH);
    repeat (200) @(posedge clk);
    check(n_ccum_reset == n0 + 1 && ccum_reset_n, "CCUM reset pulse");
    m_doh++;

    // 13) direct FEC-core access
    usb.host_write(1, 0, 16'h0042, '{32'h1234_5678});
    usb.host_read(1, 0, 16'h0077, 1, q);
    check(fec_w == 1 && fec_last_w == 32'h1234_5678 && fec_r == 1 && q[0] == 32'hFEC0_0077, $sformatf("FEC access w=%0d r=%0d %h %h", fec_w, fec_r, fec_last_w, q[0]));
    m_fec++;

    check(usb.errors == 0, "FT245 bus timing");

    // every mechanism happened
    $display("mechanisms: burst=%0d loop=%0d lv1a=%0d cal=%0d cal+lv1a=%0d ext=%0d ttc=%0d priority=%0d lost=%0d gem=%0d overflow=%0d hdr_err=%0d sbit=%0d clear=%0d doh=%0d fec=%0d",
             m_burst, m_loop, m_mode_lv1a, m_mode_cal, m_mode_cal_lv1a, m_ext, m_ttc, m_priority,
             m_lost, m_gem, m_overflow, m_hdr_err, m_sbit, m_clear, m_doh, m_fec);
    check(m_burst > 0, "burst"); check(m_loop > 0, "loop"); check(m_mode_lv1a > 0, "LV1A mode");
    check(m_mode_cal > 0, "CalPulse mode"); check(m_mode_cal_lv1a > 0, "CalPulse+LV1A mode");
    check(m_ext > 0, "external"); check(m_ttc > 0, "TTC"); check(m_priority > 0, "priority");
    check(m_lost > 0, "lost"); check(m_gem > 0, "GEM"); check(m_overflow > 0, "overflow");
    check(m_hdr_err > 0, "header error"); check(m_sbit > 0, "s-bit"); check(m_clear > 0, "clear");
    check(m_doh > 0, "CCUM reset"); check(m_fec > 0, "FEC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
