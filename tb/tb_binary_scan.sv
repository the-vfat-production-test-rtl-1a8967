// tb_binary_scan: the binary-scan test of a Roman Pot hybrid run on the whole
// platform at its default sizes. For each of the 128 channels in turn the
// host selects the channel to pulse through the FEC path (the i2c write that
// enables the channel's test charge), runs a burst of 80 CalPulse+LV1A pairs
// from the pattern RAM, then reads the 80 EC/BC records and the 80 packets
// (960 words) of each of the four VFATs over USB. From the packets it counts
// the hits of every channel and finds the dead and noisy channels, as the
// test software does; the VFAT models have one dead and one noisy channel
// planted.
module tb_binary_scan;
  import ttp_pkg::*;
  import vfat_pkt_pkg::*;

  localparam int PULSES = 80;           // pulses per channel (binary scan)
  localparam logic [15:0] CAL_CH_REG = 16'h0010;   // FEC-side channel select

  logic clk = 0, rst_n = 0;
  logic [7:0] usb_d_in, usb_d_out;
  logic usb_d_oe, usb_rd_n, usb_wr, usb_rxf_n, usb_txe_n;
  logic ext_trig = 0, ttc_l1a = 0, t1_out, ccum_reset_n;
  logic [3:0] rp_data, gem_data = '0, rp_sbit, gem_sbit = '0;
  logic [15:0] fec_addr;
  logic [31:0] fec_wdata, fec_rdata = '0;
  logic fec_we, fec_re, fec_rvalid = 0;

  int checks = 0, failures = 0;

  ttp_top dut (.*);
  ft245_model usb (.*);

  // the FEC core stand-in passes the channel select to the four chips
  for (genvar c = 0; c < 4; c++) begin : g_vfat
    vfat_model #(.CHIP_ID(12'h100 + 12'(c))) rp (.clk, .rst_n, .t1_in(t1_out), .data_out(rp_data[c]), .sbit_out(rp_sbit[c]));
    always @(posedge clk)
      if (rst_n && fec_we && fec_addr == CAL_CH_REG) rp.scan_ch = int'(fec_wdata);
  end

  always #12.5 clk = ~clk;   // 40 MHz

  // planted faults
  localparam int DEAD_CHIP = 1, DEAD_CH = 40, NOISY_CHIP = 2, NOISY_CH = 77;
  initial begin
    g_vfat[0].rp.scan_mode = 1; g_vfat[1].rp.scan_mode = 1;
    g_vfat[2].rp.scan_mode = 1; g_vfat[3].rp.scan_mode = 1;
    g_vfat[DEAD_CHIP].rp.dead_ch = DEAD_CH;
    g_vfat[NOISY_CHIP].rp.noisy_ch = NOISY_CH;
  end

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

  task automatic cmd(int bitn);
    wreg(R_COMMAND, 32'(1) << bitn);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // results of the scan: hits of the current step per chip and channel, and
  // the channels judged dead or noisy
  int scan_list[$];
  int hits [4][128];
  bit found_dead [4][128];
  bit found_noisy [4][128];
  int total [4][128];           // hits per channel over the whole scan

  initial begin
    logic [31:0] v, q[$], e[$], b[$];
    logic [127:0] data;
    logic [175:0] body;
    int p, prev_ec, n_dead, n_noisy;
    for (int c = 0; c < 4; c++)
      for (int ch = 0; ch < 128; ch++) begin
        total[c][ch] = 0; found_dead[c][ch] = 0; found_noisy[c][ch] = 0;
      end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    usb.armed = 1;
    wait (ccum_reset_n);

    cmd(C_RESYNCH);
    cmd(C_BC0);
    // 80 pulses, 250 clocks apart; CalPulse then LV1A 12 clocks later
    q.delete();
    for (int i = 0; i < PULSES; i++) q.push_back(32'd250);
    usb.host_write(0, 0, 0, q);
    wreg(R_BURST_LEN, PULSES);
    wreg(R_CAL_LAT, 12);
    wreg(R_CONTROL, {26'd0, 1'b0, 1'b0, 2'(SRC_INTERNAL), 2'(MODE_CAL_LV1A)});

    for (int ch = 0; ch < 128; ch++) scan_list.push_back(ch);
    prev_ec = -1;

    foreach (scan_list[s]) begin
      p = scan_list[s];
      usb.host_write(1, 0, int'(CAL_CH_REG), '{32'(p)});   // enable the test charge of channel p
      cmd(C_PG_START);
      do rreg(R_STATUS, v); while (v[0]);
      repeat (400) @(posedge clk);
      rreg(R_PULSES, v);
      check(v == PULSES, $sformatf("step %0d: %0d pulses", p, v));
      rreg(R_EVT_FILL, v);
      check(v[8:0] == 9'(PULSES) && v[23:16] == 0, $sformatf("step %0d: event records %h", p, v));
      // EC/BC records: one per LV1A, EC counting on from the last step
      usb.host_read(0, 1, RB + R_EC_FIFO, PULSES, e);
      usb.host_read(0, 1, RB + R_BC_FIFO, PULSES, b);
      for (int i = 0; i < PULSES; i++) begin
        check(!e[i][31] && !b[i][31], "EC/BC record present");
        check(int'(e[i][7:0]) == (prev_ec + 1) % 256, $sformatf("EC %0d after %0d", e[i][7:0], prev_ec));
        if (i > 0) check(b[i][11:0] == 12'(b[i-1][11:0] + 12'd250), "BC advances by the pulse spacing");
        prev_ec = int'(e[i][7:0]);
      end
      // packets of the four chips
      for (int c = 0; c < 4; c++) begin
        rreg(R_RO_COUNT0 + 8'(c), v);
        check(v == 12 * PULSES, $sformatf("step %0d chip %0d: %0d words", p, c, v));
        usb.host_read(0, 1, RB + R_RO_DATA0 + c, 12 * PULSES, q);
        for (int ch = 0; ch < 128; ch++) hits[c][ch] = 0;
        for (int k = 0; k < PULSES; k++) begin
          body = '0;
          for (int w = 0; w < 11; w++) body = {body[159:0], q[12*k + w][15:0]};
          data = body[127:0];
          check(q[12*k][15:12] == 4'b1010 && q[12*k+1][15:12] == 4'b1100 && q[12*k+2][15:12] == 4'b1110,
                "header nibbles");
          check(q[12*k+2][11:0] == 12'h100 + 12'(c), "chip ID");
          check(q[12*k+1][11:4] == e[k][7:0], "packet EC matches the EC FIFO");
          check(q[12*k][11:0] == b[k][11:0], "packet BC matches the BC FIFO");
          check(q[12*k+11][15:0] == crc16(body), "packet checksum");
          for (int ch = 0; ch < 128; ch++) hits[c][ch] += int'(data[ch]);
          for (int ch = 0; ch < 128; ch++) total[c][ch] += int'(data[ch]);
        end
        // analysis, as the test software does it
        for (int ch = 0; ch < 128; ch++) begin
          if (ch == p && hits[c][ch] < PULSES) found_dead[c][ch] = 1;
          if (ch != p && hits[c][ch] > 0) found_noisy[c][ch] = 1;
          if (ch == p)
            check(hits[c][ch] == ((c == DEAD_CHIP && ch == DEAD_CH) ? 0 : PULSES),
                  $sformatf("step %0d chip %0d: pulsed channel has %0d hits", p, c, hits[c][ch]));
          else
            check(hits[c][ch] == ((c == NOISY_CHIP && ch == NOISY_CH) ? PULSES : 0),
                  $sformatf("step %0d chip %0d: channel %0d has %0d hits", p, c, ch, hits[c][ch]));
        end
      end
      rreg(R_STATUS, v);
      check(v[11:8] == 4'hF && v[1] && v[2], "all FIFOs drained");
    end

    // hit histogram of the scan: 80 for a healthy channel, 0 for a dead one,
    // more than 80 for a singing one
    for (int c = 0; c < 4; c++)
      for (int ch = 0; ch < 128; ch++)
        if (c == DEAD_CHIP && ch == DEAD_CH)
          check(total[c][ch] == 0, $sformatf("dead channel total %0d", total[c][ch]));
        else if (c == NOISY_CHIP && ch == NOISY_CH)
          check(total[c][ch] > PULSES, $sformatf("singing channel total %0d", total[c][ch]));
        else
          check(total[c][ch] == PULSES, $sformatf("chip %0d channel %0d total %0d", c, ch, total[c][ch]));
    // scan result: exactly the planted dead and noisy channels
    n_dead = 0; n_noisy = 0;
    for (int c = 0; c < 4; c++)
      for (int ch = 0; ch < 128; ch++) begin
        n_dead += int'(found_dead[c][ch]);
        n_noisy += int'(found_noisy[c][ch]);
      end
    check(n_dead == 1 && found_dead[DEAD_CHIP][DEAD_CH], $sformatf("dead channels found: %0d", n_dead));
    check(n_noisy == 1 && found_noisy[NOISY_CHIP][NOISY_CH], $sformatf("noisy channels found: %0d", n_noisy));
    rreg(R_DROPPED, v);
    check(v == 0, "no packet dropped");
    rreg(R_LOST_CMDS, v);
    check(v == 0, "no T1 command lost");
    $display("binary scan: %0d steps of %0d pulses, %0d packets checked", scan_list.size(), PULSES,
             4 * PULSES * scan_list.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
