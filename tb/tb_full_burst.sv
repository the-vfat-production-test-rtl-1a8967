// tb_full_burst: the longest burst the platform makes, at its default sizes.
// The host fills all 1024 words of the pattern RAM over USB and starts one
// burst of 1024 CalPulse commands. The intervals are random between 3 and 40
// clocks, with a run of back-to-back minimum intervals and a few long ones
// (up to 100 000 clocks). The test decodes the T1 line itself and checks that
// every CalPulse start bit follows the previous one by exactly the stored
// interval, and that no command was lost. It also checks the burst's pulse
// count and that the s-bit FIFO filled to its 256 words while the VFAT
// models answered every CalPulse.
module tb_full_burst;
  import ttp_pkg::*;
  import vfat_pkt_pkg::*;

  localparam int N = 1024;

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

  for (genvar c = 0; c < 4; c++) begin : g_vfat
    vfat_model #(.CHIP_ID(12'h100 + 12'(c))) rp (.clk, .rst_n, .t1_in(t1_out), .data_out(rp_data[c]), .sbit_out(rp_sbit[c]));
  end

  always #12.5 clk = ~clk;   // 40 MHz

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

  // T1 line decoder: clock number of every CalPulse start bit
  longint cyc = 0;
  longint cal_at[$];
  int other_cmds = 0;
  int dstate = 0;
  longint t_start;
  logic b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      case (dstate)
        0: if (t1_out) begin t_start = cyc; dstate = 1; end
        1: begin b1 = t1_out; dstate = 2; end
        default: begin
          dstate = 0;
          if (b1 && t1_out) cal_at.push_back(t_start);
          else other_cmds++;
        end
      endcase
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v, q[$];
    int iv[N];
    int n_before;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    usb.armed = 1;
    wait (ccum_reset_n);

    for (int i = 0; i < N; i++) iv[i] = $urandom_range(3, 40);
    for (int i = 100; i < 140; i++) iv[i] = 3;        // back to back on the T1 line
    iv[500] = 100_000; iv[501] = 65_537; iv[N-1] = 4_096;
    q.delete();
    for (int i = 0; i < N; i++) q.push_back(32'(iv[i]));
    usb.host_write(0, 0, 0, q);
    usb.host_read(0, 0, 0, N, q);
    for (int i = 0; i < N; i++) check(q[i] == 32'(iv[i]), $sformatf("pattern word %0d", i));

    wreg(R_BURST_LEN, N);
    wreg(R_CONTROL, {26'd0, 1'b0, 1'b0, 2'(SRC_INTERNAL), 2'(MODE_CALPULSE)});
    n_before = other_cmds;
    wreg(R_COMMAND, 32'(1) << C_PG_START);
    do rreg(R_STATUS, v); while (v[0]);
    repeat (100) @(posedge clk);

    rreg(R_PULSES, v);
    check(v == N, $sformatf("pulses in the burst: %0d", v));
    check(cal_at.size() == N, $sformatf("CalPulse commands on the line: %0d", cal_at.size()));
    check(other_cmds == n_before, "no other command on the line");
    for (int i = 1; i < N && i < cal_at.size(); i++)
      check(cal_at[i] - cal_at[i-1] == longint'(iv[i]),
            $sformatf("pulse %0d: %0d clocks after the previous one, pattern says %0d", i, cal_at[i] - cal_at[i-1], iv[i]));
    rreg(R_LOST_CMDS, v);
    check(v == 0, $sformatf("lost T1 requests: %0d", v));
    check(g_vfat[0].rp.n_cal == N && g_vfat[3].rp.n_cal == N, "every VFAT decoded every CalPulse");
    // one s-bit record per CalPulse; the 256-word FIFO keeps the first 256
    rreg(R_SBIT_STAT, v);
    check(v[8:0] == 9'd256, $sformatf("s-bit FIFO full (%h)", v));
    rreg(R_SBIT_FIFO, v);
    check(!v[31] && v[15:12] == 4'hF, $sformatf("first s-bit record %h", v));
    if (cal_at.size() > 0)
      $display("burst of %0d CalPulses over %0d clocks", cal_at.size(), cal_at[$] - cal_at[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
