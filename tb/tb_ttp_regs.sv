// tb_ttp_regs: exercises the memory-space decoder and register file with a
// pattern-RAM model and status inputs driven by the test. Checks read-back of
// every writable register, one-clock COMMAND strobes, FIFO pops on reads of
// the FIFO registers (exactly one pop per read), RAM accesses routed below
// 0x400 only, status and counter fields, and the one-clock read latency.
module tb_ttp_regs;
  import ttp_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic [10:0] addr = '0;
  logic we = 0, re = 0, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [9:0] ram_addr;
  logic ram_we;
  logic [31:0] ram_wdata, ram_rdata;
  trig_mode_e mode; trig_src_e src;
  logic loop, sel_gem, pg_start, pg_stop, fifo_clr, doh_fire;
  logic [10:0] burst_len;
  logic [8:0] cal_lat;
  logic [15:0] doh_len;
  t1_req_t host_cmd, t1_lost = '0;
  logic pg_busy = 0;
  logic [10:0] pulse_count = '0;
  logic [7:0] ec_data = '0;
  logic [11:0] bc_data = '0;
  logic ec_empty = 1, bc_empty = 1, ec_pop, bc_pop;
  logic [NCH-1:0][15:0] ro_data = '0;
  logic [NCH-1:0][10:0] ro_count = '0;
  logic [NCH-1:0] ro_empty = '1, ro_pop;
  logic [NCH-1:0][7:0] ro_drop = '0, ro_hdr_err = '0;
  logic [15:0] sbit_data = '0;
  logic sbit_empty = 1, sbit_pop;
  logic [8:0] sbit_count = '0, evt_count = '0;
  logic [7:0] sbit_lost = '0, ec_now = '0;
  logic evt_overflow = 0, t1_busy = 0;
  logic [NCH-1:0][7:0] ro_pkt = '0;
  logic [11:0] bc_now = '0;
  int checks = 0, failures = 0;
  int pops[string];

  ttp_regs dut (.*);
  always #5 clk = ~clk;

  // pattern RAM model
  logic [31:0] ram [1024];
  always @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_wdata;
    ram_rdata <= ram[ram_addr];
  end

  // strobe and pop counters
  int n_start = 0, n_stop = 0, n_clr = 0, n_doh = 0, n_cmd = 0;
  always @(posedge clk) if (rst_n) begin
    if (pg_start) n_start++;
    if (pg_stop) n_stop++;
    if (fifo_clr) n_clr++;
    if (doh_fire) n_doh++;
    if (host_cmd != '0) n_cmd++;
    if (ec_pop) pops["ec"]++;
    if (bc_pop) pops["bc"]++;
    if (sbit_pop) pops["sbit"]++;
    for (int c = 0; c < NCH; c++) if (ro_pop[c]) pops[$sformatf("ro%0d", c)]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); addr = 11'(a); wdata = d; we = 1;
    @(negedge clk); we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); addr = 11'(a); re = 1;
    @(negedge clk); re = 0;
    check(rvalid, "rvalid one clock after re");
    d = rdata;
    @(negedge clk);
    check(!rvalid, "rvalid is one clock");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, v;
    logic [31:0] words [16];
    int a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pattern RAM window
    for (int i = 0; i < 16; i++) begin
      words[i] = $urandom;
      wr(i * 64 + 3, words[i]);
    end
    for (int i = 0; i < 16; i++) begin
      rd(i * 64 + 3, d);
      check(d == words[i], "RAM read-back");
    end
    // register writes do not touch the RAM
    d = ram[10'h000];
    wr(12'h400 + R_SCRATCH, 32'h1234_5678);
    check(ram[10'h000] == d && ram[10'h015] != 32'h1234_5678 || ram[10'h015] == words[0], "register write stays out of RAM");
    rd(12'h400 + R_SCRATCH, d);
    check(d == 32'h1234_5678, "scratch");
    // control fields
    wr(12'h400 + R_CONTROL, 32'h3A);   // mode 2, source 2, loop 1, gem 1
    check(mode == MODE_CAL_LV1A && src == SRC_TTC && loop && sel_gem, "control fields");
    rd(12'h400 + R_CONTROL, d);
    check(d == 32'h3A, "control read-back");
    wr(12'h400 + R_BURST_LEN, 32'd1024);
    check(burst_len == 11'd1024, "burst length");
    wr(12'h400 + R_CAL_LAT, 32'd200);
    check(cal_lat == 9'd200, "latency");
    wr(12'h400 + R_DOH_LEN, 32'd999);
    rd(12'h400 + R_DOH_LEN, d);
    check(doh_len == 16'd999 && d == 32'd999, "DOH length");
    // random words over the whole RAM and random register values
    for (int i = 0; i < 64; i++) begin
      a = $urandom_range(0, 1023);
      v = $urandom;
      wr(a, v);
      rd(a, d);
      check(d == v && ram[a] == v, $sformatf("RAM word %0d", a));
      v = $urandom;
      wr(12'h400 + R_BURST_LEN, v);
      rd(12'h400 + R_BURST_LEN, d);
      check(burst_len == v[10:0] && d == 32'(v[10:0]), "random burst length");
      wr(12'h400 + R_CAL_LAT, v);
      rd(12'h400 + R_CAL_LAT, d);
      check(cal_lat == v[8:0] && d == 32'(v[8:0]), "random latency");
      wr(12'h400 + R_DOH_LEN, v);
      rd(12'h400 + R_DOH_LEN, d);
      check(doh_len == v[15:0] && d == 32'(v[15:0]), "random DOH length");
      if (v[3:2] == 2'd3) v[3:2] = 2'd1;   // only three sources and modes exist
      if (v[1:0] == 2'd3) v[1:0] = 2'd2;
      wr(12'h400 + R_CONTROL, v);
      rd(12'h400 + R_CONTROL, d);
      check(2'(src) == v[3:2] && 2'(mode) == v[1:0] && loop == v[4] && sel_gem == v[5] && d == 32'(v[5:0]),
            "random control fields");
    end
    // command strobes: each one clock
    wr(12'h400 + R_COMMAND, 32'hFF);
    repeat (3) @(negedge clk);
    check(n_start == 1 && n_stop == 1 && n_clr == 1 && n_doh == 1 && n_cmd == 1, $sformatf("one-clock strobes %0d %0d %0d %0d %0d", n_start, n_stop, n_clr, n_doh, n_cmd));
    wr(12'h400 + R_COMMAND, 32'h1 << C_BC0);
    // status
    pg_busy = 1; ec_empty = 0; ro_empty = 4'b0101;
    rd(12'h400 + R_STATUS, d);
    check(d == 32'h0000_050D, $sformatf("status %h", d));
    pulse_count = 11'd77;
    rd(12'h400 + R_PULSES, d);
    check(d == 77, "pulse count");
    // FIFO registers pop exactly once per read
    ec_data = 8'h5A; bc_data = 12'hBCD; bc_empty = 0; sbit_data = 16'hABCD; sbit_empty = 0;
    ro_data[2] = 16'hA5A5; ro_count[2] = 11'd36; ro_empty[2] = 0;
    rd(12'h400 + R_EC_FIFO, d);   check(d == 32'h5A, "EC FIFO word");
    rd(12'h400 + R_BC_FIFO, d);   check(d == 32'hBCD, "BC FIFO word");
    rd(12'h400 + R_SBIT_FIFO, d); check(d == 32'hABCD, "s-bit FIFO word");
    rd(12'h400 + R_RO_DATA0 + 2, d); check(d == 32'hA5A5, "readout FIFO word");
    rd(12'h400 + R_RO_COUNT0 + 2, d); check(d == 36, "readout fill level");
    ec_empty = 1;
    rd(12'h400 + R_EC_FIFO, d);   check(d[31], "empty flag on FIFO word");
    check(pops["ec"] == 2 && pops["bc"] == 1 && pops["sbit"] == 1 && pops["ro2"] == 1 &&
          !pops.exists("ro0") && !pops.exists("ro1"), "one pop per read");
    // counters
    ro_drop[1] = 8'd3; ro_hdr_err[3] = 8'd9;
    rd(12'h400 + R_DROPPED, d); check(d == 32'h0000_0300, "drop counters");
    rd(12'h400 + R_HDR_ERR, d); check(d == 32'h0900_0000, "header error counters");
    @(negedge clk); t1_lost.lv1a = 1; @(negedge clk); @(negedge clk); t1_lost = '0;
    rd(12'h400 + R_LOST_CMDS, d); check(d == 2, "lost commands");
    // pops of the other readout channels
    ro_empty = '0;
    for (int c = 0; c < NCH; c++) begin
      ro_data[c] = 16'(16'h1111 * (c + 1));
      rd(12'h400 + R_RO_DATA0 + c, d);
      check(d == 32'(ro_data[c]), $sformatf("readout channel %0d word", c));
    end
    check(pops["ro0"] == 1 && pops["ro1"] == 1 && pops["ro2"] == 2 && pops["ro3"] == 1, "one pop per channel read");
    ro_empty = '1;
    // monitoring registers
    t1_busy = 1;
    rd(12'h400 + R_STATUS, d); check(d[4], "T1 busy status bit");
    evt_count = 9'd256; sbit_count = 9'd17; sbit_lost = 8'd4;
    ro_pkt[0] = 8'h11; ro_pkt[3] = 8'hC4; ec_now = 8'h3E; bc_now = 12'hDEC;
    @(negedge clk); evt_overflow = 1; repeat (3) @(negedge clk); evt_overflow = 0;
    rd(12'h400 + R_EVT_FILL, d);  check(d == 32'h0003_0100, $sformatf("event FIFO fill %h", d));
    rd(12'h400 + R_SBIT_STAT, d); check(d == 32'h0004_0011, $sformatf("s-bit status %h", d));
    rd(12'h400 + R_PKT_CNT, d);   check(d == 32'hC400_0011, $sformatf("packet counters %h", d));
    rd(12'h400 + R_COUNTERS, d);  check(d == 32'h0DEC_003E, $sformatf("live EC/BC %h", d));
    wr(12'h400 + R_COMMAND, 32'h1 << C_CLEAR);
    rd(12'h400 + R_EVT_FILL, d);  check(d[23:16] == 0, "overflow count cleared");
    // unmapped register
    rd(12'h400 + 8'h80, d); check(d == 0, "unused register reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
