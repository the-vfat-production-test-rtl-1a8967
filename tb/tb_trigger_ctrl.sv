// tb_trigger_ctrl: checks trigger source selection and the three trigger
// modes. Pulses from the pattern generator, the external input and the TTC
// input are applied while each source is selected; the resulting LV1A /
// CalPulse requests are compared with what the mode prescribes, including the
// CalPulse-to-LV1A latency and the 2-clock external-trigger synchroniser.
module tb_trigger_ctrl;
  import ttp_pkg::*;
  logic clk = 0, rst_n = 0;
  trig_src_e src = SRC_INTERNAL;
  trig_mode_e mode = MODE_LV1A;
  logic [8:0] cal_lat = 9'd1;
  logic pg_pulse = 0, ext_trig = 0, ttc_l1a = 0, trig;
  t1_req_t host_cmd = '0, req;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_lv1a[$], t_cal[$];

  trigger_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req.lv1a) t_lv1a.push_back(cyc);
    if (req.calpulse) t_cal.push_back(cyc);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one trigger on `which` (0 internal, 1 external, 2 TTC); returns its clock
  task automatic fire(int which, output longint t);
    @(negedge clk);
    t = cyc;
    case (which)
      0: pg_pulse = 1;
      1: ext_trig = 1;
      default: ttc_l1a = 1;
    endcase
    @(negedge clk);
    pg_pulse = 0; ttc_l1a = 0;
    if (which == 1) begin repeat (3) @(negedge clk); ext_trig = 0; end
  endtask

  task automatic settle();
    repeat (300) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t;
    int lat, lat_set, lat_exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      src = trig_src_e'(s);
      for (int m = 0; m < 3; m++) begin
        mode = trig_mode_e'(m);
        cal_lat = 9'(1 + ($urandom % 255));
        for (int w = 0; w < 3; w++) begin
          lat = (w == 1) ? 2 : 0;   // external input goes through the synchroniser
          t_lv1a.delete(); t_cal.delete();
          fire(w, t);
          settle();
          if (w != s) begin
            check(t_lv1a.size() == 0 && t_cal.size() == 0, "unselected source ignored");
          end else if (m == MODE_LV1A) begin
            check(t_lv1a.size() == 1 && t_cal.size() == 0, "LV1A mode");
            if (t_lv1a.size() == 1) check(t_lv1a[0] == t + lat, "LV1A timing");
          end else if (m == MODE_CALPULSE) begin
            check(t_lv1a.size() == 0 && t_cal.size() == 1, "CalPulse mode");
            if (t_cal.size() == 1) check(t_cal[0] == t + lat, "CalPulse timing");
          end else begin
            check(t_lv1a.size() == 1 && t_cal.size() == 1, "CalPulse+LV1A mode");
            if (t_lv1a.size() == 1 && t_cal.size() == 1)
              check(t_lv1a[0] - t_cal[0] == longint'(cal_lat), $sformatf("latency %0d vs %0d", t_lv1a[0] - t_cal[0], cal_lat));
          end
        end
      end
    end
    // latency limits: 0 acts as 1, above the line depth acts as the depth
    src = SRC_INTERNAL; mode = MODE_CAL_LV1A;
    for (int k = 0; k < 3; k++) begin
      lat_set = (k == 0) ? 0 : (k == 1) ? 256 : 300;
      lat_exp = (k == 0) ? 1 : 256;
      cal_lat = 9'(lat_set);
      t_lv1a.delete(); t_cal.delete();
      fire(0, t); settle();
      check(t_lv1a.size() == 1 && t_cal.size() == 1 && t_lv1a[0] - t_cal[0] == longint'(lat_exp), "latency limits");
    end
    // host commands pass through whatever the source
    src = SRC_TTC;
    @(negedge clk); host_cmd = '1;
    #1 check(req == 4'b1111, "host commands");
    @(negedge clk); host_cmd = '0;
    #1 check(req == 4'b0000, "host commands end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
