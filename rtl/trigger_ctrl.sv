// trigger_ctrl: trigger source and triggering-mode logic.
//
// Chooses where triggers come from - the RAM pattern generator, an external
// trigger input or the L1 accept of the TTCrm hybrid - and turns each trigger
// into T1 command requests according to the mode: LV1A only, CalPulse only,
// or CalPulse followed by LV1A `cal_lat` clocks later (the usual way to read
// out an injected test charge). Host one-shot commands for any of the four
// T1 commands are merged in. The platform specification names internal,
// external and TTC sources and "internal triggering mode settings" without
// listing them; the three modes and the latency line are this design's own.
//
// Interface: `ext_trig` is asynchronous, synchronised by two flip-flops and
// edge-detected (one trigger per rising edge, 2 clocks latency). `ttc_l1a` is
// taken as a one-clock pulse already in this clock domain. `pg_pulse` and
// the host strobes are used as they are. `req` is combinational from the
// trigger except for the delayed LV1A of MODE_CAL_LV1A (latency `cal_lat`,
// 0 treated as 1, at most DELAY_DEPTH).
module trigger_ctrl
  import ttp_pkg::*;
#(
  parameter int DELAY_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  trig_src_e  src,
  input  trig_mode_e mode,
  input  logic [$clog2(DELAY_DEPTH):0] cal_lat,
  input  logic       pg_pulse,
  input  logic       ext_trig,
  input  logic       ttc_l1a,
  input  t1_req_t    host_cmd,
  output t1_req_t    req,
  output logic       trig        // the selected trigger, for monitoring
);

  logic [2:0] ext_sync;
  logic       ext_edge;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_trig};
  end
  assign ext_edge = ext_sync[1] && !ext_sync[2];

  always_comb begin
    unique case (src)
      SRC_INTERNAL: trig = pg_pulse;
      SRC_EXTERNAL: trig = ext_edge;
      SRC_TTC:      trig = ttc_l1a;
      default:      trig = 1'b0;
    endcase
  end

  // Latency line for the LV1A that follows a CalPulse.
  localparam int DW = $clog2(DELAY_DEPTH);
  logic [DELAY_DEPTH-1:0] dline;
  logic                   cal_trig, lv1a_late;
  logic [DW:0]            tap;
  assign tap = cal_lat - 1'b1;
  assign cal_trig = trig && (mode == MODE_CAL_LV1A);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dline <= '0;
    else        dline <= {dline[DELAY_DEPTH-2:0], cal_trig};
  end

  always_comb begin
    if (cal_lat == '0)                           lv1a_late = dline[0];
    else if (cal_lat >= (DW+1)'(DELAY_DEPTH))    lv1a_late = dline[DELAY_DEPTH-1];
    else                                         lv1a_late = dline[tap[DW-1:0]];
  end

  always_comb begin
    req          = host_cmd;
    req.lv1a     = host_cmd.lv1a || lv1a_late || (trig && mode == MODE_LV1A);
    req.calpulse = host_cmd.calpulse || (trig && (mode == MODE_CALPULSE || mode == MODE_CAL_LV1A));
  end

endmodule
