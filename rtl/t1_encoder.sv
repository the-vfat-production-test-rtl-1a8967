// t1_encoder: fast T1 command encoder and serialiser.
//
// The four fast commands reach the front-end chips as 3-bit patterns on a
// single line, one bit per clock, most significant bit first: a '1' start bit,
// then the 2-bit code ("00" LV1A, "01" BC0, "10" Resynch, "11" CalPulse). The
// line idles at '0'. When several commands wait, the highest priority goes
// first: Resynch, then BC0, then CalPulse, then LV1A. Patterns and priorities
// follow the platform specification; the queueing is this design's own: each
// command has one pending flag, a request that finds its flag already set is
// lost and reported on `lost`.
//
// Timing: a request in clock c (with the line free) puts the start bit on
// `t1_out` after edge c, i.e. `t1_out` is registered. Commands can follow
// back-to-back, one every 3 clocks. `sent` pulses, together with the start
// bit, for the command being transmitted.
module t1_encoder
  import ttp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  t1_req_t req,      // one-clock requests
  output logic    t1_out,   // serial T1 line
  output t1_req_t sent,     // command whose start bit is on t1_out
  output t1_req_t lost,     // request dropped, same command already pending
  output logic    busy
);

  t1_req_t    pend, eff, issue;
  logic [1:0] code_sh, code;
  logic [1:0] left;          // code bits still to send

  assign eff = pend | req;

  // Fixed-priority selection, only when the line is free.
  always_comb begin
    issue = '0;
    code  = T1_LV1A;
    if (left == 2'd0) begin
      if (eff.resynch) begin
        issue.resynch = 1'b1;  code = T1_RESYNCH;
      end else if (eff.bc0) begin
        issue.bc0 = 1'b1;      code = T1_BC0;
      end else if (eff.calpulse) begin
        issue.calpulse = 1'b1; code = T1_CALPULSE;
      end else if (eff.lv1a) begin
        issue.lv1a = 1'b1;     code = T1_LV1A;
      end
    end
  end

  assign busy = (left != 2'd0) || (pend != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= '0;
      code_sh <= '0;
      left    <= '0;
      t1_out  <= 1'b0;
      sent    <= '0;
      lost    <= '0;
    end else begin
      pend <= (pend & ~issue) | (req & ~(issue & ~pend));
      lost <= req & pend & ~issue;
      sent <= issue;
      if (issue != '0) begin
        t1_out  <= 1'b1;          // start bit
        code_sh <= code;
        left    <= 2'd2;
      end else if (left != 2'd0) begin
        t1_out  <= code_sh[1];
        code_sh <= {code_sh[0], 1'b0};
        left    <= left - 1'b1;
      end else begin
        t1_out  <= 1'b0;
      end
    end
  end

  a_onehot_issue: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(issue));

endmodule
