// doh_reset: reset generator for the CCUM (CCU25) hybrid.
//
// In the front-end control chain the CCU receives its hard reset from the
// optical hybrid (DOH); the test platform replaces that with this block. It
// drives the active-low `ccum_reset_n` for `len` clocks (0 counts as 1) once
// after the platform's own reset and again on every `fire` strobe from the
// host. The platform names a "DOH-like reset" without details: polarity,
// length control and the power-up pulse are this design's own.
//
// Timing: `ccum_reset_n` falls the clock after `fire` and rises `len` clocks
// later; a `fire` during a pulse restarts it.
module doh_reset #(
  parameter int LEN_W       = 16,
  parameter int POWERUP_LEN = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fire,
  input  logic [LEN_W-1:0] len,
  output logic             ccum_reset_n
);

  logic [LEN_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= LEN_W'(POWERUP_LEN);
      ccum_reset_n <= 1'b0;
    end else if (fire) begin
      cnt          <= (len == '0) ? LEN_W'(1) : len;
      ccum_reset_n <= 1'b0;
    end else if (cnt > LEN_W'(1)) begin
      cnt          <= cnt - 1'b1;
      ccum_reset_n <= 1'b0;
    end else begin
      cnt          <= '0;
      ccum_reset_n <= 1'b1;
    end
  end

endmodule
