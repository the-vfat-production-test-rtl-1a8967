// sbit_recorder: s-bit (fast OR) activity recorder with time stamps.
//
// The VFAT "Trigger" outputs (programmable fast ORs, the s-bits) of the four
// selected front-end chips are watched every clock. Whenever at least one
// s-bit rises, a 16-bit word {s-bit pattern[3:0], time stamp[11:0]} is pushed
// into a FIFO that the host reads. The platform names this block ("s-bit &
// timestamp") without describing it; the rising-edge rule, the word layout,
// the use of the bunch counter as time stamp and the 256-word depth are this
// design's own. Words written while the FIFO is full are lost and counted.
//
// Timing: the word for an edge seen in clock c is in the FIFO after edge c+1.
module sbit_recorder #(
  parameter int NSBIT = 4,
  parameter int TS_W  = 12,
  parameter int DEPTH = 256,
  localparam int CW   = $clog2(DEPTH) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic [NSBIT-1:0]      sbit,
  input  logic [TS_W-1:0]       timestamp,
  input  logic                  rd_en,
  output logic [NSBIT+TS_W-1:0] rd_data,
  output logic                  empty,
  output logic [CW-1:0]         count,
  output logic [7:0]            lost_cnt
);

  logic [NSBIT-1:0] sbit_q;
  logic             hit, full, overflow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sbit_q <= '0;
    else        sbit_q <= sbit;
  end

  assign hit = (sbit & ~sbit_q) != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lost_cnt <= '0;
    else if (clr)      lost_cnt <= '0;
    else if (overflow) lost_cnt <= lost_cnt + 1'b1;
  end

  sync_fifo #(.WIDTH(NSBIT + TS_W), .DEPTH(DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (clr),
    .wr_en    (hit),
    .wr_data  ({sbit, timestamp}),
    .rd_en    (rd_en),
    .rd_data  (rd_data),
    .empty    (empty),
    .full     (full),
    .count    (count),
    .overflow (overflow)
  );

endmodule
