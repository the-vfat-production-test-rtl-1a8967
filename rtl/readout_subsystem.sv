// readout_subsystem: VFAT data reception for the four readout channels.
//
// The platform can read either the Roman Pot hybrid (four VFATs) or the four
// single-VFAT GEM hybrids; `sel_gem` picks which four serial data lines (and
// which four s-bit lines) are used. Each line feeds a vfat_deserializer whose
// 16-bit words go into a 1024 x 16-bit packet FIFO, enough for 85 whole
// 192-bit packets. The channel count, FIFO size and the RP/GEM selection
// follow the platform specification; registering the selected lines once
// (one clock of latency) is this design's choice.
//
// Host side: per channel a show-ahead FIFO read port (`rd_en` pops
// `rd_data`), the fill level and the deserializer's counters. `clr` empties
// all FIFOs.
module readout_subsystem
  import ttp_pkg::*;
#(
  parameter int NCH        = 4,
  parameter int FIFO_DEPTH = 1024,
  localparam int CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sel_gem,
  input  logic [NCH-1:0]        rp_data,
  input  logic [NCH-1:0]        gem_data,
  input  logic [NCH-1:0]        rp_sbit,
  input  logic [NCH-1:0]        gem_sbit,
  output logic [NCH-1:0]        sbit,        // selected s-bits, registered
  input  logic                  clr,
  input  logic [NCH-1:0]        rd_en,
  output logic [NCH-1:0][15:0]  rd_data,
  output logic [NCH-1:0][CW-1:0] count,
  output logic [NCH-1:0]        empty,
  output logic [NCH-1:0][7:0]   pkt_cnt,
  output logic [NCH-1:0][7:0]   drop_cnt,
  output logic [NCH-1:0][7:0]   hdr_err_cnt
);

  logic [NCH-1:0] din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din  <= '0;
      sbit <= '0;
    end else begin
      din  <= sel_gem ? gem_data : rp_data;
      sbit <= sel_gem ? gem_sbit : rp_sbit;
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic        wr_en, full, overflow, pkt_done, busy;
    logic [15:0] wr_data;
    logic [CW-1:0] free;

    assign free = CW'(FIFO_DEPTH) - count[c];

    vfat_deserializer #(.FREE_W(CW)) u_deser (
      .clk         (clk),
      .rst_n       (rst_n),
      .din         (din[c]),
      .fifo_free   (free),
      .wr_en       (wr_en),
      .wr_data     (wr_data),
      .pkt_done    (pkt_done),
      .busy        (busy),
      .pkt_cnt     (pkt_cnt[c]),
      .drop_cnt    (drop_cnt[c]),
      .hdr_err_cnt (hdr_err_cnt[c])
    );

    sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .clr      (clr),
      .wr_en    (wr_en),
      .wr_data  (wr_data),
      .rd_en    (rd_en[c]),
      .rd_data  (rd_data[c]),
      .empty    (empty[c]),
      .full     (full),
      .count    (count[c]),
      .overflow (overflow)
    );

    // Room is reserved at the start of every packet, so the FIFO cannot overflow.
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow);
  end

endmodule
