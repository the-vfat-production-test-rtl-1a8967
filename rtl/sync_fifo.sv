// sync_fifo: single-clock first-in first-out buffer.
//
// Used four ways in the TTP: the two 256-word event (EC, 8 bit) and bunch
// (BC, 12 bit) number FIFOs of the triggering subsystem, the 1024 x 16-bit
// packet FIFOs of the readout subsystem, and the s-bit FIFO. The depths and
// widths come from the platform specification; the show-ahead read port and
// the flag set are this design's choice.
//
// Interface: wr_en pushes wr_data unless the FIFO is full (the word is then
// discarded and `overflow` pulses). rd_data always shows the oldest word
// (show-ahead); rd_en pops it unless empty. `count` is the fill level, valid
// the cycle after a push or pop. clr empties the FIFO synchronously.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A pop never happens on an empty FIFO, a push never on a full one.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) do_rd |-> !empty);
  a_count_bound:  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
