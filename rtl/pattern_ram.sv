// pattern_ram: the 1024 x 32-bit trigger-pattern RAM of the TTP memory space.
//
// Holds the intervals T1..TN (in clock cycles) between the pulses of a trigger
// burst. The size follows the platform specification (1024 words of 32 bit at
// memory-space addresses 0x000-0x3FF). Two ports, as the FPGA block RAM offers:
// port A is the host port (read/write, used by the USB memory-space access),
// port B is the read-only port of the pattern generator. Both ports read
// synchronously: data appears one clock after the address.
module pattern_ram #(
  parameter int WORDS = 1024,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic             clk,
  // port A: host
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: pattern generator
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
