// pattern_generator: RAM-based trigger burst generator.
//
// Structure as specified for the platform: an address counter selects a word
// of the pattern RAM, the word (an interval T in clock cycles) is loaded into a
// down counter, and when the down counter expires it emits a one-clock pulse,
// advances the address counter and loads the next interval. A burst of N pulses
// is therefore described by the intervals T1..TN stored at RAM words 0..N-1:
// T1 runs from the start of the burst to pulse 1, Tk from pulse k-1 to pulse k.
//
// Sizes follow the specification: 1024 intervals of 32 bit, bursts of up to
// 1024 pulses, intervals between 3 and 2^32 clocks. This design's own choices:
// an interval word of 0 means 2^32 clocks and words 1 or 2 are raised to the
// minimum of 3; a burst length of 0 or above the RAM size means a full RAM;
// in `loop` mode the burst restarts from word 0 without a gap.
//
// Timing: `start` at clock edge s gives the first pulse at edge s+2+T1 (one
// clock to fetch T1, one to register the pulse); pulse k+1 follows pulse k by
// exactly T(k+1) clocks. `stop` ends a burst at once. The RAM's port A is the
// host port of the memory space, passed through.
module pattern_generator #(
  parameter int WORDS = 1024,
  parameter int CNT_W = 32,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  logic             loop,
  input  logic [AW:0]      burst_len,   // pulses per burst
  output logic             pulse,       // one clock per trigger
  output logic             busy,
  output logic [AW:0]      pulse_count, // pulses emitted in the current burst
  // host port of the pattern RAM
  input  logic [AW-1:0]    host_addr,
  input  logic             host_we,
  input  logic [CNT_W-1:0] host_wdata,
  output logic [CNT_W-1:0] host_rdata
);

  localparam int MIN_T = 3;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;
  state_e state;

  logic [AW-1:0]    addr;       // address counter: next RAM word to load
  logic [CNT_W-1:0] q;          // RAM output, word at `addr`
  logic [CNT_W-1:0] cnt;        // down counter
  logic [AW:0]      len;        // effective burst length

  pattern_ram #(.WORDS(WORDS), .WIDTH(CNT_W)) u_ram (
    .clk     (clk),
    .a_addr  (host_addr),
    .a_we    (host_we),
    .a_wdata (host_wdata),
    .a_rdata (host_rdata),
    .b_addr  (addr),
    .b_rdata (q)
  );

  always_comb begin
    if (burst_len == '0 || burst_len > (AW+1)'(WORDS)) len = (AW+1)'(WORDS);
    else                                                len = burst_len;
  end

  // Interval actually loaded into the down counter.
  logic [CNT_W-1:0] t_load;
  always_comb begin
    if (q != '0 && q < CNT_W'(MIN_T)) t_load = CNT_W'(MIN_T);
    else                              t_load = q;   // 0 counts 2^CNT_W clocks
  end

  logic [AW-1:0] addr_next;
  assign addr_next = ({1'b0, addr} + 1'b1 == len) ? '0 : addr + 1'b1;

  logic last_pulse;
  assign last_pulse = (pulse_count + 1'b1 == len);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      addr        <= '0;
      cnt         <= '0;
      pulse       <= 1'b0;
      pulse_count <= '0;
    end else begin
      pulse <= 1'b0;
      unique case (state)
        S_IDLE: begin
          addr <= '0;
          if (start) begin
            pulse_count <= '0;
            state       <= S_LOAD;
          end
        end
        S_LOAD: begin          // q now holds word 0
          cnt   <= t_load;
          addr  <= addr_next;
          state <= S_RUN;
        end
        S_RUN: begin
          if (cnt == CNT_W'(1)) begin
            pulse <= 1'b1;
            if (last_pulse && !loop) begin
              pulse_count <= pulse_count + 1'b1;
              addr        <= '0;
              state       <= S_IDLE;
            end else begin
              pulse_count <= last_pulse ? '0 : pulse_count + 1'b1;
              cnt         <= t_load;
              addr        <= addr_next;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (stop) begin
        state <= S_IDLE;
        addr  <= '0;
      end
    end
  end

endmodule
