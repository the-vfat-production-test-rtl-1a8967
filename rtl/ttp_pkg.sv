// ttp_pkg: types and constants shared by the TOTEM Test Platform (TTP) firmware.
//
// Holds the fast T1 command set with its 3-bit line patterns and priorities
// (these follow the platform's specification: '1' start bit, then "00"=LV1A,
// "01"=BC0, "10"=Resynch, "11"=CalPulse), the VFAT packet header nibbles, the
// memory-space map (pattern RAM at 0x000-0x3FF, registers at 0x400-0x4FF, as
// specified) and the register offsets, which are this design's own choice.
package ttp_pkg;

  // ---------------- fast T1 commands ----------------
  typedef enum logic [1:0] {
    T1_LV1A     = 2'b00,
    T1_BC0      = 2'b01,
    T1_RESYNCH  = 2'b10,
    T1_CALPULSE = 2'b11
  } t1_cmd_e;

  // One request / strobe line per command.
  typedef struct packed {
    logic resynch;   // priority 1 (highest)
    logic bc0;       // priority 2
    logic calpulse;  // priority 3
    logic lv1a;      // priority 4 (lowest)
  } t1_req_t;

  // ---------------- VFAT data packet ----------------
  localparam int          PKT_WORDS = 192 / 16;  // 192-bit packet, 12 words of 16 bit
  localparam logic [3:0]  HDR_BC    = 4'b1010;
  localparam logic [3:0]  HDR_EC    = 4'b1100;
  localparam logic [3:0]  HDR_CHIP  = 4'b1110;

  // ---------------- trigger settings ----------------
  typedef enum logic [1:0] {
    MODE_LV1A     = 2'd0,  // every pattern pulse sends LV1A
    MODE_CALPULSE = 2'd1,  // every pattern pulse sends CalPulse
    MODE_CAL_LV1A = 2'd2   // CalPulse, then LV1A a programmable latency later
  } trig_mode_e;

  typedef enum logic [1:0] {
    SRC_INTERNAL = 2'd0,   // RAM pattern generator
    SRC_EXTERNAL = 2'd1,   // external trigger input
    SRC_TTC      = 2'd2    // L1 accept from the TTCrm hybrid
  } trig_src_e;

  // ---------------- memory space ----------------
  localparam int MEM_AW = 11;                 // word address 0x000-0x4FF
  localparam logic [MEM_AW-1:0] REG_BASE = 11'h400;

  // Register word offsets inside 0x400-0x4FF.
  localparam logic [7:0] R_CONTROL    = 8'h00; // RW [1:0] mode [3:2] source [4] loop [5] readout GEM
  localparam logic [7:0] R_BURST_LEN  = 8'h01; // RW number of pulses per burst, 1..1024
  localparam logic [7:0] R_CAL_LAT    = 8'h02; // RW CalPulse -> LV1A latency in clocks
  localparam logic [7:0] R_COMMAND    = 8'h03; // W  one-shot strobes, see ttp_regs
  localparam logic [7:0] R_STATUS     = 8'h04; // R  busy and FIFO flags
  localparam logic [7:0] R_PULSES     = 8'h05; // R  pulses emitted in the current burst
  localparam logic [7:0] R_EC_FIFO    = 8'h06; // R  pops the EC FIFO
  localparam logic [7:0] R_BC_FIFO    = 8'h07; // R  pops the BC FIFO
  localparam logic [7:0] R_RO_DATA0   = 8'h08; // R  0x08..0x0B pop readout FIFO 0..3
  localparam logic [7:0] R_RO_COUNT0  = 8'h0C; // R  0x0C..0x0F readout FIFO fill 0..3
  localparam logic [7:0] R_SBIT_FIFO  = 8'h10; // R  pops the s-bit FIFO
  localparam logic [7:0] R_LOST_CMDS  = 8'h11; // R  T1 requests lost (already pending)
  localparam logic [7:0] R_DROPPED    = 8'h12; // R  packets dropped, one byte per channel
  localparam logic [7:0] R_HDR_ERR    = 8'h13; // R  header errors, one byte per channel
  localparam logic [7:0] R_DOH_LEN    = 8'h14; // RW CCUM reset pulse length in clocks
  localparam logic [7:0] R_SCRATCH    = 8'h15; // RW scratch register
  localparam logic [7:0] R_EVT_FILL   = 8'h16; // R  EC/BC FIFO fill, overflow counter
  localparam logic [7:0] R_SBIT_STAT  = 8'h17; // R  s-bit FIFO fill, lost words
  localparam logic [7:0] R_PKT_CNT    = 8'h18; // R  packets stored, one byte per channel
  localparam logic [7:0] R_COUNTERS   = 8'h19; // R  live EC [7:0] and BC [27:16]

  // COMMAND register bits.
  localparam int C_PG_START = 0;
  localparam int C_PG_STOP  = 1;
  localparam int C_LV1A     = 2;
  localparam int C_CALPULSE = 3;
  localparam int C_BC0      = 4;
  localparam int C_RESYNCH  = 5;
  localparam int C_CLEAR    = 6;
  localparam int C_DOH      = 7;

endpackage
