// ttp_top: FPGA firmware of the TOTEM Test Platform (TTP).
//
// The TTP is a portable, USB-controlled test bench for VFAT front-end hybrids.
// Its FPGA holds four subsystems, wired here as the platform's block diagram
// shows:
//  * triggering: a RAM pattern generator (or an external / TTCrm trigger),
//    the trigger-mode logic and the T1 encoder that sends the four fast
//    commands on one serial line to every hybrid; local EC/BC counters record
//    the event and bunch number of every LV1A in two 256-word FIFOs;
//  * readout: four VFAT deserializers (Roman Pot or GEM hybrids) filling
//    1024 x 16-bit packet FIFOs, plus an s-bit recorder;
//  * front-end control: the CCUM reset generator; the FEC core that talks to
//    the CCU25 i2c master is outside this RTL and is reached through the fec_*
//    ports (the host can address it directly);
//  * local control: the FT245 USB interface and the memory space (pattern RAM
//    at 0x000-0x3FF, registers at 0x400-0x4FF).
// Everything runs on one clock, the 40 MHz LHC-like bunch clock; rst_n is an
// asynchronous, active-low reset.
module ttp_top
  import ttp_pkg::*;
#(
  parameter int NCH        = 4,     // readout channels
  parameter int PG_WORDS   = 1024,  // pattern RAM words = longest burst
  parameter int RO_DEPTH   = 1024,  // words per readout FIFO
  parameter int EVT_DEPTH  = 256,   // words per EC / BC FIFO
  parameter int SBIT_DEPTH = 256    // words in the s-bit FIFO
) (
  input  logic            clk,
  input  logic            rst_n,
  // FT245 USB FIFO chip
  input  logic [7:0]      usb_d_in,
  output logic [7:0]      usb_d_out,
  output logic            usb_d_oe,
  output logic            usb_rd_n,
  output logic            usb_wr,
  input  logic            usb_rxf_n,
  input  logic            usb_txe_n,
  // trigger inputs
  input  logic            ext_trig,
  input  logic            ttc_l1a,
  // fast command line to all hybrids
  output logic            t1_out,
  // front-end data and s-bits
  input  logic [NCH-1:0]  rp_data,
  input  logic [NCH-1:0]  gem_data,
  input  logic [NCH-1:0]  rp_sbit,
  input  logic [NCH-1:0]  gem_sbit,
  // front-end control
  output logic            ccum_reset_n,
  output logic [15:0]     fec_addr,
  output logic [31:0]     fec_wdata,
  output logic            fec_we,
  output logic            fec_re,
  input  logic [31:0]     fec_rdata,
  input  logic            fec_rvalid
);

  localparam int PG_AW = $clog2(PG_WORDS);
  localparam int RO_CW = $clog2(RO_DEPTH) + 1;
  localparam int EV_CW = $clog2(EVT_DEPTH) + 1;
  localparam int SB_CW = $clog2(SBIT_DEPTH) + 1;

  // ---------------- local control: USB and memory space ----------------
  logic [15:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata, mem_rdata;
  logic        bus_we, bus_re, bus_fec, bus_rvalid, mem_rvalid;

  ft245_if u_usb (
    .clk, .rst_n,
    .usb_d_in, .usb_d_out, .usb_d_oe, .usb_rd_n, .usb_wr, .usb_rxf_n, .usb_txe_n,
    .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_fec,
    .bus_rdata, .bus_rvalid
  );

  assign fec_addr  = bus_addr;
  assign fec_wdata = bus_wdata;
  assign fec_we    = bus_we && bus_fec;
  assign fec_re    = bus_re && bus_fec;

  logic              mapped;
  logic [MEM_AW-1:0] mem_addr;
  assign mapped   = (bus_addr < 16'h0500);
  assign mem_addr = mapped ? bus_addr[MEM_AW-1:0] : '1;   // unmapped reads give 0

  assign bus_rvalid = mem_rvalid || fec_rvalid;
  assign bus_rdata  = mem_rvalid ? mem_rdata : fec_rdata;

  // register outputs
  trig_mode_e       mode;
  trig_src_e        src;
  logic             loop, sel_gem, pg_start, pg_stop, fifo_clr, doh_fire;
  logic [PG_AW:0]   burst_len, pulse_count;
  logic [8:0]       cal_lat;
  logic [15:0]      doh_len;
  t1_req_t          host_cmd;
  // pattern RAM host port
  logic [PG_AW-1:0] ram_addr;
  logic             ram_we;
  logic [31:0]      ram_wdata, ram_rdata;
  // status
  logic             pg_busy, pg_pulse;
  t1_req_t          t1_req, t1_sent, t1_lost;
  logic [7:0]       ev_ec, ec_data;
  logic [11:0]      ev_bc, bc_data, bc_now;
  logic [7:0]       ec_now;
  logic             ev_valid, ec_empty, bc_empty, ec_pop, bc_pop;
  logic [NCH-1:0][15:0]      ro_data;
  logic [NCH-1:0][RO_CW-1:0] ro_count;
  logic [NCH-1:0]            ro_empty, ro_pop;
  logic [NCH-1:0][7:0]       ro_pkt, ro_drop, ro_hdr_err;
  logic [NCH-1:0]            sbit;
  logic [NCH+11:0]           sbit_data;
  logic                      sbit_empty, sbit_pop;
  logic [SB_CW-1:0]          sbit_count;
  logic [7:0]                sbit_lost;
  logic                      ec_full, bc_full, ec_ovf, bc_ovf, t1_busy;
  logic [EV_CW-1:0]          ec_count, bc_count;

  ttp_regs #(.NCH(NCH), .RO_CW(RO_CW), .PG_AW(PG_AW)) u_regs (
    .clk, .rst_n,
    .addr (mem_addr), .we (bus_we && !bus_fec && mapped), .re (bus_re && !bus_fec),
    .wdata (bus_wdata), .rdata (mem_rdata), .rvalid (mem_rvalid),
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .mode, .src, .loop, .sel_gem, .burst_len, .cal_lat, .doh_len,
    .pg_start, .pg_stop, .host_cmd, .fifo_clr, .doh_fire,
    .pg_busy, .pulse_count, .t1_lost,
    .ec_data, .ec_empty, .bc_data, .bc_empty, .ec_pop, .bc_pop,
    .ro_data, .ro_count, .ro_empty, .ro_pop, .ro_drop, .ro_hdr_err,
    .sbit_data (16'(sbit_data)), .sbit_empty, .sbit_pop,
    .sbit_count (9'(sbit_count)), .sbit_lost, .evt_count (9'(ec_count)),
    .evt_overflow (ec_ovf), .ro_pkt, .ec_now, .bc_now, .t1_busy
  );

  // ---------------- triggering subsystem ----------------
  pattern_generator #(.WORDS(PG_WORDS), .CNT_W(32)) u_pg (
    .clk, .rst_n,
    .start (pg_start), .stop (pg_stop), .loop, .burst_len,
    .pulse (pg_pulse), .busy (pg_busy), .pulse_count,
    .host_addr (ram_addr), .host_we (ram_we), .host_wdata (ram_wdata), .host_rdata (ram_rdata)
  );

  trigger_ctrl #(.DELAY_DEPTH(256)) u_trig (
    .clk, .rst_n, .src, .mode, .cal_lat,
    .pg_pulse, .ext_trig, .ttc_l1a, .host_cmd,
    .req (t1_req), .trig ()
  );

  t1_encoder u_t1 (
    .clk, .rst_n, .req (t1_req), .t1_out, .sent (t1_sent), .lost (t1_lost), .busy (t1_busy)
  );

  ec_bc_counter #(.EC_W(8), .BC_W(12)) u_cnt (
    .clk, .rst_n, .sent (t1_sent), .ec (ec_now), .bc (bc_now),
    .ev_valid, .ev_ec, .ev_bc
  );


  sync_fifo #(.WIDTH(8), .DEPTH(EVT_DEPTH)) u_ec_fifo (
    .clk, .rst_n, .clr (fifo_clr), .wr_en (ev_valid), .wr_data (ev_ec),
    .rd_en (ec_pop), .rd_data (ec_data), .empty (ec_empty), .full (ec_full),
    .count (ec_count), .overflow (ec_ovf)
  );

  sync_fifo #(.WIDTH(12), .DEPTH(EVT_DEPTH)) u_bc_fifo (
    .clk, .rst_n, .clr (fifo_clr), .wr_en (ev_valid), .wr_data (ev_bc),
    .rd_en (bc_pop), .rd_data (bc_data), .empty (bc_empty), .full (bc_full),
    .count (bc_count), .overflow (bc_ovf)
  );

  // ---------------- readout subsystem ----------------
  readout_subsystem #(.NCH(NCH), .FIFO_DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst_n, .sel_gem, .rp_data, .gem_data, .rp_sbit, .gem_sbit, .sbit,
    .clr (fifo_clr), .rd_en (ro_pop), .rd_data (ro_data), .count (ro_count),
    .empty (ro_empty), .pkt_cnt (ro_pkt), .drop_cnt (ro_drop), .hdr_err_cnt (ro_hdr_err)
  );

  sbit_recorder #(.NSBIT(NCH), .TS_W(12), .DEPTH(SBIT_DEPTH)) u_sbit (
    .clk, .rst_n, .clr (fifo_clr), .sbit, .timestamp (bc_now),
    .rd_en (sbit_pop), .rd_data (sbit_data), .empty (sbit_empty),
    .count (sbit_count), .lost_cnt (sbit_lost)
  );

  // ---------------- front-end control ----------------
  doh_reset #(.LEN_W(16), .POWERUP_LEN(64)) u_doh (
    .clk, .rst_n, .fire (doh_fire), .len (doh_len), .ccum_reset_n
  );

endmodule
