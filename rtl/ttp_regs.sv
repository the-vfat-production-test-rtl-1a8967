// ttp_regs: memory-space decoder and register file of the test platform.
//
// The host sees one word-addressed, 32-bit memory space: the 1024-word trigger
// pattern RAM at 0x000-0x3FF and the working-parameter and status registers
// at 0x400-0x4FF (this split follows the platform specification; the register
// list and its layout are this design's own, see ttp_pkg). Reading a FIFO
// register pops that FIFO; writing the COMMAND register produces one-clock
// strobes (burst start/stop, single T1 commands, FIFO clear, CCUM reset).
//
// Bus timing: `we` writes in the same clock. `re` returns `rdata` with
// `rvalid` one clock later, for registers and RAM alike (the RAM reads
// synchronously). FIFO pops happen in the clock of `re`. The RAM port's
// address and write data are the bus's own, wired straight through; only
// its write enable is decoded.
module ttp_regs
  import ttp_pkg::*;
#(
  parameter int NCH   = 4,
  parameter int RO_CW = 11,   // width of a readout FIFO fill level
  parameter int PG_AW = 10    // pattern RAM address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic [MEM_AW-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output logic              rvalid,
  // pattern RAM host port
  output logic [PG_AW-1:0]  ram_addr,
  output logic              ram_we,
  output logic [31:0]       ram_wdata,
  input  logic [31:0]       ram_rdata,
  // working parameters
  output trig_mode_e        mode,
  output trig_src_e         src,
  output logic              loop,
  output logic              sel_gem,
  output logic [PG_AW:0]    burst_len,
  output logic [8:0]        cal_lat,
  output logic [15:0]       doh_len,
  // strobes
  output logic              pg_start,
  output logic              pg_stop,
  output t1_req_t           host_cmd,
  output logic              fifo_clr,
  output logic              doh_fire,
  // status
  input  logic              pg_busy,
  input  logic [PG_AW:0]    pulse_count,
  input  t1_req_t           t1_lost,
  input  logic [7:0]        ec_data,
  input  logic              ec_empty,
  input  logic [11:0]       bc_data,
  input  logic              bc_empty,
  output logic              ec_pop,
  output logic              bc_pop,
  input  logic [NCH-1:0][15:0]      ro_data,
  input  logic [NCH-1:0][RO_CW-1:0] ro_count,
  input  logic [NCH-1:0]            ro_empty,
  output logic [NCH-1:0]            ro_pop,
  input  logic [NCH-1:0][7:0]       ro_drop,
  input  logic [NCH-1:0][7:0]       ro_hdr_err,
  input  logic [15:0]       sbit_data,
  input  logic              sbit_empty,
  output logic              sbit_pop,
  input  logic [8:0]        sbit_count,
  input  logic [7:0]        sbit_lost,
  input  logic [8:0]        evt_count,   // EC/BC FIFO fill (they move together)
  input  logic              evt_overflow,
  input  logic [NCH-1:0][7:0]       ro_pkt,
  input  logic [7:0]        ec_now,
  input  logic [11:0]       bc_now,
  input  logic              t1_busy
);

  logic       is_reg;
  logic [7:0] roff;
  assign is_reg = (addr >= REG_BASE);
  assign roff   = addr[7:0];

  assign ram_addr  = addr[PG_AW-1:0];
  assign ram_we    = we && !is_reg;
  assign ram_wdata = wdata;

  logic [31:0] scratch;
  logic [15:0] lost_cnt;
  logic [7:0]  evt_ovf_cnt;

  // -------- writes --------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_LV1A;
      src       <= SRC_INTERNAL;
      loop      <= 1'b0;
      sel_gem   <= 1'b0;
      burst_len <= (PG_AW+1)'(1);
      cal_lat   <= 9'd1;
      doh_len   <= 16'd64;
      scratch   <= '0;
      pg_start  <= 1'b0;
      pg_stop   <= 1'b0;
      host_cmd  <= '0;
      fifo_clr  <= 1'b0;
      doh_fire  <= 1'b0;
    end else begin
      pg_start <= 1'b0;
      pg_stop  <= 1'b0;
      host_cmd <= '0;
      fifo_clr <= 1'b0;
      doh_fire <= 1'b0;
      if (we && is_reg && addr <= REG_BASE + 11'hFF) begin
        unique case (roff)
          R_CONTROL: begin
            mode    <= trig_mode_e'(wdata[1:0]);
            src     <= trig_src_e'(wdata[3:2]);
            loop    <= wdata[4];
            sel_gem <= wdata[5];
          end
          R_BURST_LEN: burst_len <= wdata[PG_AW:0];
          R_CAL_LAT:   cal_lat   <= wdata[8:0];
          R_DOH_LEN:   doh_len   <= wdata[15:0];
          R_SCRATCH:   scratch   <= wdata;
          R_COMMAND: begin
            pg_start          <= wdata[C_PG_START];
            pg_stop           <= wdata[C_PG_STOP];
            host_cmd.lv1a     <= wdata[C_LV1A];
            host_cmd.calpulse <= wdata[C_CALPULSE];
            host_cmd.bc0      <= wdata[C_BC0];
            host_cmd.resynch  <= wdata[C_RESYNCH];
            fifo_clr          <= wdata[C_CLEAR];
            doh_fire          <= wdata[C_DOH];
          end
          default: ;
        endcase
      end
    end
  end

  // Lost T1 requests, cleared with the FIFOs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lost_cnt <= '0;
    else if (fifo_clr) lost_cnt <= '0;
    else if (t1_lost != '0) lost_cnt <= lost_cnt + 1'b1;
  end

  // Events not recorded because the EC/BC FIFOs were full.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            evt_ovf_cnt <= '0;
    else if (fifo_clr)     evt_ovf_cnt <= '0;
    else if (evt_overflow) evt_ovf_cnt <= evt_ovf_cnt + 1'b1;
  end

  // -------- reads --------
  logic rd_reg;
  assign rd_reg = re && is_reg;

  always_comb begin
    ec_pop   = rd_reg && roff == R_EC_FIFO;
    bc_pop   = rd_reg && roff == R_BC_FIFO;
    sbit_pop = rd_reg && roff == R_SBIT_FIFO;
    for (int c = 0; c < NCH; c++)
      ro_pop[c] = rd_reg && roff == R_RO_DATA0 + 8'(c);
  end

  logic [31:0] reg_val;
  always_comb begin
    reg_val = '0;
    unique case (roff)
      R_CONTROL:   reg_val = {26'd0, sel_gem, loop, src, mode};
      R_BURST_LEN: reg_val = 32'(burst_len);
      R_CAL_LAT:   reg_val = 32'(cal_lat);
      R_STATUS:    reg_val = 32'({ro_empty, 3'd0, t1_busy, sbit_empty, bc_empty, ec_empty, pg_busy});
      R_PULSES:    reg_val = 32'(pulse_count);
      R_EC_FIFO:   reg_val = {ec_empty, 23'd0, ec_data};
      R_BC_FIFO:   reg_val = {bc_empty, 19'd0, bc_data};
      R_SBIT_FIFO: reg_val = {sbit_empty, 15'd0, sbit_data};
      R_LOST_CMDS: reg_val = 32'(lost_cnt);
      R_DROPPED:   reg_val = 32'(ro_drop);
      R_HDR_ERR:   reg_val = 32'(ro_hdr_err);
      R_DOH_LEN:   reg_val = 32'(doh_len);
      R_SCRATCH:   reg_val = scratch;
      R_EVT_FILL:  reg_val = {8'd0, evt_ovf_cnt, 7'd0, evt_count};
      R_SBIT_STAT: reg_val = {8'd0, sbit_lost, 7'd0, sbit_count};
      R_PKT_CNT:   reg_val = 32'(ro_pkt);
      R_COUNTERS:  reg_val = {4'd0, bc_now, 8'd0, ec_now};
      default: begin
        for (int c = 0; c < NCH; c++) begin
          if (roff == R_RO_DATA0 + 8'(c))  reg_val = {ro_empty[c], 15'd0, ro_data[c]};
          if (roff == R_RO_COUNT0 + 8'(c)) reg_val = 32'(ro_count[c]);
        end
      end
    endcase
  end

  logic [31:0] reg_q;
  logic        sel_ram_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid    <= 1'b0;
      sel_ram_q <= 1'b0;
      reg_q     <= '0;
    end else begin
      rvalid    <= re;
      sel_ram_q <= !is_reg;
      if (re) reg_q <= (addr <= REG_BASE + 11'hFF) ? reg_val : '0;
    end
  end

  assign rdata = sel_ram_q ? ram_rdata : reg_q;

endmodule
