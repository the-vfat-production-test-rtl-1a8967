// vfat_model: behavioural model of the digital side of one VFAT front-end
// chip, for system tests only (not synthesizable, no analog part).
// Decodes the serial T1 line ('1' + 2-bit code), keeps its own bunch (12 bit)
// and event (8 bit) counters, answers every LV1A with a 192-bit packet sent
// MSB first on `data_out` (idle '0', packets queued if they come faster than
// 192 clocks) and pulses its s-bit output for one clock shortly after each
// CalPulse. Counter convention, as the platform's local counters: values are
// those of the clock the command's start bit was on the line, BC restarts at
// BC0, Resynch clears EC and BC, the first event after Resynch is EC 0.
// `corrupt_next` spoils the EC header nibble of the next packet.
// Scan mode (`scan_mode` = 1) replaces the random channel data: an event
// that follows a CalPulse has a hit on channel `scan_ch` (the one whose test
// charge is enabled), unless it is `dead_ch`; `noisy_ch` fires on every
// event. Channel n is bit n of the 128 data bits.
module vfat_model
  import vfat_pkt_pkg::*;
#(
  parameter logic [11:0] CHIP_ID = 12'h000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t1_in,
  output logic data_out,
  output logic sbit_out
);
  logic [11:0] bc;
  logic [7:0]  ec;
  int   dstate;
  logic c1;
  pkt_t queue[$];
  pkt_t sent[$];                 // every packet put on the line, in order
  int   n_lv1a = 0, n_cal = 0, n_bc0 = 0, n_resynch = 0;
  int   cmd_log[$];              // decoded command codes, in order
  bit   corrupt_next = 0;
  bit   scan_mode = 0;
  int   scan_ch = -1, dead_ch = -1, noisy_ch = -1;
  bit   cal_armed;
  logic [127:0] hits;
  pkt_t cur;
  int   bitpos;
  int   sbit_timer;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc <= '0; ec <= '0; dstate = 0; bitpos = -1; data_out <= 1'b0;
      sbit_out <= 1'b0; sbit_timer = 0; cal_armed = 0;
    end else begin
      bc <= bc + 1'b1;
      // T1 decoding
      case (dstate)
        0: if (t1_in) dstate = 1;
        1: begin c1 = t1_in; dstate = 2; end
        default: begin
          dstate = 0;
          cmd_log.push_back({c1, t1_in});
          case ({c1, t1_in})
            2'b00: begin   // LV1A
              pkt_t p;
              hits = rand_data();
              if (scan_mode) begin
                hits = '0;
                if (cal_armed && scan_ch >= 0 && scan_ch < 128 && scan_ch != dead_ch) hits[scan_ch] = 1'b1;
                if (noisy_ch >= 0 && noisy_ch < 128) hits[noisy_ch] = 1'b1;
              end
              cal_armed = 0;
              p = make_pkt(bc - 12'd2, ec, 4'h0, CHIP_ID, hits);
              if (corrupt_next) begin p[191-16 -: 4] = 4'b0110; corrupt_next = 0; end
              queue.push_back(p);
              ec <= ec + 1'b1;
              n_lv1a++;
            end
            2'b01: begin bc <= 12'd2; n_bc0++; end
            2'b10: begin bc <= 12'd2; ec <= '0; n_resynch++; end
            default: begin n_cal++; sbit_timer = 4; cal_armed = 1; end
          endcase
        end
      endcase
      // s-bit
      sbit_out <= (sbit_timer == 1);
      if (sbit_timer > 0) sbit_timer--;
      // serialiser
      if (bitpos < 0) begin
        data_out <= 1'b0;
        if (queue.size() > 0) begin
          cur = queue.pop_front();
          sent.push_back(cur);
          bitpos = 191;
        end
      end else begin
        data_out <= cur[bitpos];
        bitpos--;
      end
    end
  end
endmodule
