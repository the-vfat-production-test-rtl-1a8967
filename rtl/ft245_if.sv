// ft245_if: FPGA side of the FT245 USB FIFO chip and the host command decoder.
//
// The host reaches the platform through an FT245 USB full-speed FIFO chip on
// an 8-bit bus. This block moves bytes over that bus and decodes them with a
// small command protocol that supports single and burst, read and write
// transactions, on the memory space (pattern RAM and registers) or directly
// on the front-end control (FEC) core. The 8-bit bus and the need for single
// and burst transfers follow the platform specification; the protocol itself
// is this design's own:
//
//   header  byte0 = {write, fec, no_incr, 5'b0}
//           byte1, byte2 = 16-bit word address, MSB first
//           byte3, byte4 = word count minus 1, MSB first (1..65536 words)
//   write   4 bytes per 32-bit word follow, MSB first
//   read    the platform answers with 4 bytes per word, MSB first
//
// The address advances by one per word unless no_incr is set (for draining a
// FIFO register). A read that gets no `bus_rvalid` within 256 clocks answers
// 0xFFFFFFFF so the host never hangs.
//
// FT245 bus (active-low rxf_n / txe_n / rd_n, active-high wr strobe): the
// flags are synchronised by two flip-flops. A byte is read by holding rd_n low
// for STROBE clocks and sampling the data at the end; a byte is written by
// driving the data one clock ahead, holding wr high for STROBE clocks and the
// data one clock after wr falls. RECOVER clocks separate consecutive
// transfers so the chip's flags can settle. With the defaults at 40 MHz this
// gives 75 ns strobes.
//
// Internal bus: one-clock `bus_we`/`bus_re` strobes; read data is expected
// with `bus_rvalid` some clocks after `bus_re`.
module ft245_if
  import ttp_pkg::*;
#(
  parameter int STROBE  = 3,
  parameter int RECOVER = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // FT245 pins
  input  logic [7:0]  usb_d_in,
  output logic [7:0]  usb_d_out,
  output logic        usb_d_oe,
  output logic        usb_rd_n,
  output logic        usb_wr,
  input  logic        usb_rxf_n,
  input  logic        usb_txe_n,
  // internal bus
  output logic [15:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic        bus_we,
  output logic        bus_re,
  output logic        bus_fec,      // target: 1 = FEC core, 0 = memory space
  input  logic [31:0] bus_rdata,
  input  logic        bus_rvalid
);

  // ---------------- byte engine ----------------
  logic [1:0] rxf_s, txe_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_s <= 2'b11;
      txe_s <= 2'b11;
    end else begin
      rxf_s <= {rxf_s[0], usb_rxf_n};
      txe_s <= {txe_s[0], usb_txe_n};
    end
  end

  typedef enum logic [2:0] {B_IDLE, B_RD, B_WSETUP, B_WR, B_WHOLD, B_RECOVER} bstate_e;
  bstate_e    bst;
  logic [3:0] bcnt;

  logic       rx_want, tx_want;   // protocol asks for / offers a byte
  logic [7:0] tx_byte;
  logic       rx_valid, tx_done;
  logic [7:0] rx_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst       <= B_IDLE;
      bcnt      <= '0;
      usb_rd_n  <= 1'b1;
      usb_wr    <= 1'b0;
      usb_d_oe  <= 1'b0;
      usb_d_out <= '0;
      rx_valid  <= 1'b0;
      rx_byte   <= '0;
      tx_done   <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      tx_done  <= 1'b0;
      unique case (bst)
        B_IDLE: begin
          if (tx_want && !txe_s[1]) begin
            usb_d_out <= tx_byte;
            usb_d_oe  <= 1'b1;
            bst       <= B_WSETUP;
          end else if (rx_want && !rxf_s[1]) begin
            usb_rd_n <= 1'b0;
            bcnt     <= 4'(STROBE - 1);
            bst      <= B_RD;
          end
        end
        B_RD: begin
          if (bcnt == '0) begin
            rx_byte  <= usb_d_in;
            rx_valid <= 1'b1;
            usb_rd_n <= 1'b1;
            bcnt     <= 4'(RECOVER - 1);
            bst      <= B_RECOVER;
          end else bcnt <= bcnt - 1'b1;
        end
        B_WSETUP: begin
          usb_wr <= 1'b1;
          bcnt   <= 4'(STROBE - 1);
          bst    <= B_WR;
        end
        B_WR: begin
          if (bcnt == '0) begin
            usb_wr <= 1'b0;
            bst    <= B_WHOLD;
          end else bcnt <= bcnt - 1'b1;
        end
        B_WHOLD: begin
          usb_d_oe <= 1'b0;
          tx_done  <= 1'b1;
          bcnt     <= 4'(RECOVER - 1);
          bst      <= B_RECOVER;
        end
        B_RECOVER: begin
          if (bcnt == '0) bst <= B_IDLE;
          else            bcnt <= bcnt - 1'b1;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  // ---------------- command protocol ----------------
  typedef enum logic [2:0] {P_HDR, P_WDATA, P_WBUS, P_RBUS, P_RWAIT, P_RSEND} pstate_e;
  pstate_e     pst;
  logic [2:0]  idx;            // byte index within header / word
  logic        is_write, no_incr;
  logic [15:0] remaining;      // words left minus one
  logic [31:0] word;
  logic [7:0]  tmo;

  assign rx_want = (pst == P_HDR || pst == P_WDATA) && bst == B_IDLE && !rx_valid;
  assign tx_want = (pst == P_RSEND) && !tx_done;
  assign tx_byte = word[31:24];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst       <= P_HDR;
      idx       <= '0;
      is_write  <= 1'b0;
      no_incr   <= 1'b0;
      bus_fec   <= 1'b0;
      bus_addr  <= '0;
      remaining <= '0;
      word      <= '0;
      bus_wdata <= '0;
      bus_we    <= 1'b0;
      bus_re    <= 1'b0;
      tmo       <= '0;
    end else begin
      bus_we <= 1'b0;
      bus_re <= 1'b0;
      unique case (pst)
        P_HDR: if (rx_valid) begin
          idx <= idx + 1'b1;
          unique case (idx)
            3'd0: begin
              is_write <= rx_byte[7];
              bus_fec  <= rx_byte[6];
              no_incr  <= rx_byte[5];
            end
            3'd1: bus_addr[15:8]  <= rx_byte;
            3'd2: bus_addr[7:0]   <= rx_byte;
            3'd3: remaining[15:8] <= rx_byte;
            default: begin
              remaining[7:0] <= rx_byte;
              idx            <= '0;
              pst            <= is_write ? P_WDATA : P_RBUS;
            end
          endcase
        end
        P_WDATA: if (rx_valid) begin
          word <= {word[23:0], rx_byte};
          if (idx == 3'd3) begin
            idx <= '0;
            pst <= P_WBUS;
          end else idx <= idx + 1'b1;
        end
        P_WBUS: begin
          bus_wdata <= word;
          bus_we    <= 1'b1;
          pst       <= P_RWAIT;      // reused as one-clock gap, see below
          tmo       <= 8'hFF;
        end
        P_RBUS: begin
          bus_re <= 1'b1;
          tmo    <= '0;
          pst    <= P_RWAIT;
        end
        P_RWAIT: begin
          if (is_write) begin        // write issued this clock: advance
            if (!no_incr) bus_addr <= bus_addr + 1'b1;
            if (remaining == '0) pst <= P_HDR;
            else begin
              remaining <= remaining - 1'b1;
              pst       <= P_WDATA;
            end
          end else if (bus_rvalid || tmo == 8'hFF) begin
            word <= bus_rvalid ? bus_rdata : 32'hFFFF_FFFF;
            idx  <= '0;
            pst  <= P_RSEND;
          end else tmo <= tmo + 1'b1;
        end
        P_RSEND: if (tx_done) begin
          word <= {word[23:0], 8'h00};
          if (idx == 3'd3) begin
            idx <= '0;
            if (!no_incr) bus_addr <= bus_addr + 1'b1;
            if (remaining == '0) pst <= P_HDR;
            else begin
              remaining <= remaining - 1'b1;
              pst       <= P_RBUS;
            end
          end else idx <= idx + 1'b1;
        end
        default: pst <= P_HDR;
      endcase
    end
  end

  // The FT245 bus is never read and written at once.
  a_bus_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(usb_wr && !usb_rd_n));

endmodule
