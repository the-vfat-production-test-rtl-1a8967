// ft245_model: behavioural model of the FIFO side of an FT245-type USB chip.
// Not synthesizable. Bytes the host "sends" are queued with put_byte() and
// offered to the FPGA with rxf_n low; bytes the FPGA writes are collected in
// `to_host`. Timing follows the chip's data sheet in outline: read data valid
// 20 ns after rd_n falls, rxf_n/txe_n inactive 25 ns after a transfer and for
// at least 80 ns. The model checks the FPGA side: rd_n low and wr high for at
// least 50 ns, data stable and driven at least 20 ns before wr falls, and
// never a read and a write at once; each violation increments `errors`.
module ft245_model (
  output logic [7:0] usb_d_in,
  input  logic [7:0] usb_d_out,
  input  logic       usb_d_oe,
  input  logic       usb_rd_n,
  input  logic       usb_wr,
  output logic       usb_rxf_n,
  output logic       usb_txe_n
);
  byte unsigned from_host[$];
  byte unsigned to_host[$];
  int errors = 0;
  bit tx_blocked = 0;       // test can hold txe_n high
  bit armed = 0;            // checks start once the FPGA is out of reset
  bit rx_precharge = 0, tx_precharge = 0;
  realtime t_rd_fall, t_wr_rise, t_data;

  initial begin
    usb_d_in = 8'h00;
  end

  assign usb_rxf_n = !(from_host.size() > 0 && !rx_precharge);
  assign usb_txe_n = tx_blocked || tx_precharge;

  function automatic void put_byte(byte unsigned b);
    from_host.push_back(b);
  endfunction

  // Host side of the platform's command protocol (see ft245_if):
  // header {write, fec, no_incr, 0}, 16-bit address, 16-bit count - 1.
  task automatic send_header(bit wr, bit fec, bit noinc, int addr, int n);
    put_byte({wr, fec, noinc, 5'b0});
    put_byte(8'(addr >> 8)); put_byte(8'(addr));
    put_byte(8'((n - 1) >> 8)); put_byte(8'(n - 1));
  endtask

  task automatic host_write(bit fec, bit noinc, int addr, logic [31:0] words[$]);
    send_header(1, fec, noinc, addr, words.size());
    foreach (words[i]) for (int b = 3; b >= 0; b--) put_byte(words[i][8*b +: 8]);
    wait (from_host.size() == 0);
    #1000;
  endtask

  task automatic host_read(bit fec, bit noinc, int addr, int n, output logic [31:0] words[$]);
    to_host.delete();
    send_header(0, fec, noinc, addr, n);
    wait (to_host.size() == 4 * n);
    words.delete();
    for (int i = 0; i < n; i++)
      words.push_back({to_host[4*i], to_host[4*i+1], to_host[4*i+2], to_host[4*i+3]});
    #500;
  endtask

  always @(negedge usb_rd_n) begin
    t_rd_fall = $realtime;
    if (usb_rxf_n) begin if (armed) errors++; if (armed) $display("FT245 model: read while rxf_n high"); end
    #20 usb_d_in = (from_host.size() > 0) ? from_host[0] : 8'hEE;
  end

  always @(posedge usb_rd_n) begin
    if ($realtime - t_rd_fall < 50) begin if (armed) errors++; if (armed) $display("FT245 model: rd_n pulse too short"); end
    if (from_host.size() > 0) void'(from_host.pop_front());
    #25 rx_precharge = 1;
    #80 rx_precharge = 0;
  end

  always @(usb_d_out or usb_d_oe) t_data = $realtime;

  always @(posedge usb_wr) begin
    t_wr_rise = $realtime;
    if (usb_txe_n) begin if (armed) errors++; if (armed) $display("FT245 model: write while txe_n high"); end
    if (!usb_rd_n) begin if (armed) errors++; if (armed) $display("FT245 model: read and write together"); end
  end

  always @(negedge usb_wr) begin
    if ($realtime - t_wr_rise < 50) begin if (armed) errors++; if (armed) $display("FT245 model: wr pulse too short"); end
    if (!usb_d_oe || $realtime - t_data < 20) begin if (armed) errors++; if (armed) $display("FT245 model: data setup"); end
    to_host.push_back(usb_d_out);
    #25 tx_precharge = 1;
    #80 tx_precharge = 0;
  end
endmodule
