// ec_bc_counter: local event and bunch-crossing counters of the triggering
// subsystem.
//
// They mirror the counters inside every VFAT so that the numbers carried in
// each data packet can be checked against what the test platform sent. The
// widths (8-bit event count EC, 12-bit bunch count BC) are those of the VFAT
// packet. Counting rules are this design's reading of the front end: BC
// advances every clock and returns to 0 on BC0; EC advances on each LV1A;
// Resynch clears both. The counters are driven by the commands as the T1
// encoder actually transmits them (`sent`), so queueing in the encoder cannot
// make them drift from the front end.
//
// For each transmitted LV1A, `ev_valid` pulses for one clock with `ev_ec`, the
// event number assigned to it (the first LV1A after Resynch gets 0), and
// `ev_bc`, the BC value in the clock its start bit went out. Those values are
// written into the EC and BC FIFOs.
module ec_bc_counter
  import ttp_pkg::*;
#(
  parameter int EC_W = 8,
  parameter int BC_W = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  t1_req_t         sent,
  output logic [EC_W-1:0] ec,
  output logic [BC_W-1:0] bc,
  output logic            ev_valid,
  output logic [EC_W-1:0] ev_ec,
  output logic [BC_W-1:0] ev_bc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ec       <= '0;
      bc       <= '0;
      ev_valid <= 1'b0;
      ev_ec    <= '0;
      ev_bc    <= '0;
    end else begin
      ev_valid <= sent.lv1a;
      if (sent.lv1a) begin
        ev_ec <= ec;
        ev_bc <= bc;
      end
      if (sent.resynch) begin
        ec <= '0;
        bc <= '0;
      end else begin
        bc <= sent.bc0 ? '0 : bc + 1'b1;
        if (sent.lv1a) ec <= ec + 1'b1;
      end
    end
  end

endmodule
