// tb_sync_fifo: self-checking test of sync_fifo against a queue model.
// Random pushes and pops on a 16-deep FIFO, including pushes when full and
// pops when empty; checks data order, count, empty/full and overflow.
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit exp_ovf, full_before;
    int phase, pw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "reset state");
    for (int i = 0; i < 3000; i++) begin
      // phases: mostly push, mostly pop, mixed
      phase = (i / 200) % 3;
      pw = (phase == 0) ? 80 : (phase == 1) ? 20 : 50;
      wr_en   = ($urandom % 100) < pw;
      rd_en   = ($urandom % 100) < (100 - pw);
      wr_data = W'($urandom);
      if (i == 2500) clr = 1; else clr = 0;
      // combinational outputs before the edge
      if (model.size() > 0) check(rd_data == model[0], "show-ahead data");
      check(empty == (model.size() == 0), "empty flag");
      check(full  == (model.size() == D), "full flag");
      check(count == model.size(), "count");
      exp_ovf = wr_en && model.size() == D;
      @(posedge clk);
      if (clr) model.delete();
      else begin
        full_before = (model.size() == D);
        if (rd_en && model.size() > 0) void'(model.pop_front());
        if (wr_en && !full_before) model.push_back(wr_data);
      end
      @(negedge clk);
      if (!clr) check(overflow == exp_ovf, "overflow flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
