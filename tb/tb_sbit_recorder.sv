// tb_sbit_recorder: drives random s-bit patterns and checks that a word
// {pattern, time stamp} is stored for each clock with a rising s-bit (and
// only then), in order, and that words beyond the FIFO depth are counted lost.
module tb_sbit_recorder;
  logic clk = 0, rst_n = 0, clr = 0, rd_en = 0, empty;
  logic [3:0] sbit = '0, prev = '0;
  logic [11:0] timestamp = '0;
  logic [15:0] rd_data;
  logic [8:0] count;
  logic [7:0] lost_cnt;
  logic [15:0] model[$];
  int checks = 0, failures = 0, nlost = 0;

  sbit_recorder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // record, no reads: 600 clocks of random s-bits overfill the 256 words
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sbit = ($urandom % 3 == 0) ? 4'($urandom) : 4'h0;
      timestamp = 12'(i);
      if ((sbit & ~prev) != 0) begin
        if (model.size() < 256) model.push_back({sbit, timestamp});
        else nlost++;
      end
      prev = sbit;
    end
    @(negedge clk); sbit = '0;
    @(negedge clk);
    check(count == 9'(model.size()), "fill level");
    check(lost_cnt == 8'(nlost) && nlost > 0, "lost words counted");
    while (model.size() > 0) begin
      check(!empty && rd_data == model.pop_front(), "recorded word");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(empty, "drained");
    // a level held high records only once
    @(negedge clk); sbit = 4'b0001; timestamp = 12'hABC;
    repeat (5) @(negedge clk);
    check(count == 9'd1 && rd_data == 16'h1ABC, "held s-bit recorded once");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(empty && lost_cnt == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
