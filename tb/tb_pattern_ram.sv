// tb_pattern_ram: checks both ports of the pattern RAM against an array model,
// including the one-clock synchronous read latency.
module tb_pattern_ram;
  localparam int N = 1024;
  logic clk = 0;
  logic [9:0] a_addr = '0, b_addr = '0;
  logic a_we = 0;
  logic [31:0] a_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [N];
  int checks = 0, failures = 0;

  pattern_ram dut (.*);
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
    // fill every word
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a_addr = 10'(i); a_we = 1; a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    // random reads on both ports, with random writes on port A
    for (int i = 0; i < 4000; i++) begin
      logic [9:0] ra, rb;
      logic [31:0] ea, eb;
      @(negedge clk);
      ra = 10'($urandom); rb = 10'($urandom);
      a_addr = ra; b_addr = rb;
      a_we = ($urandom % 4) == 0; a_wdata = $urandom;
      ea = model[ra]; eb = model[rb];         // read-before-write
      if (a_we) model[ra] = a_wdata;
      if (a_we && ra == rb) eb = eb;          // port B sees the old word too
      @(posedge clk); #1;
      check(a_rdata == ea, "port A read");
      check(b_rdata == eb, "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
