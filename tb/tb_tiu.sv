// tb_tiu: checks the timer interrupt unit. After reset the counter holds
// FFFF. Loading a value L makes the interrupt flag rise exactly L clock
// cycles later; the counter then stays at 0 with the flag held until the next
// load, which clears it. Random periods are measured cycle by cycle.
module tb_tiu;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        ld = 1'b0;
  logic [15:0] ld_val = '0;
  logic        int_flag;
  logic [15:0] count;
  int checks = 0, failures = 0;

  tiu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned period, n;
    #1 rst_n = 1'b0;
    #1 check(count == 16'hFFFF && !int_flag, "reset value");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check(count == 16'hFFFE, "counts down after reset");
    for (int t = 0; t < 20; t++) begin
      period = (t < 3) ? t + 1 : 2 + $urandom % 200;
      @(negedge clk) begin ld = 1'b1; ld_val = 16'(period); end
      @(negedge clk) ld = 1'b0;
      check(!int_flag && count == 16'(period), "load clears and starts");
      n = 0;
      while (!int_flag && n < 1000) begin @(negedge clk); n++; end
      check(n == period, $sformatf("period %0d measured %0d", period, n));
      repeat (5) @(negedge clk);
      check(int_flag && count == 0, "flag held, counter stopped at 0");
    end
    // a reload before expiry restarts the count without raising the flag
    @(negedge clk) begin ld = 1'b1; ld_val = 16'd10; end
    @(negedge clk) ld = 1'b0;
    repeat (5) @(negedge clk);
    @(negedge clk) begin ld = 1'b1; ld_val = 16'd10; end
    @(negedge clk) ld = 1'b0;
    repeat (8) @(negedge clk);
    check(!int_flag && count == 16'd2, "reload restarts the period");
    @(negedge clk);
    @(negedge clk);
    check(int_flag, "flag after restarted period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
