// tb_control_store: checks the microcode store and its pipeline register.
// Random 96-bit words are written through the load port to random addresses
// (including the first and last), then every written address is presented to
// the store: the word must appear in the pipeline register one clock later,
// never sooner. Reset must clear the pipeline register to the all-zero word.
module tb_control_store;
  import ss_pkg::*;
  logic                clk = 1'b0, rst_n = 1'b1;
  logic [11:0]         addr = '0;
  logic                load_we = 1'b0;
  logic [11:0]         load_addr = '0;
  logic [UWORD_W-1:0]  load_data = '0;
  uinstr_t             pipe;
  int checks = 0, failures = 0;

  control_store dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [UWORD_W-1:0] rnd96();
    return {$urandom, $urandom, $urandom};
  endfunction

  logic [UWORD_W-1:0] ref_w [int];
  logic [11:0]        adrs  [64];

  initial begin
    logic [UWORD_W-1:0] prev;
    #1 rst_n = 1'b0;
    #1 check(pipe == '0, "reset clears the pipeline register");
    rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      adrs[k] = (k == 0) ? 12'h000 : (k == 1) ? 12'hFFF : 12'($urandom);
      @(negedge clk);
      load_we = 1'b1; load_addr = adrs[k]; load_data = rnd96();
      ref_w[adrs[k]] = load_data;
    end
    @(negedge clk) load_we = 1'b0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      prev = pipe;
      addr = adrs[k];
      #1 check(pipe == prev, "pipeline register holds until the clock");
      @(negedge clk);
      check(pipe == ref_w[adrs[k]], $sformatf("word at %h", adrs[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
