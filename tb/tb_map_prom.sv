// tb_map_prom: checks the mapping PROM that turns an op-code into a microcode
// start address. A table is programmed with random entries (unused op-codes
// left at FF, the fault entry), then all 256 op-codes are looked up: the
// output must be the table entry with the upper four address bits zero, and
// while an interrupt is pending it must be the fixed interrupt address
// whatever the op-code.
module tb_map_prom;
  import ss_pkg::*;
  logic        clk = 1'b0;
  logic        prog_we = 1'b0;
  logic [7:0]  prog_addr = '0, prog_data = '0;
  logic [7:0]  opcode = '0;
  logic        int_pending = 1'b0;
  logic [11:0] d;
  int checks = 0, failures = 0;
  logic [7:0] tbl [256];

  map_prom dut (.*);

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

  initial begin
    for (int k = 0; k < 256; k++) tbl[k] = ($urandom % 4 == 0) ? 8'($urandom) : 8'hFF;
    tbl[1] = 8'h48; tbl[2] = 8'h30;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = k[7:0]; prog_data = tbl[k];
    end
    @(negedge clk) prog_we = 1'b0;
    for (int k = 0; k < 256; k++) begin
      opcode = k[7:0]; int_pending = 1'b0; #1;
      check(d == {4'h0, tbl[k]}, $sformatf("op-code %h -> %h", k, d));
      int_pending = 1'b1; #1;
      check(d == 12'h100, "interrupt replaces the mapped address");
    end
    opcode = 8'h77; int_pending = 1'b0; #1;
    check(tbl[8'h77] != 8'hFF || d == 12'h0FF, "unused op-code enters the fault entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
