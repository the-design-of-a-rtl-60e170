// tb_mem_board: checks one 8-bit memory board. The EPROM is programmed, RAM
// is written through the bus at random addresses, and reads are compared
// with a reference copy. A write without RAM select must change nothing, an
// EPROM select never writes, and a read with no select gives FF.
module tb_mem_board;
  logic        clk = 1'b0;
  logic        ram_sel = 0, eprom_sel = 0, we = 0, prog_we = 0;
  logic [12:0] addr = '0, prog_addr = '0;
  logic [7:0]  wdata = '0, prog_data = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] rref [4096];
  logic [7:0] eref [8192];

  mem_board dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned mode;
    // fill both arrays so every later read is defined
    for (int k = 0; k < 8192; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = k[12:0]; prog_data = 8'($urandom); eref[k] = prog_data;
      if (k < 4096) begin
        ram_sel = 1; we = 1; addr = k[12:0]; wdata = 8'($urandom); rref[k] = wdata;
      end else begin
        ram_sel = 0; we = 0;
      end
    end
    @(negedge clk) begin prog_we = 0; we = 0; ram_sel = 0; end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr = 13'($urandom); wdata = 8'($urandom);
      mode = $urandom % 4;
      unique case (mode)
        0: begin ram_sel = 1; eprom_sel = 0; we = 1; rref[addr[11:0]] = wdata; end
        1: begin ram_sel = 0; eprom_sel = 0; we = 1; end   // not selected: no write
        2: begin ram_sel = 0; eprom_sel = 1; we = 1; end   // EPROM is read only
        default: begin ram_sel = 1; eprom_sel = 0; we = 0; end
      endcase
      @(negedge clk);
      we = 0;
      if (ram_sel) begin
        #1 check(rdata == rref[addr[11:0]], $sformatf("RAM %h", addr[11:0]));
      end else if (eprom_sel) begin
        #1 check(rdata == eref[addr], $sformatf("EPROM %h", addr));
      end else begin
        #1 check(rdata == 8'hFF, "no select reads FF");
        ram_sel = 1; #1 check(rdata == rref[addr[11:0]], "unselected write ignored");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
