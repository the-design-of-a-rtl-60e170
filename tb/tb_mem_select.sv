// tb_mem_select: checks the memory select logic that joins two 8-bit boards
// into a 16-bit memory with byte and word access, plus the 8-bit I/O window.
// Two behavioural byte boards and an I/O register file are kept in the
// testbench; random word and byte reads and writes to RAM, EPROM, the I/O
// window and unused space are compared with a flat byte-addressed reference.
module tb_mem_select;
  import ss_pkg::*;
  logic        clk = 1'b0;
  logic [15:0] addr, wdata, rdata;
  logic        byte_m;
  mem_op_e     op;
  logic        lo_ram_sel, lo_eprom_sel, lo_we, hi_ram_sel, hi_eprom_sel, hi_we;
  logic [7:0]  lo_wdata, lo_rdata, hi_wdata, hi_rdata;
  logic [12:0] board_addr;
  logic        io_cs, io_we, io_re;
  logic [7:0]  io_off, io_wdata, io_rdata;
  int checks = 0, failures = 0;

  // the two boards (RAM 4K x 8 and EPROM 8K x 8 each) and the I/O devices
  logic [7:0] lo_ram [4096], hi_ram [4096], lo_ep [8192], hi_ep [8192];
  logic [7:0] iodev [256];
  // flat reference, byte addressed
  logic [7:0] flat [65536];

  mem_select dut (.*);

  always #5 clk = ~clk;

  assign lo_rdata = lo_ram_sel ? lo_ram[board_addr[11:0]] :
                    lo_eprom_sel ? lo_ep[board_addr] : 8'hFF;
  assign hi_rdata = hi_ram_sel ? hi_ram[board_addr[11:0]] :
                    hi_eprom_sel ? hi_ep[board_addr] : 8'hFF;
  assign io_rdata = iodev[io_off];

  always_ff @(posedge clk) begin
    if (lo_we && lo_ram_sel) lo_ram[board_addr[11:0]] <= lo_wdata;
    if (hi_we && hi_ram_sel) hi_ram[board_addr[11:0]] <= hi_wdata;
    if (io_we) iodev[io_off] <= io_wdata;
  end

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

  function automatic logic [15:0] pick_addr();
    int unsigned r;
    r = $urandom % 4;
    unique case (r)
      0: return 16'($urandom % 16'h2000);                 // RAM
      1: return 16'h2000 + 16'($urandom % 256);           // I/O
      2: return 16'h4000 + 16'($urandom % 16'h4000);      // EPROM
      default: return 16'h8000 + 16'($urandom % 16'h8000); // nothing
    endcase
  endfunction

  function automatic logic is_ram(logic [15:0] x);   return x < 16'h2000; endfunction
  function automatic logic is_io(logic [15:0] x);    return x[15:8] == 8'h20; endfunction
  function automatic logic is_ep(logic [15:0] x);    return x >= 16'h4000 && x < 16'h8000; endfunction

  function automatic logic [7:0] ref_rd(logic [15:0] x);
    if (is_ram(x) || is_ep(x)) return flat[x];
    if (is_io(x)) return x[0] ? 8'h00 : iodev[x[7:0]];
    return 8'hFF;
  endfunction

  initial begin
    logic [15:0] ea, ev;
    int unsigned sel;
    for (int k = 0; k < 65536; k++) flat[k] = 8'hFF;
    for (int k = 0; k < 4096; k++) begin
      lo_ram[k] = 8'($urandom); hi_ram[k] = 8'($urandom);
      flat[2*k] = lo_ram[k]; flat[2*k+1] = hi_ram[k];
    end
    for (int k = 0; k < 8192; k++) begin
      lo_ep[k] = 8'($urandom); hi_ep[k] = 8'($urandom);
      flat[16'h4000 + 2*k] = lo_ep[k]; flat[16'h4000 + 2*k + 1] = hi_ep[k];
    end
    for (int k = 0; k < 256; k++) iodev[k] = 8'($urandom);
    addr = '0; wdata = '0; byte_m = 0; op = MEM_NONE;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      ea = pick_addr();
      byte_m = 1'($urandom);
      if (!byte_m) ea[0] = 1'b0;
      addr = ea; wdata = 16'($urandom);
      sel = $urandom % 3;
      op = (sel == 0) ? MEM_WRITE : (sel == 1) ? MEM_READ : MEM_NONE;
      #1;
      if (op != MEM_WRITE) begin
        if (byte_m) ev = {8'h00, ref_rd(ea)};
        else        ev = {ref_rd(ea | 16'h1), ref_rd(ea)};
        check(rdata == ev, $sformatf("read %s %h: %h exp %h", byte_m ? "byte" : "word",
                                     ea, rdata, ev));
        check(io_re == (op == MEM_READ && is_io(ea) && !ea[0]), "I/O read strobe");
      end else begin
        check(io_we == (is_io(ea) && !ea[0]), "I/O write strobe");
        if (is_ram(ea)) begin
          if (byte_m) flat[ea] = wdata[7:0];
          else begin flat[ea] = wdata[7:0]; flat[ea + 1] = wdata[15:8]; end
        end else if (is_io(ea) && !ea[0]) begin
          // device sees the low byte; the reference reads iodev directly
        end
      end
    end
    @(negedge clk) op = MEM_NONE;
    // read back all of RAM as words
    for (int k = 0; k < 16'h2000; k += 2) begin
      addr = 16'(k); byte_m = 0; #1;
      check(rdata == {flat[k+1], flat[k]}, $sformatf("RAM word %h", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
