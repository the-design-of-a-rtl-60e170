// tb_super_sixteen: one Super Sixteen processor running the test firmware
// (P-code interpreter, timer interrupt self-test, fault routine). The
// testbench plays the neighbouring processor on the PIA link: it records the
// byte on each data-ready pulse and answers with an acknowledge pulse a few
// cycles later, and it offers the op-code of diagnosis test G on side B.
// Checks: the bytes sent (CA from PUSHC/PUSHC/ADD/NOT/SEND, 42, 55, then the
// fault message EE after the illegal op-code, then the diagnosis reports of
// a fault-free processor), the final
// microcode halt address, the stack in RAM, the number of cycles of each
// instruction (ADD 5, NOT 4, PUSHC 3, counter delay loop 4), that timer
// interrupts were taken and the program still ran to the end, and that no
// ACIA access happened.
module tb_super_sixteen;
  import ss_pkg::*;
  import ss_fw_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               ucode_we = 0, map_we = 0, eprom_we = 0, eprom_hi = 0;
  logic [11:0]        ucode_addr = '0;
  logic [UWORD_W-1:0] ucode_data = '0;
  logic [7:0]         map_addr = '0, map_data = '0, eprom_data = '0;
  logic [12:0]        eprom_addr = '0;
  logic               acia_cs, acia_we, acia_re;
  logic [1:0]         acia_rs;
  logic [7:0]         acia_wdata;
  logic [0:0][7:0]    pia_pa_out, pia_pb_in;
  logic [0:0]         pia_ca2, pia_ca1, pia_cb1, pia_cb2;
  logic [11:0]        uaddr;
  logic               int_flag;
  int checks = 0, failures = 0;

  super_sixteen dut (
    .clk, .rst_n, .ucode_we, .ucode_addr, .ucode_data, .map_we, .map_addr, .map_data,
    .eprom_we, .eprom_hi, .eprom_addr, .eprom_data,
    .acia_cs, .acia_we, .acia_re, .acia_rs, .acia_wdata, .acia_rdata(8'h00),
    .pia_pa_out, .pia_ca2, .pia_ca1, .pia_pb_in, .pia_cb1, .pia_cb2,
    .uaddr, .int_flag
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign pia_pb_in = OP_GTEST;    // the reply for test G of the diagnosis
  assign pia_cb1   = '0;

  // neighbour: capture on CA2, acknowledge on CA1 three cycles later
  logic [7:0] got [$];
  int         ack_dly;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pia_ca1 <= '0; ack_dly <= 0; end
    else begin
      pia_ca1 <= '0;
      if (pia_ca2[0]) begin got.push_back(pia_pa_out[0]); ack_dly <= 3; end
      else if (ack_dly > 0) begin
        ack_dly <= ack_dly - 1;
        if (ack_dly == 1) pia_ca1 <= 1'b1;
      end
    end

  // microcode address being executed (the pipeline register holds it)
  logic [11:0] cur;
  int n_int, n_fault, n_add_cyc, n_add, n_not_cyc, n_not, n_push_cyc, n_push, n_rpct, n_acia;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur <= '0;
      {n_int, n_fault, n_add_cyc, n_add, n_not_cyc, n_not, n_push_cyc, n_push, n_rpct, n_acia} <= '0;
    end else begin
      cur <= uaddr;
      if (uaddr == INT_VECTOR)  n_int   <= n_int + 1;
      if (uaddr == FAULT_ENTRY) n_fault <= n_fault + 1;
      if (cur == A_ADD)   n_add  <= n_add + 1;
      if (cur == A_NOT)   n_not  <= n_not + 1;
      if (cur == A_PUSHC) n_push <= n_push + 1;
      if (cur >= A_ADD   && cur < A_ADD + 5)   n_add_cyc  <= n_add_cyc + 1;
      if (cur >= A_NOT   && cur < A_NOT + 4)   n_not_cyc  <= n_not_cyc + 1;
      if (cur >= A_PUSHC && cur < A_PUSHC + 3) n_push_cyc <= n_push_cyc + 1;
      if (cur == A_RPCT) n_rpct <= n_rpct + 1;
      if (acia_cs) n_acia <= n_acia + 1;
    end

  initial begin
    build();
    // load microcode, mapping PROM and EPROM with the processor in reset
    for (int k = 0; k < UC_WORDS; k++) begin
      @(negedge clk); ucode_we = 1; ucode_addr = 12'(k); ucode_data = ucode[0][k];
    end
    @(negedge clk) ucode_we = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); map_we = 1; map_addr = 8'(k); map_data = map_tbl[k];
    end
    @(negedge clk) map_we = 0;
    for (int k = 0; k < 2 * PROG_WORDS; k++) begin
      @(negedge clk); eprom_we = 1; eprom_hi = k[0]; eprom_addr = 13'(k / 2);
      eprom_data = k[0] ? prog[k / 2][15:8] : prog[k / 2][7:0];
    end
    @(negedge clk) eprom_we = 0;
    @(negedge clk) rst_n = 1'b1;

    wait (uaddr == A_HALT);
    repeat (20) @(negedge clk);
    check(got.size() == N_MSG, $sformatf("%0d bytes sent, expected %0d", got.size(), N_MSG));
    for (int k = 0; k < N_MSG && k < got.size(); k++)
      check(got[k] == MSG[k], $sformatf("byte %0d: %h expected %h", k, got[k], MSG[k]));
    check(uaddr == A_HALT, "halted in the fault routine");
    check(n_fault == 1, $sformatf("fault entry taken %0d times", n_fault));
    check(n_int > 0, $sformatf("timer interrupts taken: %0d", n_int));
    check(n_add == 1 && n_add_cyc == 5, $sformatf("ADD took %0d cycles", n_add_cyc));
    check(n_not == 1 && n_not_cyc == 4, $sformatf("NOT took %0d cycles", n_not_cyc));
    check(n_push == 4 && n_push_cyc == 12, $sformatf("PUSHC x%0d took %0d cycles", n_push, n_push_cyc));
    check(n_rpct == 4, $sformatf("delay loop with counter 3 ran %0d times", n_rpct));
    check(n_acia == 0, "no terminal access");
    // the last value pushed stays in RAM just below the empty stack
    check({dut.u_hi.ram[12'h7FF], dut.u_lo.ram[12'h7FF]} == 16'h0055, "stack word in RAM");
    check(dut.u_pcu.g_slice[0].u_slice.regs[1] == 4'h0, "stack pointer back to 1000");
    $display("interrupts %0d", n_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
