// tb_ft_dual_system: end-to-end test of the dual-processor system at its
// default size. Both processors are loaded with the test firmware: processor
// 0 interprets a P-code program that computes values, sends them to
// processor 1 over the PIA link, takes timer interrupts that run a
// self-test, and finally hits an illegal op-code, enters the fault routine
// and tells processor 1 it is faulty (byte EE). It then runs the diagnosis
// tests A-G, reporting each pass to processor 1, which answers the EE with
// the op-code for test G. Processor 0 then halts. Processor 1 copies every
// byte it receives to its terminal ACIA. The faulty processor is then reset
// on its own and runs everything a second time while processor 1 keeps
// running.
// Checked: the terminal output of processor 1 (CA 42 55 EE A1 B1 C1 D1 E7 E7
// F1 61 61 61, twice), the halt state, the ADD timing of 5 cycles, and that
// every mechanism below happened at least once (a failure is counted for
// each that never did).
module tb_ft_dual_system;
  import ss_pkg::*;
  import ss_fw_pkg::*;

  logic                     clk = 1'b0;
  logic [1:0]               rst_n = 2'b00;
  logic [1:0]               ucode_we = '0, map_we = '0, eprom_we = '0, eprom_hi = '0;
  logic [1:0][11:0]         ucode_addr = '0;
  logic [1:0][UWORD_W-1:0]  ucode_data = '0;
  logic [1:0][7:0]          map_addr = '0, map_data = '0, eprom_data = '0;
  logic [1:0][12:0]         eprom_addr = '0;
  logic [1:0]               acia_cs, acia_we, acia_re;
  logic [1:0][1:0]          acia_rs;
  logic [1:0][7:0]          acia_wdata;
  logic [1:0][11:0]         uaddr;
  logic [1:0]               int_flag;
  int checks = 0, failures = 0;

  ft_dual_system dut (
    .clk, .rst_n, .ucode_we, .ucode_addr, .ucode_data, .map_we, .map_addr, .map_data,
    .eprom_we, .eprom_hi, .eprom_addr, .eprom_data,
    .acia_cs, .acia_we, .acia_re, .acia_rs, .acia_wdata, .acia_rdata('0),
    .uaddr, .int_flag
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------- observation
  uinstr_t u0, u1;
  assign u0 = dut.g_proc[0].u_cpu.u;
  assign u1 = dut.g_proc[1].u_cpu.u;

  logic [7:0]  term [$];
  logic [11:0] cur0;
  int n_jmap, n_int, n_int_ok, n_fault, n_pcutran, n_mar_y, n_byte, n_msg, n_ack,
      n_acia, n_rpct, n_pcu_test, n_alu_br, n_push, n_pop_read, n_add, n_add_cyc,
      n_poll_wait, n_restart, n_diag, n_g_op, n_g_dec, n_gap;

  always_ff @(posedge clk) begin
    if (acia_we[1] && acia_rs[1] == 2'd1) begin term.push_back(acia_wdata[1]); n_acia <= n_acia + 1; end
    if (rst_n[0]) begin
      cur0 <= uaddr[0];
      if (u0.seq_i == JMAP)                       n_jmap    <= n_jmap + 1;
      if (uaddr[0] == INT_VECTOR)                 n_int     <= n_int + 1;
      if (uaddr[0] == 12'h108)                    n_int_ok  <= n_int_ok + 1;
      if (uaddr[0] == FAULT_ENTRY)                n_fault   <= n_fault + 1;
      if (u0.pcutran_py)                          n_pcutran <= n_pcutran + 1;
      if (u0.mar_sel == MAR_Y)                    n_mar_y   <= n_mar_y + 1;
      if (u0.mem_byte && u0.mem_op != MEM_NONE)   n_byte    <= n_byte + 1;
      if (dut.ca2[0][0])                          n_msg     <= n_msg + 1;
      if (dut.ca1[0][0])                          n_ack     <= n_ack + 1;
      if (cur0 == A_RPCT)                         n_rpct    <= n_rpct + 1;
      if (u0.ccen && u0.tt_sel == TT_PCU && dut.g_proc[0].u_cpu.cc_n == 1'b0)
                                                  n_pcu_test <= n_pcu_test + 1;
      if (u0.ccen && u0.tt_sel == TT_ALU && dut.g_proc[0].u_cpu.cc_n == 1'b0)
                                                  n_alu_br  <= n_alu_br + 1;
      if (!u0.mem_byte && u0.mem_op == MEM_WRITE) n_push    <= n_push + 1;
      if (cur0 == A_ADD + 1)                      n_pop_read <= n_pop_read + 1;
      if (cur0 == A_ADD)                          n_add     <= n_add + 1;
      if (cur0 >= A_ADD && cur0 < A_ADD + 5)      n_add_cyc <= n_add_cyc + 1;
      if (cur0 == A_SEND + 6)                     n_poll_wait <= n_poll_wait + 1;
      if (uaddr[0] == A_DIAG)                     n_diag    <= n_diag + 1;
      if (uaddr[0] == A_G_OK)                     n_g_dec   <= n_g_dec + 1;
      if (cur0 == A_SEND_P + 7 || cur0 == A_SEND_A + 7 || cur0 == A_SEND_AP + 6)
                                                  n_gap     <= n_gap + 1;
      if (dut.ca2[1][0])                          n_g_op    <= n_g_op + 1;
    end else cur0 <= '0;
  end

  task automatic load();
    for (int k = 0; k < UC_WORDS; k++) begin
      @(negedge clk);
      ucode_we = 2'b11;
      for (int p = 0; p < 2; p++) begin ucode_addr[p] = 12'(k); ucode_data[p] = ucode[p][k]; end
    end
    @(negedge clk) ucode_we = '0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      map_we = 2'b11;
      for (int p = 0; p < 2; p++) begin map_addr[p] = 8'(k); map_data[p] = map_tbl[k]; end
    end
    @(negedge clk) map_we = '0;
    for (int k = 0; k < 2 * PROG_WORDS; k++) begin
      @(negedge clk);
      eprom_we = 2'b01; eprom_hi[0] = k[0]; eprom_addr[0] = 13'(k / 2);
      eprom_data[0] = k[0] ? prog[k / 2][15:8] : prog[k / 2][7:0];
    end
    @(negedge clk) eprom_we = '0;
  endtask

  task automatic count_check(input int n, input string what);
    check(n > 0, $sformatf("mechanism never happened: %s", what));
    $display("  %-38s %0d", what, n);
  endtask

  initial begin
    {n_jmap, n_int, n_int_ok, n_fault, n_pcutran, n_mar_y, n_byte, n_msg, n_ack, n_acia,
     n_rpct, n_pcu_test, n_alu_br, n_push, n_pop_read, n_add, n_add_cyc, n_poll_wait,
     n_restart, n_diag, n_g_op, n_g_dec, n_gap} = '0;
    cur0 = '0;
    build();
    load();
    @(negedge clk) rst_n[1] = 1'b1;       // backup processor first
    repeat (4) @(negedge clk);
    rst_n[0] = 1'b1;

    for (int round = 1; round <= 2; round++) begin
      wait (uaddr[0] == A_HALT);
      repeat (40) @(negedge clk);
      check(term.size() == N_MSG * round,
            $sformatf("round %0d: terminal has %0d bytes", round, term.size()));
      check(uaddr[1] >= 12'd8 && uaddr[1] <= 12'd10, "backup processor back to polling");
      if (round == 1) begin
        // restart the faulty processor alone
        rst_n[0] = 1'b0;
        repeat (3) @(negedge clk);
        rst_n[0] = 1'b1;
        n_restart++;
      end
    end
    for (int k = 0; k < term.size(); k++)
      check(term[k] == MSG[k % N_MSG], $sformatf("terminal byte %0d: %h expected %h",
                                                 k, term[k], MSG[k % N_MSG]));
    check(n_add == 2 && n_add_cyc == 10, $sformatf("ADD: %0d runs, %0d cycles", n_add, n_add_cyc));
    check(n_fault == 2, "one fault entry per round");

    $display("mechanism counts:");
    count_check(n_jmap,      "op-code dispatch (jump to map)");
    count_check(n_push,      "stack/memory word writes");
    count_check(n_pop_read,  "pipelined ADD operand reads");
    count_check(n_int,       "timer interrupts taken");
    count_check(n_int_ok,    "interrupt self-test passed");
    count_check(n_pcutran,   "PCU transceiver to YBUS");
    count_check(n_mar_y,     "ALU-generated address (YBUS to MAR)");
    count_check(n_byte,      "byte accesses");
    count_check(n_pcu_test,  "PCU zero test through test tree");
    count_check(n_alu_br,    "ALU condition branch taken");
    count_check(n_rpct,      "counter-driven delay loop cycles");
    count_check(n_msg,       "PIA messages sent");
    count_check(n_ack,       "PIA acknowledges");
    count_check(n_poll_wait, "sender waited for acknowledge");
    count_check(n_fault,     "fault entry (unmapped op-code)");
    count_check(n_acia,      "terminal (ACIA) writes by backup");
    count_check(n_restart,   "faulty processor restarted");
    count_check(n_diag,      "diagnosis tests started");
    count_check(n_gap,       "counter-only delay after a report");
    count_check(n_g_op,      "test G op-code sent by processor 1");
    count_check(n_g_dec,     "test G op-code decoded");
    check(n_diag == 2 && n_g_dec == 2, "one diagnosis with a decoded op-code per round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
