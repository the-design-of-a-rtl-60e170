// tb_diagnosis: the microcode diagnosis of a faulty Super Sixteen. One
// processor runs the diagnosis tests A-G straight after reset; the testbench
// plays the operational processor. It offers the op-code for test G on PIA
// side B from the start, records every byte that arrives on side A, and
// turns the bytes into a pass/fail outcome per test. Only passes are
// reported (A1, B1, C1, D1, F1; E7 for test E; 61 for test G), each through
// a sender that uses only units the test relied on, so a missing byte is a
// failed test. A fail byte X0 would also count as a failure.
//
// Each scenario resets the processor, forces one unit's outputs stuck at 1
// (or the named path broken) and compares the outcome with the one expected
// from the units each test uses:
//   none          all pass
//   PCU           only B and E pass (G reads the PIA through a PCU address);
//                 its zero output stuck at 1 is caught by test C's pre-check
//   ALU           only C and G pass
//   PCUTRAN       A, E, F, G pass
//   TREG          only D fails
//   test tree     only C fails (its PCU-zero path reads "not zero")
//   Am2904        only C, E and G pass
//   ZOREG high    A, B, C fail; ZOREG low also fails F
//   memory low    A, B, C, F fail; memory high: A, B, C fail
//   ZIREG         only G fails
//   ALU top slice only C, E and G pass: the slice's Z output stuck at 1 makes
//                 an equal compare pass, and the repeated compare finds N = 1
//   carry-in at 1 all pass: every ALU constant is stored one less and loaded
//                 with carry-in 1, so the tests and their messages stay right
// A scenario is over when the processor reaches the end loop or the fault
// routine's halt, or after a fixed number of cycles.
module tb_diagnosis;
  import ss_pkg::*;
  import ss_fw_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b1;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign pia_ca1   = '0;
  assign pia_pb_in = OP_GTEST;

  // the op-code for test G is announced once, a few cycles after reset
  int since_rst;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin since_rst <= 0; pia_cb1 <= '0; end
    else begin
      since_rst <= since_rst + 1;
      pia_cb1   <= (since_rst == 3);
    end

  logic [7:0] got [$];
  always @(posedge clk)
    if (rst_n && pia_ca2[0]) got.push_back(pia_pa_out[0]);

  // outcome bits, MSB first: A B C D E F G
  function automatic logic [6:0] outcome();
    logic [6:0] r = '0;
    logic [3:0] tid [5] = '{4'hA, 4'hB, 4'hC, 4'hD, 4'hF};
    int         pos [5] = '{6, 5, 4, 3, 1};
    for (int t = 0; t < 5; t++) begin
      logic p = 1'b0, f = 1'b0;
      foreach (got[k]) begin
        if (got[k] == {tid[t], 4'h1}) p = 1'b1;
        if (got[k] == {tid[t], 4'h0}) f = 1'b1;
      end
      r[pos[t]] = p && !f;
    end
    foreach (got[k]) begin
      if (got[k] == E_VALUE) r[2] = 1'b1;
      if (got[k] == G_REPLY) r[0] = 1'b1;
    end
    return r;
  endfunction

  localparam int N_SC = 14;
  localparam string SC_NAME [N_SC] = '{"none", "PCU", "ALU", "PCUTRAN", "TREG",
    "test tree", "Am2904", "ZOREG high", "ZOREG low", "memory low", "memory high", "ZIREG",
    "ALU top slice", "carry-in at 1"};
  localparam logic [6:0] SC_EXP [N_SC] = '{7'b1111111, 7'b0100100, 7'b0010001,
    7'b1000111, 7'b1110111, 7'b1101111, 7'b0010101, 7'b0001111, 7'b0001101,
    7'b0001101, 7'b0001111, 7'b1111110, 7'b0010101, 7'b1111111};

  task automatic inject(input int sc);
    case (sc)
      1:  begin force dut.pcu_y = '1; force dut.pcu_z = 1'b1; end
      2:  force dut.alu_y = '1;
      3:  begin force dut.u_dp.tran_to_y = '1; force dut.u_dp.tran_to_pcu = '1; end
      4:  force dut.treg = '1;
      5:  force dut.pcu_z = 1'b0;
      6:  force dut.alu_cc_n = 1'b1;
      7:  force dut.zo_out[15:8] = 8'hFF;
      8:  force dut.zo_out[7:0] = 8'hFF;
      9:  force dut.lo_rdata = 8'hFF;
      10: force dut.hi_rdata = 8'hFF;
      11: force dut.zi_out = '1;
      12: begin                     // dead most significant Am2903: all 1s
        force dut.alu_y[15:12] = 4'hF;
        force dut.u_alu.zs[3] = 1'b1;  force dut.u_alu.ns[3] = 1'b1;
        force dut.u_alu.os[3] = 1'b1;  force dut.u_alu.carry[4] = 1'b1;
      end
      13: force dut.alu_cin = 1'b1;
      default: ;
    endcase
  endtask

  task automatic clear();
    release dut.pcu_y;  release dut.alu_y;
    release dut.u_dp.tran_to_y; release dut.u_dp.tran_to_pcu;
    release dut.treg;   release dut.pcu_z;  release dut.alu_cc_n;
    release dut.zo_out; release dut.lo_rdata; release dut.hi_rdata; release dut.zi_out;
    release dut.u_alu.zs; release dut.u_alu.ns; release dut.u_alu.os; release dut.u_alu.carry;
    release dut.alu_cin;
  endtask

  // the faulty unit's stuck outputs are in place from the first cycle
  int order [N_SC];
  int n_diagnosed;
  initial begin
    logic [6:0] r;
    int         cyc;
    #1 rst_n = 1'b0;              // held in reset while loading
    build();
    start_in_diag();
    for (int k = 0; k < UC_WORDS; k++) begin
      @(negedge clk); ucode_we = 1; ucode_addr = 12'(k); ucode_data = ucode[0][k];
    end
    @(negedge clk) ucode_we = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); map_we = 1; map_addr = 8'(k); map_data = map_tbl[k];
    end
    @(negedge clk) map_we = 0;

    // every scenario once, in a random order
    foreach (order[k]) order[k] = k;
    for (int k = N_SC - 1; k > 0; k--) begin
      automatic int j = int'($urandom % (k + 1));
      automatic int t = order[k]; order[k] = order[j]; order[j] = t;
    end
    n_diagnosed = 0;
    foreach (order[n]) begin
      automatic int sc = order[n];
      @(negedge clk) rst_n = 1'b0;
      got.delete();
      clear();
      inject(sc);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      cyc = 0;
      while (uaddr != A_HALT && cyc < 4000) begin
        @(negedge clk); cyc++;
      end
      repeat (10) @(negedge clk);
      r = outcome();
      check(r == SC_EXP[sc], $sformatf("%s: outcome ABCDEFG=%b expected %b (%0d bytes)",
                                       SC_NAME[sc], r, SC_EXP[sc], got.size()));
      if (r == SC_EXP[sc]) n_diagnosed++;
      $display("%s: ABCDEFG=%7b", SC_NAME[sc], r);
    end
    clear();
    // the outcomes must tell the fault classes apart as the design intends
    check(n_diagnosed == N_SC, $sformatf("%0d of %0d scenarios diagnosed", n_diagnosed, N_SC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
