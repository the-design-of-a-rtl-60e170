// tb_datapath: checks the data registers and buses between memory, ALU and
// PCU against a reference model, with random microinstruction fields and
// random data every cycle: the DA bus source choice, the YBUS (ALU or PCU
// through the transceiver, never both), the MAR source, ZREG loading on a
// read, the flow-through ZOREG/ZIREG (the word read in one cycle is usable
// by the ALU or the mapping logic in the very next cycle), DREG and TREG.
module tb_datapath;
  import ss_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1;
  uinstr_t     u;
  logic [15:0] alu_y, pcu_y, mem_rdata;
  logic [15:0] da_bus, ybus, mar, dreg, zreg, zi_out, zo_out, treg;
  int checks = 0, failures = 0;
  logic [15:0] m_z, m_zo, m_zi, m_d, m_t, m_mar;

  datapath dut (.*);

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
    logic [15:0] e_zo, e_zi, e_da, e_y;
    u = '0; alu_y = '0; pcu_y = '0; mem_rdata = '0;
    #1 rst_n = 1'b0;
    #1 check({mar, dreg, zreg, treg} == '0, "reset");
    rst_n = 1'b1;
    {m_z, m_zo, m_zi, m_d, m_t, m_mar} = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      u = uinstr_t'({$urandom, $urandom, $urandom});
      if (u.alu_oey) u.pcutran_py = 1'b0;
      alu_y = 16'($urandom); pcu_y = 16'($urandom); mem_rdata = 16'($urandom);
      #1;
      e_zo = u.zo_ld ? m_z : m_zo;
      e_zi = u.zi_ld ? m_z : m_zi;
      unique case (u.da_sel)
        DA_ZO:   e_da = e_zo;
        DA_IMM:  e_da = u.imm;
        DA_TREG: e_da = m_t;
        default: e_da = 16'h0;
      endcase
      e_y = u.alu_oey ? alu_y : (u.pcutran_py ? pcu_y : 16'h0);
      check(zo_out == e_zo, "ZOREG flow-through");
      check(zi_out == e_zi, "ZIREG flow-through");
      check(da_bus == e_da, $sformatf("DA bus source %0d", u.da_sel));
      check(ybus == e_y, "YBUS source");
      check({mar, dreg, zreg, treg} == {m_mar, m_d, m_z, m_t}, "registers");
      // reference update at the clock edge
      if (u.zo_ld) m_zo = m_z;
      if (u.zi_ld) m_zi = m_z;
      if (u.mem_op == MEM_READ) m_z = mem_rdata;
      if (u.dreg_ld) m_d = e_y;
      if (u.treg_ld) m_t = e_y;
      if (u.mar_sel == MAR_PCU) m_mar = pcu_y;
      else if (u.mar_sel == MAR_Y) m_mar = e_y;
    end
    // read in one cycle, used through ZOREG in the next
    @(negedge clk) begin u = '0; u.mem_op = MEM_READ; mem_rdata = 16'hA5C3; end
    @(negedge clk) begin u = '0; u.zo_ld = 1'b1; u.da_sel = DA_ZO; end
    #1 check(da_bus == 16'hA5C3, "read data on DA bus in the next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
