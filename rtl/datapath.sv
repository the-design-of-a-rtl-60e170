// datapath: the Super Sixteen's buses and pipeline registers between memory,
// the two arithmetic units and the CCU.
//
// Registers (all 16 bits, loaded at the rising clock edge):
//   ZREG   receives every memory read (mem_op = READ).
//   ZOREG  ZREG -> DA bus, so memory data reaches the ALU or the PCU.
//   ZIREG  ZREG -> mapping PROM (the op-code being decoded).
//   DREG   YBUS -> memory write data.
//   TREG   YBUS -> DA bus: the ALU-to-PCU transfer path.
//   MAR    memory address, from the PCU Y output or from the YBUS through the
//          PCU transceiver (PCUTRAN) when the ALU generates an address.
// ZOREG and ZIREG behave as transparent latches: in the cycle their load is
// asserted they already pass ZREG through (zo_out / zi_out), and they hold
// that value afterwards. This lets "ZREG -> ZIREG and jump to map" decode the
// word read in the previous cycle, as the design's microcycle tables require.
// Memory timing that follows: an address loaded into MAR in cycle t is read in
// cycle t+1 and its data is usable in cycle t+2, with no wait states.
//
// Buses: the DA bus carries ZOREG, the immediate field or TREG (zero if none
// is selected). The YBUS carries the ALU Y output when the ALU drives it, or
// the PCU Y output through the PCUTRAN. Both at once is a microcode error,
// checked by an assertion.
//
// The register set and the routes follow the design's block diagram and its
// datapath and ALU/PCU transfer figures; the flow-through timing and the
// bus-idle value are this implementation's reading.
module datapath
  import ss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  uinstr_t     u,
  input  logic [15:0] alu_y,
  input  logic [15:0] pcu_y,
  input  logic [15:0] mem_rdata,
  output logic [15:0] da_bus,
  output logic [15:0] ybus,
  output logic [15:0] mar,
  output logic [15:0] dreg,
  output logic [15:0] zreg,
  output logic [15:0] zi_out,
  output logic [15:0] zo_out,
  output logic [15:0] treg
);
  logic [15:0] zoreg, zireg;
  // The two directions of the PCU transceiver (PCUTRAN): PCU Y onto the YBUS,
  // and the YBUS onto the PCU side, from where the MAR loads it.
  logic [15:0] tran_to_y, tran_to_pcu;

  assign tran_to_y   = pcu_y;
  assign tran_to_pcu = ybus;

  assign zo_out = u.zo_ld ? zreg : zoreg;
  assign zi_out = u.zi_ld ? zreg : zireg;

  always_comb begin
    unique case (u.da_sel)
      DA_NONE: da_bus = 16'h0000;
      DA_ZO:   da_bus = zo_out;
      DA_IMM:  da_bus = u.imm;
      DA_TREG: da_bus = treg;
      default: da_bus = 16'h0000;
    endcase
  end

  always_comb begin
    if (u.alu_oey)         ybus = alu_y;
    else if (u.pcutran_py) ybus = tran_to_y;
    else                   ybus = 16'h0000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zreg  <= '0;
      zoreg <= '0;
      zireg <= '0;
      dreg  <= '0;
      treg  <= '0;
      mar   <= '0;
    end else begin
      if (u.mem_op == MEM_READ) zreg <= mem_rdata;
      if (u.zo_ld)   zoreg <= zreg;
      if (u.zi_ld)   zireg <= zreg;
      if (u.dreg_ld) dreg  <= ybus;
      if (u.treg_ld) treg  <= ybus;
      unique case (u.mar_sel)
        MAR_PCU: mar <= pcu_y;
        MAR_Y:   mar <= tran_to_pcu;
        default: ;
      endcase
    end
  end

  // Only one source may drive the YBUS in a cycle.
  a_ybus_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    !(u.alu_oey && u.pcutran_py));
endmodule
