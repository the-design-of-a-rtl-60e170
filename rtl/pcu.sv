// pcu: Program Control Unit, the second arithmetic unit, which generates
// memory addresses (program counter, stack pointer).
//
// Four Am2901 slices act as one 16-bit unit. Register use, fixed by the
// microcode: R0 = PC, R1 = SP, R2 = 1, R3 = current process head address,
// R4 = 2, R5 = 4, R6/R7 scratch. Keeping 1, 2 and 4 in registers lets the PCU
// step PC and SP without immediate data. Registers 8-15 are wired out of use:
// bit 3 of both register selects is tied low.
//
// The unit only needs to add and subtract, so the function select I5 is tied
// low as well, leaving R+S, S-R, R-S and OR; there is no AND. The operand D
// comes from the DA bus (immediate data or memory data). The zero output
// (high when the 16-bit F is 0) goes to the sequencer through the test tree;
// the Y output feeds the MAR and the PCU transceiver. Shift ends are tied to
// zero; the carry in comes straight from the microinstruction.
// One operation per microcycle; register writes at the rising clock edge.
//
// What follows the design: four Am2901s, the register assignment, registers
// 8-15 disabled, add/subtract only, the Z output. Tying I5 low is this
// implementation's reading of "only addition and subtraction" together with
// "it has no AND facility".
module pcu (
  input  logic        clk,
  input  logic [2:0]  a,
  input  logic [2:0]  b,
  input  logic [7:0]  i,     // {I8,I7,I6, I4,I3, I2,I1,I0}
  input  logic        cin,
  input  logic [15:0] d,     // DA bus
  output logic [15:0] y,
  output logic        z
);

  logic [8:0] i_full;
  logic [4:0] carry;
  logic [3:0] fz;
  logic [3:0] r0o, r3o, q0o, q3o;

  assign i_full   = {i[7:5], 1'b0, i[4:0]};
  assign carry[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_slice
    am2901_slice u_slice (
      .clk     (clk),
      .a       ({1'b0, a}),
      .b       ({1'b0, b}),
      .i       (i_full),
      .d       (d[4*k +: 4]),
      .cin     (carry[k]),
      .ram3_in ((k == 3) ? 1'b0 : r0o[(k == 3) ? 3 : k+1]),
      .ram0_in ((k == 0) ? 1'b0 : r3o[(k == 0) ? 0 : k-1]),
      .q3_in   ((k == 3) ? 1'b0 : q0o[(k == 3) ? 3 : k+1]),
      .q0_in   ((k == 0) ? 1'b0 : q3o[(k == 0) ? 0 : k-1]),
      .y       (y[4*k +: 4]),
      .cout    (carry[k+1]),
      .f_zero  (fz[k]),
      .ram0_out(r0o[k]),
      .ram3_out(r3o[k]),
      .q0_out  (q0o[k]),
      .q3_out  (q3o[k])
    );
  end

  assign z = &fz;

endmodule
