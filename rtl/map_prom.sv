// map_prom: the mapping PROM decoder of the Computer Control Unit.
//
// The op-code in the ZIREG addresses a 256 x 8 PROM whose output is the
// microcode start address of that instruction. The 8-bit output passes a
// zero-fill buffer (the upper four of the sequencer's 12 D bits are 0), so
// every machine instruction starts in microcode page 000-0FF. Op-codes that
// are not instructions are programmed to point at the fault diagnosis entry
// (0FF), which is also where an all-ones (failed) PROM sends the machine.
//
// When the timer interrupt is pending the PROM is disabled and the D bus
// carries the wired-in interrupt address instead, so the next jump-to-map
// (the end of a machine instruction) enters the interrupt microcode.
//
// The PROM contents are written through a programming port (prog_*), as a
// PROM programmer or a memory emulator would; the port is synchronous, the
// look-up is combinational. Which op-code bits address the PROM (the low 8
// bits of the ZIREG) and the interrupt address are this implementation's
// choices.
module map_prom
  import ss_pkg::*;
#(
  parameter logic [11:0] INT_ADDR = INT_VECTOR
) (
  input  logic        clk,
  input  logic        prog_we,
  input  logic [7:0]  prog_addr,
  input  logic [7:0]  prog_data,
  input  logic [7:0]  opcode,
  input  logic        int_pending,
  output logic [11:0] d
);
  logic [7:0] prom [256];

  always_ff @(posedge clk)
    if (prog_we) prom[prog_addr] <= prog_data;

  assign d = int_pending ? INT_ADDR : {4'b0000, prom[opcode]};
endmodule
