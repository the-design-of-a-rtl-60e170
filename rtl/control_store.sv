// control_store: microcode memory and pipeline (current microinstruction)
// register of the Computer Control Unit.
//
// The memory is DEPTH words of 96 bits (twelve 8-bit devices side by side).
// The sequencer's address selects a word combinationally and the pipeline
// register captures it at the rising clock edge, so the microinstruction that
// controls the machine in cycle t was addressed in cycle t-1; the sequencer
// works one cycle ahead of the rest of the processor. Reset clears the
// pipeline register, which decodes as "jump to zero" with all writes off.
//
// The store is written through a load port (load_*), the way microcode was
// downloaded into an emulator of the EPROMs during development; in a fielded
// machine it is read-only. Depth 4096 is the sequencer's full 12-bit range.
module control_store
  import ss_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [11:0]              addr,
  input  logic                     load_we,
  input  logic [11:0]              load_addr,
  input  logic [UWORD_W-1:0]       load_data,
  output uinstr_t                  pipe
);
  logic [UWORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr[$clog2(DEPTH)-1:0]] <= load_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pipe <= '0;
    else        pipe <= uinstr_t'(mem[addr[$clog2(DEPTH)-1:0]]);
endmodule
