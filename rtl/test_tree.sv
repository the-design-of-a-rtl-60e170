// test_tree: selects the single condition bit that the sequencer's CC input
// sees in a microcycle.
//
// Sources (chosen by the tt_sel field of the microinstruction):
//   TT_ALU  the Am2904 condition output, passed unchanged (LOW = true);
//   TT_PCU  the PCU zero output, inverted, so a PCU result of zero makes the
//           sequencer test pass;
//   TT_INT  the timer interrupt flag, inverted, so the microcode can poll for
//           an interrupt when no machine code is running;
//   TT_NONE nothing selected: reads HIGH, the test fails.
// Purely combinational.
//
// The inversion of the PCU result and the interrupt input follow the design.
// Inverting the interrupt flag too, and the encoding of the select, are this
// implementation's choices. A consequence the fault-tolerant microcode must
// respect: a PCU output stuck at 1 makes every PCU test pass.
module test_tree
  import ss_pkg::*;
(
  input  tt_sel_e sel,
  input  logic    alu_cc_n,
  input  logic    pcu_z,
  input  logic    int_flag,
  output logic    cc_n
);
  always_comb begin
    unique case (sel)
      TT_ALU:  cc_n = alu_cc_n;
      TT_PCU:  cc_n = !pcu_z;
      TT_INT:  cc_n = !int_flag;
      TT_NONE: cc_n = 1'b1;
      default: cc_n = 1'b1;
    endcase
  end
endmodule
