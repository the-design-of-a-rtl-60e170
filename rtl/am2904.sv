// am2904: status and shift control unit of the main ALU.
//
// Three jobs, all steered by the microinstruction:
//   * Test status multiplexer: turns the ALU flags Z, N, C, O into one
//     condition (=, !=, signed and unsigned <, <=, >, >=, sign, carry,
//     overflow) for the sequencer. The flags tested are either this cycle's
//     (live) or those held in the status register. The output cc_n is LOW when
//     the condition holds: a dead unit whose output floats high therefore
//     makes every ALU test fail, never pass.
//   * Carry-in generation for the ALU: 0, 1, the stored carry or its inverse.
//   * Shift linkage at the two ends of the ALU and Q shifters: fill with 0, 1,
//     rotate (the bit leaving one end enters the other) or the stored carry.
// The status register latches Z, N, C, O at the clock edge when ce is high;
// reset clears it.
//
// The roles follow the design. The real part's 13-bit instruction and its
// micro/machine status pair are reduced here to the condition, carry and
// shift selects of the microinstruction; the encodings are this
// implementation's own.
module am2904
  import ss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // flags of this cycle's ALU operation
  input  logic       z,
  input  logic       n,
  input  logic       c,
  input  logic       o,
  // control
  input  cond_e      cond,
  input  logic       live,
  input  logic       ce,
  input  cin_sel_e   cin_sel,
  input  shift_sel_e shift_sel,
  // bits leaving the ALU shifters
  input  logic       sh_r_out,
  input  logic       sh_l_out,
  input  logic       q_r_out,
  input  logic       q_l_out,
  // outputs
  output logic       cc_n,      // 0: condition true
  output logic       cin,       // ALU carry in
  output logic       sh_r_in,
  output logic       sh_l_in,
  output logic       q_r_in,
  output logic       q_l_in,
  output logic [3:0] status     // {Z, N, C, O} held
);

  logic sz, sn, sc, so;   // status register
  logic tz, tn, tc, to;   // flags under test
  logic t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {sz, sn, sc, so} <= 4'b0;
    else if (ce) {sz, sn, sc, so} <= {z, n, c, o};
  end
  assign status = {sz, sn, sc, so};

  assign {tz, tn, tc, to} = live ? {z, n, c, o} : {sz, sn, sc, so};

  always_comb begin
    unique case (cond)
      C_EQ: t = tz;
      C_NE: t = !tz;
      C_LT: t = tn ^ to;
      C_GE: t = !(tn ^ to);
      C_GT: t = !(tn ^ to) && !tz;
      C_LE: t = (tn ^ to) || tz;
      C_LO: t = !tc;
      C_HS: t = tc;
      C_HI: t = tc && !tz;
      C_LS: t = !tc || tz;
      C_MI: t = tn;
      C_PL: t = !tn;
      C_CS: t = tc;
      C_CC: t = !tc;
      C_VS: t = to;
      C_VC: t = !to;
      default: t = 1'b0;
    endcase
  end
  assign cc_n = !t;

  always_comb begin
    unique case (cin_sel)
      CIN_0:  cin = 1'b0;
      CIN_1:  cin = 1'b1;
      CIN_C:  cin = sc;
      CIN_NC: cin = !sc;
      default: cin = 1'b0;
    endcase
  end

  always_comb begin
    unique case (shift_sel)
      SH_ZERO:  {sh_r_in, sh_l_in, q_r_in, q_l_in} = 4'b0000;
      SH_ONE:   {sh_r_in, sh_l_in, q_r_in, q_l_in} = 4'b1111;
      SH_ROT:   {sh_r_in, sh_l_in, q_r_in, q_l_in} =
                  {sh_r_out, sh_l_out, q_r_out, q_l_out};
      SH_CARRY: {sh_r_in, sh_l_in, q_r_in, q_l_in} = {4{sc}};
      default:  {sh_r_in, sh_l_in, q_r_in, q_l_in} = 4'b0000;
    endcase
  end

endmodule
