// ss_fw_pkg: test firmware for the Super Sixteen processor: microcode for the
// two processors of the dual system, the mapping PROM table and a small
// P-code program, plus helpers that assemble microinstructions field by
// field.
//
// Processor 0 (the "main" processor) runs a P-code interpreter:
//   * start-up: PCU constants R2 = 1, R4 = 2, R5 = 4, SP = 1000, PC at the
//     first instruction, timer started, PIA set up, a PCU self-test through
//     the test tree and a counter-driven delay loop.
//   * fetch: after each jump-to-map the op-code of the instruction at p has
//     been mapped, ZREG holds the word at p+2 and PC = MAR = p+4, so memory
//     is always read two cycles ahead of use.
//   * instructions (op-code in the low byte):
//       01 JUMP t   02 ADD   03 NOT   04 PUSHC c   05 SEND (pop, send the
//       low byte to the other processor through the PIA, wait for the
//       acknowledge). Every other op-code maps to FF, the fault entry.
//   * timer interrupt: the mapping PROM is overridden and the interrupt
//     routine runs a self-test: the fifth program word must be the JUMP
//     op-code and a PCU constant sent over the PCU transceiver into the ALU
//     must compare equal. It then backs PC up by 4 and refetches, so the
//     interrupted instruction runs next.
//   * fault routine: using only the ALU (addresses through the transceiver
//     path to the MAR) it re-initialises the PIA, sends the byte EE ("I am
//     faulty") to the other processor, waits and runs the diagnosis tests
//     once, then halts in a one-word loop.
// Processor 1 (the "backup") waits for messages on its PIA B side and copies
// each byte to its terminal ACIA; it answers EE with the test G op-code 06.
// build_diag_code() adds the microcode diagnosis tests A-G that a processor found
// faulty runs and reports to the operational processor (see below).
package ss_fw_pkg;
  import ss_pkg::*;

  localparam int          UC_WORDS   = 512;
  localparam int          PROG_WORDS = 32;
  localparam logic [15:0] PERIOD     = 16'd40;     // timer reload, cycles

  // microcode addresses
  localparam logic [11:0] A_FILL = 12'h020, A_ADD = 12'h030, A_NOT = 12'h038,
                          A_PUSHC = 12'h040, A_JUMP = 12'h048, A_SEND = 12'h050,
                          A_FAULT = 12'h180, A_HALT = 12'h186, A_RPCT = 12'h010;
  localparam logic [11:0] A_P1_ACIA = 12'h00F;     // processor 1: terminal write

  // op-codes
  localparam logic [7:0] OP_JUMP = 8'h01, OP_ADD = 8'h02, OP_NOT = 8'h03,
                         OP_PUSHC = 8'h04, OP_SEND = 8'h05, OP_BAD = 8'h7F;

  uinstr_t     ucode [2][UC_WORDS];
  logic [7:0]  map_tbl [256];
  logic [15:0] prog [PROG_WORDS];     // EPROM words from 4000

  // expected bytes sent by processor 0
  // program output, the fault message, then the diagnosis reports of a
  // fault-free processor (tests A-D, E twice, F, G three times)
  localparam int N_MSG = 14;
  localparam logic [7:0] MSG [N_MSG] = '{8'hCA, 8'h42, 8'h55, 8'hEE,
    8'hA1, 8'hB1, 8'hC1, 8'hD1, 8'hE7, 8'hE7, 8'hF1, 8'h61, 8'h61, 8'h61};

  // ------------------------------------------------------------ helpers
  function automatic uinstr_t nop();
    uinstr_t w = '0;
    w.seq_i  = CONT;
    w.tt_sel = TT_NONE;
    w.pcu_i  = {3'd1, 2'd0, 3'd4};          // PCU: no destination
    w.alu_i  = {4'b1100, 4'b0110, 1'b1};    // ALU: Y only
    return w;
  endfunction

  // PCU register b := immediate, optionally to the MAR
  function automatic uinstr_t pcu_ldi(uinstr_t w, logic [2:0] b, logic [15:0] v, logic mar);
    w.pcu_i = {3'd3, 2'd0, 3'd7}; w.pcu_b = b; w.pcu_cin = 1'b0;
    w.da_sel = DA_IMM; w.imm = v;
    if (mar) w.mar_sel = MAR_PCU;
    return w;
  endfunction

  // PCU register b := ZOREG (memory data read in the previous cycle) -> MAR
  function automatic uinstr_t pcu_ldz(uinstr_t w, logic [2:0] b);
    w.pcu_i = {3'd3, 2'd0, 3'd7}; w.pcu_b = b; w.pcu_cin = 1'b0;
    w.da_sel = DA_ZO; w.zo_ld = 1'b1; w.mar_sel = MAR_PCU;
    return w;
  endfunction

  // PCU output := register a (to the MAR if mar)
  function automatic uinstr_t pcu_pass(uinstr_t w, logic [2:0] a, logic mar);
    w.pcu_i = {3'd1, 2'd0, 3'd4}; w.pcu_a = a; w.pcu_cin = 1'b0;
    if (mar) w.mar_sel = MAR_PCU;
    return w;
  endfunction

  // PCU register b := b + a (result to the MAR if mar)
  function automatic uinstr_t pcu_add(uinstr_t w, logic [2:0] a, logic [2:0] b, logic mar);
    w.pcu_i = {3'd3, 2'd0, 3'd1}; w.pcu_a = a; w.pcu_b = b; w.pcu_cin = 1'b0;
    if (mar) w.mar_sel = MAR_PCU;
    return w;
  endfunction

  // PCU register b := b - a
  function automatic uinstr_t pcu_sub(uinstr_t w, logic [2:0] a, logic [2:0] b, logic mar);
    w.pcu_i = {3'd3, 2'd1, 3'd1}; w.pcu_a = a; w.pcu_b = b; w.pcu_cin = 1'b1;
    if (mar) w.mar_sel = MAR_PCU;
    return w;
  endfunction

  // ALU Y := DA bus (source src); ZO also loads ZOREG. A constant is stored
  // as v - 1 and loaded with carry-in 1, so that an Am2904 whose carry-in
  // output is stuck at 1 cannot corrupt it.
  function automatic uinstr_t alu_da(uinstr_t w, da_sel_e src, logic [15:0] v);
    w.alu_ea = 1'b1; w.da_sel = src; w.alu_oey = 1'b1;
    w.alu_i = {4'b1100, 4'b0110, 1'b1}; w.st_cin = CIN_0;
    if (src == DA_IMM) begin w.imm = v - 16'd1; w.st_cin = CIN_1; end
    if (src == DA_ZO)  w.zo_ld = 1'b1;
    return w;
  endfunction

  // ALU Y := DA op register b (fn: 4'b0011 add, 4'b0010 DA - Rb, 4'b1100 and)
  function automatic uinstr_t alu_dr(uinstr_t w, da_sel_e src, logic [15:0] v,
                                     logic [3:0] fn, logic [3:0] b);
    w = alu_da(w, src, v);
    if (src == DA_IMM) w.imm = v;
    w.alu_i = {4'b1100, fn, 1'b0}; w.alu_b = b; w.alu_oeb = 1'b0;
    w.st_cin = (fn == 4'b0010) ? CIN_1 : CIN_0;
    return w;
  endfunction

  // write the ALU result (or, with oey low, the YBUS) into ALU register b
  function automatic uinstr_t alu_wr(uinstr_t w, logic [3:0] b);
    w.alu_i[8:5] = 4'b1111; w.alu_b = b; w.alu_we = 1'b1;
    return w;
  endfunction

  function automatic uinstr_t mem(uinstr_t w, mem_op_e op, logic bt);
    w.mem_op = op; w.mem_byte = bt;
    return w;
  endfunction

  function automatic uinstr_t jmp(uinstr_t w, logic [11:0] t);
    w.seq_i = CJP; w.ccen = 1'b0; w.br = t;
    return w;
  endfunction

  function automatic uinstr_t jmap(uinstr_t w);
    w.seq_i = JMAP;
    return w;
  endfunction

  // conditional jump on this cycle's ALU flags
  function automatic uinstr_t br_alu(uinstr_t w, cond_e c, logic [11:0] t);
    w.seq_i = CJP; w.ccen = 1'b1; w.tt_sel = TT_ALU; w.st_cond = c; w.st_live = 1'b1;
    w.br = t;
    return w;
  endfunction

  // ------------------------------------------------------------ build
  function automatic void build();
    uinstr_t w;
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < UC_WORDS; k++) ucode[p][k] = nop();
    for (int k = 0; k < 256; k++) map_tbl[k] = 8'hFF;
    map_tbl[OP_JUMP]  = A_JUMP[7:0];
    map_tbl[OP_ADD]   = A_ADD[7:0];
    map_tbl[OP_NOT]   = A_NOT[7:0];
    map_tbl[OP_PUSHC] = A_PUSHC[7:0];
    map_tbl[OP_SEND]  = A_SEND[7:0];

    // ================= processor 0 =================
    // start-up
    ucode[0][0]  = pcu_ldi(nop(), 3'd2, 16'd1, 1'b0);
    ucode[0][1]  = pcu_ldi(nop(), 3'd4, 16'd2, 1'b0);
    ucode[0][2]  = pcu_ldi(nop(), 3'd5, 16'd4, 1'b0);
    ucode[0][3]  = pcu_ldi(nop(), 3'd1, 16'h1000, 1'b0);
    ucode[0][4]  = pcu_ldi(nop(), 3'd0, 16'h4008, 1'b0);
    w = nop(); w.tiu_ld = 1'b1; w.imm = PERIOD; ucode[0][5] = w;
    ucode[0][6]  = alu_wr(alu_da(nop(), DA_IMM, 16'h0080), 4'd15);
    ucode[0][7]  = alu_wr(alu_da(nop(), DA_IMM, 16'h0001), 4'd14);
    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1; ucode[0][8] = w;
    ucode[0][9]  = pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1);
    ucode[0][10] = mem(nop(), MEM_WRITE, 1'b1);
    ucode[0][11] = pcu_ldi(nop(), 3'd6, 16'h2016, 1'b1);
    ucode[0][12] = mem(nop(), MEM_WRITE, 1'b1);
    // PCU self-test: R5 - R5 must be zero (PCU zero output via test tree)
    w = nop(); w.pcu_i = {3'd1, 2'd1, 3'd1}; w.pcu_a = 3'd5; w.pcu_b = 3'd5; w.pcu_cin = 1'b1;
    w.seq_i = CJP; w.ccen = 1'b1; w.tt_sel = TT_PCU; w.br = 12'd15;
    ucode[0][13] = w;
    ucode[0][14] = jmp(nop(), A_FAULT);
    // counter-driven delay: load 3, one-word loop runs 4 times
    w = nop(); w.seq_i = LDCT; w.br = 12'd3; ucode[0][15] = w;
    w = nop(); w.seq_i = RPCT; w.br = A_RPCT; ucode[0][A_RPCT] = w;
    ucode[0][17] = jmp(alu_wr(alu_da(nop(), DA_IMM, 16'h0000), 4'd8), A_FILL);

    // fill: F0 MAR = PC; F1 read, PC += 2; F2 read, PC += 2, map
    ucode[0][A_FILL]     = pcu_pass(nop(), 3'd0, 1'b1);
    ucode[0][A_FILL + 1] = mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_READ, 1'b0);
    w = mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_READ, 1'b0); w.zi_ld = 1'b1;
    ucode[0][A_FILL + 2] = jmap(w);

    // ADD: pop a, pop b, push a + b (5 cycles)
    w = pcu_pass(nop(), 3'd1, 1'b1); w.zi_ld = 1'b1;           ucode[0][A_ADD]     = w;
    ucode[0][A_ADD + 1] = mem(pcu_add(nop(), 3'd4, 3'd1, 1'b1), MEM_READ, 1'b0);
    w = alu_wr(alu_da(nop(), DA_ZO, '0), 4'd1);
    ucode[0][A_ADD + 2] = mem(pcu_pass(w, 3'd0, 1'b1), MEM_READ, 1'b0);
    w = alu_dr(nop(), DA_ZO, '0, 4'b0011, 4'd1); w.dreg_ld = 1'b1;
    ucode[0][A_ADD + 3] = mem(pcu_pass(w, 3'd1, 1'b1), MEM_READ, 1'b0);
    ucode[0][A_ADD + 4] = jmap(mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_WRITE, 1'b0));

    // NOT: replace the top of stack by its complement (4 cycles)
    w = pcu_pass(nop(), 3'd1, 1'b1); w.zi_ld = 1'b1;           ucode[0][A_NOT]     = w;
    ucode[0][A_NOT + 1] = mem(pcu_pass(nop(), 3'd0, 1'b1), MEM_READ, 1'b0);
    w = alu_da(nop(), DA_ZO, '0); w.alu_i = {4'b1100, 4'b0111, 1'b1}; w.dreg_ld = 1'b1;
    ucode[0][A_NOT + 2] = mem(pcu_pass(w, 3'd1, 1'b1), MEM_READ, 1'b0);
    ucode[0][A_NOT + 3] = jmap(mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_WRITE, 1'b0));

    // PUSHC c (3 cycles)
    w = alu_da(nop(), DA_ZO, '0); w.dreg_ld = 1'b1;
    ucode[0][A_PUSHC]     = mem(pcu_sub(w, 3'd4, 3'd1, 1'b1), MEM_READ, 1'b0);
    w = mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_WRITE, 1'b0); w.zi_ld = 1'b1;
    ucode[0][A_PUSHC + 1] = w;
    ucode[0][A_PUSHC + 2] = jmap(mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_READ, 1'b0));

    // JUMP t: PC := t, refill
    ucode[0][A_JUMP] = jmp(pcu_ldz(nop(), 3'd0), A_FILL + 1);

    // SEND: pop, write the low byte to ORA, wait for the acknowledge
    w = pcu_pass(nop(), 3'd1, 1'b1); w.zi_ld = 1'b1;           ucode[0][A_SEND]     = w;
    ucode[0][A_SEND + 1] = mem(pcu_ldi(nop(), 3'd6, 16'h2010, 1'b1), MEM_READ, 1'b0);
    w = alu_da(nop(), DA_ZO, '0); w.dreg_ld = 1'b1;
    ucode[0][A_SEND + 2] = pcu_add(w, 3'd4, 3'd1, 1'b0);
    ucode[0][A_SEND + 3] = mem(pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1), MEM_WRITE, 1'b1);
    ucode[0][A_SEND + 4] = mem(nop(), MEM_READ, 1'b1);
    ucode[0][A_SEND + 5] = br_alu(alu_dr(nop(), DA_ZO, '0, 4'b1100, 4'd15), C_NE, A_SEND + 7);
    ucode[0][A_SEND + 6] = jmp(nop(), A_SEND + 4);
    ucode[0][A_SEND + 7] = pcu_pass(nop(), 3'd0, 1'b1);
    ucode[0][A_SEND + 8] = jmap(mem(pcu_add(nop(), 3'd4, 3'd0, 1'b1), MEM_READ, 1'b0));

    // fault entry (all-ones mapping PROM output)
    ucode[0][FAULT_ENTRY] = jmp(nop(), A_FAULT);

    // timer interrupt routine
    w = nop(); w.tiu_ld = 1'b1; w.imm = PERIOD;               ucode[0][12'h100] = w;
    ucode[0][12'h101] = pcu_ldi(nop(), 3'd6, 16'h4008, 1'b1);
    ucode[0][12'h102] = mem(nop(), MEM_READ, 1'b0);
    ucode[0][12'h103] = br_alu(alu_dr(nop(), DA_ZO, '0, 4'b0010, 4'd14), C_EQ, 12'h105);
    ucode[0][12'h104] = jmp(nop(), A_FAULT);
    w = pcu_pass(nop(), 3'd5, 1'b0); w.pcutran_py = 1'b1;
    w.alu_oey = 1'b0; w = alu_wr(w, 4'd13);                   ucode[0][12'h105] = w;
    ucode[0][12'h106] = br_alu(alu_dr(nop(), DA_IMM, 16'd4, 4'b0010, 4'd13), C_EQ, 12'h108);
    ucode[0][12'h107] = jmp(nop(), A_FAULT);
    ucode[0][12'h108] = jmp(pcu_sub(nop(), 3'd5, 3'd0, 1'b1), A_FILL + 1);

    // fault routine: ALU only, addresses through the transceiver to the MAR
    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1;    ucode[0][A_FAULT]     = w;
    w = alu_da(nop(), DA_IMM, 16'h2012); w.mar_sel = MAR_Y;   ucode[0][A_FAULT + 1] = w;
    ucode[0][A_FAULT + 2] = mem(nop(), MEM_WRITE, 1'b1);
    w = alu_da(nop(), DA_IMM, 16'h00EE); w.dreg_ld = 1'b1;    ucode[0][A_FAULT + 3] = w;
    w = alu_da(nop(), DA_IMM, 16'h2010); w.mar_sel = MAR_Y;   ucode[0][A_FAULT + 4] = w;
    ucode[0][A_FAULT + 5] = jmp(mem(nop(), MEM_WRITE, 1'b1), A_HALT + 1);
    ucode[0][A_HALT]      = jmp(nop(), A_HALT);
    // diagnosis not yet run (R8 = 0): wait, then run it
    ucode[0][A_HALT + 1]  = br_alu(alu_dr(nop(), DA_IMM, 16'h0001, 4'b0010, 4'd8), C_EQ, A_HALT);
    w = nop(); w.seq_i = LDCT; w.br = MSG_GAP;               ucode[0][A_HALT + 2] = w;
    w = nop(); w.seq_i = RPCT; w.br = A_HALT + 3;            ucode[0][A_HALT + 3] = w;
    ucode[0][A_HALT + 4]  = jmp(nop(), A_DIAG);

    // ================= processor 1 =================
    ucode[1][0]  = alu_wr(alu_da(nop(), DA_IMM, 16'h0080), 4'd15);
    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1; ucode[1][1] = w;
    ucode[1][2]  = pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1);
    ucode[1][3]  = mem(nop(), MEM_WRITE, 1'b1);
    ucode[1][4]  = pcu_ldi(nop(), 3'd6, 16'h2016, 1'b1);
    ucode[1][5]  = mem(nop(), MEM_WRITE, 1'b1);
    w = nop(); w.tiu_ld = 1'b1; w.imm = 16'hFFFF; ucode[1][6] = w;
    ucode[1][8]  = mem(nop(), MEM_READ, 1'b1);                       // poll CRB
    ucode[1][9]  = br_alu(alu_dr(nop(), DA_ZO, '0, 4'b1100, 4'd15), C_NE, 12'd11);
    ucode[1][10] = jmp(nop(), 12'd8);
    ucode[1][11] = pcu_ldi(nop(), 3'd6, 16'h2014, 1'b1);
    ucode[1][12] = mem(nop(), MEM_READ, 1'b1);                       // read ORB
    w = alu_wr(alu_da(nop(), DA_ZO, '0), 4'd9); w.dreg_ld = 1'b1; ucode[1][13] = w;
    ucode[1][14] = pcu_ldi(nop(), 3'd6, 16'h2002, 1'b1);
    ucode[1][A_P1_ACIA] = mem(nop(), MEM_WRITE, 1'b1);              // terminal
    ucode[1][16] = br_alu(alu_dr(nop(), DA_IMM, 16'h00EE, 4'b0010, 4'd9), C_EQ, 12'd18);
    ucode[1][17] = jmp(pcu_ldi(nop(), 3'd6, 16'h2016, 1'b1), 12'd8);
    // the neighbour reports itself faulty: send it the op-code for test G
    w = alu_da(nop(), DA_IMM, {8'h00, OP_GTEST}); w.dreg_ld = 1'b1; ucode[1][18] = w;
    ucode[1][19] = pcu_ldi(nop(), 3'd6, 16'h2010, 1'b1);
    ucode[1][20] = mem(nop(), MEM_WRITE, 1'b1);
    ucode[1][21] = jmp(pcu_ldi(nop(), 3'd6, 16'h2016, 1'b1), 12'd8);

    // ================= P-code program (EPROM from 4000) =================
    for (int k = 0; k < PROG_WORDS; k++) prog[k] = 16'h0000;
    prog[4'h4] = {8'h00, OP_JUMP};  prog[5] = 16'h400C;
    prog[6]  = {8'h00, OP_PUSHC};   prog[7] = 16'h1234;
    prog[8]  = {8'h00, OP_PUSHC};   prog[9] = 16'h0101;
    prog[10] = {8'h00, OP_ADD};
    prog[11] = {8'h00, OP_NOT};
    prog[12] = {8'h00, OP_SEND};
    prog[13] = {8'h00, OP_PUSHC};   prog[14] = 16'h0042;
    prog[15] = {8'h00, OP_SEND};
    prog[16] = {8'h00, OP_JUMP};    prog[17] = 16'h4028;
    prog[18] = {8'h00, OP_BAD};     prog[19] = {8'h00, OP_BAD};
    prog[20] = {8'h00, OP_PUSHC};   prog[21] = 16'h0055;
    prog[22] = {8'h00, OP_SEND};
    prog[23] = {8'h00, OP_BAD};

    build_diag_code();
  endfunction

  // ------------------------------------------------------------ diagnosis
  // Microcode tests run by a processor that has been found faulty. Each test
  // exercises a different set of units. Only a passed test is reported: the
  // byte {test, 1} (A1, B1, C1, D1, F1) goes to the operational processor,
  // which takes a missing message as a failed test. Test E sends the value E7
  // made by the ALU, and test G answers 61 after decoding an op-code that the
  // operational processor sent.
  //   A  ALU data, PCU addresses, no PCUTRAN; checked by the Am2904
  //   B  ALU data, ALU addresses through the PCUTRAN into the MAR, no PCU
  //   C  PCU data (through the PCUTRAN into DREG), PCU addresses, PCU zero
  //      test through the test tree, no ALU
  //   D  ALU -> TREG -> PCU -> PCUTRAN -> ALU register, checked by the Am2904
  //   E  ALU value sent to the operational processor, which checks it
  //   F  byte write and read with the low halves only, checked by the Am2904
  //   G  op-code read from the PIA, ZREG -> ZIREG -> mapping PROM -> decode
  // There are three message senders, so that a report depends only on units
  // the test has just shown to work: PCU only (A_SEND_P), ALU only
  // (A_SEND_A) and ALU data with a PCU address, no PCUTRAN (A_SEND_AP). The
  // code to send is held in PCU R7 and ALU R10; the ALU copies it out as
  // R10 OR R10, which does not depend on the carry-in. Each sender sets up
  // the PIA again before it writes, in case a faulty unit has disturbed it.
  localparam logic [11:0] A_DIAG = 12'h1C0, A_SEND_P = 12'h060, A_SEND_A = 12'h070,
                          A_SEND_AP = 12'h080, A_G_OK = 12'h090;
  localparam logic [11:0] MSG_GAP = 12'd29;    // CCU-only delay after a message: 30 passes
  localparam logic [7:0]  OP_GTEST = 8'h06;   // op-code sent for test G
  localparam logic [7:0]  E_VALUE  = 8'hE7, G_REPLY = 8'h61;
  logic [11:0] diag_end;                      // last word: on to the halt

  // load the code into PCU R7 and ALU R10 and call the sender at t
  function automatic uinstr_t send_code(logic [7:0] code, logic [11:0] t);
    uinstr_t w = alu_wr(alu_da(nop(), DA_IMM, {8'h00, code}), 4'd10);
    // the PCU takes the same stored constant (code - 1) plus its carry-in
    w.pcu_i = {3'd3, 2'd0, 3'd7}; w.pcu_b = 3'd7; w.pcu_cin = 1'b1;
    w.seq_i = CJS; w.ccen = 1'b0; w.br = t;
    return w;
  endfunction

  function automatic uinstr_t call(logic [11:0] t);
    uinstr_t w = nop();
    w.seq_i = CJS; w.ccen = 1'b0; w.br = t;
    return w;
  endfunction

  // The branch word at k jumps to k+2 when the comparison is equal (or the
  // PCU result zero). A failed test falls through to k+1 and skips the
  // report. An ALU comparison is then made again and a negative result
  // counts as a failure: a dead most significant slice makes Z and N both
  // 1, which no real result can. The report goes through sender snd.
  // Returns the start of the next test.
  function automatic logic [11:0] verdict(logic [11:0] k, logic [3:0] t, logic [11:0] snd);
    uinstr_t w = ucode[0][k];
    logic [11:0] nxt;
    if (w.tt_sel == TT_ALU) begin
      nxt = k + 4;
      w.st_cond = C_MI; w.br = k + 1;
      ucode[0][k + 2] = w;
      ucode[0][k + 3] = send_code({t, 4'h1}, snd);
    end else begin
      nxt = k + 3;
      ucode[0][k + 2] = send_code({t, 4'h1}, snd);
    end
    ucode[0][k + 1] = jmp(nop(), nxt);
    return nxt;
  endfunction

  // after build(): processor 0 starts directly in the diagnosis
  function automatic void start_in_diag();
    ucode[0][0] = jmp(nop(), A_DIAG);
  endfunction

  // called by build(); ALU R8 = 1 marks "diagnosis already run", so that a
  // decode failure in test G (which lands on the fault entry) ends in the halt
  function automatic void build_diag_code();
    uinstr_t w;
    logic [11:0] k;
    map_tbl[OP_GTEST] = A_G_OK[7:0];

    // senders: each first re-initialises PIA side A (CRA = 04) with its own
    // units, then writes the code to ORA, then returns
    w = pcu_pass(nop(), 3'd5, 1'b0); w.pcutran_py = 1'b1; w.dreg_ld = 1'b1;
    ucode[0][A_SEND_P]     = w;
    ucode[0][A_SEND_P + 1] = pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1);
    ucode[0][A_SEND_P + 2] = mem(nop(), MEM_WRITE, 1'b1);
    w = pcu_pass(nop(), 3'd7, 1'b0); w.pcutran_py = 1'b1; w.dreg_ld = 1'b1;
    ucode[0][A_SEND_P + 3] = w;
    ucode[0][A_SEND_P + 4] = pcu_ldi(nop(), 3'd6, 16'h2010, 1'b1);
    ucode[0][A_SEND_P + 5] = mem(nop(), MEM_WRITE, 1'b1);

    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1;    ucode[0][A_SEND_A] = w;
    w = alu_da(nop(), DA_IMM, 16'h2012); w.mar_sel = MAR_Y;   ucode[0][A_SEND_A + 1] = w;
    ucode[0][A_SEND_A + 2] = mem(nop(), MEM_WRITE, 1'b1);
    w = nop(); w.alu_a = 4'd10; w.alu_b = 4'd10; w.alu_i = {4'b1100, 4'b1111, 1'b0}; w.alu_oey = 1'b1;
    w.dreg_ld = 1'b1;                                          ucode[0][A_SEND_A + 3] = w;
    w = alu_da(nop(), DA_IMM, 16'h2010); w.mar_sel = MAR_Y;   ucode[0][A_SEND_A + 4] = w;
    ucode[0][A_SEND_A + 5] = mem(nop(), MEM_WRITE, 1'b1);

    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1;    ucode[0][A_SEND_AP] = w;
    ucode[0][A_SEND_AP + 1] = pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1);
    ucode[0][A_SEND_AP + 2] = mem(nop(), MEM_WRITE, 1'b1);
    w = nop(); w.alu_a = 4'd10; w.alu_b = 4'd10; w.alu_i = {4'b1100, 4'b1111, 1'b0}; w.alu_oey = 1'b1;
    w.dreg_ld = 1'b1;
    ucode[0][A_SEND_AP + 3] = pcu_ldi(w, 3'd6, 16'h2010, 1'b1);
    ucode[0][A_SEND_AP + 4] = mem(nop(), MEM_WRITE, 1'b1);

    // then wait with the sequencer's counter alone, and return
    for (int e = 0; e < 3; e++) begin
      logic [11:0] q = (e == 0) ? A_SEND_P + 6 : (e == 1) ? A_SEND_A + 6 : A_SEND_AP + 5;
      w = nop(); w.seq_i = LDCT; w.br = MSG_GAP;            ucode[0][q]     = w;
      w = nop(); w.seq_i = RPCT; w.br = q + 1;              ucode[0][q + 1] = w;
      w = nop(); w.seq_i = CRTN; w.ccen = 1'b0;             ucode[0][q + 2] = w;
    end

    // test G ending: the decoded op-code lands here; the reply goes all
    // three ways since only the decode path is under test
    ucode[0][A_G_OK]     = send_code(G_REPLY, A_SEND_P);
    ucode[0][A_G_OK + 1] = call(A_SEND_A);
    ucode[0][A_G_OK + 2] = call(A_SEND_AP);

    k = A_DIAG;
    ucode[0][k] = alu_wr(alu_da(nop(), DA_IMM, 16'h0001), 4'd8);   k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd5, 16'h0004, 1'b0);             k++;
    // set up both PIA sides twice: with the PCU alone and with the ALU alone
    ucode[0][k] = pcu_ldi(nop(), 3'd7, 16'h0004, 1'b0);             k++;
    w = pcu_pass(nop(), 3'd7, 1'b0); w.pcutran_py = 1'b1; w.dreg_ld = 1'b1;
    ucode[0][k] = w;                                                 k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h2012, 1'b1);             k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b1);                       k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h2016, 1'b1);             k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b1);                       k++;
    w = alu_da(nop(), DA_IMM, 16'h0004); w.dreg_ld = 1'b1; ucode[0][k] = w; k++;
    w = alu_da(nop(), DA_IMM, 16'h2012); w.mar_sel = MAR_Y; ucode[0][k] = w; k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b1);                       k++;
    w = alu_da(nop(), DA_IMM, 16'h2016); w.mar_sel = MAR_Y; ucode[0][k] = w; k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b1);                       k++;

    // A
    w = alu_wr(alu_da(nop(), DA_IMM, 16'h5AC3), 4'd12); w.dreg_ld = 1'b1;
    ucode[0][k] = w;                                                 k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h0800, 1'b1);             k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b0);                       k++;
    ucode[0][k] = mem(nop(), MEM_READ, 1'b0);                        k++;
    ucode[0][k] = br_alu(alu_dr(nop(), DA_ZO, '0, 4'b0010, 4'd12), C_EQ, k + 2);
    k = verdict(k, 4'hA, A_SEND_AP);
    // B
    w = alu_wr(alu_da(nop(), DA_IMM, 16'h3CA5), 4'd12); w.dreg_ld = 1'b1;
    ucode[0][k] = w;                                                 k++;
    w = alu_da(nop(), DA_IMM, 16'h0802); w.mar_sel = MAR_Y; ucode[0][k] = w; k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b0);                       k++;
    ucode[0][k] = mem(nop(), MEM_READ, 1'b0);                        k++;
    ucode[0][k] = br_alu(alu_dr(nop(), DA_ZO, '0, 4'b0010, 4'd12), C_EQ, k + 2);
    k = verdict(k, 4'hB, A_SEND_A);
    // C: PCU Y = ZOREG - R7 must be zero. First R7, which is not zero, must
    // not test as zero: a dead PCU would make every zero test pass.
    ucode[0][k] = pcu_ldi(nop(), 3'd7, 16'hC35A, 1'b0);             k++;
    w = pcu_pass(nop(), 3'd7, 1'b0);
    w.seq_i = CJP; w.ccen = 1'b1; w.tt_sel = TT_PCU; w.br = k + 6;
    ucode[0][k] = w;                                                 k++;
    w = pcu_pass(nop(), 3'd7, 1'b0); w.pcutran_py = 1'b1; w.dreg_ld = 1'b1;
    ucode[0][k] = w;                                                 k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h0804, 1'b1);             k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b0);                       k++;
    ucode[0][k] = mem(nop(), MEM_READ, 1'b0);                        k++;
    w = nop(); w.pcu_i = {3'd1, 2'd2, 3'd5}; w.pcu_a = 3'd7; w.pcu_cin = 1'b1;
    w.da_sel = DA_ZO; w.zo_ld = 1'b1;
    w.seq_i = CJP; w.ccen = 1'b1; w.tt_sel = TT_PCU; w.br = k + 2;
    ucode[0][k] = w;
    k = verdict(k, 4'hC, A_SEND_P);
    // D: ALU -> TREG -> PCU (D + 0) -> PCUTRAN -> ALU R13, compare
    w = alu_da(nop(), DA_IMM, 16'h6A95); w.treg_ld = 1'b1;   ucode[0][k] = w; k++;
    w = nop(); w.pcu_i = {3'd1, 2'd0, 3'd7}; w.da_sel = DA_TREG; w.pcutran_py = 1'b1;
    w.alu_oey = 1'b0; ucode[0][k] = alu_wr(w, 4'd13);                k++;
    ucode[0][k] = br_alu(alu_dr(nop(), DA_IMM, 16'h6A95, 4'b0010, 4'd13), C_EQ, k + 2);
    k = verdict(k, 4'hD, A_SEND_AP);
    // E: the ALU's value goes out through the two ALU-data senders
    w = alu_wr(alu_da(nop(), DA_IMM, {8'h00, E_VALUE}), 4'd10);
    w.seq_i = CJS; w.ccen = 1'b0; w.br = A_SEND_A;            ucode[0][k] = w; k++;
    ucode[0][k] = call(A_SEND_AP);                                   k++;
    // F: byte write and read at an even address, compare the low byte
    ucode[0][k] = alu_wr(alu_da(nop(), DA_IMM, 16'h00FF), 4'd12);   k++;
    w = alu_da(nop(), DA_IMM, 16'h00A5); w.dreg_ld = 1'b1;    ucode[0][k] = w; k++;
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h0810, 1'b1);             k++;
    ucode[0][k] = mem(nop(), MEM_WRITE, 1'b1);                       k++;
    ucode[0][k] = mem(nop(), MEM_READ, 1'b1);                        k++;
    ucode[0][k] = alu_wr(alu_dr(nop(), DA_ZO, '0, 4'b1100, 4'd12), 4'd12); k++;
    ucode[0][k] = br_alu(alu_dr(nop(), DA_IMM, 16'h00A5, 4'b0010, 4'd12), C_EQ, k + 2);
    k = verdict(k, 4'hF, A_SEND_AP);
    // G: read the op-code from PIA side B, decode it
    // (the timer is reloaded first, so no interrupt replaces the decode)
    ucode[0][k] = pcu_ldi(nop(), 3'd6, 16'h2014, 1'b1);             k++;
    w = mem(nop(), MEM_READ, 1'b1); w.tiu_ld = 1'b1; w.imm = 16'hFFFF;
    ucode[0][k] = w;                                                 k++;
    w = nop(); w.zi_ld = 1'b1;                   ucode[0][k] = jmap(w); k++;
    diag_end = k;
    ucode[0][k] = jmp(nop(), A_HALT);
    ucode[0][A_G_OK + 3] = jmp(nop(), diag_end);
  endfunction

endpackage
