// am2910: 12-bit microprogram sequencer of the Computer Control Unit.
//
// Each microcycle it picks the next microcode address Y from one of four
// sources (the microprogram counter, the D input, the register/counter, the
// top of a 5-word stack) according to the 4-bit instruction of the current
// microinstruction and the condition input. The microprogram counter is
// loaded with Y + 1 at every rising clock edge (the carry-in of the part is
// tied high), so "continue" steps through the microcode.
//
// Condition: a test passes when ccen is 0 (test ignored) or when cc_n is LOW.
// A failed test never takes the branch, so a condition stuck at 1 always
// falls through.
//
// D-source enables: map_en is high for JMAP (the mapping PROM drives D),
// vect_en for CJV (vector), pl_en otherwise (the pipeline register drives D).
//
// The register/counter is a 12-bit down counter used for fixed-length loops
// entirely inside the CCU: RPCT with the counter loaded to x repeats x+1
// times. Reset clears the microprogram counter, the stack and the counter.
//
// The design uses the part for sequencing, mapping, conditional branches and
// its counter; the instruction set below is that of the part's data sheet.
module am2910
  import ss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  seq_op_e     i,
  input  logic        ccen,     // 1: the condition is used
  input  logic        cc_n,     // 0: condition true
  input  logic [11:0] d,
  output logic [11:0] y,
  output logic        map_en,
  output logic        vect_en,
  output logic        pl_en,
  output logic        full,
  output logic [11:0] upc_q     // microprogram counter (for observation)
);

  logic [11:0] upc, cnt;
  logic [11:0] stack [5];
  logic [2:0]  sp;              // number of entries, 0..5
  logic [11:0] tos;
  logic        pass, cnt_nz;

  // next-state controls
  logic        do_push, do_pop, do_clear, ld_cnt, dec_cnt;

  assign pass   = !ccen || !cc_n;
  assign cnt_nz = (cnt != 12'd0);
  assign tos    = (sp == 3'd0) ? 12'd0 : stack[sp - 3'd1];
  assign full   = (sp == 3'd5);
  assign upc_q  = upc;

  always_comb begin
    y        = upc;
    do_push  = 1'b0;
    do_pop   = 1'b0;
    do_clear = 1'b0;
    ld_cnt   = 1'b0;
    dec_cnt  = 1'b0;
    unique case (i)
      JZ:   begin y = 12'd0; do_clear = 1'b1; end
      CJS:  if (pass) begin y = d; do_push = 1'b1; end
      JMAP: y = d;
      CJP:  if (pass) y = d;
      PUSH: begin do_push = 1'b1; ld_cnt = pass; end
      JSRP: begin y = pass ? d : cnt; do_push = 1'b1; end
      CJV:  if (pass) y = d;
      JRP:  y = pass ? d : cnt;
      RFCT: if (cnt_nz) begin y = tos; dec_cnt = 1'b1; end
            else do_pop = 1'b1;
      RPCT: if (cnt_nz) begin y = d; dec_cnt = 1'b1; end
      CRTN: if (pass) begin y = tos; do_pop = 1'b1; end
      CJPP: if (pass) begin y = d; do_pop = 1'b1; end
      LDCT: ld_cnt = 1'b1;
      LOOP: if (pass) do_pop = 1'b1; else y = tos;
      CONT: ;
      TWB:  if (pass) do_pop = 1'b1;
            else if (cnt_nz) begin y = tos; dec_cnt = 1'b1; end
            else begin y = d; do_pop = 1'b1; end
      default: ;
    endcase
  end

  assign map_en  = (i == JMAP);
  assign vect_en = (i == CJV);
  assign pl_en   = !map_en && !vect_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= '0;
      cnt <= '0;
      sp  <= '0;
    end else begin
      upc <= y + 12'd1;
      if (ld_cnt)       cnt <= d;
      else if (dec_cnt) cnt <= cnt - 12'd1;
      if (do_clear) sp <= '0;
      else if (do_push) begin
        if (sp != 3'd5) sp <= sp + 3'd1;
      end else if (do_pop && sp != 3'd0) sp <= sp - 3'd1;
    end
  end

  // Stack storage (no reset). A push onto a full stack overwrites the top.
  always_ff @(posedge clk) begin
    if (!do_clear && do_push)
      stack[(sp == 3'd5) ? 3'd4 : sp] <= upc;
  end

endmodule
