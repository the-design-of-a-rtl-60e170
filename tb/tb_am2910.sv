// tb_am2910: runs a small microprogram through the sequencer with a pipeline
// register in front of it, as in the processor, and compares the address
// sequence with the one worked out by hand from the instruction definitions.
// Covered: continue, load counter, repeat-on-counter (a one-word loop with
// the counter at x must execute x+1 times), subroutine call and return,
// conditional jump taken and not taken, push with counter load and
// repeat-from-file, jump-to-map (map enable), conditional vector (vector
// enable), loop-until with a condition that fails twice, jump via the
// register, stack full after five calls and reset of the stack by JZ.
module tb_am2910;
  import ss_pkg::*;
  typedef struct packed {
    seq_op_e     i;
    logic        ccen;
    logic [1:0]  cc;     // 0: true, 1: false, 2: false twice, then true
    logic [11:0] d;
  } ent_t;

  logic        clk = 1'b0, rst_n = 1'b1;
  seq_op_e     i;
  logic        ccen, cc_n;
  logic [11:0] d, y, upc_q;
  logic        map_en, vect_en, pl_en, full;
  int checks = 0, failures = 0;

  ent_t rom [4096];
  ent_t pipe;
  int   dyn_fails;

  am2910 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ent_t e(seq_op_e op, logic en, logic [1:0] c, logic [11:0] dv);
    return '{i: op, ccen: en, cc: c, d: dv};
  endfunction

  assign i    = pipe.i;
  assign ccen = pipe.ccen;
  assign cc_n = (pipe.cc == 2'd2) ? (dyn_fails < 2) : pipe.cc[0];
  assign d    = map_en ? 12'h040 : pipe.d;     // the mapping PROM answers 040

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pipe <= e(JZ, 1'b0, 2'd0, 12'h0); dyn_fails <= 0; end
    else begin
      pipe <= rom[y];
      if (pipe.cc == 2'd2 && cc_n) dyn_fails <= dyn_fails + 1;
    end

  localparam int NEXP = 44;
  logic [11:0] expy [NEXP] = '{
    12'h000, 12'h001, 12'h002, 12'h002, 12'h002, 12'h002, 12'h003,  // RPCT x=3
    12'h020, 12'h021, 12'h004,                                       // CJS / CRTN
    12'h005, 12'h008,                                                // CJP no / yes
    12'h009, 12'h00A, 12'h009, 12'h00A, 12'h009, 12'h00A, 12'h00B,   // PUSH / RFCT
    12'h040, 12'h048,                                                // JMAP, CJV
    12'h049, 12'h04A, 12'h049, 12'h04A, 12'h049, 12'h04A, 12'h04B,   // PUSH / LOOP
    12'h04C, 12'h070,                                                // LDCT, JRP
    12'h071, 12'h072, 12'h073, 12'h074, 12'h075,                     // 5 x CJS
    12'h000, 12'h001, 12'h002, 12'h002, 12'h002, 12'h002, 12'h003,   // JZ restarts
    12'h020, 12'h021 };

  initial begin
    int rpct_cycles;
    for (int k = 0; k < 4096; k++) rom[k] = e(JZ, 1'b0, 2'd0, 12'h0);
    rom[12'h000] = e(CONT, 0, 0, 0);
    rom[12'h001] = e(LDCT, 0, 0, 12'd3);
    rom[12'h002] = e(RPCT, 0, 0, 12'h002);
    rom[12'h003] = e(CJS,  0, 0, 12'h020);
    rom[12'h020] = e(CONT, 0, 0, 0);
    rom[12'h021] = e(CRTN, 0, 0, 0);
    rom[12'h004] = e(CJP,  1, 1, 12'h030);
    rom[12'h005] = e(CJP,  1, 0, 12'h008);
    rom[12'h008] = e(PUSH, 0, 0, 12'd2);
    rom[12'h009] = e(CONT, 0, 0, 0);
    rom[12'h00A] = e(RFCT, 0, 0, 0);
    rom[12'h00B] = e(JMAP, 0, 0, 12'h7FF);
    rom[12'h040] = e(CJV,  1, 0, 12'h048);
    rom[12'h048] = e(PUSH, 1, 1, 12'h0);
    rom[12'h049] = e(CONT, 0, 0, 0);
    rom[12'h04A] = e(LOOP, 1, 2, 0);
    rom[12'h04B] = e(LDCT, 0, 0, 12'h070);
    rom[12'h04C] = e(JRP,  1, 1, 12'h060);
    for (int k = 0; k < 5; k++) rom[12'h070 + k] = e(CJS, 0, 0, 12'(12'h071 + k));
    rom[12'h075] = e(JZ, 0, 0, 0);

    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    rpct_cycles = 0;
    for (int t = 0; t < NEXP; t++) begin
      if (t > 0) @(negedge clk);
      check(y == expy[t], $sformatf("step %0d: y=%h exp %h", t, y, expy[t]));
      if (t < 7 && pipe.i == RPCT) rpct_cycles++;
      if (pipe.i == JMAP) check(map_en && !pl_en && !vect_en, "map enable on JMAP");
      if (pipe.i == CJV)  check(vect_en && !pl_en && !map_en, "vector enable on CJV");
      if (pipe.i == CONT) check(pl_en, "pipeline enable");
      if (t == 35) check(full, "stack full after five calls");
      if (t == 36) check(!full, "JZ clears the stack");
    end
    @(posedge clk); #1;
    check(rpct_cycles == 4, $sformatf("RPCT loop with counter 3 ran %0d times", rpct_cycles));
    check(upc_q == 12'h022, "microprogram counter follows Y + 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
