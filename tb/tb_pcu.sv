// tb_pcu: checks the Program Control Unit (four Am2901 slices, registers
// 0-7, add/subtract/OR only) against a 16-bit reference kept here. Random
// operations over every operand-source pair, the four usable functions and
// all eight destinations (including shifts with zero fill and Q) are applied
// for many cycles; Y, Z and the register contents are compared each cycle.
// A short program then runs the address steps the microcode uses:
// PC := PC + 2, SP := SP - 2 with the constants 1, 2, 4 held in R2, R4, R5.
module tb_pcu;
  logic        clk = 1'b0;
  logic [2:0]  a, b;
  logic [7:0]  i;
  logic        cin;
  logic [15:0] d, y;
  logic        z;
  int checks = 0, failures = 0;
  logic [15:0] rm [8];
  logic [15:0] qm;

  pcu dut (.*);

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

  // one PCU operation, checked against the reference, then clocked
  task automatic op(input logic [2:0] dst, input logic [1:0] fn, input logic [2:0] src,
                    input logic [2:0] ra, input logic [2:0] rb, input logic c,
                    input logic [15:0] dv);
    logic [15:0] r, s, f, ey;
    @(negedge clk);
    a = ra; b = rb; cin = c; d = dv; i = {dst, fn, src};
    unique case (src)
      3'd0: begin r = rm[ra]; s = qm;     end
      3'd1: begin r = rm[ra]; s = rm[rb]; end
      3'd2: begin r = 0;      s = qm;     end
      3'd3: begin r = 0;      s = rm[rb]; end
      3'd4: begin r = 0;      s = rm[ra]; end
      3'd5: begin r = dv;     s = rm[ra]; end
      3'd6: begin r = dv;     s = qm;     end
      default: begin r = dv;  s = 0;      end
    endcase
    unique case (fn)
      2'd0: f = r + s + 16'(c);
      2'd1: f = s + ~r + 16'(c);
      2'd2: f = r + ~s + 16'(c);
      default: f = r | s;
    endcase
    ey = (dst == 3'd2) ? rm[ra] : f;
    #1;
    check(y == ey, $sformatf("dst %0d fn %0d src %0d: y=%h exp %h", dst, fn, src, y, ey));
    check(z == (f == 16'h0), "zero output");
    unique case (dst)
      3'd0: qm = f;
      3'd2, 3'd3: rm[rb] = f;
      3'd4: begin rm[rb] = f >> 1; qm = qm >> 1; end
      3'd5: rm[rb] = f >> 1;
      3'd6: begin rm[rb] = f << 1; qm = qm << 1; end
      3'd7: rm[rb] = f << 1;
      default: ;
    endcase
  endtask

  initial begin
    a = 0; b = 0; i = 0; cin = 0; d = 0;
    // initialise every register and Q: F = D + 0, store in B
    for (int r = 0; r < 8; r++) op(3'd3, 2'd0, 3'd7, 3'd0, r[2:0], 1'b0, 16'($urandom));
    op(3'd0, 2'd0, 3'd7, 3'd0, 3'd0, 1'b0, 16'($urandom));
    for (int t = 0; t < 2000; t++)
      op(3'($urandom), 2'($urandom), 3'($urandom), 3'($urandom), 3'($urandom),
         1'($urandom), (t % 9 == 0) ? 16'h0 : 16'($urandom));
    // register read-back through "pass A"
    for (int r = 0; r < 8; r++) op(3'd1, 2'd0, 3'd4, r[2:0], 3'd0, 1'b0, 16'h0);

    // address arithmetic as used by the microcode
    op(3'd3, 2'd0, 3'd7, 3'd0, 3'd2, 1'b0, 16'd1);      // R2 = 1
    op(3'd3, 2'd0, 3'd7, 3'd0, 3'd4, 1'b0, 16'd2);      // R4 = 2
    op(3'd3, 2'd0, 3'd7, 3'd0, 3'd5, 1'b0, 16'd4);      // R5 = 4
    op(3'd3, 2'd0, 3'd7, 3'd0, 3'd0, 1'b0, 16'h4000);   // PC
    op(3'd3, 2'd0, 3'd7, 3'd0, 3'd1, 1'b0, 16'h1000);   // SP
    for (int k = 0; k < 4; k++) op(3'd3, 2'd0, 3'd1, 3'd4, 3'd0, 1'b0, 16'h0);  // PC += 2
    check(rm[0] == 16'h4008, "PC stepped by 2 four times");
    op(3'd3, 2'd1, 3'd1, 3'd4, 3'd1, 1'b1, 16'h0);      // SP -= 2
    op(3'd3, 2'd1, 3'd1, 3'd5, 3'd0, 1'b1, 16'h0);      // PC -= 4
    check(rm[1] == 16'h0FFE && rm[0] == 16'h4004, "SP -= 2, PC -= 4");
    // zero test of a compare: R6 - R6
    op(3'd1, 2'd1, 3'd1, 3'd6, 3'd6, 1'b1, 16'h0);
    check(z, "equal operands give zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
