// tb_alu16: self-checking test of the 16-bit ALU (four Am2903 slices).
// Loads random values into the register file through the DA input, then
// applies random arithmetic, logic and shift operations and compares Y, the
// register written back and the Z/N/C/O flags with a 16-bit reference model
// computed here. Also checks a register write from the external Y bus
// (OEY low), Q-register use and arithmetic shift behaviour.
module tb_alu16;
  logic        clk = 1'b0;
  logic [3:0]  a, b;
  logic [8:0]  i;
  logic        ea, oeb, we, oey, cin;
  logic        sh_r_in, sh_l_in, q_r_in, q_l_in;
  logic [15:0] da, db, y_in, y;
  logic        z, n, c, o, sh_r_out, sh_l_out, q_r_out, q_l_out;
  int checks = 0, failures = 0;
  logic [15:0] model [16];
  logic [15:0] qm;

  alu16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc();
    @(posedge clk); #1;
  endtask

  // F = R + Cin with R = DA, store in B
  task automatic load(input logic [3:0] r, input logic [15:0] v);
    a = 0; b = r; ea = 1; oeb = 0; we = 1; oey = 1; cin = 0;
    i = {4'b1111, 4'b0110, 1'b1}; da = v;
    cyc();
    model[r] = v;
  endtask

  initial begin
    logic [15:0] rv, sv, f, exp_y;
    logic [16:0] s17;
    logic        ec, eo;
    logic [3:0]  fn;
    int unsigned sel;
    ea = 0; oeb = 0; we = 0; oey = 1; cin = 0; db = 16'h0; y_in = 0;
    sh_r_in = 0; sh_l_in = 0; q_r_in = 0; q_l_in = 0; a = 0; b = 0; i = 0; da = 0;
    for (int r = 0; r < 16; r++) load(r[3:0], 16'($urandom));
    // load Q: F = R + Cin with R = DA, destination Q
    da = 16'h5A5A; i = {4'b0110, 4'b0110, 1'b1}; ea = 1; cyc(); qm = 16'h5A5A;

    // ---------------------------------------------- random ALU operations
    for (int t = 0; t < 400; t++) begin
      a = 4'($urandom); b = 4'($urandom); cin = 1'($urandom);
      ea = 1'($urandom); da = 16'($urandom);
      sel = $urandom % 10;
      unique case (sel)
        0: fn = 4'b0011; 1: fn = 4'b0001; 2: fn = 4'b0010; 3: fn = 4'b1100;
        4: fn = 4'b1111; 5: fn = 4'b1011; 6: fn = 4'b1010; 7: fn = 4'b1101;
        8: fn = 4'b1110; default: fn = 4'b1001;
      endcase
      i = {4'b0100, fn, 1'b0};  // no shift, store in B
      we = 1; oey = 1;
      #1;
      rv = ea ? da : model[a];
      sv = model[b];
      ec = 0; eo = 0;
      unique case (fn)
        4'b0011: begin s17 = {1'b0, rv} + {1'b0, sv} + 17'(cin); end
        4'b0001: begin s17 = {1'b0, sv} + {1'b0, ~rv} + 17'(cin); end
        4'b0010: begin s17 = {1'b0, rv} + {1'b0, ~sv} + 17'(cin); end
        default: s17 = '0;
      endcase
      unique case (fn)
        4'b0011, 4'b0001, 4'b0010: begin
          f = s17[15:0]; ec = s17[16];
          // signed overflow from the operands as added
          unique case (fn)
            4'b0011: eo = (rv[15] == sv[15]) && (f[15] != rv[15]);
            4'b0001: eo = (sv[15] == ~rv[15]) && (f[15] != sv[15]);
            default: eo = (rv[15] == ~sv[15]) && (f[15] != rv[15]);
          endcase
        end
        4'b1100: f = rv & sv;
        4'b1111: f = rv | sv;
        4'b1011: f = rv ^ sv;
        4'b1010: f = ~(rv ^ sv);
        4'b1101: f = ~(rv | sv);
        4'b1110: f = ~(rv & sv);
        default: f = ~rv & sv;
      endcase
      check(y == f, $sformatf("op %b y=%h exp %h", fn, y, f));
      check(z == (f == 0), "Z flag");
      check(n == f[15], "N flag");
      check(c == ec, $sformatf("C flag op %b", fn));
      check(o == eo, $sformatf("O flag op %b", fn));
      cyc();
      model[b] = f;
    end

    // ---------------------------------------------- register read-back
    for (int r = 0; r < 16; r++) begin
      a = r[3:0]; ea = 0; we = 0; i = {4'b1100, 4'b0110, 1'b1}; cin = 0; #1;
      check(y == model[r], $sformatf("readback r%0d", r));
    end

    // ---------------------------------------------- shifts
    load(4'd3, 16'h8421);
    // logical shift right, 1 enters at bit 15
    a = 3; b = 3; ea = 0; we = 1; cin = 0; sh_r_in = 1;
    i = {4'b0001, 4'b0110, 1'b1}; #1;
    check(y == 16'hC210 && sh_r_out == 1'b1, "logical shift right");
    cyc(); model[3] = 16'hC210;
    // arithmetic shift right keeps the sign
    sh_r_in = 0; i = {4'b0000, 4'b0110, 1'b1}; #1;
    check(y == 16'hE108, "arithmetic shift right");
    cyc();
    // logical shift left
    load(4'd4, 16'h4003); a = 4; b = 4; ea = 0; sh_l_in = 0;
    i = {4'b1001, 4'b0110, 1'b1}; #1;
    check(y == 16'h8006 && sh_l_out == 1'b0, "logical shift left");
    // arithmetic shift left keeps bit 15
    load(4'd4, 16'hC003); a = 4; b = 4; i = {4'b1000, 4'b0110, 1'b1}; #1;
    check(y == 16'h8006, "arithmetic shift left");
    cyc();

    // ---------------------------------------------- Y bus as input
    oey = 0; we = 1; b = 4'd9; y_in = 16'hBEEF; i = {4'b1111, 4'b0110, 1'b1};
    ea = 1; da = 16'h0000; cyc(); oey = 1;
    a = 9; ea = 0; we = 0; i = {4'b1100, 4'b0110, 1'b1}; #1;
    check(y == 16'hBEEF, "register written from external Y");

    // ---------------------------------------------- Q as operand S
    a = 0; ea = 1; da = 16'h0001; cin = 0; i = {4'b1100, 4'b0011, 1'b1}; #1;
    check(y == 16'h5A5B, "R + Q");
    // Y-only destination does not write B
    b = 4'd9; we = 1; cyc(); we = 0;
    a = 9; ea = 0; i = {4'b1100, 4'b0110, 1'b1}; #1;
    check(y == 16'hBEEF, "Y-only destination leaves B");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
