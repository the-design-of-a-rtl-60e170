// tb_am2904: checks the status and shift control unit against a reference
// written from the condition definitions (signed and unsigned comparisons
// after a subtraction are checked on real 16-bit operand pairs), the live
// versus stored flag choice, the status register load enable, the carry-in
// choice and the four shift linkage modes.
module tb_am2904;
  import ss_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic       z, n, c, o;
  cond_e      cond;
  logic       live, ce;
  cin_sel_e   cin_sel;
  shift_sel_e shift_sel;
  logic       sh_r_out, sh_l_out, q_r_out, q_l_out;
  logic       cc_n, cin, sh_r_in, sh_l_in, q_r_in, q_l_in;
  logic [3:0] status;
  int checks = 0, failures = 0;

  am2904 dut (.*);

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

  // flags of x - y computed as x + ~y + 1 (carry = no borrow)
  task automatic set_sub(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] s;
    s = {1'b0, x} + {1'b0, ~y} + 17'd1;
    z = (s[15:0] == 0); n = s[15]; c = s[16];
    o = (x[15] != y[15]) && (s[15] != x[15]);
  endtask

  function automatic logic expect_cond(cond_e cd, logic [15:0] x, logic [15:0] y);
    unique case (cd)
      C_EQ: return x == y;
      C_NE: return x != y;
      C_LT: return $signed(x) <  $signed(y);
      C_GE: return $signed(x) >= $signed(y);
      C_GT: return $signed(x) >  $signed(y);
      C_LE: return $signed(x) <= $signed(y);
      C_LO: return x <  y;
      C_HS: return x >= y;
      C_HI: return x >  y;
      C_LS: return x <= y;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    logic [15:0] x, y;
    logic [3:0]  held;
    live = 1; ce = 0; cond = C_EQ; cin_sel = CIN_0; shift_sel = SH_ZERO;
    {z, n, c, o} = 4'b0; {sh_r_out, sh_l_out, q_r_out, q_l_out} = 4'b0;
    #1 rst_n = 1'b0;
    #1 check(status == 4'b0, "reset clears status");
    @(negedge clk) rst_n = 1'b1;

    // comparisons on live flags
    for (int t = 0; t < 300; t++) begin
      x = 16'($urandom); y = (t % 4 == 0) ? x : 16'($urandom);
      if (t % 7 == 0) y = x ^ 16'h8000;
      set_sub(x, y);
      for (int k = 0; k <= 9; k++) begin
        cond = cond_e'(k); #1;
        check(cc_n == !expect_cond(cond, x, y),
              $sformatf("cond %s x=%h y=%h cc_n=%b", cond.name(), x, y, cc_n));
      end
    end
    // single-flag conditions
    for (int v = 0; v < 16; v++) begin
      {z, n, c, o} = v[3:0];
      cond = C_MI; #1 check(cc_n == !n, "MI");
      cond = C_PL; #1 check(cc_n ==  n, "PL");
      cond = C_CS; #1 check(cc_n == !c, "CS");
      cond = C_CC; #1 check(cc_n ==  c, "CC");
      cond = C_VS; #1 check(cc_n == !o, "VS");
      cond = C_VC; #1 check(cc_n ==  o, "VC");
    end

    // status register: loads only with ce, stored flags tested with live = 0
    @(negedge clk) begin {z, n, c, o} = 4'b1010; ce = 1; end
    @(negedge clk) begin ce = 0; {z, n, c, o} = 4'b0101; end
    @(negedge clk);
    check(status == 4'b1010, "status loaded with ce only");
    live = 0; cond = C_EQ; #1 check(cc_n == 1'b0, "stored Z tested");
    live = 1; #1 check(cc_n == 1'b1, "live Z tested");
    live = 0;

    // carry-in choice (stored C = 1)
    cin_sel = CIN_0;  #1 check(cin == 1'b0, "cin 0");
    cin_sel = CIN_1;  #1 check(cin == 1'b1, "cin 1");
    cin_sel = CIN_C;  #1 check(cin == 1'b1, "cin stored carry");
    cin_sel = CIN_NC; #1 check(cin == 1'b0, "cin inverted carry");

    // shift linkage
    {sh_r_out, sh_l_out, q_r_out, q_l_out} = 4'b1001;
    shift_sel = SH_ZERO;  #1 check({sh_r_in, sh_l_in, q_r_in, q_l_in} == 4'b0000, "shift zero");
    shift_sel = SH_ONE;   #1 check({sh_r_in, sh_l_in, q_r_in, q_l_in} == 4'b1111, "shift one");
    shift_sel = SH_ROT;   #1 check({sh_r_in, sh_l_in, q_r_in, q_l_in} == 4'b1001, "rotate");
    shift_sel = SH_CARRY; #1 check({sh_r_in, sh_l_in, q_r_in, q_l_in} == 4'b1111, "shift carry");
    held = status;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
