// tb_pia: two parallel interface adapters cross-connected as in the dual
// system (A side of each to the B side of the other). Checks: the control
// register must be set up before the data register is reachable (reset
// selects the direction register), the control register reads back its six
// writable bits with the two flag bits above them, and the full message
// handshake: a write of the output register pulses CA2 for one cycle, the
// other side sees its receive flag (CRB bit 7) set, reads the byte, which
// clears that flag and pulses CB2, and the sender's acknowledge flag (CRA
// bit 7) then sets and is cleared by the next write. Random bytes are sent
// both ways and the number of cycles from write to acknowledge is checked.
module tb_pia;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic       cs [2], we [2], re [2];
  logic [1:0] rs [2];
  logic [7:0] wdata [2], rdata [2], pa_out [2], pb_in [2];
  logic       ca2 [2], ca1 [2], cb1 [2], cb2 [2], irqa_n [2], irqb_n [2];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < 2; p++) begin : g
    pia u (.clk, .rst_n, .cs(cs[p]), .rs(rs[p]), .we(we[p]), .re(re[p]),
           .wdata(wdata[p]), .rdata(rdata[p]), .pa_out(pa_out[p]), .ca2(ca2[p]),
           .ca1(ca1[p]), .pb_in(pb_in[p]), .cb1(cb1[p]), .cb2(cb2[p]),
           .irqa_n(irqa_n[p]), .irqb_n(irqb_n[p]));
    assign pb_in[p] = pa_out[1-p];
    assign cb1[p]   = ca2[1-p];
    assign ca1[p]   = cb2[1-p];
  end

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

  task automatic wr(input int p, input logic [1:0] r, input logic [7:0] v);
    @(negedge clk);
    cs[p] = 1; we[p] = 1; re[p] = 0; rs[p] = r; wdata[p] = v;
    @(negedge clk);
    cs[p] = 0; we[p] = 0;
  endtask

  task automatic rd(input int p, input logic [1:0] r, output logic [7:0] v);
    @(negedge clk);
    cs[p] = 1; we[p] = 0; re[p] = 1; rs[p] = r;
    #1 v = rdata[p];
    @(negedge clk);
    cs[p] = 0; re[p] = 0;
  endtask

  initial begin
    logic [7:0] v, msg;
    int n;
    for (int p = 0; p < 2; p++) begin
      cs[p] = 0; we[p] = 0; re[p] = 0; rs[p] = 0; wdata[p] = 0;
    end
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    check(!ca2[0] && !ca2[1] && irqa_n[0] && irqb_n[1], "reset state");
    // before set-up, register 0 is the direction register: no message goes out
    wr(0, 2'd0, 8'h3C);
    repeat (2) @(negedge clk);
    rd(1, 2'd3, v);
    check(v[7] == 1'b0, "direction register write sends nothing");
    // set up both sides: bit 2 of each control register, interrupts on A
    for (int p = 0; p < 2; p++) begin wr(p, 2'd1, 8'h05); wr(p, 2'd3, 8'h04); end
    rd(0, 2'd1, v);
    check(v == 8'h05, $sformatf("control register A reads %h", v));
    wr(0, 2'd1, 8'hFD); rd(0, 2'd1, v);
    check(v == 8'h3D, "bits 7 and 6 are read only");
    wr(0, 2'd1, 8'h05);

    for (int t = 0; t < 40; t++) begin
      int s, r;
      s = t % 2; r = 1 - s;
      msg = 8'($urandom);
      @(negedge clk);
      cs[s] = 1; we[s] = 1; rs[s] = 2'd0; wdata[s] = msg;
      @(negedge clk);
      cs[s] = 0; we[s] = 0;
      check(ca2[s] == 1'b1, "CA2 pulses after the data write");
      rd(s, 2'd1, v);
      check(v[7] == 1'b0 && ca2[s] == 1'b0, "CA2 is one cycle; no acknowledge yet");
      // receiver polls its B control register
      n = 0;
      do begin rd(r, 2'd3, v); n++; end while (!v[7] && n < 10);
      check(v[7] && n == 1, "receive flag set");
      rd(r, 2'd2, v);
      check(v == msg, $sformatf("byte received %h exp %h", v, msg));
      rd(r, 2'd3, v);
      check(!v[7], "reading the data clears the receive flag");
      rd(s, 2'd1, v);
      check(v[7], "acknowledge flag set at the sender");
      if (s == 0) check(!irqa_n[0], "acknowledge interrupt when enabled");
      wr(s, 2'd0, msg);  // next write clears the acknowledge
      rd(s, 2'd1, v);
      check(!v[7], "write clears the acknowledge flag");
      rd(r, 2'd2, v);    // drain the extra message
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
