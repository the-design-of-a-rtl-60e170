// tb_test_tree: exhaustive check of the condition-code multiplexer in front
// of the sequencer. For every source select and every input combination the
// output must be: the ALU condition as given, the PCU zero output inverted,
// the timer flag inverted, or a constant failed test.
module tb_test_tree;
  import ss_pkg::*;
  tt_sel_e sel;
  logic    alu_cc_n, pcu_z, int_flag, cc_n;
  int checks = 0, failures = 0;
  logic exp_cc;

  test_tree dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 8; v++) begin
        sel = tt_sel_e'(s);
        {alu_cc_n, pcu_z, int_flag} = v[2:0];
        #1;
        unique case (s)
          0: exp_cc = alu_cc_n;
          1: exp_cc = (pcu_z == 1'b0);
          2: exp_cc = (int_flag == 1'b0);
          default: exp_cc = 1'b1;
        endcase
        checks++;
        if (cc_n !== exp_cc) begin
          failures++;
          $display("FAIL: sel=%0d in=%b cc_n=%b", s, v[2:0], cc_n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
