// tiu: Timer Interrupt Unit.
//
// A 16-bit down counter (four 4-bit counter stages in the original) that
// decrements once per microcycle. When it reaches zero it sets the interrupt
// flag and stops. The interrupt microcode reloads it from the pipeline
// register's immediate field (ld/ld_val), which also clears the flag; the
// next interrupt then follows ld_val cycles later.
// The flag disables the mapping PROM (so the next jump-to-map enters the
// interrupt routine) and is also visible to the test tree for polling.
//
// Counting every microcycle and the reset value (all ones, counting from
// reset) are this implementation's choices; the design says only that the
// counter interrupts at zero and is reloaded with the interrupt period.
module tiu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,
  input  logic [15:0] ld_val,
  output logic        int_flag,
  output logic [15:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= 16'hFFFF;
      int_flag <= 1'b0;
    end else if (ld) begin
      count    <= ld_val;
      int_flag <= 1'b0;
    end else if (count != 16'd0) begin
      count <= count - 16'd1;
      if (count == 16'd1) int_flag <= 1'b1;
    end
  end
endmodule
