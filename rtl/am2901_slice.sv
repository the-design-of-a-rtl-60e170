// am2901_slice: one 4-bit Am2901 bit-slice (16-register file, Q register,
// eight operand-source pairs, eight functions, eight destinations), the
// building block of the Program Control Unit.
//
// I2..I0 select the operand pair (R,S): AQ, AB, 0Q, 0B, 0A, DA, DQ, D0.
// I5..I3 select the function: R+S, S-R, R-S, OR, AND, (NOT R) AND S, XOR,
// XNOR; subtraction is one's complement plus carry in.
// I8..I6 select the destination: F to Q, none, F to B with Y = A, F to B,
// F/2 to B with Q/2, F/2 to B, 2F to B with 2Q, 2F to B.
// Register and Q writes occur at the rising clock edge (the part has no write
// enable; the "none" destination is used to write nothing). f_zero is high
// when all four F bits are 0 (open-collector in the part; ANDed by the
// parent). Logic functions give cout = 0.
//
// The design names the part and uses it for address arithmetic; the function
// of the part is the standard one of its data sheet.
module am2901_slice (
  input  logic       clk,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [8:0] i,
  input  logic [3:0] d,
  input  logic       cin,
  input  logic       ram3_in,  // enters bit 3 on a down (right) shift
  input  logic       ram0_in,  // enters bit 0 on an up (left) shift
  input  logic       q3_in,
  input  logic       q0_in,
  output logic [3:0] y,
  output logic       cout,
  output logic       f_zero,
  output logic       ram0_out, // bit 0 leaving on a down shift
  output logic       ram3_out, // bit 3 leaving on an up shift
  output logic       q0_out,
  output logic       q3_out
);

  logic [3:0] regs [16];
  logic [3:0] q;
  logic [3:0] r, s, f;
  logic [4:0] sum;
  logic       arith;

  always_comb begin
    unique case (i[2:0])
      3'd0: begin r = regs[a]; s = q;       end
      3'd1: begin r = regs[a]; s = regs[b]; end
      3'd2: begin r = 4'h0;    s = q;       end
      3'd3: begin r = 4'h0;    s = regs[b]; end
      3'd4: begin r = 4'h0;    s = regs[a]; end
      3'd5: begin r = d;       s = regs[a]; end
      3'd6: begin r = d;       s = q;       end
      3'd7: begin r = d;       s = 4'h0;    end
      default: begin r = 4'h0; s = 4'h0;    end
    endcase
  end

  always_comb begin
    sum   = '0;
    arith = 1'b0;
    f     = '0;
    unique case (i[5:3])
      3'd0: begin sum = {1'b0, r} + {1'b0, s} + {4'b0, cin};  arith = 1'b1; end
      3'd1: begin sum = {1'b0, s} + {1'b0, ~r} + {4'b0, cin}; arith = 1'b1; end
      3'd2: begin sum = {1'b0, r} + {1'b0, ~s} + {4'b0, cin}; arith = 1'b1; end
      3'd3: f = r | s;
      3'd4: f = r & s;
      3'd5: f = ~r & s;
      3'd6: f = r ^ s;
      3'd7: f = ~(r ^ s);
      default: f = '0;
    endcase
    if (arith) f = sum[3:0];
  end

  assign cout     = arith ? sum[4] : 1'b0;
  assign f_zero   = (f == 4'h0);
  assign y        = (i[8:6] == 3'd2) ? regs[a] : f;
  assign ram0_out = f[0];
  assign ram3_out = f[3];
  assign q0_out   = q[0];
  assign q3_out   = q[3];

  always_ff @(posedge clk) begin
    unique case (i[8:6])
      3'd0: q <= f;
      3'd1: ;
      3'd2, 3'd3: regs[b] <= f;
      3'd4: begin regs[b] <= {ram3_in, f[3:1]}; q <= {q3_in, q[3:1]}; end
      3'd5: regs[b] <= {ram3_in, f[3:1]};
      3'd6: begin regs[b] <= {f[2:0], ram0_in}; q <= {q[2:0], q0_in}; end
      3'd7: regs[b] <= {f[2:0], ram0_in};
      default: ;
    endcase
  end

endmodule
