// am2903_slice: one 4-bit Am2903 bit-slice ALU (register file, Q register,
// operand selection, ALU and shifter), as used four times in the 16-bit ALU.
//
// Operation (one microcycle per clock):
//   * Operand R is the A-port register or the DA input (EA). Operand S is the
//     B-port register, the DB input (OEB) or the Q register (I0), per the
//     operand source table of the part.
//   * I4..I1 (with I0 where the table uses it) select the function; I8..I5 the
//     destination: shift right/left (arithmetic or logical) into the B-port
//     register, Q-only, B and Q, Y-bus only, sign extend, with or without an
//     independent shift of Q.
//   * The result always appears on Y. When OEY is low the Y pins are inputs:
//     a register write then takes the external y_in value instead, which is
//     how data from the PCU reaches the ALU registers.
//   * Register and Q writes happen at the rising clock edge and only when WE
//     is high (the write enable of the part).
// Flags: z is high when all four Y bits are 0 (slices are wire-ORed by the
// parent), n is F3, cout the carry out of bit 3, ovr the overflow of the
// slice. Logic functions give cout = ovr = 0.
//
// Follows the design's operand/function/destination tables. The special
// functions (I4..I0 = 00000, multiply/divide/normalise steps) and the
// reserved codes are not modelled and give F = 0; this is a choice of this
// implementation. The arithmetic shift on the most significant slice keeps
// the sign bit (left shift) or copies it (right shift); parity is omitted.
module am2903_slice (
  input  logic       clk,
  input  logic [3:0] a,        // A-port register select
  input  logic [3:0] b,        // B-port register select
  input  logic [8:0] i,        // instruction I8..I0
  input  logic       ea,       // 1: R = DA
  input  logic       oeb,      // 1: S = DB (when I0 = 0)
  input  logic       we,       // register / Q write enable
  input  logic       oey,      // 1: slice drives Y; 0: Y is an input
  input  logic       mss,      // this is the most significant slice
  input  logic [3:0] da,
  input  logic [3:0] db,
  input  logic [3:0] y_in,     // external Y bus (used when oey = 0)
  input  logic       cin,
  input  logic       sio0_in,  // shift-left input  (from the slice below)
  input  logic       sio3_in,  // shift-right input (from the slice above)
  input  logic       qio0_in,
  input  logic       qio3_in,
  output logic [3:0] y,        // result (valid whatever oey is)
  output logic       cout,
  output logic       ovr,
  output logic       n,
  output logic       z,
  output logic       sio0_out, // bit shifted out to the right
  output logic       sio3_out, // bit shifted out to the left
  output logic       qio0_out,
  output logic       qio3_out
);

  logic [3:0] regs [16];
  logic [3:0] q;

  logic [3:0] r, s, f;
  logic [4:0] sum;
  logic       c3;       // carry into bit 3, for overflow
  logic       arith;

  // ---------------------------------------------------------- operands
  always_comb begin
    r = ea ? da : regs[a];
    if (i[0])     s = q;
    else if (oeb) s = db;
    else          s = regs[b];
  end

  // ---------------------------------------------------------- function
  function automatic logic [4:0] add4(input logic [3:0] x, input logic [3:0] w,
                                      input logic c);
    return {1'b0, x} + {1'b0, w} + {4'b0, c};
  endfunction

  always_comb begin
    sum   = '0;
    arith = 1'b0;
    f     = '0;
    unique case (i[4:1])
      4'b0000: f = i[0] ? 4'hF : 4'h0;
      4'b0001: begin sum = add4(s, ~r, cin); arith = 1'b1; end
      4'b0010: begin sum = add4(r, ~s, cin); arith = 1'b1; end
      4'b0011: begin sum = add4(r, s, cin);  arith = 1'b1; end
      4'b0100: begin sum = add4(s, 4'h0, cin); arith = 1'b1; end
      4'b0101: begin sum = add4(~s, 4'h0, cin); arith = 1'b1; end
      4'b0110: if (i[0]) begin sum = add4(r, 4'h0, cin);  arith = 1'b1; end
      4'b0111: if (i[0]) begin sum = add4(~r, 4'h0, cin); arith = 1'b1; end
      4'b1000: f = 4'h0;
      4'b1001: f = ~r & s;
      4'b1010: f = ~(r ^ s);
      4'b1011: f = r ^ s;
      4'b1100: f = r & s;
      4'b1101: f = ~(r | s);
      4'b1110: f = ~(r & s);
      4'b1111: f = r | s;
      default: f = '0;
    endcase
    if (arith) f = sum[3:0];
  end

  // Carry into bit 3 from the low three bits of the same addition.
  always_comb begin
    logic [2:0] xo, wo;
    logic [3:0] lo;
    xo = '0; wo = '0;
    unique case (i[4:1])
      4'b0001: begin xo = s[2:0];  wo = ~r[2:0]; end
      4'b0010: begin xo = r[2:0];  wo = ~s[2:0]; end
      4'b0011: begin xo = r[2:0];  wo = s[2:0];  end
      4'b0100: begin xo = s[2:0];  wo = '0; end
      4'b0101: begin xo = ~s[2:0]; wo = '0; end
      4'b0110: begin xo = r[2:0];  wo = '0; end
      4'b0111: begin xo = ~r[2:0]; wo = '0; end
      default: begin xo = '0; wo = '0; end
    endcase
    lo = {1'b0, xo} + {1'b0, wo} + {3'b0, cin};
    c3 = lo[3];
  end

  assign cout = arith ? sum[4] : 1'b0;
  assign ovr  = arith ? (sum[4] ^ c3) : 1'b0;
  assign n    = f[3];

  // ---------------------------------------------------------- destination
  logic       wr_b, wr_q_f, shq_r, shq_l;
  logic [3:0] yv;
  logic       asr_fill;

  always_comb begin
    wr_b   = 1'b0;
    wr_q_f = 1'b0;
    shq_r  = 1'b0;
    shq_l  = 1'b0;
    yv     = f;
    // arithmetic right shift on the top slice replicates the sign bit
    asr_fill = (mss && !i[5]) ? f[3] : sio3_in;
    unique case (i[8:5])
      4'b0000, 4'b0001, 4'b0010, 4'b0011: begin
        yv    = {asr_fill, f[3:1]};
        wr_b  = 1'b1;
        shq_r = i[6];
      end
      4'b0100: wr_b = 1'b1;
      4'b0101: shq_r = 1'b1;
      4'b0110: wr_q_f = 1'b1;
      4'b0111: begin wr_b = 1'b1; wr_q_f = 1'b1; end
      4'b1000, 4'b1001, 4'b1010, 4'b1011: begin
        // arithmetic left shift on the top slice keeps the sign bit
        yv    = (mss && !i[5]) ? {f[3], f[1:0], sio0_in} : {f[2:0], sio0_in};
        wr_b  = 1'b1;
        shq_l = i[6];
      end
      4'b1100: ;
      4'b1101: shq_l = 1'b1;
      4'b1110: begin yv = {4{sio0_in}}; wr_b = 1'b1; end
      4'b1111: wr_b = 1'b1;
      default: ;
    endcase
  end

  assign y        = yv;
  assign z        = (yv == 4'h0);
  assign sio0_out = f[0];
  assign sio3_out = (mss && !i[5] && i[8:7] == 2'b10) ? f[2] : f[3];
  assign qio0_out = q[0];
  assign qio3_out = q[3];

  always_ff @(posedge clk) begin
    if (we) begin
      if (wr_b) regs[b] <= oey ? yv : y_in;
      if (wr_q_f)     q <= f;
      else if (shq_r) q <= {qio3_in, q[3:1]};
      else if (shq_l) q <= {q[2:0], qio0_in};
    end
  end

endmodule
