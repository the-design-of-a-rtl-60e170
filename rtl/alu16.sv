// alu16: the 16-bit main ALU, four Am2903 slices cascaded bit-slice fashion.
//
// All four slices share the register selects (A, B), the instruction I8..I0,
// EA, OEB, WE and OEY, so they act as one 16-bit unit with 16 registers and a
// Q register. Between neighbouring slices the carry out feeds the next carry
// in (ripple), and the shift pins are cross-connected (SIO3 of one slice to
// SIO0 of the slice above; likewise QIO), giving 16-bit shifts. The ends of
// the shift chain (sh_*_in) and the carry in come from the Am2904.
//
// Flags, all combinational on this cycle's operation: Z is the wired-OR of
// the four slice zero outputs (high only if all 16 Y bits are 0); N, C and O
// come from the most significant slice.
//
// Structure follows the design (four Am2903s, ripple carry, SIO linkage). The
// DB input is present for completeness; the processor does not use it.
module alu16 #(
  parameter int unsigned SLICES = 4
) (
  input  logic                  clk,
  input  logic [3:0]            a,
  input  logic [3:0]            b,
  input  logic [8:0]            i,
  input  logic                  ea,
  input  logic                  oeb,
  input  logic                  we,
  input  logic                  oey,
  input  logic [4*SLICES-1:0]   da,
  input  logic [4*SLICES-1:0]   db,
  input  logic [4*SLICES-1:0]   y_in,
  input  logic                  cin,
  input  logic                  sh_r_in,  // enters bit 15 on a right shift
  input  logic                  sh_l_in,  // enters bit 0 on a left shift
  input  logic                  q_r_in,   // enters Q15 on a right shift of Q
  input  logic                  q_l_in,   // enters Q0 on a left shift of Q
  output logic [4*SLICES-1:0]   y,
  output logic                  z,
  output logic                  n,
  output logic                  c,
  output logic                  o,
  output logic                  sh_r_out, // bit 0 leaving on a right shift
  output logic                  sh_l_out, // bit 15 leaving on a left shift
  output logic                  q_r_out,
  output logic                  q_l_out
);

  logic [SLICES:0]   carry;
  logic [SLICES-1:0] zs, ns, os;
  logic [SLICES-1:0] s0o, s3o, q0o, q3o;
  logic [SLICES-1:0] s0i, s3i, q0i, q3i;

  assign carry[0] = cin;

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    // shift linkage
    assign s0i[k] = (k == 0)          ? sh_l_in : s3o[(k == 0) ? 0 : k-1];
    assign s3i[k] = (k == SLICES - 1) ? sh_r_in : s0o[(k == SLICES - 1) ? k : k+1];
    assign q0i[k] = (k == 0)          ? q_l_in  : q3o[(k == 0) ? 0 : k-1];
    assign q3i[k] = (k == SLICES - 1) ? q_r_in  : q0o[(k == SLICES - 1) ? k : k+1];

    am2903_slice u_slice (
      .clk     (clk),
      .a       (a),
      .b       (b),
      .i       (i),
      .ea      (ea),
      .oeb     (oeb),
      .we      (we),
      .oey     (oey),
      .mss     (k == SLICES - 1),
      .da      (da[4*k +: 4]),
      .db      (db[4*k +: 4]),
      .y_in    (y_in[4*k +: 4]),
      .cin     (carry[k]),
      .sio0_in (s0i[k]),
      .sio3_in (s3i[k]),
      .qio0_in (q0i[k]),
      .qio3_in (q3i[k]),
      .y       (y[4*k +: 4]),
      .cout    (carry[k+1]),
      .ovr     (os[k]),
      .n       (ns[k]),
      .z       (zs[k]),
      .sio0_out(s0o[k]),
      .sio3_out(s3o[k]),
      .qio0_out(q0o[k]),
      .qio3_out(q3o[k])
    );
  end

  assign z        = &zs;
  assign n        = ns[SLICES-1];
  assign c        = carry[SLICES];
  assign o        = os[SLICES-1];
  assign sh_r_out = s0o[0];
  assign sh_l_out = s3o[SLICES-1];
  assign q_r_out  = q0o[0];
  assign q_l_out  = q3o[SLICES-1];

endmodule
