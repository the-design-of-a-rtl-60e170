// pia: Peripheral Interface Adapter (reduced to what the inter-processor
// message link uses).
//
// Two 8-bit sides. Side A sends: its output register drives pa_out to the
// neighbouring processor, and every write to it pulses ca2 (a "data ready"
// strobe). Side B receives: pb_in comes from the neighbour, and a pulse on cb1
// (the neighbour's ca2) sets the received flag. Reading the side-B data
// register clears that flag and pulses cb2, which the neighbour sees on its
// ca1 as "reply/acknowledge received".
//
// Register select rs (byte offsets 0,2,4,6 in the I/O window):
//   0  side A data register, or data direction register A when CRA bit 2 = 0
//   1  control register A
//   2  side B data register, or data direction register B when CRB bit 2 = 0
//   3  control register B
// Control register layout: bits 7..6 are read-only status flags, bits 5..0
// are read/write and keep their value until the processor writes them.
//   bit 7: side A = acknowledge seen on ca1 (cleared by writing side A data);
//          side B = message seen on cb1 (cleared by reading side B data).
//   bit 6: C2 input flag; the C2 lines are outputs here, so it reads 0.
//   bit 2: 1 = data register, 0 = data direction register.
//   bit 0: interrupt enable for bit 7 (irqa_n / irqb_n, active low).
// Reset clears every register, as on the real part: the microcode must set
// bit 2 (initialise the PIA) before it can send or receive.
// Accesses take effect at the rising clock edge; reads are combinational.
//
// What follows the design: memory-mapped PIAs carry the messages, and the
// control register has two read-only flag bits above six read/write bits
// that change only when written. The strobe/acknowledge handshake and the
// omission of the part's other C1/C2 modes are this implementation's.
module pia (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs,
  input  logic [1:0] rs,
  input  logic       we,
  input  logic       re,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  // side A: outgoing messages
  output logic [7:0] pa_out,
  output logic       ca2,
  input  logic       ca1,
  // side B: incoming messages
  input  logic [7:0] pb_in,
  input  logic       cb1,
  output logic       cb2,
  output logic       irqa_n,
  output logic       irqb_n
);
  logic [7:0] ora, ddra, ddrb;
  logic [5:0] cra, crb;
  logic       fa, fb;          // bit-7 flags
  logic       ca1_q, cb1_q;    // for edge detection
  logic       wr_a, rd_b;

  assign wr_a = cs && we && rs == 2'd0 && cra[2];
  assign rd_b = cs && re && rs == 2'd2 && crb[2];

  always_comb begin
    unique case (rs)
      2'd0: rdata = cra[2] ? ora : ddra;
      2'd1: rdata = {fa, 1'b0, cra};
      2'd2: rdata = crb[2] ? pb_in : ddrb;
      2'd3: rdata = {fb, 1'b0, crb};
      default: rdata = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ora <= '0; ddra <= '0; ddrb <= '0;
      cra <= '0; crb <= '0;
      fa  <= 1'b0; fb <= 1'b0;
      ca1_q <= 1'b0; cb1_q <= 1'b0;
      ca2 <= 1'b0; cb2 <= 1'b0;
    end else begin
      ca1_q <= ca1;
      cb1_q <= cb1;
      ca2   <= wr_a;
      cb2   <= rd_b;
      if (cs && we) begin
        unique case (rs)
          2'd0: if (cra[2]) ora <= wdata; else ddra <= wdata;
          2'd1: cra <= wdata[5:0];
          2'd2: if (!crb[2]) ddrb <= wdata;
          2'd3: crb <= wdata[5:0];
          default: ;
        endcase
      end
      if (ca1 && !ca1_q) fa <= 1'b1;
      else if (wr_a)     fa <= 1'b0;
      if (cb1 && !cb1_q) fb <= 1'b1;
      else if (rd_b)     fb <= 1'b0;
    end
  end

  assign pa_out = ora;
  assign irqa_n = !(fa && cra[0]);
  assign irqb_n = !(fb && crb[0]);
endmodule
