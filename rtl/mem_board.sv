// mem_board: one 8-bit memory board (one byte lane of main memory).
//
// Holds RAM_WORDS bytes of RAM and EPROM_WORDS bytes of EPROM, addressed by
// the word index the memory select board hands it. Reads are combinational
// (the processor latches the data into ZREG at the end of the read cycle);
// RAM writes occur at the rising clock edge when we is high. The EPROM is
// read-only to the processor and is filled through a programming port
// (prog_*), standing in for an EPROM programmer. A read selecting neither
// array returns all ones, like an undriven bus.
//
// Two such boards side by side make the 16-bit memory: 8K bytes of RAM and
// 16K bytes of EPROM in all, so each board holds half. The I/O devices live
// on the low board but are modelled separately.
module mem_board #(
  parameter int unsigned RAM_WORDS   = 4096,
  parameter int unsigned EPROM_WORDS = 8192
) (
  input  logic        clk,
  input  logic        ram_sel,
  input  logic        eprom_sel,
  input  logic [12:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic        prog_we,
  input  logic [12:0] prog_addr,
  input  logic [7:0]  prog_data
);
  localparam int unsigned RA = $clog2(RAM_WORDS);
  localparam int unsigned EA = $clog2(EPROM_WORDS);

  logic [7:0] ram   [RAM_WORDS];
  logic [7:0] eprom [EPROM_WORDS];

  always_ff @(posedge clk)
    if (we && ram_sel) ram[addr[RA-1:0]] <= wdata;

  always_ff @(posedge clk)
    if (prog_we) eprom[prog_addr[EA-1:0]] <= prog_data;

  always_comb begin
    if (ram_sel)        rdata = ram[addr[RA-1:0]];
    else if (eprom_sel) rdata = eprom[addr[EA-1:0]];
    else                rdata = 8'hFF;
  end
endmodule
