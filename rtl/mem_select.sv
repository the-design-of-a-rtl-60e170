// mem_select: the memory select board that makes one 16-bit memory with word
// and byte addressing out of two 8-bit boards.
//
// Addresses are byte addresses. A word access (even address) enables both
// boards: the even byte is the low board (data bits 7..0), the odd byte the
// high board (bits 15..8). A byte access enables only the board that holds
// the byte and moves the byte to/from data bits 7..0 (bits 15..8 read as 0),
// so a byte access only exercises the low half of the processor's datapath.
//
// It also decodes the address into RAM, EPROM and the I/O window. I/O devices
// are 8 bits wide and sit on the low board: in the I/O window the low lane
// goes to the I/O bus (io_*) and the high lane reads 0. Outside every region
// a lane reads all ones. Purely combinational; the boards and devices act on
// the clock edge ending the cycle.
//
// Word/byte selection and the byte order (even byte = low lane, word at the
// even address) follow the design; the memory map is this implementation's
// (RAM 0000-1FFF, I/O 2000-20FF, EPROM 4000-7FFF; see ss_pkg).
module mem_select
  import ss_pkg::*;
(
  input  logic [15:0] addr,
  input  logic        byte_m,
  input  mem_op_e     op,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // low board (even bytes)
  output logic        lo_ram_sel,
  output logic        lo_eprom_sel,
  output logic        lo_we,
  output logic [7:0]  lo_wdata,
  input  logic [7:0]  lo_rdata,
  // high board (odd bytes)
  output logic        hi_ram_sel,
  output logic        hi_eprom_sel,
  output logic        hi_we,
  output logic [7:0]  hi_wdata,
  input  logic [7:0]  hi_rdata,
  // word index within the selected array, shared by both boards
  output logic [12:0] board_addr,
  // I/O bus (low lane only)
  output logic        io_cs,
  output logic        io_we,
  output logic        io_re,
  output logic [7:0]  io_off,
  output logic [7:0]  io_wdata,
  input  logic [7:0]  io_rdata
);
  logic in_ram, in_io, in_eprom;
  logic use_lo, use_hi;
  logic [15:0] ram_off, eprom_off;
  logic [7:0]  lo_lane;

  assign ram_off   = addr - RAM_BASE;
  assign eprom_off = addr - EPROM_BASE;
  assign in_ram    = (ram_off < RAM_BYTES);  // RAM_BASE is 0
  assign in_io     = (addr[15:8] == IO_BASE[15:8]);
  assign in_eprom  = (addr >= EPROM_BASE) && (eprom_off < EPROM_BYTES);

  assign use_lo = !byte_m || !addr[0];
  assign use_hi = !byte_m ||  addr[0];

  assign board_addr = in_eprom ? eprom_off[13:1] : {1'b0, ram_off[12:1]};

  assign lo_ram_sel   = in_ram   && use_lo;
  assign lo_eprom_sel = in_eprom && use_lo;
  assign hi_ram_sel   = in_ram   && use_hi;
  assign hi_eprom_sel = in_eprom && use_hi;
  assign lo_we        = (op == MEM_WRITE) && in_ram && use_lo;
  assign hi_we        = (op == MEM_WRITE) && in_ram && use_hi;
  assign lo_wdata     = wdata[7:0];
  assign hi_wdata     = byte_m ? wdata[7:0] : wdata[15:8];

  assign io_cs    = in_io && use_lo;
  assign io_we    = (op == MEM_WRITE) && io_cs;
  assign io_re    = (op == MEM_READ)  && io_cs;
  assign io_off   = addr[7:0];
  assign io_wdata = wdata[7:0];

  assign lo_lane = in_io ? io_rdata : lo_rdata;

  always_comb begin
    if (!byte_m)      rdata = {in_io ? 8'h00 : hi_rdata, lo_lane};
    else if (addr[0]) rdata = {8'h00, in_io ? 8'h00 : hi_rdata};
    else              rdata = {8'h00, lo_lane};
  end
endmodule
