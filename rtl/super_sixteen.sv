// super_sixteen: one complete Super Sixteen processor, a microprogrammed
// 16-bit bit-slice computer that executes P-code (the stack machine code of
// Concurrent Pascal) from microcode.
//
// Five sub-systems under direct microcode control, plus memory and I/O:
//   CCU       am2910 sequencer, control_store (96-bit microcode + pipeline
//             register), map_prom (op-code -> microcode address), test_tree
//             (condition select).
//   ALU       alu16 (4 x Am2903) with am2904 (status, conditions, carry-in,
//             shift linkage): the arithmetic of the machine code.
//   PCU       pcu (4 x Am2901): program counter, stack pointer, addresses.
//   Datapath  ZREG/ZOREG/ZIREG/DREG/TREG/MAR, the PCU transceiver, DA bus and
//             YBUS (datapath).
//   TIU       tiu: interval timer whose interrupt diverts the next
//             jump-to-map into the interrupt microcode.
//   Memory    mem_select + two mem_board lanes (8K bytes RAM, 16K bytes EPROM)
//             and, on the low lane, the I/O window: N_PIA pia devices for the
//             link to the other processor and the ACIA terminal port, which
//             is brought out as a bus (acia_*).
//
// Timing: one microinstruction per clock. The sequencer addresses the
// control store one cycle ahead; all registers load at the rising edge. A
// memory address put in the MAR in one cycle is read in the next and its data
// used in the one after, so with pipelined microcode a simple P-code
// instruction completes in about half the microcycles of a sequential fetch.
//
// The microcode, mapping PROM and EPROM are not part of the hardware; they
// are loaded through the ucode_*, map_* and eprom_* ports before rst_n is
// released. The ACIA itself is not modelled.
module super_sixteen
  import ss_pkg::*;
#(
  parameter int unsigned N_PIA       = 1,
  parameter int unsigned UCODE_DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // microcode, mapping PROM and EPROM loading
  input  logic                     ucode_we,
  input  logic [11:0]              ucode_addr,
  input  logic [UWORD_W-1:0]       ucode_data,
  input  logic                     map_we,
  input  logic [7:0]               map_addr,
  input  logic [7:0]               map_data,
  input  logic                     eprom_we,
  input  logic                     eprom_hi,     // 0: low lane, 1: high lane
  input  logic [12:0]              eprom_addr,
  input  logic [7:0]               eprom_data,
  // ACIA (terminal) register bus
  output logic                     acia_cs,
  output logic                     acia_we,
  output logic                     acia_re,
  output logic [1:0]               acia_rs,
  output logic [7:0]               acia_wdata,
  input  logic [7:0]               acia_rdata,
  // PIA ports to the neighbouring processor
  output logic [N_PIA-1:0][7:0]    pia_pa_out,
  output logic [N_PIA-1:0]         pia_ca2,
  input  logic [N_PIA-1:0]         pia_ca1,
  input  logic [N_PIA-1:0][7:0]    pia_pb_in,
  input  logic [N_PIA-1:0]         pia_cb1,
  output logic [N_PIA-1:0]         pia_cb2,
  // observation
  output logic [11:0]              uaddr,        // next microcode address
  output logic                     int_flag
);
  uinstr_t     u;
  logic [11:0] seq_y, seq_d, map_d;
  logic        seq_map_en, seq_vect_en, seq_pl_en, seq_full;
  logic [11:0] seq_upc;
  logic        cc_n, alu_cc_n;

  logic [15:0] alu_y, pcu_y, da_bus, ybus, mar, dreg, zreg, zi_out, zo_out, treg;
  logic        alu_z, alu_n, alu_c, alu_o;
  logic        sh_r_out, sh_l_out, q_r_out, q_l_out;
  logic        sh_r_in, sh_l_in, q_r_in, q_l_in, alu_cin;
  logic [3:0]  status;
  logic        pcu_z;
  logic [15:0] tiu_count;

  logic [15:0] mem_rdata;
  logic        lo_ram_sel, lo_eprom_sel, lo_we, hi_ram_sel, hi_eprom_sel, hi_we;
  logic [7:0]  lo_wdata, hi_wdata, lo_rdata, hi_rdata;
  logic [12:0] board_addr;
  logic        io_cs, io_we, io_re;
  logic [7:0]  io_off, io_wdata, io_rdata;

  // ------------------------------------------------------------------ CCU
  control_store #(.DEPTH(UCODE_DEPTH)) u_cs (
    .clk, .rst_n, .addr(seq_y),
    .load_we(ucode_we), .load_addr(ucode_addr), .load_data(ucode_data),
    .pipe(u)
  );

  assign seq_d = seq_map_en ? map_d : u.br;

  am2910 u_seq (
    .clk, .rst_n, .i(u.seq_i), .ccen(u.ccen), .cc_n, .d(seq_d),
    .y(seq_y), .map_en(seq_map_en), .vect_en(seq_vect_en), .pl_en(seq_pl_en),
    .full(seq_full), .upc_q(seq_upc)
  );

  map_prom u_map (
    .clk, .prog_we(map_we), .prog_addr(map_addr), .prog_data(map_data),
    .opcode(zi_out[7:0]), .int_pending(int_flag), .d(map_d)
  );

  test_tree u_tt (
    .sel(u.tt_sel), .alu_cc_n, .pcu_z, .int_flag, .cc_n
  );

  // ------------------------------------------------------------------ ALU
  alu16 u_alu (
    .clk, .a(u.alu_a), .b(u.alu_b), .i(u.alu_i), .ea(u.alu_ea),
    .oeb(u.alu_oeb), .we(u.alu_we), .oey(u.alu_oey),
    .da(da_bus), .db(16'h0000), .y_in(ybus), .cin(alu_cin),
    .sh_r_in, .sh_l_in, .q_r_in, .q_l_in,
    .y(alu_y), .z(alu_z), .n(alu_n), .c(alu_c), .o(alu_o),
    .sh_r_out, .sh_l_out, .q_r_out, .q_l_out
  );

  am2904 u_st (
    .clk, .rst_n, .z(alu_z), .n(alu_n), .c(alu_c), .o(alu_o),
    .cond(u.st_cond), .live(u.st_live), .ce(u.st_ce),
    .cin_sel(u.st_cin), .shift_sel(u.st_shift),
    .sh_r_out, .sh_l_out, .q_r_out, .q_l_out,
    .cc_n(alu_cc_n), .cin(alu_cin), .sh_r_in, .sh_l_in, .q_r_in, .q_l_in,
    .status
  );

  // ------------------------------------------------------------------ PCU
  pcu u_pcu (
    .clk, .a(u.pcu_a), .b(u.pcu_b), .i(u.pcu_i), .cin(u.pcu_cin),
    .d(da_bus), .y(pcu_y), .z(pcu_z)
  );

  // ------------------------------------------------------------------ Datapath
  datapath u_dp (
    .clk, .rst_n, .u, .alu_y, .pcu_y, .mem_rdata,
    .da_bus, .ybus, .mar, .dreg, .zreg, .zi_out, .zo_out, .treg
  );

  // ------------------------------------------------------------------ TIU
  tiu u_tiu (
    .clk, .rst_n, .ld(u.tiu_ld), .ld_val(u.imm), .int_flag, .count(tiu_count)
  );

  // ------------------------------------------------------------------ memory
  mem_select u_msel (
    .addr(mar), .byte_m(u.mem_byte), .op(u.mem_op), .wdata(dreg),
    .rdata(mem_rdata),
    .lo_ram_sel, .lo_eprom_sel, .lo_we, .lo_wdata, .lo_rdata,
    .hi_ram_sel, .hi_eprom_sel, .hi_we, .hi_wdata, .hi_rdata,
    .board_addr, .io_cs, .io_we, .io_re, .io_off, .io_wdata, .io_rdata
  );

  mem_board u_lo (
    .clk, .ram_sel(lo_ram_sel), .eprom_sel(lo_eprom_sel), .addr(board_addr),
    .we(lo_we), .wdata(lo_wdata), .rdata(lo_rdata),
    .prog_we(eprom_we && !eprom_hi), .prog_addr(eprom_addr), .prog_data(eprom_data)
  );

  mem_board u_hi (
    .clk, .ram_sel(hi_ram_sel), .eprom_sel(hi_eprom_sel), .addr(board_addr),
    .we(hi_we), .wdata(hi_wdata), .rdata(hi_rdata),
    .prog_we(eprom_we && eprom_hi), .prog_addr(eprom_addr), .prog_data(eprom_data)
  );

  // ------------------------------------------------------------------ I/O
  // ACIA at offsets 00-07, PIA k at 10+8k .. 17+8k; register r at +2r.
  logic [N_PIA-1:0]      pia_cs;
  logic [N_PIA-1:0][7:0] pia_rdata;
  logic [N_PIA-1:0]      pia_irqa_n, pia_irqb_n;

  assign acia_cs    = io_cs && (io_off[7:3] == 5'd0);
  assign acia_we    = io_we && acia_cs;
  assign acia_re    = io_re && acia_cs;
  assign acia_rs    = io_off[2:1];
  assign acia_wdata = io_wdata;

  for (genvar k = 0; k < N_PIA; k++) begin : g_pia
    assign pia_cs[k] = io_cs && (io_off[7:3] == 5'(2 + k));
    pia u_pia (
      .clk, .rst_n, .cs(pia_cs[k]), .rs(io_off[2:1]),
      .we(io_we && pia_cs[k]), .re(io_re && pia_cs[k]),
      .wdata(io_wdata), .rdata(pia_rdata[k]),
      .pa_out(pia_pa_out[k]), .ca2(pia_ca2[k]), .ca1(pia_ca1[k]),
      .pb_in(pia_pb_in[k]), .cb1(pia_cb1[k]), .cb2(pia_cb2[k]),
      .irqa_n(pia_irqa_n[k]), .irqb_n(pia_irqb_n[k])
    );
  end

  always_comb begin
    io_rdata = acia_cs ? acia_rdata : 8'hFF;
    for (int k = 0; k < N_PIA; k++)
      if (pia_cs[k]) io_rdata = pia_rdata[k];
  end

  assign uaddr = seq_y;
endmodule
