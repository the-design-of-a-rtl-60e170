// ss_pkg: types and constants shared by the Super Sixteen processor RTL.
//
// The processor is a microprogrammed 16-bit bit-slice machine. Every unit is
// steered directly by fields of a 96-bit microinstruction held in the pipeline
// register (the control store is 96 bits wide, built from twelve 8-bit
// devices). The width is the design's; the order and encoding of the fields
// below are this implementation's own, since the field map is not published.
//
// The memory map (RAM, I/O, EPROM windows) is likewise this implementation's
// choice: the sizes (8K bytes of RAM, 16K bytes of EPROM, one ACIA, up to five
// PIAs, all I/O 8 bits wide on the low byte board) follow the design.
package ss_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned UWORD_W    = 96;   // microinstruction width

  // Microcode entry points fixed by the hardware.
  localparam logic [11:0] FAULT_ENTRY = 12'h0FF;  // all-ones PROM output
  localparam logic [11:0] INT_VECTOR  = 12'h100;  // wired-in interrupt address

  // ---------------------------------------------------------------- memory map
  // Byte addresses. Word accesses use even addresses; the even byte is the
  // low byte (low board), the odd byte the high byte (high board).
  localparam logic [15:0] RAM_BASE   = 16'h0000;  // 8K bytes: 0000-1FFF
  localparam logic [15:0] RAM_BYTES  = 16'h2000;
  localparam logic [15:0] IO_BASE    = 16'h2000;  // I/O window: 2000-20FF
  localparam logic [15:0] EPROM_BASE = 16'h4000;  // 16K bytes: 4000-7FFF
  localparam logic [15:0] EPROM_BYTES = 16'h4000;
  // I/O device offsets inside the I/O window (byte address bits 7:0). Every
  // device register sits at an even address so that it is on the low board.
  // ACIA: 2000/2002, PIA k: 2010+8k .. 2016+8k (registers 0..3 at +0,+2,+4,+6)

  // ---------------------------------------------------------------- fields
  typedef enum logic [1:0] {
    TT_ALU  = 2'd0,   // Am2904 condition output, not inverted
    TT_PCU  = 2'd1,   // PCU zero output, inverted by the test tree
    TT_INT  = 2'd2,   // timer interrupt flag, inverted (polling)
    TT_NONE = 2'd3    // no source: reads as "test failed"
  } tt_sel_e;

  typedef enum logic [1:0] {
    DA_NONE = 2'd0,   // nothing drives the DA bus (reads as zero)
    DA_ZO   = 2'd1,   // ZOREG (memory read data)
    DA_IMM  = 2'd2,   // immediate field of the microinstruction
    DA_TREG = 2'd3    // transfer register (ALU -> PCU path)
  } da_sel_e;

  typedef enum logic [1:0] {
    MAR_HOLD = 2'd0,
    MAR_PCU  = 2'd1,  // PCU Y output (normal address path)
    MAR_Y    = 2'd2,  // YBUS through the PCUTRAN (ALU generated address)
    MAR_RSV  = 2'd3   // reserved: holds
  } mar_sel_e;

  typedef enum logic [1:0] {
    MEM_NONE  = 2'd0,
    MEM_READ  = 2'd1, // ZREG <= memory[MAR] at the end of the cycle
    MEM_WRITE = 2'd2, // memory[MAR] <= DREG at the end of the cycle
    MEM_RSV   = 2'd3
  } mem_op_e;

  // Am2904 (simplified) condition codes, tested on the selected status.
  typedef enum logic [3:0] {
    C_EQ  = 4'd0,  C_NE  = 4'd1,     // Z, !Z
    C_LT  = 4'd2,  C_GE  = 4'd3,     // signed
    C_GT  = 4'd4,  C_LE  = 4'd5,     // signed
    C_LO  = 4'd6,  C_HS  = 4'd7,     // unsigned (carry = no borrow)
    C_HI  = 4'd8,  C_LS  = 4'd9,     // unsigned
    C_MI  = 4'd10, C_PL  = 4'd11,    // N, !N
    C_CS  = 4'd12, C_CC  = 4'd13,    // C, !C
    C_VS  = 4'd14, C_VC  = 4'd15     // O, !O
  } cond_e;

  // ALU carry-in source chosen by the Am2904.
  typedef enum logic [1:0] {
    CIN_0 = 2'd0, CIN_1 = 2'd1, CIN_C = 2'd2, CIN_NC = 2'd3
  } cin_sel_e;

  // Shift linkage at the ends of the ALU word (Am2904 shift multiplexer).
  typedef enum logic [1:0] {
    SH_ZERO = 2'd0, SH_ONE = 2'd1, SH_ROT = 2'd2, SH_CARRY = 2'd3
  } shift_sel_e;

  // Am2910 instructions (standard encoding of the part).
  typedef enum logic [3:0] {
    JZ = 4'd0, CJS = 4'd1, JMAP = 4'd2, CJP = 4'd3, PUSH = 4'd4, JSRP = 4'd5,
    CJV = 4'd6, JRP = 4'd7, RFCT = 4'd8, RPCT = 4'd9, CRTN = 4'd10,
    CJPP = 4'd11, LDCT = 4'd12, LOOP = 4'd13, CONT = 4'd14, TWB = 4'd15
  } seq_op_e;

  // The 96-bit microinstruction. An all-zero word is "JZ" with every write
  // disabled except the PCU Q register, so a cleared pipeline register
  // restarts the machine at address 0.
  typedef struct packed {
    logic [1:0]  spare;
    // sequencer (CCU)
    seq_op_e     seq_i;     // Am2910 instruction
    logic        ccen;      // 1: the test result decides; 0: always pass
    tt_sel_e     tt_sel;    // test tree source
    logic [11:0] br;        // branch address / counter value
    // ALU: 4 x Am2903
    logic [3:0]  alu_a;     // A-port register
    logic [3:0]  alu_b;     // B-port register
    logic [8:0]  alu_i;     // I8..I0
    logic        alu_ea;    // EA: 1 selects DA as operand R
    logic        alu_oeb;   // OEB: 1 selects DB as operand S (DB unused)
    logic        alu_we;    // register file / Q write enable
    logic        alu_oey;   // 1: ALU drives YBUS; 0: Y pins are inputs
    // Am2904 status and shift control
    cond_e       st_cond;   // condition tested for the CCU
    logic        st_live;   // 1: test this cycle's flags, 0: the status reg
    logic        st_ce;     // latch this cycle's flags into the status reg
    cin_sel_e    st_cin;    // ALU carry-in source
    shift_sel_e  st_shift;  // shift linkage
    // PCU: 4 x Am2901
    logic [2:0]  pcu_a;     // A register (bit 3 wired low)
    logic [2:0]  pcu_b;     // B register (bit 3 wired low)
    logic [7:0]  pcu_i;     // {I8..I6 destination, I4..I3 function, I2..I0 source}
    logic        pcu_cin;
    // Datapath
    da_sel_e     da_sel;
    logic [15:0] imm;       // immediate data / TIU reload value
    mar_sel_e    mar_sel;
    logic        pcutran_py;// PCUTRAN drives PCU Y onto YBUS
    logic        dreg_ld;   // DREG <= YBUS
    logic        treg_ld;   // TREG <= YBUS
    mem_op_e     mem_op;
    logic        mem_byte;  // 1: byte access
    logic        zi_ld;     // ZREG -> ZIREG (flow-through)
    logic        zo_ld;     // ZREG -> ZOREG (flow-through)
    logic        tiu_ld;    // reload TIU from imm, clears the interrupt
  } uinstr_t;

endpackage
