// asip_pkg: types and constants shared by the packet-processing ASIP.
//
// The processor is a VLIW machine with a 72 bit instruction word. One word
// holds a Load/Store bus transfer, two address generation unit (AGU)
// operations, an ALU operation, a checksum engine control and a branch.
// The word width, the 16 bit ALU and register file, the 12 bit pointers, the
// 8-entry register files, the two checksum registers and the 32 bit
// Load/Store bus follow the architecture this RTL implements. The field
// layout, opcode values and program counter width are this design's own.
//
// Instruction word layout (bit 71 first):
//   [71]    br_delay  1 = delayed branch (next word executes), 0 = stalling
//   [70:68] br_op     branch / halt
//   [67:65] br_reg    REG_DATA index tested by conditional branches
//   [64:62] ls_src    Load/Store bus source
//   [61:59] ls_dst    Load/Store bus destination
//   [58:57] ls_size   8/16/32 bit transfer
//   [56:54] ls_sreg   source register index
//   [53:51] ls_dreg   destination register index
//   [50:41] agu1      mode(2) ptr(3) off(5): source address
//   [40:31] agu2      mode(2) ptr(3) off(5): destination address
//   [30:20] alu       op(4) rd(3) rs(3) use_imm(1)
//   [19:17] csum      en0 en1 swap
//   [16]    reserved
//   [15:0]  imm16     shared immediate: bus constant, ALU operand,
//                     absolute address, branch target(s)
package asip_pkg;

  localparam int unsigned DATA_W   = 16;   // REG_DATA and ALU width
  localparam int unsigned PTR_W    = 12;   // REG_PTR width, byte address
  localparam int unsigned BUS_W    = 32;   // Load/Store bus width
  localparam int unsigned NREGS    = 8;    // entries per register file
  localparam int unsigned INSTR_W  = 72;   // VLIW instruction word
  localparam int unsigned PM_DEPTH = 256;  // program memory words
  localparam int unsigned PC_W     = $clog2(PM_DEPTH);
  localparam int unsigned MEM_BYTES = 4096; // each dual-ported memory
  localparam int unsigned DMA_AW   = 9;    // 64 bit words per memory

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PTR_W-1:0]  ptr_t;
  typedef logic [BUS_W-1:0]  bus_t;
  typedef logic [2:0]        ridx_t;
  typedef logic [PC_W-1:0]   pc_t;

  typedef enum logic [2:0] {
    BR_NONE   = 3'd0,
    BR_JMP    = 3'd1,  // pc = imm16[7:0]
    BR_BZ     = 3'd2,  // if r == 0: pc = imm16[7:0]
    BR_BNZ    = 3'd3,  // if r != 0: pc = imm16[7:0]
    BR_SWITCH = 3'd4,  // r == 0: imm16[7:0]; r == 1: imm16[15:8]; else fall through
    BR_HALT   = 3'd5   // stop issuing, pc = start, raise halted when drained
  } br_op_e;

  typedef enum logic [2:0] {
    SRC_NONE  = 3'd0,
    SRC_PKM   = 3'd1,
    SRC_DM    = 3'd2,  // ticket + data memory
    SRC_IOM   = 3'd3,
    SRC_RDATA = 3'd4,
    SRC_RPTR  = 3'd5,
    SRC_RCSUM = 3'd6,
    SRC_IMM   = 3'd7
  } ls_src_e;

  typedef enum logic [2:0] {
    DST_NONE  = 3'd0,
    DST_PKM   = 3'd1,
    DST_DM    = 3'd2,
    DST_IOM   = 3'd3,
    DST_RDATA = 3'd4,
    DST_RPTR  = 3'd5,
    DST_RCSUM = 3'd6
  } ls_dst_e;

  typedef enum logic [1:0] {
    SZ8  = 2'd0,
    SZ16 = 2'd1,
    SZ32 = 2'd2
  } size_e;

  typedef enum logic [1:0] {
    AGU_NONE    = 2'd0,
    AGU_IMM     = 2'd1,  // address = imm16[11:0]
    AGU_POSTINC = 2'd2,  // address = ptr, ptr += off
    AGU_INDEX   = 2'd3   // address = ptr + off
  } agu_mode_e;

  typedef enum logic [3:0] {
    ALU_NOP = 4'd0,
    ALU_MOV = 4'd1,
    ALU_ADD = 4'd2,
    ALU_SUB = 4'd3,
    ALU_AND = 4'd4,
    ALU_OR  = 4'd5,
    ALU_XOR = 4'd6,
    ALU_SHL = 4'd7,
    ALU_SHR = 4'd8,
    ALU_SEQ = 4'd9,   // rd = (rd == b)
    ALU_SLT = 4'd10   // rd = (rd < b), unsigned
  } alu_op_e;

  typedef struct packed {
    agu_mode_e   mode;
    ridx_t       ptr;
    logic [4:0]  off;   // signed offset / increment
  } agu_f_t;

  typedef struct packed {
    alu_op_e op;
    ridx_t   rd;
    ridx_t   rs;
    logic    use_imm;
  } alu_f_t;

  typedef struct packed {
    logic en0;   // REG_CSUM[0] += new - old
    logic en1;   // REG_CSUM[1] += new - old
    logic swap;  // byte swap both contributions
  } csum_f_t;

  typedef struct packed {
    logic    br_delay;
    br_op_e  br_op;
    ridx_t   br_reg;
    ls_src_e ls_src;
    ls_dst_e ls_dst;
    size_e   ls_size;
    ridx_t   ls_sreg;
    ridx_t   ls_dreg;
    agu_f_t  agu1;
    agu_f_t  agu2;
    alu_f_t  alu;
    csum_f_t csum;
    logic    rsvd;
    logic [15:0] imm16;
  } instr_t;

  // Decoded enables of one instruction (see asip_decoder).
  typedef struct packed {
    logic xfer;     // a Load/Store bus transfer takes place
    logic rd_pkm;   // ID: read PKM at the AGU1 address
    logic rd_dm;    // ID: read DM/TKM at the AGU1 address
    logic rd_iom;   // ID: read memory-mapped IO at the AGU1 address
    logic wr_pkm;   // E1: write PKM at the AGU2 address
    logic wr_dm;    // E1: write DM/TKM at the AGU2 address
    logic wr_iom;   // E1: write memory-mapped IO at the AGU2 address
    logic wr_rdata; // E1: REG_DATA[ls_dreg] = bus
    logic wr_rptr;  // E1: REG_PTR[ls_dreg] = bus
    logic wr_rcsum; // E1: REG_CSUM[ls_dreg[0]] = ~bus
    logic branch;   // ID: conditional or unconditional jump
    logic halt;     // ID: halt instruction
  } dec_t;

  // Ones' complement 16 bit addition with end-around carry.
  function automatic data_t oc_add(data_t a, data_t b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
