// Mirror Processor shared definitions.
//
// Sizes follow the described chip: 32-bit data, a register file of four
// banks of sixteen window registers plus ten globals (74 physical registers,
// 7-bit physical register numbers), four-stage delayed write buffers (a
// rollback range of four cycles), an 11-bit processor status word and a
// 33-bit external bus (32 data/address bits plus one parity bit).
//
// The chip runs the Berkeley RISC II instruction set, whose encoding is not
// part of this design description. The opcode numbers, the condition codes
// and the PSW field order below are this design's own choice (RISC II-like
// short format: op[31:25] scc[24] rd[23:19] rs1[18:14] imm[13] s2[12:0];
// long format replaces rs1/imm/s2 with a 19-bit immediate).
package mp_pkg;

  localparam int XLEN      = 32;
  localparam int NGLOBAL   = 10;
  localparam int NBANK     = 4;
  localparam int BANKSZ    = 16;
  localparam int NPHYS     = NGLOBAL + NBANK * BANKSZ;   // 74
  localparam int PREG_W    = 7;
  localparam int DWB_DEPTH = 4;
  localparam int RB_W      = 3;                          // rollback-amount lines
  localparam int PSW_W     = 11;
  localparam int SIG_W     = 4;
  // busD (32) + destination register (7) + write valid (1) + PSW (11) + state (4)
  localparam int SIG_IN_W  = XLEN + PREG_W + 1 + PSW_W + 4;

  localparam logic [31:0] RESET_VEC    = 32'h0000_0000;
  localparam logic [31:0] SHUTDOWN_VEC = 32'h0000_0400;

  // Processor status word: 2-bit current and saved window pointers, interrupt
  // enable, system mode, previous system mode and four condition codes.
  typedef struct packed {
    logic [1:0] cwp;
    logic [1:0] swp;
    logic       i;
    logic       s;
    logic       p;
    logic       z;
    logic       n;
    logic       v;
    logic       c;
  } psw_t;

  // Controller state, one-hot (these four bits enter the signature).
  typedef enum logic [3:0] {
    ST_NORMAL = 4'b0001,   // normal instruction / first cycle
    ST_SECOND = 4'b0010,   // second cycle of a load or store
    ST_REP1   = 4'b0100,   // first state-repair cycle
    ST_REP2   = 4'b1000    // second state-repair cycle
  } mp_state_e;

  // Control state kept in a delayed write buffer so that a rollback into the
  // middle of a two-cycle instruction restores it.
  typedef struct packed {
    mp_state_e          state;
    logic               squash;     // do not execute the instruction in IR
    logic               pend_store; // second cycle is a store (else a load)
    logic               pend_badpar;// load gates data with inverted parity
    logic [PREG_W-1:0]  pend_phys;  // load destination
  } ctl_state_t;

  typedef enum logic [6:0] {
    OP_NOP    = 7'h00,
    OP_ADD    = 7'h01, OP_ADDC = 7'h02, OP_SUB = 7'h03, OP_SUBC = 7'h04,
    OP_AND    = 7'h05, OP_OR   = 7'h06, OP_XOR = 7'h07,
    OP_SLL    = 7'h08, OP_SRL  = 7'h09, OP_SRA = 7'h0A,
    OP_LDHI   = 7'h0B,
    OP_LDL    = 7'h10, OP_STL  = 7'h11,
    OP_JMP    = 7'h20, OP_JMPR = 7'h21, OP_CALLR = 7'h22, OP_RET = 7'h23,
    OP_GETPSW = 7'h24, OP_PUTPSW = 7'h25, OP_GETLPC = 7'h26,
    OP_CLRRBM = 7'h30, OP_CLRRBS = 7'h31,
    OP_ADDBPM = 7'h32, OP_ADDBPS = 7'h33,
    OP_JMPRBM = 7'h34, OP_JMPRBS = 7'h35,
    OP_STRBDM = 7'h36, OP_STRBDS = 7'h37,
    OP_LDRBPM = 7'h38, OP_LDRBPS = 7'h39
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC, ALU_AND, ALU_OR, ALU_XOR
  } alu_op_e;

  typedef enum logic [1:0] { SH_PASS, SH_SLL, SH_SRL, SH_SRA } sh_op_e;

  // Source of the value on busD that is written to the register file.
  typedef enum logic [2:0] {
    D_ALU, D_SHIFT, D_LDHI, D_PC, D_LPC, D_PSW, D_RS1, D_RS2
  } dsel_e;

  typedef enum logic [1:0] { J_NONE, J_PCREL_IMM, J_REG, J_PCREL_RS2 } jmp_e;

  // Decoded control word for the executing instruction.
  typedef struct packed {
    logic       reads_a;
    logic       reads_b;
    logic       b_is_rd;     // port B reads the rd field (store source)
    logic       use_imm;
    alu_op_e    alu_op;
    sh_op_e     sh_op;
    dsel_e      dsel;
    logic       rd_we;
    logic       rd_new_win;  // rd is written in the callee window (CALLR)
    logic       set_cc;
    logic       load;
    logic       store;
    logic       pcrel_addr;  // effective address is PC + imm13
    jmp_e       jmp;
    logic       jmp_cond;    // jump is conditional on condition codes
    logic       jmp_on_rbit; // jump taken only if the rollback bit is set
    logic       cwp_dec;
    logic       cwp_inc;
    logic       psw_write;
    logic       bad_par;     // store inverted register-file parity
    logic       bad_store;   // store MAR instead of Rs
    logic       bad_load;    // gate load data with inverted parity
    logic       clr_rbit;
  } ctrl_t;

  // Physical register number of logical register r in window cwp.
  // Window w: r10-r25 -> bank w, r26-r31 -> first six of bank w-1
  // (the callee's "in" registers are the caller's "out" registers).
  function automatic logic [PREG_W-1:0] phys_reg(input logic [1:0] cwp, input logic [4:0] r);
    logic [1:0] bank;
    logic [4:0] off;
    if (r < 5'd10) return PREG_W'(r);
    if (r < 5'd26) begin
      bank = cwp;
      off  = r - 5'd10;
    end else begin
      bank = cwp - 2'd1;
      off  = r - 5'd26;
    end
    return PREG_W'(NGLOBAL) + PREG_W'({bank, 4'b0000}) + PREG_W'(off);
  endfunction

  // Condition evaluation on {z, n, v, c}.
  function automatic logic cond_true(input logic [3:0] cond, input psw_t p);
    case (cond)
      4'd0:    return 1'b1;                     // always
      4'd1:    return p.z;                      // eq
      4'd2:    return !p.z;                     // ne
      4'd3:    return p.n ^ p.v;                // lt
      4'd4:    return !(p.n ^ p.v);             // ge
      4'd5:    return p.z | (p.n ^ p.v);        // le
      4'd6:    return !(p.z | (p.n ^ p.v));     // gt
      4'd7:    return !p.c;                     // ltu
      4'd8:    return p.c;                      // geu
      4'd9:    return p.n;                      // neg
      4'd10:   return !p.n;                     // pos
      default: return 1'b0;                     // never
    endcase
  endfunction

endpackage
