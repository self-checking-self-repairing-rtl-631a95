// Control unit of the Mirror Processor.
//
// Decodes the instruction held in IR (the job of the chip's three PLAs) into
// a control word for the data path, and keeps the four-state controller:
// normal instruction, second cycle of a two-cycle (load/store) instruction,
// and the first and second cycles of state repair. The normal/second state
// and the information the second cycle needs (store or load, destination
// register, forced bad parity) live in a control-state register with its own
// delayed write buffer, so a rollback to the boundary between the two cycles
// of a load or store restores them. This register plays the part of the
// control unit's rollback memory, whose exact contents are not given; what it
// holds is this design's choice. The repair state is set by the rollback
// controller in a rollback cycle and then runs REP1 -> REP2 -> back to the
// restored state; it is not itself rolled back. A shutdown-trap cycle
// returns the controller to the normal state and marks the instruction
// already fetched into IR as squashed.
//
// The diagnostic instructions act differently on the two chips: master_pin
// selects which of the ...m/...s pair takes the special action here. They
// are privileged and execute as no-ops in user mode (this design's choice;
// the trap RISC II would take is not modelled). Opcode numbers are this
// design's own (see mp_pkg).
//
// Interface: ctrl is combinational from ir, psw and the rollback bit; the
// caller gates it with the current state. state is the state of the current
// cycle.
module mp_control
  import mp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            master_pin,
  input  logic            rb_cycle,
  input  logic [RB_W-1:0] rb_amt,
  input  logic            shut_cycle,
  input  logic            repair,
  input  logic            rep_bus_b,
  input  logic            rep_send,
  input  logic [31:0]     ir,
  input  psw_t            psw,
  input  logic            rbit,
  output ctrl_t           ctrl,
  output mp_state_e       state,
  output ctl_state_t      csr,
  output logic            rep_bus_b_q,
  output logic            rep_send_q
);

  typedef enum logic [1:0] { R_NONE, R_REP1, R_REP2 } rep_e;
  rep_e       rep_q;
  ctl_state_t csr_next;
  logic [6:0] op_raw;
  logic       imm, priv_ok;
  logic [4:0] rd_f;

  assign op_raw  = ir[31:25];
  assign rd_f    = ir[23:19];
  assign imm     = ir[13];
  assign priv_ok = psw.s;

  // Instruction decode.
  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.sh_op  = SH_PASS;
    ctrl.dsel   = D_ALU;
    ctrl.jmp    = J_NONE;
    case (op_raw)
      OP_ADD, OP_ADDC, OP_SUB, OP_SUBC, OP_AND, OP_OR, OP_XOR: begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = !imm;
        ctrl.use_imm = imm;
        ctrl.rd_we   = 1'b1;
        ctrl.set_cc  = ir[24];
        case (op_raw)
          OP_ADDC: ctrl.alu_op = ALU_ADDC;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_SUBC: ctrl.alu_op = ALU_SUBC;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          OP_XOR:  ctrl.alu_op = ALU_XOR;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_SLL, OP_SRL, OP_SRA: begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = !imm;
        ctrl.use_imm = imm;
        ctrl.rd_we   = 1'b1;
        ctrl.dsel    = D_SHIFT;
        ctrl.sh_op   = (op_raw == OP_SLL) ? SH_SLL : (op_raw == OP_SRL) ? SH_SRL : SH_SRA;
      end
      OP_LDHI: begin
        ctrl.rd_we = 1'b1;
        ctrl.dsel  = D_LDHI;
      end
      OP_LDL: begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = !imm;
        ctrl.use_imm = imm;
        ctrl.load    = 1'b1;
      end
      OP_STL: begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = 1'b1;
        ctrl.b_is_rd = 1'b1;
        ctrl.use_imm = 1'b1;
        ctrl.store   = 1'b1;
      end
      OP_JMP: begin
        ctrl.reads_a  = 1'b1;
        ctrl.reads_b  = !imm;
        ctrl.use_imm  = imm;
        ctrl.jmp      = J_REG;
        ctrl.jmp_cond = 1'b1;
      end
      OP_JMPR: begin
        ctrl.jmp      = J_PCREL_IMM;
        ctrl.jmp_cond = 1'b1;
      end
      OP_CALLR: begin
        ctrl.jmp        = J_PCREL_IMM;
        ctrl.rd_we      = 1'b1;
        ctrl.rd_new_win = 1'b1;
        ctrl.dsel       = D_PC;
        ctrl.cwp_dec    = 1'b1;
      end
      OP_RET: begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = !imm;
        ctrl.use_imm = imm;
        ctrl.jmp     = J_REG;
        ctrl.cwp_inc = 1'b1;
      end
      OP_GETPSW: begin
        ctrl.rd_we = 1'b1;
        ctrl.dsel  = D_PSW;
      end
      OP_GETLPC: begin
        ctrl.rd_we = 1'b1;
        ctrl.dsel  = D_LPC;
      end
      OP_PUTPSW: if (priv_ok) begin
        ctrl.reads_a   = 1'b1;
        ctrl.reads_b   = !imm;
        ctrl.use_imm   = imm;
        ctrl.psw_write = 1'b1;
      end
      OP_CLRRBM, OP_CLRRBS: if (priv_ok) begin
        ctrl.clr_rbit = (op_raw == OP_CLRRBM) == master_pin;
      end
      OP_ADDBPM, OP_ADDBPS: if (priv_ok) begin
        ctrl.reads_a = 1'b1;
        ctrl.reads_b = !imm;
        ctrl.use_imm = imm;
        ctrl.rd_we   = 1'b1;
        ctrl.bad_par = (op_raw == OP_ADDBPM) == master_pin;
      end
      OP_JMPRBM, OP_JMPRBS: if (priv_ok) begin
        ctrl.reads_a     = 1'b1;
        ctrl.reads_b     = 1'b1;
        ctrl.rd_we       = 1'b1;
        ctrl.jmp         = J_PCREL_RS2;
        ctrl.jmp_on_rbit = 1'b1;
        // jmprbm: master stores Rs1, slave Rs2; jmprbs: the reverse.
        if (rbit || ((op_raw == OP_JMPRBM) == master_pin)) ctrl.dsel = D_RS1;
        else                                               ctrl.dsel = D_RS2;
      end
      OP_STRBDM, OP_STRBDS: if (priv_ok) begin
        ctrl.reads_b    = 1'b1;
        ctrl.b_is_rd    = 1'b1;
        ctrl.use_imm    = 1'b1;
        ctrl.store      = 1'b1;
        ctrl.pcrel_addr = 1'b1;
        ctrl.bad_store  = !rbit && ((op_raw == OP_STRBDM) == master_pin);
      end
      OP_LDRBPM, OP_LDRBPS: if (priv_ok) begin
        ctrl.use_imm    = 1'b1;
        ctrl.load       = 1'b1;
        ctrl.pcrel_addr = 1'b1;
        ctrl.bad_load   = !rbit && ((op_raw == OP_LDRBPM) == master_pin);
      end
      default: ;
    endcase
    if (csr.squash) ctrl = '0;
  end

  // Current state.
  always_comb begin
    case (rep_q)
      R_REP1:  state = ST_REP1;
      R_REP2:  state = ST_REP2;
      default: state = csr.state;
    endcase
  end

  // Next control state.
  always_comb begin
    csr_next = csr;
    if (shut_cycle) begin
      csr_next        = '0;
      csr_next.state  = ST_NORMAL;
      csr_next.squash = 1'b1;
    end else if (state == ST_NORMAL) begin
      csr_next        = '0;
      csr_next.state  = ST_NORMAL;
      if (ctrl.load || ctrl.store) begin
        csr_next.state       = ST_SECOND;
        csr_next.pend_store  = ctrl.store;
        csr_next.pend_badpar = ctrl.bad_load;
        csr_next.pend_phys   = phys_reg(psw.cwp, rd_f);
      end
    end else if (state == ST_SECOND) begin
      csr_next       = '0;
      csr_next.state = ST_NORMAL;
    end
  end

  localparam ctl_state_t CSR_RESET = '{state: ST_NORMAL, default: '0};

  dwb_reg #(.W($bits(ctl_state_t)), .DEPTH(DWB_DEPTH), .RESET_VAL(CSR_RESET)) u_csr (
    .clk   (clk),
    .rst_n (rst_n),
    .rb_en (rb_cycle),
    .rb_n  (rb_amt),
    .we    (1'b1),
    .wdata (csr_next),
    .rdata (csr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_q       <= R_NONE;
      rep_bus_b_q <= 1'b0;
      rep_send_q  <= 1'b0;
    end else if (shut_cycle) begin
      rep_q <= R_NONE;
    end else if (rb_cycle) begin
      rep_q       <= repair ? R_REP1 : R_NONE;
      rep_bus_b_q <= rep_bus_b;
      rep_send_q  <= rep_send;
    end else begin
      case (rep_q)
        R_REP1:  rep_q <= R_REP2;
        default: rep_q <= R_NONE;
      endcase
    end
  end

endmodule
