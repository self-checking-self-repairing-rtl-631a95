// Mirror Processor: a RISC II-style processor chip with micro rollback,
// master/slave error detection and register-file state repair.
//
// One clock edge per processor cycle (the chip's four clock phases are
// folded into the cycle). Each cycle the chip executes the instruction in IR
// and fetches the next one over the multiplexed external bus: the address is
// the memory address register (MAR), written in the previous cycle with the
// new next_PC, and the instruction returns in the same cycle and enters IR.
// Register-register instructions take one cycle, loads and stores two: the
// first computes the effective address into MAR (and the store data into
// SDR) while still fetching, the second puts that address on the bus and
// moves the data. Jumps are delayed by one instruction, as in RISC II.
//
// Every register that carries state across a cycle boundary (register file,
// PC unit, MAR, IR, SDR, PSW and the control state) commits its updates only
// after four cycles through a delayed write buffer, so the whole chip can be
// rolled back by one to four cycles in a single rollback cycle.
//
// Error detection: a chip strapped as slave (master_pin low) drives nothing
// and compares the master's address, strobes, mode bit, store data and
// 4-bit signature of internal state with its own (two-cycle rollback);
// both chips check the parity of words read from the bus (two cycles) and of
// the register-file values read on busA and busB (one cycle, plus a repair
// request on the repair pins). After a rollback with repair, the chip that
// read a good value re-reads the register (REP1) and drives it on the data
// pins while the other chip writes it into its register file (REP2).
//
// Pins: the bus is split into an address phase (addr_*, mem_rd/wr, mode,
// sig) and a data phase (data_*), each with the value this chip would drive
// (*_o) and the value present on the pins (*_i). data_drive_o says this chip
// drives the data phase (master store, or repair sender). Rollback, amount,
// shutdown and repair pins are those of rb_controller. Interrupts, byte and
// halfword accesses and register-window overflow traps are not modelled.
module mp_chip
  import mp_pkg::*;
#(
  parameter int NREG = NPHYS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            master_pin,
  // external bus
  output logic [32:0]     addr_o,
  output logic            mem_rd_o,
  output logic            mem_wr_o,
  output logic [32:0]     data_o,
  output logic            data_drive_o,
  output logic            mode_o,
  output logic [SIG_W-1:0] sig_o,
  input  logic [32:0]     addr_i,
  input  logic            mem_rd_i,
  input  logic            mem_wr_i,
  input  logic [32:0]     data_i,
  input  logic            mode_i,
  input  logic [SIG_W-1:0] sig_i,
  // rollback domain
  output logic            rb_n_o,
  output logic [RB_W-1:0] amt_n_o,
  output logic            shut_n_o,
  output logic [1:0]      rep_o,
  input  logic            rb_n_i,
  input  logic [RB_W-1:0] amt_n_i,
  input  logic            shut_n_i,
  input  logic [1:0]      rep_i,
  // status
  output logic            rb_cycle_o,
  output logic            shut_cycle_o,
  output logic            repair_o,
  output logic            rep_recv_o,
  output logic            rollback_bit_o,
  output mp_state_e       state_o,
  output logic [31:0]     pc_o
);

  // ---------------------------------------------------------------- control
  logic            rb_cycle, shut_cycle, repair, rep_bus_b, rep_send, rbit;
  logic [RB_W-1:0] rb_amt;
  logic            rep_bus_b_q, rep_send_q;
  ctrl_t           ctrl;
  mp_state_e       state;
  ctl_state_t      csr;
  logic [31:0]     ir_q, mar_q, sdr_q;
  psw_t            psw_q, psw_d;
  logic [31:0]     npc, pc, lpc;

  logic is_normal, is_second, is_rep1, is_rep2, exec_en;
  assign exec_en   = !rb_cycle && !shut_cycle;
  assign is_normal = exec_en && state == ST_NORMAL;
  assign is_second = exec_en && state == ST_SECOND;
  assign is_rep1   = exec_en && state == ST_REP1;
  assign is_rep2   = exec_en && state == ST_REP2;

  mp_control u_ctl (
    .clk         (clk),
    .rst_n       (rst_n),
    .master_pin  (master_pin),
    .rb_cycle    (rb_cycle),
    .rb_amt      (rb_amt),
    .shut_cycle  (shut_cycle),
    .repair      (repair),
    .rep_bus_b   (rep_bus_b),
    .rep_send    (rep_send),
    .ir          (ir_q),
    .psw         (psw_q),
    .rbit        (rbit),
    .ctrl        (ctrl),
    .state       (state),
    .csr         (csr),
    .rep_bus_b_q (rep_bus_b_q),
    .rep_send_q  (rep_send_q)
  );

  // ------------------------------------------------------- instruction fields
  logic [4:0]  f_rd, f_rs1, f_s2r;
  logic [31:0] simm13, simm19;
  assign f_rd   = ir_q[23:19];
  assign f_rs1  = ir_q[18:14];
  assign f_s2r  = ir_q[4:0];
  assign simm13 = {{19{ir_q[12]}}, ir_q[12:0]};
  assign simm19 = {{13{ir_q[18]}}, ir_q[18:0]};

  // ---------------------------------------------------------- register file
  logic [PREG_W-1:0] phys_a, phys_b, rf_waddr;
  logic [31:0]       bus_a, bus_b, bus_d;
  logic              perr_a, perr_b, rf_we, rf_wbad;

  assign phys_a = phys_reg(psw_q.cwp, f_rs1);
  assign phys_b = phys_reg(psw_q.cwp, ctrl.b_is_rd ? f_rd : f_s2r);

  regfile_dwb #(.NREG(NREG), .W(XLEN), .AW(PREG_W), .DEPTH(DWB_DEPTH)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .rb_en   (rb_cycle),
    .rb_n    (rb_amt),
    .we      (rf_we),
    .waddr   (rf_waddr),
    .wdata   (bus_d),
    .wbad    (rf_wbad),
    .raddr_a (phys_a),
    .raddr_b (phys_b),
    .rdata_a (bus_a),
    .rdata_b (bus_b),
    .perr_a  (perr_a),
    .perr_b  (perr_b)
  );

  // ------------------------------------------------------------ ALU / SHIFT
  logic [31:0] op_b, alu_y, sh_y, sh_a, ea;
  logic        f_z, f_n, f_v, f_c;
  sh_op_e      sh_op;
  assign op_b = ctrl.use_imm ? simm13 : bus_b;

  alu u_alu (
    .op  (ctrl.alu_op),
    .a   (bus_a),
    .b   (op_b),
    .cin (psw_q.c),
    .y   (alu_y),
    .z   (f_z),
    .n   (f_n),
    .v   (f_v),
    .c   (f_c)
  );

  always_comb begin
    sh_a  = bus_a;
    sh_op = ctrl.sh_op;
    if (is_rep1) begin
      sh_a  = rep_bus_b_q ? bus_b : bus_a;
      sh_op = SH_PASS;
    end else if (is_rep2) begin
      sh_a  = data_i[31:0];
      sh_op = SH_PASS;
    end
  end

  shifter u_sh (
    .op  (sh_op),
    .a   (sh_a),
    .amt (op_b[4:0]),
    .y   (sh_y)
  );

  assign ea = (ctrl.pcrel_addr ? pc : bus_a) + op_b;

  // busD: the value written to the register file (or repaired).
  always_comb begin
    if (is_second)                bus_d = data_i[31:0];
    else if (is_rep1 || is_rep2)  bus_d = sh_y;
    else begin
      case (ctrl.dsel)
        D_SHIFT: bus_d = sh_y;
        D_LDHI:  bus_d = {ir_q[18:0], 13'b0};
        D_PC:    bus_d = pc;
        D_LPC:   bus_d = lpc;
        D_PSW:   bus_d = 32'(psw_q);
        D_RS1:   bus_d = bus_a;
        D_RS2:   bus_d = bus_b;
        default: bus_d = alu_y;
      endcase
    end
  end

  // -------------------------------------------------------------- repair
  logic [31:0]       rep_val_q;
  logic              rep_par_q;
  logic [PREG_W-1:0] rep_phys_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_val_q  <= '0;
      rep_par_q  <= 1'b0;
      rep_phys_q <= '0;
    end else if (is_rep1) begin
      rep_val_q  <= bus_d;
      rep_par_q  <= ^bus_d;
      rep_phys_q <= rep_bus_b_q ? phys_b : phys_a;
    end
  end

  // ---------------------------------------------------- register-file write
  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = phys_reg(psw_q.cwp, f_rd);
    rf_wbad  = 1'b0;
    if (is_normal) begin
      rf_we    = ctrl.rd_we;
      rf_wbad  = ctrl.bad_par;
      if (ctrl.rd_new_win) rf_waddr = phys_reg(psw_q.cwp - 2'd1, f_rd);
    end else if (is_second) begin
      rf_we    = !csr.pend_store;
      rf_waddr = csr.pend_phys;
    end else if (is_rep2) begin
      rf_we    = !rep_send_q;
      rf_waddr = rep_phys_q;
    end
  end

  // -------------------------------------------------------------- PC unit
  logic        take;
  logic [31:0] target, new_pc;

  always_comb begin
    case (ctrl.jmp)
      J_PCREL_IMM: target = pc + simm19;
      J_PCREL_RS2: target = pc + bus_b;
      default:     target = alu_y;
    endcase
    take = is_normal && ctrl.jmp != J_NONE &&
           (ctrl.jmp_on_rbit ? rbit : (!ctrl.jmp_cond || cond_true(f_rd[3:0], psw_q)));
    if (shut_cycle) new_pc = SHUTDOWN_VEC;
    else if (take)  new_pc = target;
    else            new_pc = npc + 32'd4;
  end

  pc_unit #(.DEPTH(DWB_DEPTH), .RESET_PC(RESET_VEC)) u_pc (
    .clk     (clk),
    .rst_n   (rst_n),
    .rb_en   (rb_cycle),
    .rb_n    (rb_amt),
    .adv     (is_normal || shut_cycle),
    .new_pc  (new_pc),
    .next_pc (npc),
    .pc      (pc),
    .last_pc (lpc)
  );

  // ------------------------------------------------- MAR, IR, SDR, PSW DWBs
  logic [31:0] mar_d, ir_d, sdr_d;

  always_comb begin
    mar_d = mar_q;
    ir_d  = ir_q;
    sdr_d = sdr_q;
    psw_d = psw_q;
    if (shut_cycle) begin
      mar_d   = SHUTDOWN_VEC;
      psw_d.p = psw_q.s;
      psw_d.s = 1'b1;
      psw_d.i = 1'b0;
    end else if (is_normal) begin
      mar_d = (ctrl.load || ctrl.store) ? ea : new_pc;
      ir_d  = data_i[31:0];
      if (ctrl.store) sdr_d = ctrl.bad_store ? mar_q : bus_b;
      if (ctrl.set_cc) {psw_d.z, psw_d.n, psw_d.v, psw_d.c} = {f_z, f_n, f_v, f_c};
      if (ctrl.cwp_dec) psw_d.cwp = psw_q.cwp - 2'd1;
      if (ctrl.cwp_inc) psw_d.cwp = psw_q.cwp + 2'd1;
      if (ctrl.psw_write) psw_d = psw_t'(alu_y[PSW_W-1:0]);
    end else if (is_second) begin
      mar_d = npc;
    end
  end

  localparam psw_t PSW_RESET = '{s: 1'b1, default: '0};

  dwb_reg #(.W(32), .DEPTH(DWB_DEPTH), .RESET_VAL(RESET_VEC)) u_mar (
    .clk(clk), .rst_n(rst_n), .rb_en(rb_cycle), .rb_n(rb_amt),
    .we(1'b1), .wdata(mar_d), .rdata(mar_q));

  dwb_reg #(.W(32), .DEPTH(DWB_DEPTH), .RESET_VAL(32'h0)) u_ir (
    .clk(clk), .rst_n(rst_n), .rb_en(rb_cycle), .rb_n(rb_amt),
    .we(1'b1), .wdata(ir_d), .rdata(ir_q));

  dwb_reg #(.W(32), .DEPTH(DWB_DEPTH), .RESET_VAL(32'h0)) u_sdr (
    .clk(clk), .rst_n(rst_n), .rb_en(rb_cycle), .rb_n(rb_amt),
    .we(1'b1), .wdata(sdr_d), .rdata(sdr_q));

  dwb_reg #(.W(PSW_W), .DEPTH(DWB_DEPTH), .RESET_VAL(PSW_RESET)) u_psw (
    .clk(clk), .rst_n(rst_n), .rb_en(rb_cycle), .rb_n(rb_amt),
    .we(1'b1), .wdata(psw_d), .rdata(psw_q));

  // ---------------------------------------------------------- external bus
  logic [31:0] dout;
  logic        err_par_in, err_par_out, err_cmp;
  logic [32:0] addr_unused_in;

  assign mem_rd_o     = is_normal || (is_second && !csr.pend_store);
  assign mem_wr_o     = is_second && csr.pend_store;
  assign dout         = is_rep2 ? rep_val_q : sdr_q;
  assign data_drive_o = (mem_wr_o && master_pin) || (is_rep2 && rep_send_q);
  assign mode_o       = psw_q.s;

  // parOUT on the address, parIN on words read from the bus.
  bus_parity #(.W(32)) u_par_addr (
    .out_data (mar_q),
    .out_bus  (addr_o),
    .in_bus   (data_i),
    .in_check (is_normal || (is_second && !csr.pend_store)),
    .inv_in   (is_second && csr.pend_badpar),
    .in_err   (err_par_in)
  );

  // parOUT on store/repair data; the repair sender checks the busOUT parity
  // against the parity taken from busD in REP1.
  assign addr_unused_in = {rep_par_q, rep_val_q};
  bus_parity #(.W(32)) u_par_data (
    .out_data (dout),
    .out_bus  (data_o),
    .in_bus   (addr_unused_in ^ {data_o[32] ^ rep_par_q, 32'h0}),
    .in_check (is_rep2 && rep_send_q),
    .inv_in   (1'b0),
    .in_err   (err_par_out)
  );

  // ------------------------------------------------------------- signature
  logic [SIG_IN_W-1:0] sig_in;
  assign sig_in = {bus_d, rf_waddr, rf_we, psw_q, state};

  sig_gen #(.W(SIG_IN_W), .NSIG(SIG_W)) u_sig (
    .d   (sig_in),
    .sig (sig_o)
  );

  ms_compare #(.W(33), .S(SIG_W)) u_cmp (
    .en       (!master_pin && (is_normal || is_second)),
    .own_addr (addr_o),
    .own_rd   (mem_rd_o),
    .own_wr   (mem_wr_o),
    .own_data (data_o),
    .own_mode (mode_o),
    .own_sig  (sig_o),
    .bus_addr (addr_i),
    .bus_rd   (mem_rd_i),
    .bus_wr   (mem_wr_i),
    .bus_data (data_i),
    .bus_mode (mode_i),
    .bus_sig  (sig_i),
    .mismatch (err_cmp)
  );

  // ---------------------------------------------------- rollback controller
  logic err_a, err_b;
  assign err_a = (is_normal && ctrl.reads_a && perr_a) ||
                 (is_rep1 && rep_send_q && !rep_bus_b_q && perr_a);
  assign err_b = (is_normal && ctrl.reads_b && perr_b) ||
                 (is_rep1 && rep_send_q && rep_bus_b_q && perr_b);

  rb_controller #(.DEPTH(DWB_DEPTH), .AW(RB_W)) u_rbc (
    .clk          (clk),
    .rst_n        (rst_n),
    .normal_cycle (is_normal || is_second),
    .err_cmp      (err_cmp),
    .err_par_in   (err_par_in),
    .err_par_out  (err_par_out),
    .err_par_a    (err_a),
    .err_par_b    (err_b),
    .clr_rbit     (is_normal && ctrl.clr_rbit),
    .rb_n_o       (rb_n_o),
    .amt_n_o      (amt_n_o),
    .shut_n_o     (shut_n_o),
    .rep_o        (rep_o),
    .rb_n_i       (rb_n_i),
    .amt_n_i      (amt_n_i),
    .shut_n_i     (shut_n_i),
    .rep_i        (rep_i),
    .rb_cycle     (rb_cycle),
    .rb_amt       (rb_amt),
    .shut_cycle   (shut_cycle),
    .repair       (repair),
    .rep_bus_b    (rep_bus_b),
    .rep_send     (rep_send),
    .rollback_bit (rbit)
  );

  assign rb_cycle_o     = rb_cycle;
  assign shut_cycle_o   = shut_cycle;
  assign repair_o       = repair;
  assign rep_recv_o     = is_rep2 && !rep_send_q;
  assign rollback_bit_o = rbit;
  assign state_o        = state;
  assign pc_o           = pc;

endmodule
