// Test of one Mirror Processor chip running alone as master (its rollback
// lines looped back, no partner on the repair pins) from a memory model with
// a store delayed write buffer. The program covers the arithmetic, logic and
// shift instructions with condition codes, LDHI, loads and stores, a
// conditional loop, call and return across register windows, GETPSW,
// PUTPSW and GETLPC. Results are stored to memory and compared with values
// worked out by hand. The testbench measures the execution rate of a
// straight-line block (one cycle per register instruction, two per load or
// store) and pulls the rollback lines with amounts 1 to 4 in the middle of
// a load/store sequence: rollback must be invisible in the results.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_mp_chip;
  import mp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [32:0] addr_o, data_o, mem_rdata, data_bus;
  logic mem_rd_o, mem_wr_o, data_drive_o, mode_o;
  logic [3:0] sig_o;
  logic rb_n_o, shut_n_o, rb_n, shut_n;
  logic [2:0] amt_n_o, amt_n;
  logic [1:0] rep_o;
  logic rb_cycle_o, shut_cycle_o, repair_o, rep_recv_o, rollback_bit_o;
  mp_state_e state_o;
  logic [31:0] pc_o;
  logic ext_rb_n = 1'b1;
  logic [2:0] ext_amt_n = 3'b111;

  assign rb_n   = rb_n_o & ext_rb_n;
  assign amt_n  = amt_n_o & ext_amt_n;
  assign shut_n = shut_n_o;
  assign data_bus = data_drive_o ? data_o : mem_rdata;

  mp_chip dut (
    .clk(clk), .rst_n(rst_n), .master_pin(1'b1),
    .addr_o(addr_o), .mem_rd_o(mem_rd_o), .mem_wr_o(mem_wr_o), .data_o(data_o),
    .data_drive_o(data_drive_o), .mode_o(mode_o), .sig_o(sig_o),
    .addr_i(addr_o), .mem_rd_i(mem_rd_o), .mem_wr_i(mem_wr_o), .data_i(data_bus),
    .mode_i(mode_o), .sig_i(sig_o),
    .rb_n_o(rb_n_o), .amt_n_o(amt_n_o), .shut_n_o(shut_n_o), .rep_o(rep_o),
    .rb_n_i(rb_n), .amt_n_i(amt_n), .shut_n_i(shut_n), .rep_i(2'b00),
    .rb_cycle_o(rb_cycle_o), .shut_cycle_o(shut_cycle_o), .repair_o(repair_o),
    .rep_recv_o(rep_recv_o), .rollback_bit_o(rollback_bit_o), .state_o(state_o), .pc_o(pc_o)
  );

  mem_dwb_model #(.WORDS(1024)) u_mem (
    .clk(clk), .rst_n(rst_n), .addr_i(addr_o), .rd_i(mem_rd_o), .wr_i(mem_wr_o),
    .wdata_i(data_o), .rdata_o(mem_rdata), .rb_n_i(rb_n), .amt_n_i(amt_n),
    .shut_n_i(shut_n), .bad_par_i(1'b0)
  );

  int checks = 0, failures = 0, cycles = 0;
  int pcw = 0, lbl_s = 0, lbl_e = 0, lbl_rb = 0, t_s = -1, t_e = -1, n_rb = 0;

  function automatic logic [31:0] rr(opcode_e op, int rd, int rs1, int rs2, bit scc = 0);
    return {op, scc, 5'(rd), 5'(rs1), 1'b0, 8'h0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ri(opcode_e op, int rd, int rs1, int imm, bit scc = 0);
    return {op, scc, 5'(rd), 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] rl(opcode_e op, int rd, int imm19);
    return {op, 1'b0, 5'(rd), 19'(imm19)};
  endfunction
  task automatic put(input logic [31:0] w);
    u_mem.mem[pcw] = {^w, w};
    pcw++;
  endtask
  function automatic int here();
    return pcw * 4;
  endfunction

  localparam int D = 32'h800;

  task automatic build();
    int t;
    for (int w = 0; w < 1024; w++) u_mem.mem[w] = 33'h0;
    u_mem.mem[D / 4 + 32] = {^32'h1234_5678, 32'h1234_5678};
    pcw = 0;
    put(ri(OP_ADD, 6, 0, D));               // r6 = data base
    lbl_s = here();
    put(ri(OP_ADD, 1, 0, -1));              // r1 = -1
    put(ri(OP_ADD, 2, 0, 1));               // r2 = 1
    put(rr(OP_ADD, 3, 1, 2, 1));            // r3 = 0, Z=1, C=1
    put(rr(OP_ADDC, 4, 0, 0));              // r4 = 0 + 0 + C = 1
    put(ri(OP_STL, 4, 6, 0));               // [D+0] = 1
    put(rr(OP_SUB, 5, 2, 1, 1));            // r5 = 2
    put(ri(OP_SRA, 7, 1, 4));               // r7 = -1
    put(ri(OP_SRL, 8, 1, 28));              // r8 = 15
    put(ri(OP_SLL, 9, 8, 4));               // r9 = 240
    put(rr(OP_XOR, 10, 9, 8));              // r10 = 255
    put(ri(OP_AND, 11, 10, 'h0F0));       // r11 = 0xF0
    put(ri(OP_OR, 12, 11, 3));              // r12 = 0xF3
    put(ri(OP_STL, 12, 6, 4));              // [D+4] = 0xF3
    put(ri(OP_LDL, 13, 6, 128));            // r13 = 0x12345678
    put(rl(OP_LDHI, 14, 'h12345));        // r14 = 0x12345 << 13
    lbl_e = here();
    put(ri(OP_STL, 14, 6, 8));              // [D+8]
    put(ri(OP_STL, 13, 6, 12));             // [D+12]
    put(ri(OP_STL, 7, 6, 16));              // [D+16] = -1
    put(ri(OP_STL, 5, 6, 20));              // [D+20] = 2
    // loop: r16 = 0; for r15 = 5 downto 1: r16 += r15
    put(ri(OP_ADD, 15, 0, 5));
    put(ri(OP_ADD, 16, 0, 0));
    t = here();
    put(rr(OP_ADD, 16, 16, 15));
    put(ri(OP_SUB, 15, 15, 1, 1));
    put(rl(OP_JMPR, 6, (t - here()) & 'h7FFFF));   // jgt loop
    put(32'h0);
    put(ri(OP_STL, 16, 6, 24));             // [D+24] = 15
    // call: callee adds its r10/r11 ins (caller's r26/r27)
    put(ri(OP_ADD, 26, 0, 40));
    put(ri(OP_ADD, 27, 0, 2));
    put(rl(OP_CALLR, 25, 20));              // call to here + 20
    put(32'h0);
    put(ri(OP_STL, 26, 6, 28));             // [D+28] = 42 (callee's result)
    put(ri(OP_STL, 16, 6, 32));             // [D+32] = 15: caller's local intact
    put(rl(OP_JMPR, 0, 24));                // skip the callee
    put(32'h0);
    put(rr(OP_ADD, 10, 10, 11));            // callee: r10 = 42
    put(ri(OP_ADD, 16, 0, 99));             // callee local r16
    put(ri(OP_RET, 0, 25, 8));
    put(32'h0);
    // PSW and last PC
    put(rr(OP_GETPSW, 17, 0, 0));
    put(ri(OP_STL, 17, 6, 36));             // [D+36] = PSW
    put(ri(OP_PUTPSW, 0, 0, 'h02A));      // S=1, Z=1, V=1, cwp=0
    put(rr(OP_GETPSW, 18, 0, 0));
    put(ri(OP_STL, 18, 6, 40));             // [D+40] = 0x2A
    lbl_rb = here();
    put(rr(OP_GETLPC, 19, 0, 0));           // last PC = address of the STL before
    put(ri(OP_STL, 19, 6, 44));             // [D+44]
    put(ri(OP_LDL, 20, 6, 44));
    put(ri(OP_ADD, 20, 20, 1));
    put(ri(OP_STL, 20, 6, 48));             // [D+48] = [D+44] + 1
    put(ri(OP_ADD, 21, 0, 'h5E));
    put(ri(OP_STL, 21, 6, 60));             // done marker
    t = here();
    put(rl(OP_JMPR, 0, 0));
    put(32'h0);
  endtask

  function automatic logic [31:0] peek(input int byte_addr);
    int w;
    logic [32:0] v;
    w = byte_addr / 4;
    v = u_mem.mem[w];
    for (int i = 3; i >= 0; i--)
      if (u_mem.sv[i] && int'(u_mem.sa[i]) == w) v = u_mem.sd[i];
    return v[31:0];
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (pc_o == 32'(lbl_s) && t_s < 0) t_s = cycles;
    if (pc_o == 32'(lbl_e) && t_e < 0) t_e = cycles;
    if (rb_cycle_o) n_rb++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // rollbacks of 1..4 cycles while the final load/store sequence runs
    while (pc_o != 32'(lbl_rb)) @(negedge clk);
    for (int n = 1; n <= 4; n++) begin
      repeat (n + 1) @(negedge clk);
      ext_rb_n = 1'b0; ext_amt_n = ~3'(n);
      @(negedge clk);
      ext_rb_n = 1'b1; ext_amt_n = 3'b111;
    end
    while (peek(D + 60) != 32'h5E) @(posedge clk);
    repeat (6) @(posedge clk);
    // 15 instructions, 3 of them loads/stores: 18 cycles. The PC moves on at
    // the end of the first cycle of a load or store, so the block is ended
    // after a register instruction.
    chk("straight-line cycles", 32'(t_e - t_s), 32'd18);
    chk("addc carry", peek(D + 0), 32'd1);
    chk("logic ops", peek(D + 4), 32'hF3);
    chk("ldhi", peek(D + 8), 32'h12345 << 13);
    chk("ldl", peek(D + 12), 32'h1234_5678);
    chk("sra", peek(D + 16), 32'hFFFF_FFFF);
    chk("sub", peek(D + 20), 32'd2);
    chk("loop", peek(D + 24), 32'd15);
    chk("call window result", peek(D + 28), 32'd42);
    chk("caller local kept", peek(D + 32), 32'd15);
    // PSW after the loop's last SUB (1 - 1: Z and C) back in window 0, S set
    chk("getpsw", peek(D + 36), 32'h029);
    chk("putpsw", peek(D + 40), 32'h02A);
    chk("getlpc", peek(D + 44), 32'(lbl_rb - 4));
    chk("load after store", peek(D + 48), 32'(lbl_rb - 4) + 1);
    chk("rollbacks seen", 32'(n_rb), 32'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
