// End-to-end test of the self-checking node at its default size.
//
// A master/slave pair of Mirror Processors runs a self-diagnosis program
// from a memory model with a store delayed write buffer. The program does
// ordinary arithmetic, loads, stores, a counted loop and a call/return, then
// uses the diagnostic instructions to force, one at a time: a register-file
// parity error in the master (one-cycle rollback and repair from the slave),
// a signature mismatch (jump-if-rollback stores different registers on the
// two chips; two-cycle rollback, then the jump is taken), a store-data
// mismatch (store-bad-data) and a busIN parity error (load-with-bad-parity).
// The testbench also pulls the external rollback lines with amounts three
// and four, and finally makes the memory return bad parity permanently until
// the repeated rollbacks end in a shutdown trap whose handler writes a
// marker. Memory results are compared with values worked out by hand, and
// every mechanism must be seen at least once.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_mp_node;
  import mp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [32:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_rd, mem_wr;
  logic        ext_rb_n = 1'b1, ext_shut_n = 1'b1;
  logic [2:0]  ext_amt_n = 3'b111;
  logic        rb_n, shut_n;
  logic [2:0]  amt_n;
  logic        rb_cycle, shut_cycle, repair;
  logic [1:0]  rep_recv, rbits;
  mp_state_e   state;
  logic [31:0] pc;
  logic        bad_par = 1'b0;

  mp_node dut (
    .clk(clk), .rst_n(rst_n),
    .mem_addr_o(mem_addr), .mem_rd_o(mem_rd), .mem_wr_o(mem_wr),
    .mem_wdata_o(mem_wdata), .mem_rdata_i(mem_rdata),
    .ext_rb_n_i(ext_rb_n), .ext_amt_n_i(ext_amt_n), .ext_shut_n_i(ext_shut_n),
    .rb_n_o(rb_n), .amt_n_o(amt_n), .shut_n_o(shut_n),
    .rb_cycle_o(rb_cycle), .shut_cycle_o(shut_cycle), .repair_o(repair),
    .rep_recv_o(rep_recv), .rollback_bit_o(rbits), .state_o(state), .pc_o(pc)
  );

  mem_dwb_model #(.WORDS(1024)) u_mem (
    .clk(clk), .rst_n(rst_n), .addr_i(mem_addr), .rd_i(mem_rd), .wr_i(mem_wr),
    .wdata_i(mem_wdata), .rdata_o(mem_rdata), .rb_n_i(rb_n), .amt_n_i(amt_n),
    .shut_n_i(shut_n), .bad_par_i(bad_par)
  );

  int checks = 0, failures = 0;
  int n_rb[5];
  int n_repair = 0, n_recv_master = 0, n_shut = 0, n_second = 0, n_wr = 0;
  int cycles = 0;

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] rr(opcode_e op, int rd, int rs1, int rs2, bit scc = 0);
    return {op, scc, 5'(rd), 5'(rs1), 1'b0, 8'h0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ri(opcode_e op, int rd, int rs1, int imm, bit scc = 0);
    return {op, scc, 5'(rd), 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] rl(opcode_e op, int rd, int imm19);
    return {op, 1'b0, 5'(rd), 19'(imm19)};
  endfunction

  int pcw = 0;
  int ext_pc = 0;
  task automatic put(input logic [31:0] w);
    u_mem.mem[pcw] = {^w, w};
    pcw++;
  endtask
  task automatic pad(input int n);
    for (int i = 0; i < n; i++) put(32'h0);
  endtask
  function automatic int here();
    return pcw * 4;
  endfunction

  localparam int DATA = 32'h800;   // word 512

  task automatic build();
    int t;
    for (int w = 0; w < 1024; w++) u_mem.mem[w] = 33'h0;
    pcw = 0;
    put(ri(OP_ADD, 1, 0, 5));             // r1 = 5
    put(ri(OP_ADD, 2, 0, 7));             // r2 = 7
    put(rr(OP_ADD, 3, 1, 2));             // r3 = 12
    put(rr(OP_SUB, 4, 2, 1, 1));          // r4 = 2, set cc
    put(ri(OP_SLL, 5, 3, 2));             // r5 = 48
    put(ri(OP_ADD, 6, 0, DATA));          // r6 = 0x800
    put(ri(OP_STL, 3, 6, 0));             // [0x800] = 12
    put(ri(OP_LDL, 7, 6, 0));             // r7 = 12
    put(rr(OP_ADD, 8, 7, 5));             // r8 = 60
    put(ri(OP_STL, 8, 6, 4));             // [0x804] = 60
    // counted loop: r20 = 3; do r21 += r1; r20--; while (r20 != 0)
    put(ri(OP_ADD, 20, 0, 3));
    put(ri(OP_ADD, 21, 0, 0));
    t = here();
    put(rr(OP_ADD, 21, 21, 1));
    put(ri(OP_SUB, 20, 20, 1, 1));
    put(rl(OP_JMPR, 2, (t - here()) & 19'h7FFFF));   // jne loop
    put(32'h0);                                      // delay slot
    put(ri(OP_STL, 21, 6, 8));            // [0x808] = 15
    // call/return: the callee writes its r10, which is the caller's r26.
    put(rl(OP_CALLR, 25, 16));            // call to here+16
    put(32'h0);                           // delay slot
    put(ri(OP_STL, 26, 6, 12));           // after return: [0x80C] = 33
    put(rl(OP_JMPR, 0, 16));              // skip the callee
    put(32'h0);
    put(ri(OP_ADD, 10, 0, 33));           // callee: r10 = 33
    put(ri(OP_RET, 0, 25, 8));            // return to call + 8
    put(32'h0);
    pad(20);
    // register-file parity error in the master, repaired from the slave
    put(rl(OP_CLRRBM, 0, 0));
    put(rl(OP_CLRRBS, 0, 0));
    put(ri(OP_ADDBPM, 9, 0, 99));         // master r9 gets bad parity
    put(rr(OP_ADD, 11, 9, 0));            // reads r9 -> rollback 1, repair
    put(ri(OP_STL, 11, 6, 16));           // [0x810] = 99
    put(rr(OP_ADD, 12, 9, 0));            // reads r9 again: no rollback
    put(ri(OP_STL, 12, 6, 20));           // [0x814] = 99
    pad(20);
    // signature mismatch: jump-if-rollback with Rs1 != Rs2
    put(rl(OP_CLRRBM, 0, 0));
    put(rl(OP_CLRRBS, 0, 0));
    put(ri(OP_ADD, 13, 0, 12));           // offset 12
    put(rr(OP_JMPRBM, 14, 1, 13));        // r14 = r1 after the rollback
    put(ri(OP_ADD, 15, 0, 1));            // delay slot
    put(ri(OP_ADD, 16, 0, 119));          // skipped when the jump is taken
    put(ri(OP_STL, 14, 6, 24));           // target: [0x818] = 5
    put(ri(OP_STL, 16, 6, 28));           // [0x81C] = 0
    pad(20);
    // store-bad-data in the master
    put(rl(OP_CLRRBM, 0, 0));
    put(rl(OP_CLRRBS, 0, 0));
    put(ri(OP_STRBDM, 1, 0, (DATA + 32) - here()));   // [0x820] = 5
    pad(20);
    // load-with-bad-parity in the master
    put(rl(OP_CLRRBM, 0, 0));
    put(rl(OP_CLRRBS, 0, 0));
    put(ri(OP_LDRBPM, 17, 0, DATA - here()));         // r17 = [0x800] = 12
    put(ri(OP_STL, 17, 6, 36));           // [0x824] = 12
    ext_pc = here() + 8;
    pad(24);
    // external rollbacks happen here (driven by the testbench)
    put(ri(OP_ADD, 18, 0, 12'h5E));
    put(ri(OP_STL, 18, 6, 60));           // [0x83C] = 0x5E: done
    t = here();
    put(rl(OP_JMPR, 0, 0));               // spin
    put(32'h0);
    // shutdown handler at SHUTDOWN_VEC
    pcw = int'(SHUTDOWN_VEC) / 4;
    put(ri(OP_ADD, 19, 0, 12'h5A));
    put(ri(OP_STL, 19, 0, DATA + 48));    // [0x830] = 0x5A
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

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- monitoring
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (rb_cycle) n_rb[int'(3'(~amt_n))]++;
    if (repair) n_repair++;
    if (rep_recv[0]) n_recv_master++;
    if (shut_cycle) n_shut++;
    if (state == ST_SECOND) n_second++;
    if (mem_wr) n_wr++;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    foreach (n_rb[i]) n_rb[i] = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // external rollbacks of 3 and 4 cycles while in the padding
    while (pc != 32'(ext_pc)) @(posedge clk);
    @(negedge clk);
    ext_rb_n = 1'b0; ext_amt_n = ~3'd3;
    @(negedge clk);
    ext_rb_n = 1'b1; ext_amt_n = 3'b111;
    repeat (20) @(negedge clk);
    ext_rb_n = 1'b0; ext_amt_n = ~3'd4;
    @(negedge clk);
    ext_rb_n = 1'b1; ext_amt_n = 3'b111;
    t0 = cycles;
    while (peek(DATA + 60) != 32'h5E) @(posedge clk);
    repeat (6) @(posedge clk);
    check("add/sll/stl", peek(DATA + 0), 32'd12);
    check("ldl/add", peek(DATA + 4), 32'd60);
    check("loop", peek(DATA + 8), 32'd15);
    check("call/ret window", peek(DATA + 12), 32'd33);
    check("repaired register", peek(DATA + 16), 32'd99);
    check("repaired register reread", peek(DATA + 20), 32'd99);
    check("jmprb taken, Rs1 stored", peek(DATA + 24), 32'd5);
    check("jmprb skipped", peek(DATA + 28), 32'd0);
    check("strbd good data", peek(DATA + 32), 32'd5);
    check("ldrbp data", peek(DATA + 36), 32'd12);
    check("rollback bits set", 32'(rbits), 32'd3);
    // permanent memory fault: repeated rollbacks end in a shutdown trap
    @(negedge clk);
    bad_par = 1'b1;
    while (!shut_cycle) @(posedge clk);
    @(negedge clk);
    bad_par = 1'b0;
    while (peek(DATA + 48) != 32'h5A) @(posedge clk);
    repeat (4) @(posedge clk);
    check("shutdown handler", peek(DATA + 48), 32'h5A);
    check("kernel mode after trap", 32'(dut.g_chip[0].u_mp.mode_o), 32'd1);
    $display("rollbacks by amount: 1:%0d 2:%0d 3:%0d 4:%0d, repairs %0d (master received %0d), shutdowns %0d, second cycles %0d, stores %0d, cycles %0d",
             n_rb[1], n_rb[2], n_rb[3], n_rb[4], n_repair, n_recv_master, n_shut, n_second, n_wr, cycles);
    checks++; if (n_rb[1] == 0) begin failures++; $display("FAIL no 1-cycle rollback"); end
    checks++; if (n_rb[2] == 0) begin failures++; $display("FAIL no 2-cycle rollback"); end
    checks++; if (n_rb[3] == 0) begin failures++; $display("FAIL no 3-cycle rollback"); end
    checks++; if (n_rb[4] == 0) begin failures++; $display("FAIL no 4-cycle rollback"); end
    checks++; if (n_repair == 0 || n_recv_master == 0) begin failures++; $display("FAIL no repair"); end
    checks++; if (n_shut == 0) begin failures++; $display("FAIL no shutdown"); end
    checks++; if (n_second == 0) begin failures++; $display("FAIL no two-cycle instruction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
