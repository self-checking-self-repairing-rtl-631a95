// Register file with delayed write buffer and per-register parity.
//
// NREG physical 32-bit registers (74 by default: ten globals plus four banks
// of sixteen window registers) form the permanent storage. Writes do not go
// to it directly: each cycle that is not a rollback cycle, the write of that
// cycle (data, 7-bit physical register number as tag, parity, valid) enters
// stage 0 of a four-stage DWB, the stages shift right, and the value leaving
// the last stage is copied into the permanent array if its valid bit is set.
// A read compares its register number with all DWB tags in parallel with the
// array read and returns the most recent valid match, else the array value.
// A rollback of n cycles clears the n leftmost valid bits.
//
// Each register carries one parity bit computed over the data and the
// physical register number, so that a write that lands in the wrong register
// is also caught. Both read ports check the parity of what they read (perr_a,
// perr_b). wbad inverts the stored parity; it serves the add-with-bad-parity
// diagnostic instructions. Physical register 0 reads as zero, never reports
// a parity error and ignores writes (RISC II r0).
//
// Timing: reads are combinational; a write is visible from the next cycle.
// Reset clears the DWB and loads zero with correct parity into every
// register (this design's choice; the chip itself has no such reset).
module regfile_dwb #(
  parameter int NREG  = 74,
  parameter int W     = 32,
  parameter int AW    = 7,
  parameter int DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rb_en,
  input  logic [$clog2(DEPTH+1)-1:0] rb_n,
  input  logic                       we,
  input  logic [AW-1:0]              waddr,
  input  logic [W-1:0]               wdata,
  input  logic                       wbad,
  input  logic [AW-1:0]              raddr_a,
  input  logic [AW-1:0]              raddr_b,
  output logic [W-1:0]               rdata_a,
  output logic [W-1:0]               rdata_b,
  output logic                       perr_a,
  output logic                       perr_b
);

  typedef struct packed {
    logic          v;
    logic [AW-1:0] tag;
    logic          par;
    logic [W-1:0]  d;
  } dwb_entry_t;

  logic [W:0]  mem [NREG];   // {parity, data}
  dwb_entry_t  dwb [DEPTH];

  function automatic logic gen_par(input logic [W-1:0] d, input logic [AW-1:0] a);
    return ^{d, a};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) mem[r] <= {gen_par('0, AW'(r)), {W{1'b0}}};
      for (int i = 0; i < DEPTH; i++) dwb[i] <= '0;
    end else if (rb_en) begin
      for (int i = 0; i < DEPTH; i++)
        if (i < int'(rb_n)) dwb[i].v <= 1'b0;
    end else begin
      if (dwb[DEPTH-1].v && int'(dwb[DEPTH-1].tag) < NREG)
        mem[dwb[DEPTH-1].tag] <= {dwb[DEPTH-1].par, dwb[DEPTH-1].d};
      for (int i = DEPTH-1; i > 0; i--) dwb[i] <= dwb[i-1];
      dwb[0].v   <= we && (waddr != '0);
      dwb[0].tag <= waddr;
      dwb[0].d   <= wdata;
      dwb[0].par <= gen_par(wdata, waddr) ^ wbad;
    end
  end

  function automatic logic [W:0] lookup(input logic [AW-1:0] a);
    logic [W:0] v;
    v = (int'(a) < NREG) ? mem[a] : {gen_par('0, a), {W{1'b0}}};
    for (int i = DEPTH-1; i >= 0; i--)
      if (dwb[i].v && dwb[i].tag == a) v = {dwb[i].par, dwb[i].d};
    return v;
  endfunction

  always_comb begin
    logic [W:0] va, vb;
    va = lookup(raddr_a);
    vb = lookup(raddr_b);
    rdata_a = (raddr_a == '0) ? '0 : va[W-1:0];
    rdata_b = (raddr_b == '0) ? '0 : vb[W-1:0];
    perr_a  = (raddr_a != '0) && (va[W] != gen_par(va[W-1:0], raddr_a));
    perr_b  = (raddr_b != '0) && (vb[W] != gen_par(vb[W-1:0], raddr_b));
  end

endmodule
