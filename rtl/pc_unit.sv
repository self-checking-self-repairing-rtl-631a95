// Program-counter unit with micro-rollback support.
//
// The three program counters next_PC, PC and last_PC form a FIFO: each
// cycle in which the PC advances, the new value enters next_PC, next_PC
// moves to PC and PC moves to last_PC. Instead of giving each of the three
// registers its own delayed write buffer, the unit keeps a single four-stage
// DWB of new values in front of three permanent registers (npc, pc, lpc).
// Reading next_PC, PC and last_PC selects the first, second and third valid
// value in the sequence DWB stage 1..4 followed by npc, pc, lpc. When a
// value leaves the last DWB stage with its valid bit set, the permanent FIFO
// shifts. A rollback of n cycles clears the n leftmost valid bits, so the
// selection falls back to older values.
//
// Interface: adv/new_pc is the update of this cycle (adv low writes an
// invalid stage, i.e. the PC holds); rb_en/rb_n perform a rollback instead
// of a shift. Outputs are combinational. Reset puts RESET_PC in all three
// permanent registers (this design's choice).
module pc_unit #(
  parameter int          DEPTH    = 4,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rb_en,
  input  logic [$clog2(DEPTH+1)-1:0] rb_n,
  input  logic                       adv,
  input  logic [31:0]                new_pc,
  output logic [31:0]                next_pc,
  output logic [31:0]                pc,
  output logic [31:0]                last_pc
);

  logic [31:0]      stage [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [31:0]      npc_q, pc_q, lpc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      npc_q <= RESET_PC;
      pc_q  <= RESET_PC;
      lpc_q <= RESET_PC;
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (rb_en) begin
      for (int i = 0; i < DEPTH; i++)
        if (i < int'(rb_n)) valid[i] <= 1'b0;
    end else begin
      if (valid[DEPTH-1]) begin
        npc_q <= stage[DEPTH-1];
        pc_q  <= npc_q;
        lpc_q <= pc_q;
      end
      for (int i = DEPTH-1; i > 0; i--) begin
        stage[i] <= stage[i-1];
        valid[i] <= valid[i-1];
      end
      stage[0] <= new_pc;
      valid[0] <= adv;
    end
  end

  // Select the first three valid values, scanning left to right.
  always_comb begin
    logic [31:0] seq [DEPTH+3];
    logic [DEPTH+2:0] sv;
    logic [1:0]  found;
    for (int i = 0; i < DEPTH; i++) seq[i] = stage[i];
    sv = {3'b111, valid};
    seq[DEPTH]   = npc_q;
    seq[DEPTH+1] = pc_q;
    seq[DEPTH+2] = lpc_q;
    next_pc = npc_q;
    pc      = pc_q;
    last_pc = lpc_q;
    found   = 2'd0;
    for (int i = 0; i < DEPTH + 3; i++) begin
      if (sv[i]) begin
        case (found)
          2'd0: next_pc = seq[i];
          2'd1: pc      = seq[i];
          2'd2: last_pc = seq[i];
          default: ;
        endcase
        if (found != 2'd3) found = found + 2'd1;
      end
    end
  end

endmodule
