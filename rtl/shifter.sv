// Shifter of the data path (SHIFT).
//
// Shifts a 32-bit operand left logically, right logically or right
// arithmetically by 0-31 bits, or passes it unchanged. The pass mode is the
// path by which a value travels to busD during state repair: the sending
// chip gates the register being repaired through the shifter, and the
// receiving chip gates the value read from the pins through it into the
// register file. Purely combinational.
//
// The described chip only names its shifter; the shift set is the RISC II one
// and the operation encoding (sh_op_e) is this design's. Interface: op,
// a, amt (5 bits) in; y out, combinational.
module shifter
  import mp_pkg::*;
(
  input  sh_op_e      op,
  input  logic [31:0] a,
  input  logic [4:0]  amt,
  output logic [31:0] y
);

  always_comb begin
    case (op)
      SH_SLL:  y = a << amt;
      SH_SRL:  y = a >> amt;
      SH_SRA:  y = 32'($signed(a) >>> amt);
      default: y = a;
    endcase
  end

endmodule
