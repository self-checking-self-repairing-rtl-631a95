// Integer ALU of the data path.
//
// Computes add, add with carry, subtract, subtract with borrow and the three
// logic operations on two 32-bit operands and returns the condition codes
// Z, N, V, C. Subtraction is a + ~b + carry-in, so C is the carry out
// (set when no borrow occurs); for the logic operations V and C are zero.
// The operation set follows the RISC II integer instructions the chip runs;
// the flag conventions are this design's choice. Purely combinational.
module alu
  import mp_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] y,
  output logic        z,
  output logic        n,
  output logic        v,
  output logic        c
);

  always_comb begin
    logic [32:0] sum;
    logic [31:0] bb;
    logic        ci;
    logic        arith;
    arith = 1'b1;
    bb    = b;
    ci    = 1'b0;
    case (op)
      ALU_ADD:  begin bb = b;  ci = 1'b0; end
      ALU_ADDC: begin bb = b;  ci = cin;  end
      ALU_SUB:  begin bb = ~b; ci = 1'b1; end
      ALU_SUBC: begin bb = ~b; ci = cin;  end
      default:  arith = 1'b0;
    endcase
    sum = {1'b0, a} + {1'b0, bb} + 33'(ci);
    case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      default: y = sum[31:0];
    endcase
    z = (y == '0);
    n = y[31];
    v = arith && (a[31] == bb[31]) && (y[31] != a[31]);
    c = arith && sum[32];
  end

endmodule
