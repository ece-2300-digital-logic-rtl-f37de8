// alu: arithmetic-logic unit of the single-cycle datapath.
//
// Combinational. Computes Y from operand A (register SA) and operand B (the
// B-multiplexer output) as selected by FS, and reports the condition codes
// that the control unit uses to choose its next step:
//   ADD  Y = A + B          C = carry out, V = signed overflow
//   SUB  Y = A - B          computed as A + ~B + 1; C = carry out of that sum
//                           (1 when no borrow), V = signed overflow
//   AND  Y = A & B
//   SLL  Y = A shifted left one bit, 0 into the LSB (B unused)
//   SRL  Y = A shifted right one bit, 0 into the MSB (B unused)
//   Z = (Y == 0), N = MSB of Y for every function.
// The five functions and the four condition codes are the lecture's. The FS
// encoding, C = V = 0 for AND and the shifts, and Y = 0 for unused FS codes
// are this design's own choices.
module alu
  import sc_pkg::fs_e, sc_pkg::flags_t,
         sc_pkg::FS_ADD, sc_pkg::FS_SUB, sc_pkg::FS_AND, sc_pkg::FS_SLL, sc_pkg::FS_SRL;
#(
  parameter int unsigned DATA_W = sc_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  fs_e               fs,
  output logic [DATA_W-1:0] y,
  output flags_t            flags
);

  logic [DATA_W:0] sum;  // DATA_W-bit sum plus carry out

  always_comb begin
    sum     = '0;
    y       = '0;
    flags.c = 1'b0;
    flags.v = 1'b0;
    unique case (fs)
      FS_ADD: begin
        sum     = {1'b0, a} + {1'b0, b};
        y       = sum[DATA_W-1:0];
        flags.c = sum[DATA_W];
        flags.v = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      FS_SUB: begin
        sum     = {1'b0, a} + {1'b0, ~b} + (DATA_W+1)'(1);
        y       = sum[DATA_W-1:0];
        flags.c = sum[DATA_W];
        flags.v = (a[DATA_W-1] != b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      FS_AND: y = a & b;
      FS_SLL: y = {a[DATA_W-2:0], 1'b0};
      FS_SRL: y = {1'b0, a[DATA_W-1:1]};
      default: y = '0;
    endcase
    flags.z = (y == '0);
    flags.n = y[DATA_W-1];
  end

endmodule
