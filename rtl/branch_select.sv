// branch_select: chooses the branch condition MP with the BS field.
//
// Combinational 8-to-1 multiplexer over the ALU condition codes:
//   BS 000 -> 0 (never)   001 -> 1 (always)   010 -> Z    011 -> Z'
//   BS 100 -> N           101 -> N'           110 -> C    111 -> V
// MP = 1 makes the program counter take PC + SE(OFF) instead of PC + 1.
// The table is the lecture's.
module branch_select
  import sc_pkg::*;
(
  input  bs_e    bs,
  input  flags_t flags,
  output logic   mp
);

  always_comb begin
    unique case (bs)
      BS_NEVER:  mp = 1'b0;
      BS_ALWAYS: mp = 1'b1;
      BS_ZERO:   mp = flags.z;
      BS_NZERO:  mp = ~flags.z;
      BS_NEG:    mp = flags.n;
      BS_NNEG:   mp = ~flags.n;
      BS_CARRY:  mp = flags.c;
      BS_OVF:    mp = flags.v;
      default:   mp = 1'b0;
    endcase
  end

endmodule
