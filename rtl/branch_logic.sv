// branch_logic: produces PROGRAM_COUNTER_MUX (c2).
//
// c2 = JUMP | BRE & ZF | BRNE & ~ZF | BRG & ~ZF & (NF xnor OF) | BRGE & (NF xnor OF)
// where the five instruction lines come from the opcode decoder and ZF, NF,
// OF are the stored flags. (NF xnor OF) means "a - b >= 0" for signed numbers
// after a CMP or SUB, so BRG and BRGE are signed comparisons. The carry flag
// is not used: unsigned comparisons are not supported. Combinational.
//
// The equation follows the original design; that an unused branch sub-code
// raises no line is this design's choice (in control_unit).
module branch_logic
  import cpu_pkg::*;
(
  input  branch_lines_t br,
  input  flags_t        flags,
  output logic          c2
);
  logic ge;
  always_comb begin
    ge = ~(flags.negative ^ flags.overflow);
    c2 = br.jump
       | (br.bre  &  flags.zero)
       | (br.brne & ~flags.zero)
       | (br.brg  & ~flags.zero & ge)
       | (br.brge & ge);
  end
endmodule
