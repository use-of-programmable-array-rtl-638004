// pal_and_or: the programmable AND array and fixed OR groups of a PAL.
//
// Every input column reaches every AND gate both as itself and inverted.
// Each of those crossings is a fuse: an intact fuse connects the column to
// the gate, a blown one leaves a plain crossover. An AND gate is therefore
// the product of the columns whose fuses are intact; a gate with every fuse
// blown is always true (the way a three-state enable term is tied on), and
// one with both fuses of any column intact is always false (how a PAL leaves
// the terms an equation does not use). The AND gates are grouped, TERMS to
// a group, into the fixed OR gates, one per output. ACTIVE_LOW inverts the
// OR outputs, as in the "L" devices (PAL14L8, PAL16L8).
//
// The fuse map is two flat vectors, FUSE_TRUE and FUSE_COMP, each holding
// N_OUT*TERMS product terms of N_IN bits: term t of output o starts at bit
// (o*TERMS + t)*N_IN, and bit i of a term is input column i. A 1 is an
// intact fuse. The defaults are the unprogrammed part of the two-input,
// two-gate, one-OR example: every fuse intact, output always low.
//
// Interface: in is the array's input columns, product the individual AND
// gate outputs (for three-state enables and for tests), out the OR outputs.
// The block is purely combinational: outputs follow inputs with no clock.
module pal_and_or #(
  parameter int unsigned N_IN       = 2,
  parameter int unsigned N_OUT      = 1,
  parameter int unsigned TERMS      = 2,
  parameter bit          ACTIVE_LOW = 1'b0,
  parameter logic [N_OUT*TERMS*N_IN-1:0] FUSE_TRUE = '1,
  parameter logic [N_OUT*TERMS*N_IN-1:0] FUSE_COMP = '1
) (
  input  logic [N_IN-1:0]        in,
  output logic [N_OUT*TERMS-1:0] product,
  output logic [N_OUT-1:0]       out
);

  // AND plane: a column contributes only where its fuse is intact.
  always_comb begin
    for (int unsigned p = 0; p < N_OUT*TERMS; p++) begin
      product[p] = &((in | ~FUSE_TRUE[p*N_IN +: N_IN]) &
                     (~in | ~FUSE_COMP[p*N_IN +: N_IN]));
    end
  end

  // Fixed OR plane, then the output polarity of the device.
  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) begin
      out[o] = (|product[o*TERMS +: TERMS]) ^ ACTIVE_LOW;
    end
  end

endmodule
