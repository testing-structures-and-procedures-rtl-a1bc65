// gtfe_trigger: fast-OR trigger of the GTFE64 with its daisy chain.
//
// The chip's trigger is a 65-input OR: one input per channel (the
// discriminator output, passed only where the trigger mask bit is 1) and
// one input for the trigger coming from the previous chip in the chain. The
// result is sent towards the controller the chip works with: on the right
// chain (input tri, output tro) when the control direction is right, on the
// left chain (input tli, output tlo) when it is left. The unused output is
// held at 0. The path is purely combinational, so a trigger ripples through
// the whole chain within the cycle, as a fast-OR does.
//
// From the document: the 65-input OR, the trigger mask, the direction
// choice and the daisy chain. Own choice: the idle output is driven 0.
module gtfe_trigger
  import gtfe_pkg::*;
(
  input  logic [NCH-1:0] disc,
  input  logic [NCH-1:0] trig_mask,
  input  gtfe_dir_e      dir,
  input  logic           tri_r,
  input  logic           tli_l,
  output logic           tro_r,
  output logic           tlo_l,
  output logic           local_or
);

  assign local_or = |(disc & trig_mask);

  always_comb begin
    tro_r = 1'b0;
    tlo_l = 1'b0;
    if (dir == DIR_RIGHT) tro_r = local_or | tri_r;
    else                  tlo_l = local_or | tli_l;
  end

endmodule
