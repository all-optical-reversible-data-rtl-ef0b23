// beam_combiner -- Boolean model of an optical beam (power) combiner.
//
// N optical paths are merged into one fibre. Light leaves the combiner when
// any input carries light, so in the light-is-1 convention the output is the
// OR of the inputs. In the GLG network the combiner is fed product terms that
// are mutually exclusive, so at most one input is lit at a time and the
// output power equals a single input's power.
//
// Interface: beams[N-1:0] -> out. Combinational, no delay modelled.
// N = 3 matches the three-input combiners of the optical GLG; the OR model of
// a combiner is this design's choice.
module beam_combiner #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] beams,
  output logic         out
);

  always_comb out = |beams;

endmodule
