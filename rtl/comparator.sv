// comparator: behavioural model of the avalanche-sensing comparator. This is an
// analog block; the model is not synthesizable logic.
//
// compo is high while the non-inverting input (the APD anode) is above the
// inverting input (the reference Vref), and compo_b is its inverse, which the
// chip brings to a pad so that avalanches can be counted outside. The model is
// ideal: no offset, no hysteresis, no delay. The two outputs and the input
// connection follow the reference circuit; the ideal behaviour is a modelling
// choice, since the comparator's own circuit is not part of this design.
module comparator (
  input  real  vin_p,
  input  real  vin_n,
  output logic compo,
  output logic compo_b
);
  always_comb begin
    compo   = (vin_p > vin_n);
    compo_b = ~compo;
  end
endmodule
