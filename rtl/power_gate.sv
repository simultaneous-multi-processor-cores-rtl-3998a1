// power_gate: behavioural model of the power gate of one instructed resource.
//
// Not synthesizable logic but a model of a header power switch: while use_bit is
// high the instructed resource receives gated_power from the supply, and while
// it is low the resource's supply is switched off.  power and gated_power stand
// for supply rails, modelled as single bits (1 = rail up).  The switch takes
// T_ON time units to bring the rail up and T_OFF to drop it.  From the document:
// the power gate with inputs Power and Use bit and output Gated resource power
// (Fig. 7).  Own choices: the rail model and the switching delays.
module power_gate #(
  parameter int unsigned T_ON  = 1,
  parameter int unsigned T_OFF = 1
) (
  input  wire  power,
  input  wire  use_bit,
  output logic gated_power
);
  initial gated_power = 1'b0;

  always @(power or use_bit) begin
    if (power && use_bit) #(T_ON) gated_power = power && use_bit;
    else                  #(T_OFF) gated_power = power && use_bit;
  end
endmodule
