// ht_trigger: activation circuit of the link Hardware Trojan model.
//
// The Trojan watches four data bits W, X, Y, Z taken from the packets that
// pass it and is activated by a fixed combinational function of them. The
// method specifies a four-input combinational trigger; the function itself
// is left to the parameter TRUTH_TABLE (bit {W,X,Y,Z} of the table is the
// output for that input), so any four-input circuit can be modelled. The
// default, firing only when all four bits are 1, is this design's choice of
// a rarely met condition.
//
// Interface: w_i, x_i, y_i, z_i -> fire_o. Combinational, no latency.
module ht_trigger #(
  parameter logic [15:0] TRUTH_TABLE = 16'h8000
) (
  input  logic w_i,
  input  logic x_i,
  input  logic y_i,
  input  logic z_i,
  output logic fire_o
);

  always_comb fire_o = TRUTH_TABLE[{w_i, x_i, y_i, z_i}];

endmodule
