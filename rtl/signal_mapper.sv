// signal_mapper: multi-D signal set mapper of the 4D-8PSK code. The six code
// bits z5..z0 select a pair of 8PSK phases (in units of 45 degrees):
//   y1 = (z5, z3, z1)
//   y2 = (z5, z3, z1) + (z4, z2, z0)  mod 8
// The mod-8 adder for y2 is the structure of the mapper in Fig. 1; the bit
// taps are this design's reading, chosen so that a 45-degree rotation (+1 on
// both phases) changes z1 but not z0 or z2. Purely combinational.
module signal_mapper (
  input  logic [5:0] z,
  output logic [2:0] y1,
  output logic [2:0] y2
);
  assign y1 = {z[5], z[3], z[1]};
  assign y2 = {z[5], z[3], z[1]} + {z[4], z[2], z[0]};
endmodule
