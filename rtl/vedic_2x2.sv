// vedic_2x2: 2-bit by 2-bit Vedic (vertically and crosswise) multiplier.
//
// The four bit products are formed with AND gates. The vertical product
// a0&b0 is the least significant result bit s0. The two crosswise products
// a0&b1 and a1&b0 go into a half adder, whose sum is s1 and whose carry c1
// goes, with the second vertical product a1&b1, into a second half adder
// that yields s2 and the top bit c2. This is the structure the document
// draws; only the packing of the outputs into one vector is this design's.
//
// Interface: a = {a1,a0}, b = {b1,b0}, s = {c2,s2,s1,s0}.
// Purely combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);

  logic a0b0, a0b1, a1b0, a1b1;
  logic s1, c1, s2, c2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  half_adder ha_cross (.a(a0b1), .b(a1b0), .sum(s1), .carry(c1));
  half_adder ha_vert  (.a(a1b1), .b(c1),   .sum(s2), .carry(c2));

  assign s = {c2, s2, s1, a0b0};

endmodule
