// half_adder: adds two bits, giving a sum bit and a carry bit.
// sum = a ^ b, carry = a & b. Purely combinational. Used by the 2x2 Vedic
// multiplier, whose two adders the document draws as half adders.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
