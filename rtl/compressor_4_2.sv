// compressor_4_2: one-bit 4:2 compressor built from XOR/XNOR stages and
// multiplexers.
//
// It adds four bits of equal weight (x1..x4) and a carry-in (cin) and
// returns one bit of the same weight (sum) and two bits of double weight
// (cout, carry), so that x1+x2+x3+x4+cin = sum + 2*(cout + carry).
//   cout  = (x1^x2) ? x3  : x1
//   carry = (x1^x2^x3^x4) ? cin : x4
//   sum   = (x1^x2^x3^x4) ? ~cin : cin
// The XOR/XNOR pairs of (x1,x2) and (x3,x4) are formed first and serve as
// the multiplexer selects, so the selects are ready before the late data
// inputs (cin in particular) arrive. cout does not depend on cin, which is
// what lets a row of these cells pass cout to the next bit's cin without a
// ripple chain. The cout and carry equations and the XOR/XNOR-plus-MUX
// structure follow the document; the sum equation is written here as the
// multiplexer form of the five-input parity.
// Purely combinational, no clock.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic carry
);

  logic x12_xor, x12_xnor;   // XOR/XNOR of x1, x2
  logic x34_xor, x34_xnor;   // XOR/XNOR of x3, x4
  logic x1234;               // parity of the four inputs (MUX-TG stage)

  always_comb begin
    x12_xor  = x1 ^ x2;
    x12_xnor = ~x12_xor;
    x34_xor  = x3 ^ x4;
    x34_xnor = ~x34_xor;
    // Transmission-gate multiplexer: pick XOR or XNOR of (x3,x4) by the
    // XNOR of (x1,x2).
    x1234    = x12_xnor ? x34_xor : x34_xnor;
    cout     = x12_xor ? x3 : x1;
    sum      = x1234 ? ~cin : cin;
    carry    = x1234 ? cin : x4;
  end

endmodule
