// full_adder: exact 3:2 counter. s + 2*co = a + b + ci. Combinational.
// Used by reduction stages 2 and 3 and inside the approximate 5:2 compressor.
// The source design names full adders as building blocks; the gate form is
// the standard one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
