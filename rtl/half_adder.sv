// half_adder: adds two bits. s = a xor b, c = a and b. Combinational.
// Used in the reduction stages, and in pairs inside the final adder (stage 4).
// The source design names half adders as building blocks; the gate form is
// the standard one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
