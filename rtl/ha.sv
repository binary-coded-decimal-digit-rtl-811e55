// ha: one-bit half adder. s = a xor b, c = a and b. Combinational.
module ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
