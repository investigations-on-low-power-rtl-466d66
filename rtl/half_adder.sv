// half_adder: one-bit half adder, s = a ^ b, c = a & b. Combinational.
// Building cell of the modified carry-save adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
