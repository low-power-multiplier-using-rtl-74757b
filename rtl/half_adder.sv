// half_adder: one-bit half adder (2:2 counter), used in the reduction tree only where
// a column would otherwise exceed the row count of the next stage. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
