// hybrid_full_adder -- one-bit full adder in the three-module hybrid form.
//
// The cell is split into three modules that share one intermediate node.
// Module 1 forms XNOR(a, b). Module 2 is a second XNOR of that node with the
// carry in, which gives the sum a ^ b ^ cin. Module 3 forms the carry out from
// the same node: when a and b are equal (XNOR = 1) the carry is their common
// value a, otherwise it is the incoming carry. The split into an XNOR-XNOR sum
// path and a separate carry module follows the hybrid adder structure of the
// design; writing Module 3 as a 2-to-1 selection is this design's choice, since
// only its function is fixed. The transistor-level circuit is not modelled.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module hybrid_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic xnor_ab;  // Module 1 output, shared by Modules 2 and 3

  always_comb begin
    xnor_ab = ~(a ^ b);           // Module 1: XNOR
    sum     = ~(xnor_ab ^ cin);   // Module 2: XNOR -> a ^ b ^ cin
    cout    = xnor_ab ? a : cin;  // Module 3: carry
  end

endmodule
