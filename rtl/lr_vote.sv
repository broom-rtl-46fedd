// lr_vote: bitwise majority vote over the three copies of a recycled cache
// line.  Line recycling joins three disabled lines whose faulty bits sit in
// different places; every bit is then correct in at least two of the three
// copies, so the majority restores the stored word.  Combinational.
module lr_vote #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
