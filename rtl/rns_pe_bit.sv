// rns_pe_bit: one-bit slice of the processing element (PE) that adds two
// residues modulo m.
//
// A modular addition is done as a binary addition, a subtraction of the
// modulus and a sign test: s = a + b, d = s - m, result = (d < 0) ? s : d.
// Each slice holds one full adder (bit of s), one full subtractor (bit of d)
// and the selecting multiplexer. The carry and borrow ripple from slice to
// slice along the row; the sign decision sel_sub is taken at the top of the
// row and fed back to every slice. The method asks for exactly these three
// operations (addition, subtraction, sign test); the ripple organisation is
// this implementation's choice.
//
// Purely combinational.
module rns_pe_bit (
  input  logic a,       // operand bit (data line)
  input  logic b,       // operand bit (own register R or accumulator A)
  input  logic m_bit,   // modulus bit of this slice
  input  logic c_in,    // carry of the addition from the slice below
  input  logic br_in,   // borrow of the subtraction from the slice below
  input  logic sel_sub, // 1: take s - m, 0: take s
  output logic c_out,
  output logic br_out,
  output logic r        // result bit
);
  logic s, d;

  always_comb begin
    s      = a ^ b ^ c_in;
    c_out  = (a & b) | (a & c_in) | (b & c_in);
    d      = s ^ m_bit ^ br_in;
    br_out = (~s & m_bit) | (~s & br_in) | (m_bit & br_in);
    r      = sel_sub ? d : s;
  end
endmodule
