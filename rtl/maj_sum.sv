// Sum stage of the majority-logic adders.
//
// Once the carries are known, each sum bit is formed with two majority gates
// and two inverters, the classic majority-gate full adder with its carry gate
// already supplied by the carry network:
//   t_i = M(a_i, b_i, ~C_i),   s_i = M(~C_{i+1}, C_i, t_i).
// (If C_{i+1} = 1 then at least two of a_i, b_i, C_i are 1 and s_i = a_i & b_i
// & C_i; otherwise s_i = a_i | b_i | C_i; both equal a_i ^ b_i ^ C_i.) The
// source only names the three-gate, two-inverter full adder; using it for the
// sum stage is this design's choice, which keeps the whole adder in majority
// gates and inverters. The sum is ready two gate delays after the carries.
//
// Interface: a, b, and c[WIDTH:0] = C0..Cn in; s out. Combinational.
module maj_sum #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH:0]   c,
  output logic [WIDTH-1:0] s
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic t;
    maj_gate u_t (.x(a[i]),     .y(b[i]), .z(~c[i]), .m(t));
    maj_gate u_s (.x(~c[i+1]), .y(c[i]), .z(t),     .m(s[i]));
  end

endmodule
