// mcc_sum - sum bits of the double carry chain adder module.
//
// With the new carries the conventional carry is c_{i-1} = t_{i-1} h_{i-1},
// so s_i = p_i xor c_{i-1} becomes a 2:1 multiplexer:
//   s_i = p_i                 when h_{i-1} = 0
//   s_i = p_i xor t_{i-1}     when h_{i-1} = 1      (i > 0)
//   s_0 = p_0 xor c_{-1}.
// Both data inputs are ready before h_{i-1}, so the multiplexer costs no
// more delay than the usual sum XOR. Static logic, as in the document.
// h_7 is accepted for a uniform interface and not used. Combinational.
module mcc_sum (
  input  logic [7:0] p,
  input  logic [7:0] t,
  input  logic [7:0] h,
  input  logic       cin,
  output logic [7:0] s
);

  always_comb begin
    s[0] = p[0] ^ cin;
    for (int i = 1; i < 8; i++)
      s[i] = h[i-1] ? (p[i] ^ t[i-1]) : p[i];
  end

endmodule
