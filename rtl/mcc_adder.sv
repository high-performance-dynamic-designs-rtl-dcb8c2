// mcc_adder - wide adder from cascaded double carry chain modules.
//
// WIDTH/8 copies of the 8-bit double carry chain module are chained, the
// carry out of each module feeding the carry in of the next (a ripple of
// 8-bit blocks). The document evaluates 8, 16, 32 and 64 bits; 64 is the
// default. Combinational; in the circuit the whole adder is one domino
// evaluation per clock period. The module chaining is the document's;
// WIDTH must be a multiple of 8.
module mcc_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned NMOD = WIDTH / 8;

  logic [NMOD:0] c;

  assign c[0] = cin;

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    mcc_dcc8 u_dcc (
      .a   (a[8*m +: 8]),
      .b   (b[8*m +: 8]),
      .cin (c[m]),
      .s   (s[8*m +: 8]),
      .cout(c[m+1]));
  end

  assign cout = c[NMOD];

  if (WIDTH % 8 != 0 || WIDTH == 0) begin : g_bad_width
    $error("mcc_adder: WIDTH must be a non-zero multiple of 8");
  end

endmodule
