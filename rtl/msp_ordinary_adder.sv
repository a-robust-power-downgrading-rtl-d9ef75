// msp_ordinary_adder: the ordinary W-bit binary adder of the MSP.
//
// Adds the two (isolated) MSP operands and the carry coming from the LSP.
// Its sum is the "pseudo-sum" PS that the sign-extension unit completes.
// It is written as a plain addition, leaving the adder architecture to
// synthesis. Combinational.
//
// Ports: a, b, cin -> ps (pseudo-sum), cout (carry out of the word).
module msp_ordinary_adder #(
  parameter int unsigned W = rpdt_pkg::MSP_W_DEF
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] ps,
  output logic         cout
);

  assign {cout, ps} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
