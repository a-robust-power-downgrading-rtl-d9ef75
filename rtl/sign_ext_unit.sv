// sign_ext_unit: sign-extension (SE) unit of the MSP.
//
// While the MSP is closed its adder sees zero operands and a zero carry, so
// its pseudo-sum PS is zero; this unit then supplies the predicted MSP sum
// by OR-ing into PS the bit "sign and not close" on bits W-1..1 and
// carr-ctrl on bit 0. While the MSP is open, sign and carr-ctrl are 0 and
// PS passes unchanged. Combinational.
//
// Ports: ps (pseudo-sum), close, sign, carr_ctrl -> sum (MSP sum).
module sign_ext_unit #(
  parameter int unsigned W = rpdt_pkg::MSP_W_DEF
) (
  input  logic [W-1:0] ps,
  input  logic         close,
  input  logic         sign,
  input  logic         carr_ctrl,
  output logic [W-1:0] sum
);

  logic ext;

  always_comb begin
    ext      = sign & ~close;
    sum[W-1:1] = ps[W-1:1] | {(W-1){ext}};
    sum[0]     = ps[0] | carr_ctrl;
  end

endmodule
